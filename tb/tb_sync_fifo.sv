// tb_sync_fifo: random test of the first-word-fall-through FIFO against a
// queue model: order, full and empty flags, ignored writes when full and reads
// when empty, flush, and the one-cycle write-to-output latency.
module tb_sync_fifo;
  localparam int W = 16, DEPTH = 8;
  logic clk, rst = 1'b1, flush = 1'b0, write = 1'b0, read = 1'b0;
  initial clk = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic full, empty;
  always #5 clk = ~clk;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int n_full = 0, n_flush = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // latency: a word written in one cycle is on dout in the next
    @(negedge clk); write = 1'b1; din = 16'hBEEF;
    @(negedge clk); write = 1'b0;
    check(!empty && dout == 16'hBEEF, "first word not visible one cycle after the write");
    read = 1'b1; @(negedge clk); read = 1'b0;
    check(empty, "FIFO not empty after reading its only word");
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) check(dout == model[0], "head word");
      if (full) n_full++;
      flush = ($urandom % 200) == 0;
      write = ($urandom % 2) == 1;
      read  = ($urandom % ((cyc / 500) % 2 == 0 ? 3 : 2)) == 0;
      din   = W'($urandom);
      begin
        automatic bit wr_ok = write && model.size() < DEPTH;
        automatic bit rd_ok = read && model.size() > 0;
        automatic logic [W-1:0] d = din;
        @(posedge clk);
        if (flush) begin model.delete(); n_flush++; end
        else begin
          if (rd_ok) void'(model.pop_front());
          if (wr_ok) model.push_back(d);
        end
      end
    end
    $display("full seen %0d times, %0d flushes", n_full, n_flush);
    check(n_full > 0 && n_flush > 0, "full and flush both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
