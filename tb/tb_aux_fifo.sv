// tb_aux_fifo: test of the AUX FIFO. A directed part stores a decrypted
// message, drains it in order (tag valid case), overflows it and flushes it
// (tag invalid case), checking the status bits {overflow, full, empty} at
// each step. A random part then drives all four control bits for 4000 cycles
// in phases that favour writing or reading, and compares dout and status
// every cycle with a queue model: flush empties and clears overflow, a write
// while full is dropped and sets overflow, a read while empty does nothing.
module tb_aux_fifo;
  localparam int W = 32, DEPTH = 16;
  logic clk, rst;
  logic [W-1:0] din, dout;
  logic [3:0]   ctrl;
  logic [2:0]   status;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  aux_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s (status=%b)", what, status); end
  endtask

  task automatic op(input logic [3:0] c, input logic [W-1:0] d);
    @(negedge clk); ctrl = c; din = d;
    @(negedge clk); ctrl = 4'b0000;
  endtask

  initial begin
    rst = 1'b1; ctrl = '0; din = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(status == 3'b001, "empty after reset");
    // store 10 words, then drain them in order
    for (int i = 0; i < 10; i++) op(4'b0001, 32'hA000_0000 + i);
    check(status == 3'b000, "neither empty nor full with 10 words");
    for (int i = 0; i < 10; i++) begin
      check(dout == 32'hA000_0000 + i, $sformatf("drained word %0d", i));
      op(4'b0010, '0);
    end
    check(status == 3'b001, "empty after draining");
    // fill, overflow, then flush
    for (int i = 0; i < DEPTH; i++) op(4'b0001, 32'hB000_0000 + i);
    check(status == 3'b010, "full after DEPTH writes");
    op(4'b0001, 32'hDEAD_BEEF);
    check(status == 3'b110, "overflow flagged on a write while full");
    check(dout == 32'hB000_0000, "head word kept on overflow");
    op(4'b0100, '0);
    check(status == 3'b001, "flush empties and clears overflow");
    // write and read in the same cycle keep the count
    op(4'b0001, 32'h1111_1111);
    op(4'b0011, 32'h2222_2222);
    check(dout == 32'h2222_2222 && status == 3'b000, "simultaneous read and write");
    op(4'b1010, '0);   // reserved bit 3 is ignored
    check(status == 3'b001, "read with the reserved bit set");

    // random part against a queue model
    begin
      automatic logic [W-1:0] q[$];
      automatic bit ovf = 1'b0;
      automatic int n_full = 0, n_ovf = 0, n_flush = 0;
      for (int cyc = 0; cyc < 4000; cyc++) begin
        automatic int wr_pct = ((cyc / 250) % 2 == 0) ? 80 : 25;
        @(negedge clk);
        checks++;
        if (status != {ovf, q.size() == DEPTH, q.size() == 0} ||
            (q.size() > 0 && dout != q[0])) begin
          failures++;
          $display("ERROR: cycle %0d status %b dout %h, model %b%b%b %h", cyc, status, dout,
                   ovf, q.size() == DEPTH, q.size() == 0, q.size() > 0 ? q[0] : '0);
        end
        ctrl[0] = ($urandom % 100) < wr_pct;
        ctrl[1] = ($urandom % 100) >= wr_pct;
        ctrl[2] = ($urandom % 200) == 0;
        ctrl[3] = 1'($urandom);
        din     = $urandom;
        // model of the clock edge that follows
        if (ctrl[2]) begin
          q.delete();
          ovf = 1'b0;
          n_flush++;
        end else begin
          automatic bit full_now = (q.size() == DEPTH);
          automatic bit empty_now = (q.size() == 0);
          if (ctrl[0] && full_now) begin ovf = 1'b1; n_ovf++; end
          if (full_now) n_full++;
          if (ctrl[1] && !empty_now) void'(q.pop_front());
          if (ctrl[0] && !full_now) q.push_back(din);
        end
      end
      @(negedge clk) ctrl = '0;
      check(n_full > 0 && n_ovf > 0 && n_flush > 0,
            $sformatf("random part reached full %0d, overflow %0d, flush %0d times",
                      n_full, n_ovf, n_flush));
    end
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
