// tb_aead_widths: the AEAD unit end to end at external bus widths of 8, 16,
// 64 and 128 bits (tb_aead covers 32). Each width runs in its own
// aead_width_env, in parallel on one clock: multi-word instructions and
// headers at 8 and 16 bits, a whole header in one word at 64, and a whole
// block in one word at 128. The result is the sum of the four environments.
module tb_aead_widths;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done8, done16, done64, done128;
  int   c8, c16, c64, c128, f8, f16, f64, f128;
  int   checks, failures;

  aead_width_env #(.W(8))   u_w8   (.clk, .done(done8),   .checks(c8),   .failures(f8));
  aead_width_env #(.W(16))  u_w16  (.clk, .done(done16),  .checks(c16),  .failures(f16));
  aead_width_env #(.W(64))  u_w64  (.clk, .done(done64),  .checks(c64),  .failures(f64));
  aead_width_env #(.W(128)) u_w128 (.clk, .done(done128), .checks(c128), .failures(f128));

  initial begin
    wait (done8 && done16 && done64 && done128);
    checks   = c8 + c16 + c64 + c128;
    failures = f8 + f16 + f64 + f128;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    $display("ERROR: watchdog, done w8=%b w16=%b w64=%b w128=%b", done8, done16, done64, done128);
    checks   = c8 + c16 + c64 + c128;
    failures = f8 + f16 + f64 + f128 + 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
