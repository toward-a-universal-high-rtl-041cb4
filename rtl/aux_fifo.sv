// aux_fifo: the AUX FIFO of the AEAD, which holds decrypted output until the
// result of the tag check is known.
//
// The PostProcessor writes every word of a decryption's output here, then
// either drains it to the data output (tag valid) or flushes it (tag invalid),
// so no unauthenticated plaintext ever leaves the core. The port widths (din w,
// ctrl 4, dout w, status 3) follow the block diagram; what the bits mean is
// this design's choice:
//   ctrl[0] write, ctrl[1] read (pop the head word), ctrl[2] flush,
//   ctrl[3] reserved, ignored.
//   status[0] empty, status[1] full,
//   status[2] overflow: sticky, set by a write while full, cleared by flush.
// The FIFO is first-word-fall-through: dout is the head word while not empty.
module aux_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  input  logic [3:0]   ctrl,
  output logic [W-1:0] dout,
  output logic [2:0]   status
);
  logic full, empty, overflow;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) u_mem (
    .clk   (clk),
    .rst   (rst),
    .flush (ctrl[2]),
    .write (ctrl[0]),
    .din   (din),
    .full  (full),
    .read  (ctrl[1]),
    .dout  (dout),
    .empty (empty)
  );

  always_ff @(posedge clk) begin
    if (rst || ctrl[2])            overflow <= 1'b0;
    else if (ctrl[0] && full)      overflow <= 1'b1;
  end

  assign status = {overflow, full, empty};

endmodule
