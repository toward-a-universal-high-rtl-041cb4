// sync_fifo: single-clock first-word-fall-through FIFO.
//
// This is the Bypass FIFO of the AEAD and the storage inside the AUX FIFO.
// The head word is always on dout while empty is low; read pops it. A write
// while full and a read while empty are ignored. flush empties the FIFO in
// one cycle. The storage is a plain array, so a synthesis tool may map it to
// block RAM or registers. The port names (write, full, din, read, empty, dout)
// follow the Bypass FIFO of the block diagram; the depth, the flush input and
// the synchronous active-high reset are this design's choices.
//
// Timing: a word written in cycle t is visible on dout in cycle t+1.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         flush,
  input  logic         write,
  input  logic [W-1:0] din,
  output logic         full,
  input  logic         read,
  output logic [W-1:0] dout,
  output logic         empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;

  wire do_wr = write && !full;
  wire do_rd = read && !empty;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign dout  = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

endmodule
