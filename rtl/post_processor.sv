// post_processor: output side of the AEAD Core.
//
// It rebuilds the output stream from three sources: the Bypass FIFO (the
// instructions, segment headers, Npub and associated data, in input order),
// full output blocks from the CipherCore (bdo) and the computed tag.
// Instructions (ceil(24/G_W) words) and headers (ceil(32/G_W) words) are
// gathered from the Bypass FIFO before they are decoded; instructions other
// than Encrypt/Decrypt are dropped, as are the Npub and the Tag header of a
// decryption, which the output does not carry.
//   - Output blocks are loaded into a parallel-in/serial-out register; the
//     bytes beyond bdo_size are cleared on load, and the last word of a
//     segment is cut to the segment's length, so nothing but ciphertext or
//     plaintext leaves the core.
//   - Headers are copied with Message turned into Ciphertext (encryption) or
//     back (decryption). After the segment marked EOI of an encryption a Tag
//     segment (header and G_TAG_SIZE/G_W words) is appended, and the EOI bit of
//     the copied headers is cleared because the tag is now last.
//   - Every output word of a decryption goes to the AUX FIFO instead. When the
//     CipherCore reports msg_auth_done, the AUX FIFO is drained to the output
//     if msg_auth_valid was high, or flushed and replaced otherwise by one
//     header-sized error unit {ERR_CODE, Msg ID, 0...}. An AUX FIFO overflow
//     (the decrypted output did not fit) also gives the error unit.
// The list of functions and all port names come from the protocol and its
// block diagram; the output order (Npub, AD, ciphertext, tag for encryption;
// AD and message, or an error word, for decryption) follows its input/output
// figure. These are this design's choices: the error word, the AUX control
// and status bits (see aux_fifo; ctrl[3] is reserved and always driven 0), no status word after a successful
// operation, and that writes to the AUX FIFO never stall (an overflow is
// reported instead). The data output is called do_data, since do is a
// SystemVerilog keyword.
// Handshakes: do is valid/ready; the CipherCore may pulse bdo_write while
// bdo_ready is high (within an operation bdo_ready stays high until the write) and tag_write while tag_ready is high; msg_auth_done is a
// pulse, remembered until the decryption reaches it.
module post_processor
  import aead_pkg::*;
#(
  parameter int unsigned G_W        = 32,
  parameter int unsigned BLOCK_SIZE = 128,
  parameter int unsigned G_TAG_SIZE = 128,
  localparam int unsigned G_BS_BYTES = $clog2(BLOCK_SIZE/8)
) (
  input  logic                  clk,
  input  logic                  rst,
  // CipherCore
  input  logic [BLOCK_SIZE-1:0] bdo_data,
  input  logic [G_TAG_SIZE-1:0] tag_data,
  output logic                  bdo_ready,
  input  logic                  bdo_write,
  input  logic [G_BS_BYTES:0]   bdo_size,
  output logic                  tag_ready,
  input  logic                  tag_write,
  input  logic                  msg_auth_valid,
  input  logic                  msg_auth_done,
  // data output
  output logic [G_W-1:0]        do_data,
  output logic                  do_valid,
  input  logic                  do_ready,
  // Bypass FIFO
  output logic                  bypass_rd,
  input  logic                  bypass_empty,
  input  logic [G_W-1:0]        bypass_data,
  // AUX FIFO
  output logic [G_W-1:0]        aux_fifo_din,
  output logic [3:0]            aux_fifo_ctrl,
  input  logic [G_W-1:0]        aux_fifo_dout,
  input  logic [2:0]            aux_fifo_status
);
  localparam int unsigned WB = G_W / 8;
  localparam int unsigned NW = BLOCK_SIZE / G_W;
  localparam int unsigned NT = G_TAG_SIZE / G_W;
  localparam int unsigned IW = (NW > 1) ? $clog2(NW) : 1;
  localparam int unsigned TW = (NT > 1) ? $clog2(NT) : 1;
  // instructions and headers take ceil(bits / w) words, starting from the MSB
  localparam int unsigned INST_WORDS = (24 + G_W - 1) / G_W;
  localparam int unsigned HDR_WORDS  = (16 + SEGLEN_W + G_W - 1) / G_W;
  localparam int unsigned INST_BITS  = INST_WORDS * G_W;
  localparam int unsigned HDR_BITS   = HDR_WORDS * G_W;
  localparam int unsigned GB = (INST_BITS > HDR_BITS) ? INST_BITS : HDR_BITS;

  typedef enum logic [3:0] {
    P_INST, P_HDR, P_OUT_HDR, P_PASS, P_SKIP, P_BDO, P_TAG, P_TAG_HDR,
    P_TAG_DATA, P_TAG_SKIP, P_AUTH, P_DRAIN, P_ERR
  } state_e;

  state_e state;

  logic                  decrypt;
  logic [7:0]            msg_id;
  logic [HDR_BITS-1:0]   hdr;
  logic [GB-1:0]         gat;    // words of an instruction or header so far
  logic [2:0]            gcnt;   // words gathered or sent of the current one
  logic [SEGLEN_W-1:0]   bytes_left;
  logic                  auth_seen, auth_ok;

  logic [BLOCK_SIZE-1:0] piso;
  logic                  piso_valid;
  logic [IW-1:0]         piso_idx;
  logic [IW:0]           piso_nw;
  logic [G_TAG_SIZE-1:0] tag_reg;
  logic [TW-1:0]         tag_idx;

  wire aux_empty    = aux_fifo_status[0];
  wire aux_overflow = aux_fifo_status[2];

  wire [GB-1:0]       asm       = GB'({gat, bypass_data});
  wire                inst_last = (gcnt == 3'(INST_WORDS - 1));
  wire                hdr_last  = (gcnt == 3'(HDR_WORDS - 1));
  wire [3:0]          hdr_type  = hdr[HDR_BITS-9 -: 4];
  wire                hdr_eoi   = hdr[HDR_BITS-15];
  wire [SEGLEN_W-1:0] hdr_len   = hdr[SEGLEN_W-1:0];
  wire [SEGLEN_W-1:0] nbytes   = (bytes_left < SEGLEN_W'(WB)) ? bytes_left : SEGLEN_W'(WB);
  wire                seg_end  = (bytes_left == nbytes);

  function automatic logic [G_W-1:0] keep_bytes(input logic [G_W-1:0] w,
                                                input logic [SEGLEN_W-1:0] n);
    logic [G_W-1:0] r;
    for (int i = 0; i < int'(WB); i++)
      r[G_W-1-8*i -: 8] = (SEGLEN_W'(i) < n) ? w[G_W-1-8*i -: 8] : 8'h00;
    return r;
  endfunction

  // clear the bytes of an output block beyond its size
  function automatic logic [BLOCK_SIZE-1:0] clear_tail(input logic [BLOCK_SIZE-1:0] b,
                                                       input logic [G_BS_BYTES:0] n);
    logic [BLOCK_SIZE-1:0] r;
    for (int i = 0; i < BLOCK_SIZE/8; i++)
      r[BLOCK_SIZE-1-8*i -: 8] = ((G_BS_BYTES+1)'(i) < n) ? b[BLOCK_SIZE-1-8*i -: 8] : 8'h00;
    return r;
  endfunction

  // the header as it appears on the output
  function automatic logic [HDR_BITS-1:0] out_header(input logic [HDR_BITS-1:0] h,
                                                     input logic dec);
    logic [HDR_BITS-1:0] r;
    r = h;
    if (h[HDR_BITS-9 -: 4] == ST_MSG)     r[HDR_BITS-9 -: 4] = ST_CT;
    else if (h[HDR_BITS-9 -: 4] == ST_CT) r[HDR_BITS-9 -: 4] = ST_MSG;
    if (!dec) r[HDR_BITS-15] = 1'b0;
    return r;
  endfunction

  // the generated Tag header, and the error indication, both header sized
  wire [HDR_BITS-1:0] tag_hdr  = {msg_id, ST_TAG, 4'b0011, {(HDR_BITS-16){1'b0}}}
                                 | HDR_BITS'(G_TAG_SIZE/8);
  wire [HDR_BITS-1:0] err_word = {ERR_CODE, msg_id, {(HDR_BITS-16){1'b0}}};
  wire [HDR_BITS-1:0] hdr_out  = out_header(hdr, decrypt);

  // the word offered in this cycle, and where it goes
  logic           emit_valid;
  logic [G_W-1:0] emit_word;
  logic           to_aux, emit_fire;

  always_comb begin
    emit_valid = 1'b0;
    emit_word  = '0;
    unique case (state)
      P_OUT_HDR:  begin emit_valid = 1'b1;        emit_word = hdr_out[HDR_BITS-1-G_W*int'(gcnt) -: G_W]; end
      P_PASS:     begin emit_valid = !bypass_empty; emit_word = keep_bytes(bypass_data, nbytes); end
      P_BDO:      begin emit_valid = piso_valid;
                        emit_word  = keep_bytes(piso[BLOCK_SIZE-1-G_W*int'(piso_idx) -: G_W], nbytes); end
      P_TAG_HDR:  begin emit_valid = 1'b1;        emit_word = tag_hdr[HDR_BITS-1-G_W*int'(gcnt) -: G_W]; end
      P_TAG_DATA: begin emit_valid = 1'b1;        emit_word = tag_reg[G_TAG_SIZE-1-G_W*int'(tag_idx) -: G_W]; end
      P_DRAIN:    begin emit_valid = !aux_empty;  emit_word = aux_fifo_dout; end
      P_ERR:      begin emit_valid = 1'b1;        emit_word = err_word[HDR_BITS-1-G_W*int'(gcnt) -: G_W]; end
      default: ;
    endcase
    to_aux    = decrypt && (state != P_DRAIN) && (state != P_ERR);
    emit_fire = emit_valid && (to_aux || do_ready);
  end

  assign do_valid = emit_valid && !to_aux;
  assign do_data  = emit_word;

  assign aux_fifo_din  = emit_word;
  assign aux_fifo_ctrl = {1'b0,
                          (state == P_AUTH) && auth_seen && !(auth_ok && !aux_overflow),
                          (state == P_DRAIN) && emit_fire,
                          emit_valid && to_aux};

  assign bypass_rd = ((state == P_INST) || (state == P_HDR) || (state == P_SKIP) ||
                      (state == P_TAG_SKIP) || (state == P_PASS && emit_fire))
                     && !bypass_empty;

  // within an operation bdo_ready does not fall again before bdo_write, so a
  // core may answer it a cycle late; a block taken in P_SKIP waits in the register
  assign bdo_ready = !piso_valid &&
                     ((state == P_HDR) || (state == P_OUT_HDR) || (state == P_PASS) ||
                      (state == P_SKIP) || (state == P_BDO));
  assign tag_ready = (state == P_TAG);

  function automatic state_e after_segment(input logic eoi, input logic dec);
    if (eoi) return dec ? P_TAG_SKIP : P_TAG;
    return P_HDR;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= P_INST;
      decrypt    <= 1'b0;
      msg_id     <= '0;
      hdr        <= '0;
      gat        <= '0;
      gcnt       <= '0;
      bytes_left <= '0;
      auth_seen  <= 1'b0;
      auth_ok    <= 1'b0;
      piso       <= '0;
      piso_valid <= 1'b0;
      piso_idx   <= '0;
      piso_nw    <= '0;
      tag_reg    <= '0;
      tag_idx    <= '0;
    end else begin
      if (msg_auth_done) begin
        auth_seen <= 1'b1;
        auth_ok   <= msg_auth_valid;
      end

      if (bdo_write && bdo_ready && bdo_size != '0) begin
        piso       <= clear_tail(bdo_data, bdo_size);
        piso_valid <= 1'b1;
        piso_idx   <= '0;
        piso_nw    <= (IW+1)'((bdo_size + (G_BS_BYTES+1)'(WB - 1)) / (G_BS_BYTES+1)'(WB));
      end

      unique case (state)
        P_INST: if (!bypass_empty && !inst_last) begin
          gat  <= asm;
          gcnt <= gcnt + 1'b1;
        end else if (!bypass_empty) begin
          // instructions other than encrypt/decrypt are dropped
          gcnt    <= '0;
          decrypt <= (asm[INST_BITS-13 -: 4] == OP_DEC);
          msg_id  <= asm[INST_BITS-1 -: 8];
          if (asm[INST_BITS-13 -: 4] == OP_ENC || asm[INST_BITS-13 -: 4] == OP_DEC)
            state <= P_HDR;
        end

        P_HDR: if (!bypass_empty && !hdr_last) begin
          gat  <= asm;
          gcnt <= gcnt + 1'b1;
        end else if (!bypass_empty) begin
          gcnt       <= '0;
          hdr        <= asm[HDR_BITS-1:0];
          bytes_left <= asm[SEGLEN_W-1:0];
          // the Npub of a decryption is not part of the output
          if (asm[HDR_BITS-9 -: 4] == ST_NPUB && decrypt)
            state <= (asm[SEGLEN_W-1:0] == '0) ? after_segment(asm[HDR_BITS-15], 1'b1) : P_SKIP;
          else
            state <= P_OUT_HDR;
        end

        P_OUT_HDR: if (emit_fire && !hdr_last) begin
          gcnt <= gcnt + 1'b1;
        end else if (emit_fire) begin
          gcnt <= '0;
          if (hdr_len == '0)
            state <= after_segment(hdr_eoi, decrypt);
          else if (hdr_type == ST_MSG || hdr_type == ST_CT)
            state <= P_BDO;
          else
            state <= P_PASS;
        end

        P_SKIP: if (!bypass_empty) begin
          bytes_left <= bytes_left - nbytes;
          if (seg_end) state <= after_segment(hdr_eoi, decrypt);
        end

        // the Tag header of a decryption is dropped
        P_TAG_SKIP: if (!bypass_empty) begin
          gcnt <= gcnt + 1'b1;
          if (hdr_last) begin
            gcnt  <= '0;
            state <= P_AUTH;
          end
        end

        P_PASS: if (emit_fire) begin
          bytes_left <= bytes_left - nbytes;
          if (seg_end) state <= after_segment(hdr_eoi, decrypt);
        end

        P_BDO: if (emit_fire) begin
          bytes_left <= bytes_left - nbytes;
          piso_idx   <= piso_idx + 1'b1;
          if ((IW+1)'(piso_idx) + 1'b1 == piso_nw || (seg_end && hdr_eoi))
            piso_valid <= 1'b0;
          if (seg_end) state <= after_segment(hdr_eoi, decrypt);
        end

        P_TAG: if (tag_write) begin
          tag_reg <= tag_data;
          state   <= P_TAG_HDR;
        end

        P_TAG_HDR: if (emit_fire) begin
          gcnt <= gcnt + 1'b1;
          if (hdr_last) begin
            gcnt    <= '0;
            tag_idx <= '0;
            state   <= P_TAG_DATA;
          end
        end

        P_TAG_DATA: if (emit_fire) begin
          tag_idx <= tag_idx + 1'b1;
          if (tag_idx == TW'(NT - 1)) state <= P_INST;
        end

        P_AUTH: if (auth_seen) begin
          auth_seen <= msg_auth_done;
          state     <= (auth_ok && !aux_overflow) ? P_DRAIN : P_ERR;
        end

        P_DRAIN: if (aux_empty) state <= P_INST;

        P_ERR: if (emit_fire) begin
          gcnt <= gcnt + 1'b1;
          if (hdr_last) begin
            gcnt  <= '0;
            state <= P_INST;
          end
        end

        default: state <= P_INST;
      endcase
    end
  end

  // the CipherCore writes a block only when the PostProcessor can take it
  assert property (@(posedge clk) disable iff (rst) bdo_write |-> bdo_ready)
    else $error("post_processor: bdo_write while not ready, state %s", state.name());

endmodule
