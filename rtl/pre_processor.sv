// pre_processor: input side of the AEAD Core.
//
// It turns the two word streams of the AEAD interface into the full-block
// interface of a CipherCore. On the public data input (PDI) it parses
// instructions and segment headers; on the secret data input (SDI) it loads
// keys. Data words are collected serial-in/parallel-out into a block register
// of BLOCK_SIZE bits, the unused bytes of the last block of a segment type are
// cleared (zero padding; algorithm-specific padding is left to the CipherCore,
// which gets the byte count on bdi_size), and the bytes still to come in the
// current segment are tracked. Every word of every PDI instruction and segment
// header, the Npub and all associated data are also written to the Bypass
// FIFO, whose data input is the PDI bus itself; the PostProcessor rebuilds the
// output from them and drops what the output does not carry.
//
// Protocol handled (word = G_W bits, first byte in the MSBs). An instruction
// (24 bits) takes ceil(24/G_W) words and a segment header (Msg ID, Info and a
// 16-bit length) ceil(32/G_W) words, both read from the MSB of the first word
// on; the words are gathered before the fields are decoded. G_W and G_SW may
// be 8 to BLOCK_SIZE bits and must divide BLOCK_SIZE and KEY_SIZE.
//   PDI: Activate Key instruction; or an Encrypt/Decrypt instruction followed
//        by an Npub segment, AD segments, Message (encrypt) or Ciphertext
//        (decrypt) segments and, for decryption, a Tag segment.
//   SDI: on Activate Key, a Load Key instruction, a Key header and the key,
//        optionally followed by an Nsec header and the Nsec.
// The functions (header parsing, key loading and activation, SIPO, padding,
// byte counting) and the CipherCore-side port names come from the protocol
// and its block diagram. These are this design's choices:
//   - Activate Key on PDI makes the unit read the next key from SDI; Key ID is
//     ignored (one key register).
//   - A block never mixes two data types; a segment with EOT=0 must be a
//     multiple of G_W/8 bytes long, so the next segment of that type keeps
//     filling the same block.
//   - bdi_size is the byte count modulo the block size: 0 is a full block, or
//     no data at all when bdi_nodata is high. A block of size 0 with
//     bdi_nodata and bdi_eoi is sent when the input ends without a data block
//     carrying EOI (e.g. empty AD and empty message).
//   - The EOI bit of a Tag header is ignored; EOI of data segments marks the
//     last data block.
//   - On SDI, a Key header with EOI=0 announces an Nsec segment after the key
//     (the secret input format shows Key then Nsec). Once the key has been
//     taken, the Nsec is collected into the block register and handed over
//     as blocks with bdi_nsec high (bdi_eot on the last, bdi_size as for
//     data); a non-final Nsec word must be whole.
//   - len_a/len_d count AD/data bytes received so far in the operation.
// Handshakes: pdi/sdi are valid/ready (a word moves when both are high);
// bdi_ready is high while a block waits, and the CipherCore pulses bdi_read to
// take it; key_needs_update stays high until key_updated. A header is taken
// only once the previous block has been read.
module pre_processor
  import aead_pkg::*;
#(
  parameter int unsigned G_W         = 32,
  parameter int unsigned G_SW        = 32,
  parameter int unsigned KEY_SIZE    = 128,
  parameter int unsigned BLOCK_SIZE  = 128,
  parameter int unsigned IV_SIZE     = 128,
  parameter int unsigned G_TAG_SIZE  = 128,
  parameter int unsigned CTR_AD_SIZE = 32,
  parameter int unsigned CTR_D_SIZE  = 32,
  localparam int unsigned G_BS_BYTES = $clog2(BLOCK_SIZE/8)
) (
  input  logic                   clk,
  input  logic                   rst,
  // public data input
  input  logic [G_W-1:0]         pdi,
  input  logic                   pdi_valid,
  output logic                   pdi_ready,
  // secret data input
  input  logic [G_SW-1:0]        sdi,
  input  logic                   sdi_valid,
  output logic                   sdi_ready,
  // CipherCore datapath
  output logic [KEY_SIZE-1:0]    key,
  output logic [BLOCK_SIZE-1:0]  bdi,
  output logic [IV_SIZE-1:0]     iv,
  output logic [G_TAG_SIZE-1:0]  exp_tag,
  output logic [CTR_AD_SIZE-1:0] len_a,
  output logic [CTR_D_SIZE-1:0]  len_d,
  // CipherCore controller
  input  logic                   key_updated,
  output logic                   key_needs_update,
  output logic                   key_ready,
  output logic                   iv_ready,
  output logic                   bdi_ready,
  output logic                   bdi_proc,
  output logic                   bdi_ad,
  output logic                   bdi_nsec,
  output logic                   bdi_decrypt,
  output logic                   bdi_eot,
  output logic                   bdi_eoi,
  output logic                   bdi_nodata,
  input  logic                   bdi_read,
  output logic [G_BS_BYTES-1:0]  bdi_size,
  output logic                   exp_tag_ready,
  input  logic                   msg_auth_done,
  // Bypass FIFO (its din is pdi)
  input  logic                   bypass_full,
  output logic                   bypass_wr
);
  localparam int unsigned WB = G_W / 8;            // bytes per PDI word
  localparam int unsigned SWB = G_SW / 8;          // bytes per SDI word
  localparam int unsigned NW = BLOCK_SIZE / G_W;   // words per block
  localparam int unsigned IW = (NW > 1) ? $clog2(NW) : 1;
  // instructions and headers take ceil(bits / w) words, starting from the MSB
  localparam int unsigned INST_WORDS  = (24 + G_W - 1) / G_W;
  localparam int unsigned HDR_WORDS   = (16 + SEGLEN_W + G_W - 1) / G_W;
  localparam int unsigned SINST_WORDS = (24 + G_SW - 1) / G_SW;
  localparam int unsigned SHDR_WORDS  = (16 + SEGLEN_W + G_SW - 1) / G_SW;
  localparam int unsigned INST_BITS   = INST_WORDS * G_W;
  localparam int unsigned HDR_BITS    = HDR_WORDS * G_W;
  localparam int unsigned SINST_BITS  = SINST_WORDS * G_SW;
  localparam int unsigned SHDR_BITS   = SHDR_WORDS * G_SW;
  localparam int unsigned GB  = (INST_BITS > HDR_BITS) ? INST_BITS : HDR_BITS;
  localparam int unsigned SGB = (SINST_BITS > SHDR_BITS) ? SINST_BITS : SHDR_BITS;

  // the width and size rules of this design, checked when it is elaborated
  if (G_W < 8 || G_W % 8 != 0 || BLOCK_SIZE % G_W != 0 || IV_SIZE % G_W != 0 ||
      G_TAG_SIZE % G_W != 0 || G_SW < 8 || G_SW % 8 != 0 || KEY_SIZE % G_SW != 0 ||
      BLOCK_SIZE % G_SW != 0 || (BLOCK_SIZE / 8) != (1 << G_BS_BYTES)) begin : g_bad_size
    $error("pre_processor: G_W/G_SW must be whole bytes dividing the block, key, Npub and tag, and BLOCK_SIZE/8 a power of two");
  end

  typedef enum logic [3:0] {
    S_INST, S_SDI_INST, S_SDI_HDR, S_SDI_KEY, S_KEY_UPD, S_SDI_NHDR, S_SDI_NSEC,
    S_HDR, S_NPUB, S_DATA, S_NODATA, S_TAG, S_AUTH, S_FLUSH
  } state_e;

  state_e state;

  // current segment
  logic [3:0]          seg_type;
  logic                seg_eoi, seg_eot;
  logic [SEGLEN_W-1:0] bytes_left;
  logic                decrypt, eoi_sent;

  // block register
  logic [IW-1:0]         widx;
  logic [G_BS_BYTES:0]   blk_bytes;
  logic                  blk_valid, blk_ad, blk_eot, blk_eoi, blk_nodata, blk_dec, blk_nsec;

  logic key_valid, key_pend;
  logic nsec_next;   // the Key header had EOI = 0: an Nsec segment follows on SDI

  // multi-word instructions and headers are gathered here, first word on top
  logic [GB-1:0]  gat;
  logic [SGB-1:0] sgat;
  logic [2:0]     gcnt;
  wire  [GB-1:0]  asm  = GB'({gat, pdi});
  wire  [SGB-1:0] sasm = SGB'({sgat, sdi});
  wire            inst_last  = (gcnt == 3'(INST_WORDS - 1));
  wire            hdr_last   = (gcnt == 3'(HDR_WORDS - 1));
  wire            sinst_last = (gcnt == 3'(SINST_WORDS - 1));
  wire            shdr_last  = (gcnt == 3'(SHDR_WORDS - 1));

  // fields of the instruction or header completed by the word on PDI/SDI
  wire [3:0]          inst_op  = asm[INST_BITS-13 -: 4];
  wire [3:0]          hdr_type = asm[HDR_BITS-9 -: 4];
  wire                hdr_eoi  = asm[HDR_BITS-15];
  wire                hdr_eot  = asm[HDR_BITS-16];
  wire [SEGLEN_W-1:0] hdr_len  = asm[SEGLEN_W-1:0];
  wire [3:0]          sdi_op   = sasm[SINST_BITS-13 -: 4];
  wire [SEGLEN_W-1:0] sdi_len  = sasm[SEGLEN_W-1:0];
  wire                sdi_eoi  = sasm[SHDR_BITS-15];

  // bytes of the current SDI word that belong to the Nsec segment
  wire [SEGLEN_W-1:0] snbytes  = (bytes_left < SEGLEN_W'(SWB)) ? bytes_left : SEGLEN_W'(SWB);
  wire                sseg_end = (bytes_left == snbytes);

  wire is_encdec = (inst_op == OP_ENC) || (inst_op == OP_DEC);
  wire is_data   = (hdr_type == ST_AD) || (hdr_type == ST_MSG) || (hdr_type == ST_CT);

  // bytes of the current word that belong to the segment
  wire [SEGLEN_W-1:0] nbytes  = (bytes_left < SEGLEN_W'(WB)) ? bytes_left : SEGLEN_W'(WB);
  wire                seg_end = (bytes_left == nbytes);

  wire pdi_fire = pdi_valid && pdi_ready;
  wire sdi_fire = sdi_valid && sdi_ready;

  // keep the first n bytes (from the MSB) of a word, clear the rest
  function automatic logic [G_W-1:0] keep_bytes(input logic [G_W-1:0] w,
                                                input logic [SEGLEN_W-1:0] n);
    logic [G_W-1:0] r;
    for (int i = 0; i < int'(WB); i++)
      r[G_W-1-8*i -: 8] = (SEGLEN_W'(i) < n) ? w[G_W-1-8*i -: 8] : 8'h00;
    return r;
  endfunction

  function automatic logic [G_SW-1:0] keep_sbytes(input logic [G_SW-1:0] w,
                                                  input logic [SEGLEN_W-1:0] n);
    logic [G_SW-1:0] r;
    for (int i = 0; i < int'(SWB); i++)
      r[G_SW-1-8*i -: 8] = (SEGLEN_W'(i) < n) ? w[G_SW-1-8*i -: 8] : 8'h00;
    return r;
  endfunction

  // where to go once a segment's data has all been received
  function automatic state_e after_segment(input logic [3:0] t, input logic eoi,
                                           input logic dec);
    if (t == ST_TAG) return S_AUTH;
    if (eoi)         return dec ? S_HDR : S_FLUSH;
    return S_HDR;
  endfunction

  // every instruction and header word, Npub and AD go to the Bypass FIFO;
  // the PostProcessor drops what it does not output
  always_comb begin
    pdi_ready = 1'b0;
    bypass_wr = 1'b0;
    unique case (state)
      S_INST:  pdi_ready = !bypass_full;
      S_HDR:   pdi_ready = !blk_valid && !bypass_full;
      S_NPUB:  pdi_ready = !bypass_full;
      S_DATA:  pdi_ready = !blk_valid && !(seg_type == ST_AD && bypass_full);
      S_TAG:   pdi_ready = 1'b1;
      default: pdi_ready = 1'b0;
    endcase
    bypass_wr = pdi_valid && pdi_ready &&
                ((state == S_INST) || (state == S_HDR) || (state == S_NPUB) ||
                 (state == S_DATA && seg_type == ST_AD));
  end

  assign sdi_ready = (state == S_SDI_INST) || (state == S_SDI_HDR) || (state == S_SDI_KEY) ||
                     (state == S_SDI_NHDR) || (state == S_SDI_NSEC && !blk_valid);

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_INST;
      seg_type      <= '0;
      seg_eoi       <= 1'b0;
      seg_eot       <= 1'b0;
      bytes_left    <= '0;
      decrypt       <= 1'b0;
      eoi_sent      <= 1'b0;
      widx          <= '0;
      blk_bytes     <= '0;
      blk_valid     <= 1'b0;
      blk_ad        <= 1'b0;
      blk_eot       <= 1'b0;
      blk_eoi       <= 1'b0;
      blk_nodata    <= 1'b0;
      blk_dec       <= 1'b0;
      blk_nsec      <= 1'b0;
      nsec_next     <= 1'b0;
      bdi           <= '0;
      key           <= '0;
      iv            <= '0;
      exp_tag       <= '0;
      len_a         <= '0;
      len_d         <= '0;
      key_valid     <= 1'b0;
      key_pend      <= 1'b0;
      iv_ready      <= 1'b0;
      exp_tag_ready <= 1'b0;
      bdi_proc      <= 1'b0;
      gat           <= '0;
      sgat          <= '0;
      gcnt          <= '0;
    end else begin
      // the CipherCore takes the waiting block; the register is cleared so
      // that the next partial block comes out zero padded
      if (blk_valid && bdi_read) begin
        blk_valid <= 1'b0;
        blk_nsec  <= 1'b0;
        bdi       <= '0;
        widx      <= '0;
        blk_bytes <= '0;
      end

      unique case (state)
        S_INST: if (pdi_fire && !inst_last) begin
          gat  <= asm;
          gcnt <= gcnt + 1'b1;
        end else if (pdi_fire) begin
          gcnt <= '0;
          if (inst_op == OP_ACTKEY) begin
            state <= S_SDI_INST;
          end else if (is_encdec) begin
            decrypt  <= (inst_op == OP_DEC);
            eoi_sent <= 1'b0;
            len_a    <= '0;
            len_d    <= '0;
            bdi_proc <= 1'b1;
            state    <= S_HDR;
          end
        end

        S_SDI_INST: if (sdi_fire && !sinst_last) begin
          sgat <= sasm;
          gcnt <= gcnt + 1'b1;
        end else if (sdi_fire) begin
          gcnt <= '0;
          if (sdi_op == OP_LDKEY) state <= S_SDI_HDR;
        end

        S_SDI_HDR: if (sdi_fire && !shdr_last) begin
          sgat <= sasm;
          gcnt <= gcnt + 1'b1;
        end else if (sdi_fire) begin
          gcnt       <= '0;
          bytes_left <= sdi_len;
          nsec_next  <= !sdi_eoi;
          state      <= (sdi_len == '0) ? S_KEY_UPD : S_SDI_KEY;
        end

        S_SDI_KEY: if (sdi_fire) begin
          key        <= KEY_SIZE'({key, sdi});
          bytes_left <= bytes_left - ((bytes_left < SEGLEN_W'(G_SW/8)) ? bytes_left
                                                                     : SEGLEN_W'(G_SW/8));
          if (bytes_left <= SEGLEN_W'(G_SW/8)) begin
            key_pend <= 1'b1;
            state    <= S_KEY_UPD;
          end
        end

        S_KEY_UPD: begin
          key_pend <= 1'b1;
          if (key_pend && key_updated) begin
            key_pend  <= 1'b0;
            key_valid <= 1'b1;
            state     <= nsec_next ? S_SDI_NHDR : S_INST;
          end
        end

        S_SDI_NHDR: if (sdi_fire && !shdr_last) begin
          sgat <= sasm;
          gcnt <= gcnt + 1'b1;
        end else if (sdi_fire) begin
          gcnt       <= '0;
          nsec_next  <= 1'b0;
          bytes_left <= sdi_len;
          state      <= (sdi_len == '0) ? S_INST : S_SDI_NSEC;
        end

        // Nsec is collected like data and handed over in blocks marked bdi_nsec
        S_SDI_NSEC: if (sdi_fire) begin
          bdi[BLOCK_SIZE-1-8*int'(blk_bytes) -: G_SW] <= keep_sbytes(sdi, snbytes);
          blk_bytes  <= blk_bytes + (G_BS_BYTES+1)'(snbytes);
          bytes_left <= bytes_left - snbytes;
          if (blk_bytes + (G_BS_BYTES+1)'(snbytes) == (G_BS_BYTES+1)'(BLOCK_SIZE/8) || sseg_end) begin
            blk_valid  <= 1'b1;
            blk_nsec   <= 1'b1;
            blk_ad     <= 1'b0;
            blk_dec    <= 1'b0;
            blk_eot    <= sseg_end;
            blk_eoi    <= 1'b0;
            blk_nodata <= 1'b0;
          end
          if (sseg_end) state <= S_INST;
        end

        S_HDR: if (pdi_fire && !hdr_last) begin
          gat  <= asm;
          gcnt <= gcnt + 1'b1;
        end else if (pdi_fire) begin
          gcnt       <= '0;
          seg_type   <= hdr_type;
          seg_eoi    <= hdr_eoi;
          seg_eot    <= hdr_eot;
          bytes_left <= hdr_len;
          if (hdr_len != '0) begin
            if (hdr_type == ST_NPUB)     state <= S_NPUB;
            else if (hdr_type == ST_TAG) state <= S_TAG;
            else if (is_data)            state <= S_DATA;
          end else if (hdr_type == ST_TAG) begin
            state <= S_AUTH;
          end else if ((hdr_eoi || hdr_eot) && (widx != '0)) begin
            // an empty closing segment flushes the partial block
            state <= S_NODATA;
          end else if (hdr_eoi && !eoi_sent) begin
            state <= S_NODATA;
          end else begin
            state <= after_segment(hdr_type, hdr_eoi, decrypt);
          end
        end

        S_NPUB: if (pdi_fire) begin
          iv         <= IV_SIZE'({iv, pdi});
          bytes_left <= bytes_left - nbytes;
          if (seg_end) state <= seg_eoi ? S_NODATA : S_HDR;
        end

        S_DATA: if (pdi_fire) begin
          bdi[BLOCK_SIZE-1-G_W*int'(widx) -: G_W] <= keep_bytes(pdi, nbytes);
          blk_bytes  <= blk_bytes + (G_BS_BYTES+1)'(nbytes);
          bytes_left <= bytes_left - nbytes;
          if (seg_type == ST_AD) len_a <= len_a + CTR_AD_SIZE'(nbytes);
          else                   len_d <= len_d + CTR_D_SIZE'(nbytes);
          widx <= (widx == IW'(NW-1)) ? '0 : widx + 1'b1;
          if (widx == IW'(NW-1) || (seg_end && (seg_eot || seg_eoi))) begin
            blk_valid  <= 1'b1;
            blk_ad     <= (seg_type == ST_AD);
            blk_dec    <= decrypt;
            blk_eot    <= seg_end && seg_eot;
            blk_eoi    <= seg_end && seg_eoi;
            blk_nodata <= 1'b0;
            if (seg_end && seg_eoi) eoi_sent <= 1'b1;
          end
          if (seg_end) state <= after_segment(seg_type, seg_eoi, decrypt);
        end

        S_NODATA: if (!blk_valid) begin
          // close the input: flush a pending partial block, or send an
          // empty one that only carries EOI
          blk_valid  <= 1'b1;
          blk_ad     <= (seg_type == ST_AD);
          blk_dec    <= decrypt;
          blk_eot    <= 1'b1;
          blk_eoi    <= seg_eoi;
          blk_nodata <= (widx == '0);
          if (seg_eoi) eoi_sent <= 1'b1;
          state <= after_segment(seg_type, seg_eoi, decrypt);
        end

        S_TAG: if (pdi_fire) begin
          exp_tag    <= G_TAG_SIZE'({exp_tag, pdi});
          bytes_left <= bytes_left - nbytes;
          if (seg_end) state <= S_AUTH;
        end

        S_AUTH: begin
          exp_tag_ready <= 1'b1;
          if (exp_tag_ready && msg_auth_done) begin
            exp_tag_ready <= 1'b0;
            iv_ready      <= 1'b0;
            bdi_proc      <= 1'b0;
            state         <= S_INST;
          end
        end

        S_FLUSH: if (!blk_valid) begin
          iv_ready <= 1'b0;
          bdi_proc <= 1'b0;
          state    <= S_INST;
        end

        default: state <= S_INST;
      endcase

      if (state == S_NPUB && pdi_fire && seg_end) iv_ready <= 1'b1;
    end
  end

  assign key_ready        = key_valid;
  assign key_needs_update = key_pend;
  assign bdi_ready        = blk_valid;
  assign bdi_ad           = blk_ad;
  assign bdi_decrypt      = blk_dec;
  assign bdi_eot          = blk_eot;
  assign bdi_eoi          = blk_eoi;
  assign bdi_nodata       = blk_nodata;
  assign bdi_size         = blk_bytes[G_BS_BYTES-1:0];
  assign bdi_nsec         = blk_nsec;

  // a block is only taken while one is offered
  assert property (@(posedge clk) disable iff (rst) bdi_read |-> blk_valid)
    else $error("pre_processor: bdi_read without a block");

endmodule
