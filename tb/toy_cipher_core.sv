// toy_cipher_core: behavioural model of a CipherCore, for simulation only.
//
// It speaks the full-block CipherCore interface of the AEAD unit and runs the
// toy cipher of toy_cipher_pkg. A new key is taken (key_updated pulses) when
// key_needs_update is high. A block waiting on bdi_ready is taken with a
// one-cycle bdi_read pulse, processed for LAT cycles, and for message data the
// result is written with bdo_write once bdo_ready is high. After the block
// marked bdi_eoi it writes the tag (encryption) or compares it with exp_tag
// and pulses msg_auth_done with msg_auth_valid (decryption). Blocks marked
// bdi_nsec (an Nsec loaded with the key) are taken at any time and folded
// into the starting state of later operations. Only 128-bit
// blocks, keys, nonces and tags are supported.
module toy_cipher_core
  import toy_cipher_pkg::*;
#(
  parameter int unsigned LAT = 3
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [127:0]  key,
  input  logic [127:0]  bdi,
  input  logic [127:0]  iv,
  input  logic [127:0]  exp_tag,
  input  logic          key_needs_update,
  input  logic          iv_ready,
  input  logic          bdi_ready,
  input  logic          bdi_ad,
  input  logic          bdi_nsec,
  input  logic          bdi_decrypt,
  input  logic          bdi_eoi,
  input  logic          bdi_nodata,
  input  logic [3:0]    bdi_size,
  input  logic          exp_tag_ready,
  input  logic          bdo_ready,
  input  logic          tag_ready,
  output logic          key_updated,
  output logic          bdi_read,
  output logic [127:0]  bdo,
  output logic          bdo_write,
  output logic [4:0]    bdo_size,
  output logic [127:0]  tag,
  output logic          tag_write,
  output logic          msg_auth_valid,
  output logic          msg_auth_done
);
  typedef enum logic [2:0] {C_IDLE, C_BUSY, C_OUT, C_FIN, C_TAG, C_AUTH} cstate_e;
  cstate_e st;
  logic [127:0] s, kreg, blk, nacc;
  logic         fresh, b_ad, b_dec, b_eoi, b_nodata;
  int           nb, cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= C_IDLE; fresh <= 1'b1; s <= '0; kreg <= '0; blk <= '0; nacc <= '0;
      key_updated <= 1'b0; bdi_read <= 1'b0; bdo_write <= 1'b0; bdo <= '0;
      bdo_size <= '0; tag <= '0; tag_write <= 1'b0; msg_auth_valid <= 1'b0;
      msg_auth_done <= 1'b0; b_ad <= 0; b_dec <= 0; b_eoi <= 0; b_nodata <= 0;
      nb <= 0; cnt <= 0;
    end else begin
      key_updated   <= 1'b0;
      bdi_read      <= 1'b0;
      bdo_write     <= 1'b0;
      tag_write     <= 1'b0;
      msg_auth_done <= 1'b0;
      if (key_needs_update && !key_updated && st == C_IDLE && fresh) begin
        kreg        <= key;
        nacc        <= '0;
        key_updated <= 1'b1;
      end
      case (st)
        C_IDLE: if (bdi_ready && !bdi_read && bdi_nsec) begin
          bdi_read <= 1'b1;
          nacc     <= absorb_nsec(nacc, keep(bdi, (bdi_size == 0) ? 16 : int'(bdi_size)));
        end else if (bdi_ready && !bdi_read && iv_ready && !key_needs_update) begin
          bdi_read <= 1'b1;
          blk      <= bdi;
          b_ad     <= bdi_ad;
          b_dec    <= bdi_decrypt;
          b_eoi    <= bdi_eoi;
          b_nodata <= bdi_nodata;
          nb       <= bdi_nodata ? 0 : ((bdi_size == 0) ? 16 : int'(bdi_size));
          if (fresh) s <= kreg ^ iv ^ nacc;
          fresh <= 1'b0;
          cnt   <= LAT;
          st    <= C_BUSY;
        end
        C_BUSY: if (cnt > 1) cnt <= cnt - 1;
        else if (b_nodata) st <= C_FIN;
        else if (b_ad) begin
          s  <= absorb_ad(s, keep(blk, nb));
          st <= C_FIN;
        end else begin
          logic [127:0] p, c;
          if (b_dec) begin
            c = keep(blk, nb);
            p = keep(c ^ keystream(s, kreg), nb);
            bdo <= p;
          end else begin
            p = keep(blk, nb);
            c = keep(p ^ keystream(s, kreg), nb);
            bdo <= c;
          end
          s        <= absorb_msg(s, p);
          bdo_size <= 5'(nb);
          st       <= C_OUT;
        end
        C_OUT: if (bdo_ready) begin
          bdo_write <= 1'b1;
          st        <= C_FIN;
        end
        C_FIN: if (!b_eoi)      st <= C_IDLE;
               else if (b_dec)  st <= C_AUTH;
               else             st <= C_TAG;
        C_TAG: if (tag_ready && !tag_write) begin
          tag       <= s ^ kreg;
          tag_write <= 1'b1;
          fresh     <= 1'b1;
          st        <= C_IDLE;
        end
        C_AUTH: if (exp_tag_ready && !msg_auth_done) begin
          msg_auth_valid <= (exp_tag == (s ^ kreg));
          msg_auth_done  <= 1'b1;
          fresh          <= 1'b1;
          st             <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
