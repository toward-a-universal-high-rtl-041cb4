// aead_width_env: the AEAD unit at one external bus width W (G_W = G_SW = W),
// with the toy CipherCore attached and a self-checking stimulus of its own.
// tb_aead_widths places one of these per width and adds up the results.
//
// Streams are built byte by byte and cut into W-bit words, first byte in the
// MSBs. An instruction takes ceil(24/W) words with its 24 bits at the top; a
// segment header takes ceil(32/W) words with Msg ID and Info at the top, the
// 16-bit length at the bottom and zeros between; segment data is padded to a
// whole word (random pad bytes in, zero pad bytes out). The sequence is an
// encryption with several segments, a decryption with a valid tag, one with a
// corrupted tag, one with an empty AD and message, and one decryption longer
// than the (here reduced) AUX FIFO; then a second key comes with an Nsec,
// and an encryption and a decryption use both. Expected output comes from
// the toy cipher in toy_cipher_pkg. done rises once all output has been
// compared; the counts of operations of each kind are checked at the end.
module aead_width_env #(
  parameter int unsigned W         = 8,
  parameter int unsigned AUX_DEPTH = 64
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import aead_pkg::*;
  import toy_cipher_pkg::*;

  localparam int unsigned WB         = W / 8;
  localparam int unsigned INST_BYTES = WB * ((24 + W - 1) / W);
  localparam int unsigned HDR_BYTES  = WB * ((32 + W - 1) / W);

  logic rst = 1'b1;

  logic [W-1:0]  pdi = '0, sdi = '0, do_data;
  logic          pdi_valid = 1'b0, pdi_ready, sdi_valid = 1'b0, sdi_ready;
  logic          do_valid, do_ready = 1'b0;
  logic [127:0]  key, bdi, iv, exp_tag, bdo, tag;
  logic [31:0]   len_a, len_d;
  logic key_needs_update, key_ready, iv_ready, bdi_ready, bdi_proc, bdi_ad, bdi_nsec;
  logic bdi_decrypt, bdi_eot, bdi_eoi, bdi_nodata, exp_tag_ready, bdo_ready, tag_ready;
  logic [3:0] bdi_size;
  logic [4:0] bdo_size;
  logic key_updated, bdi_read, bdo_write, tag_write, msg_auth_valid, msg_auth_done;

  aead #(.G_W(W), .G_SW(W), .AUX_DEPTH(AUX_DEPTH)) dut (.*);

  toy_cipher_core u_core (
    .clk, .rst, .key, .bdi, .iv, .exp_tag, .key_needs_update, .iv_ready,
    .bdi_ready, .bdi_ad, .bdi_nsec, .bdi_decrypt, .bdi_eoi, .bdi_nodata, .bdi_size,
    .exp_tag_ready, .bdo_ready, .tag_ready, .key_updated, .bdi_read, .bdo,
    .bdo_write, .bdo_size, .tag, .tag_write, .msg_auth_valid, .msg_auth_done
  );

  logic [W-1:0] pdi_q[$], sdi_q[$], exp_q[$];
  logic [127:0] cur_key, cur_n;
  logic [7:0]   msg_id = 8'h40;
  int n_enc = 0, n_dec_ok = 0, n_dec_fail = 0, n_overflow = 0, n_words = 0;

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  // ---------------------------------------------------------------- drivers
  always @(posedge clk) if (!rst) begin
    if (pdi_valid && pdi_ready) void'(pdi_q.pop_front());
    if (!pdi_valid || pdi_ready) begin
      pdi_valid <= pdi_q.size() > 0 && ($urandom % 4) != 0;
      if (pdi_q.size() > 0) pdi <= pdi_q[0];
    end
    if (sdi_valid && sdi_ready) void'(sdi_q.pop_front());
    if (!sdi_valid || sdi_ready) begin
      sdi_valid <= sdi_q.size() > 0 && ($urandom % 3) != 0;
      if (sdi_q.size() > 0) sdi <= sdi_q[0];
    end
    do_ready <= ($urandom % 3) != 0;
  end

  // ---------------------------------------------------------------- monitor
  always @(posedge clk) if (!rst) begin
    if (do_valid && do_ready) begin
      n_words++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("ERROR: w=%0d unexpected output word %h", W, do_data);
      end else if (do_data != exp_q[0]) begin
        failures++;
        $display("ERROR: w=%0d output word %0d is %h, expected %h", W, n_words, do_data, exp_q[0]);
      end
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    if (dut.u_aux_fifo.status[2] && dut.aux_ctrl[2]) n_overflow++;
  end

  // ---------------------------------------------------------------- stimulus
  // cut bytes into words; pad bytes are random or zero
  function automatic void to_words(ref logic [W-1:0] q[$], input logic [7:0] b[$],
                                   input bit garbage);
    for (int i = 0; i < b.size(); i += WB) begin
      logic [W-1:0] w;
      for (int j = 0; j < WB; j++)
        w[W-1-8*j -: 8] = (i + j < b.size()) ? b[i+j] : (garbage ? 8'($urandom) : 8'h00);
      q.push_back(w);
    end
  endfunction

  function automatic void inst(ref logic [W-1:0] q[$], input logic [7:0] id, input opcode_e op);
    logic [7:0] b[$];
    b = '{id, {4'h0, op}, 8'h00};
    while (b.size() < INST_BYTES) b.push_back(8'h00);
    to_words(q, b, 1'b0);
  endfunction

  function automatic void header(ref logic [W-1:0] q[$], input logic [7:0] id,
                                 input logic [3:0] t, input bit eoi, input bit eot,
                                 input int len);
    logic [7:0] b[$];
    b = '{id, {t, 2'b00, eoi, eot}};
    while (b.size() < HDR_BYTES - 2) b.push_back(8'h00);
    b.push_back(8'(len >> 8));
    b.push_back(8'(len));
    to_words(q, b, 1'b0);
  endfunction

  function automatic void segment(ref logic [W-1:0] q[$], input logic [7:0] b[$],
                                  input int from, input int len, input bit garbage);
    logic [7:0] s[$];
    for (int i = 0; i < len; i++) s.push_back(b[from+i]);
    to_words(q, s, garbage);
  endfunction

  // a key, followed by an Nsec of nsec_len bytes when nsec_len > 0
  function automatic void load_key(input logic [127:0] k, input int nsec_len);
    logic [7:0] b[$], n[$];
    inst(pdi_q, 8'h00, OP_ACTKEY);
    inst(sdi_q, 8'h00, OP_LDKEY);
    header(sdi_q, 8'h00, ST_KEY, nsec_len == 0, 1'b1, 16);
    for (int i = 0; i < 16; i++) b.push_back(k[127-8*i -: 8]);
    to_words(sdi_q, b, 1'b0);
    cur_key = k;
    cur_n   = '0;
    if (nsec_len > 0) begin
      for (int i = 0; i < nsec_len; i++) n.push_back(8'($urandom));
      header(sdi_q, 8'h00, ST_NSEC, 1'b1, 1'b1, nsec_len);
      to_words(sdi_q, n, 1'b1);
      for (int i = 0; i < nsec_len; i += 16) begin
        logic [127:0] nb = '0;
        for (int j = 0; j < 16 && i + j < nsec_len; j++) nb[127-8*j -: 8] = n[i+j];
        cur_n = absorb_nsec(cur_n, nb);
      end
    end
  endfunction

  // lengths of nseg segments; all but the last are whole words
  function automatic void split(input int len, input int nseg, ref int lens[$]);
    int left = len;
    lens.delete();
    for (int i = 0; i < nseg - 1 && left > WB; i++) begin
      int l = WB * (1 + ($urandom % ((left - 1) / WB)));
      lens.push_back(l);
      left -= l;
    end
    lens.push_back(left);
  endfunction

  function automatic void run_op(input bit dec, input int ad_len, input int m_len,
                                 input int nseg, input bit bad_tag);
    logic [7:0]   ad[$], m[$], c[$], nb[$], tb[$];
    logic [127:0] npub, s, t, blk, p, cb;
    int           ad_l[$], m_l[$], pos;
    logic [W-1:0] out[$];
    npub = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 16; i++) nb.push_back(npub[127-8*i -: 8]);
    for (int i = 0; i < ad_len; i++) ad.push_back(8'($urandom));
    for (int i = 0; i < m_len; i++)  m.push_back(8'($urandom));

    s = cur_key ^ npub ^ cur_n;
    for (int i = 0; i < ad_len; i += 16) begin
      blk = '0;
      for (int j = 0; j < 16 && i + j < ad_len; j++) blk[127-8*j -: 8] = ad[i+j];
      s = absorb_ad(s, blk);
    end
    for (int i = 0; i < m_len; i += 16) begin
      int n = (m_len - i < 16) ? m_len - i : 16;
      p = '0;
      for (int j = 0; j < n; j++) p[127-8*j -: 8] = m[i+j];
      cb = keep(p ^ keystream(s, cur_key), n);
      for (int j = 0; j < n; j++) c.push_back(cb[127-8*j -: 8]);
      s = absorb_msg(s, p);
    end
    t = s ^ cur_key;
    if (bad_tag) t[0] = ~t[0];
    for (int i = 0; i < 16; i++) tb.push_back(t[127-8*i -: 8]);

    split(ad_len, nseg, ad_l);
    split(m_len, nseg, m_l);

    inst(pdi_q, msg_id, dec ? OP_DEC : OP_ENC);
    header(pdi_q, msg_id, ST_NPUB, 1'b0, 1'b1, 16);
    to_words(pdi_q, nb, 1'b0);
    if (!dec) begin
      header(out, msg_id, ST_NPUB, 1'b0, 1'b1, 16);
      to_words(out, nb, 1'b0);
    end
    pos = 0;
    foreach (ad_l[k]) begin
      bit last = (k == ad_l.size() - 1);
      header(pdi_q, msg_id, ST_AD, 1'b0, last, ad_l[k]);
      segment(pdi_q, ad, pos, ad_l[k], 1'b1);
      header(out, msg_id, ST_AD, 1'b0, last, ad_l[k]);
      segment(out, ad, pos, ad_l[k], 1'b0);
      pos += ad_l[k];
    end
    pos = 0;
    foreach (m_l[k]) begin
      bit last = (k == m_l.size() - 1);
      header(pdi_q, msg_id, dec ? ST_CT : ST_MSG, last, last, m_l[k]);
      segment(pdi_q, dec ? c : m, pos, m_l[k], 1'b1);
      header(out, msg_id, dec ? ST_MSG : ST_CT, dec && last, last, m_l[k]);
      segment(out, dec ? m : c, pos, m_l[k], 1'b0);
      pos += m_l[k];
    end
    if (dec) begin
      header(pdi_q, msg_id, ST_TAG, 1'b1, 1'b1, 16);
      to_words(pdi_q, tb, 1'b0);
    end else begin
      header(out, msg_id, ST_TAG, 1'b1, 1'b1, 16);
      to_words(out, tb, 1'b0);
    end

    if (dec && (bad_tag || out.size() > AUX_DEPTH)) begin
      // the error indication: code and Msg ID at the top of a header-sized unit
      logic [7:0] e[$];
      out.delete();
      e = '{ERR_CODE, msg_id};
      while (e.size() < HDR_BYTES) e.push_back(8'h00);
      to_words(out, e, 1'b0);
      n_dec_fail++;
    end else if (dec) n_dec_ok++;
    else n_enc++;
    foreach (out[i]) exp_q.push_back(out[i]);
    msg_id++;
  endfunction

  initial begin
    load_key({$urandom, $urandom, $urandom, $urandom}, 0);
    run_op(0, 21, 45, 2, 1'b0);
    run_op(1, 21, 45, 2, 1'b0);
    run_op(1, 16, 32, 1, 1'b1);
    run_op(0, 0, 0, 1, 1'b0);
    run_op(1, 0, 0, 1, 1'b0);
    run_op(1, 8, AUX_DEPTH * WB + 40, 1, 1'b0);
    load_key({$urandom, $urandom, $urandom, $urandom}, 19 + W / 8);
    run_op(0, 35, 77, 3, 1'b0);
    run_op(1, 35, 77, 2, 1'b0);
    repeat (4) @(posedge clk);
    rst = 1'b0;
    while (pdi_q.size() > 0 || exp_q.size() > 0) @(posedge clk);
    repeat (20) @(posedge clk);
    checks += 4;
    if (n_enc == 0 || n_dec_ok == 0 || n_dec_fail < 2) begin
      failures++;
      $display("ERROR: w=%0d operations enc=%0d dec_ok=%0d dec_fail=%0d", W, n_enc, n_dec_ok,
               n_dec_fail);
    end
    if (n_overflow == 0) begin
      failures++;
      $display("ERROR: w=%0d AUX FIFO never overflowed", W);
    end
    if (do_valid) begin
      failures++;
      $display("ERROR: w=%0d output left after the last operation", W);
    end
    if (sdi_q.size() != 0) begin
      failures++;
      $display("ERROR: w=%0d key words left", W);
    end
    $display("w=%0d: %0d output words, enc=%0d dec_ok=%0d dec_fail=%0d overflow=%0d",
             W, n_words, n_enc, n_dec_ok, n_dec_fail, n_overflow);
    done = 1'b1;
  end
endmodule
