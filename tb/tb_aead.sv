// tb_aead: end-to-end test of the AEAD unit at its default parameters, with
// the toy CipherCore model attached to its block interface.
//
// The test loads keys over SDI, one of them with an Nsec, and runs a sequence of encryptions and
// decryptions with random AD and message lengths, one or several segments
// per type, empty AD and/or empty message, valid and corrupted tags, and one
// decryption too long for the AUX FIFO. Input words get random gaps and the
// output random back-pressure, with one stretch where the output is held until
// the Bypass FIFO is full. The expected output stream is computed in the
// testbench from the toy cipher, byte by byte, and compared word by word.
// Each mechanism of the unit is counted and must occur at least once.
module tb_aead;
  import aead_pkg::*;
  import toy_cipher_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [31:0]  pdi, sdi, do_data;
  logic         pdi_valid = 1'b0, pdi_ready, sdi_valid = 1'b0, sdi_ready;
  logic         do_valid, do_ready = 1'b0;
  logic [127:0] key, bdi, iv, exp_tag, bdo, tag;
  logic [31:0]  len_a, len_d;
  logic key_needs_update, key_ready, iv_ready, bdi_ready, bdi_proc, bdi_ad, bdi_nsec;
  logic bdi_decrypt, bdi_eot, bdi_eoi, bdi_nodata, exp_tag_ready, bdo_ready, tag_ready;
  logic [3:0] bdi_size;
  logic [4:0] bdo_size;
  logic key_updated, bdi_read, bdo_write, tag_write, msg_auth_valid, msg_auth_done;

  aead dut (.*);

  toy_cipher_core u_core (
    .clk, .rst, .key, .bdi, .iv, .exp_tag, .key_needs_update, .iv_ready,
    .bdi_ready, .bdi_ad, .bdi_nsec, .bdi_decrypt, .bdi_eoi, .bdi_nodata, .bdi_size,
    .exp_tag_ready, .bdo_ready, .tag_ready, .key_updated, .bdi_read, .bdo,
    .bdo_write, .bdo_size, .tag, .tag_write, .msg_auth_valid, .msg_auth_done
  );

  int checks = 0, failures = 0;

  logic [31:0] pdi_q[$], sdi_q[$], exp_q[$];
  logic [127:0] cur_key, cur_n;
  logic [7:0] msg_id = 8'h01;

  // mechanism counters
  int n_keys = 0, n_enc = 0, n_dec_ok = 0, n_dec_fail = 0, n_overflow = 0;
  int n_bypass_stall = 0, n_partial = 0, n_nodata = 0, n_backpressure = 0;
  int n_overlap = 0, n_multiseg = 0, n_do_words = 0, n_nsec = 0;

  // ---------------------------------------------------------------- drivers
  always @(posedge clk) if (!rst) begin
    if (pdi_valid && pdi_ready) void'(pdi_q.pop_front());
    if (!pdi_valid || pdi_ready) begin
      if (pdi_q.size() > 0 && ($urandom % 4) != 0) begin
        pdi_valid <= 1'b1;
        pdi       <= pdi_q[0];
      end else pdi_valid <= 1'b0;
    end
    if (sdi_valid && sdi_ready) void'(sdi_q.pop_front());
    if (!sdi_valid || sdi_ready) begin
      if (sdi_q.size() > 0 && ($urandom % 3) != 0) begin
        sdi_valid <= 1'b1;
        sdi       <= sdi_q[0];
      end else sdi_valid <= 1'b0;
    end
    do_ready <= !hold_do && ($urandom % 3) != 0;
  end

  // ---------------------------------------------------------------- monitor
  always @(posedge clk) begin
    if (!rst) begin
      if (do_valid && do_ready) begin
        n_do_words++;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("ERROR: unexpected output word %h", do_data);
        end else begin
          logic [31:0] e;
          e = exp_q.pop_front();
          if (do_data !== e) begin
            failures++;
            $display("ERROR: output word %0d is %h, expected %h", n_do_words, do_data, e);
          end
          if (e[31:24] == ERR_CODE && e[15:0] == 16'h0) n_dec_fail++;
        end
      end
      if (do_valid && !do_ready) n_backpressure++;
      if (pdi_valid && dut.bypass_full) n_bypass_stall++;
      if (bdi_read && bdi_size != 0 && !bdi_nodata) n_partial++;
      if (bdi_read && bdi_nodata) n_nodata++;
      if (key_updated) n_keys++;
      if (bdi_read && bdi_nsec) n_nsec++;
      if (pdi_valid && pdi_ready && u_core.st != u_core.C_IDLE) n_overlap++;
      if (dut.u_aux_fifo.status[2] && dut.aux_ctrl[2]) n_overflow++;
    end
  end

  // ---------------------------------------------------------------- stimulus
  function automatic logic [31:0] hdr(input logic [7:0] id, input logic [3:0] t,
                                      input bit eoi, input bit eot, input int len);
    return {id, t, 2'b00, eoi, eot, 16'(len)};
  endfunction

  // pack bytes into words, first byte in the MSBs; pad bytes get garbage on
  // the input (the unit must clear them) and zeros in the expected output
  task automatic push_bytes(ref logic [31:0] q[$], input logic [7:0] b[$],
                            input int from, input int len, input bit garbage);
    for (int i = 0; i < len; i += 4) begin
      logic [31:0] w;
      for (int j = 0; j < 4; j++)
        w[31-8*j -: 8] = (i + j < len) ? b[from+i+j] : (garbage ? 8'($urandom) : 8'h00);
      q.push_back(w);
    end
  endtask

  // a key, optionally followed on SDI by an Nsec segment of nsec_len bytes
  // (announced by EOI = 0 in the Key header)
  task automatic load_key(input logic [127:0] k, input int nsec_len = 0);
    logic [7:0] n[$];
    pdi_q.push_back({8'h00, 4'h0, OP_ACTKEY, 8'h00, 8'h00});
    sdi_q.push_back({8'h00, 4'h0, OP_LDKEY, 8'h00, 8'h00});
    sdi_q.push_back(hdr(8'h00, ST_KEY, nsec_len == 0, 1'b1, 16));
    for (int i = 0; i < 4; i++) sdi_q.push_back(k[127-32*i -: 32]);
    cur_key = k;
    cur_n   = '0;
    if (nsec_len > 0) begin
      for (int i = 0; i < nsec_len; i++) n.push_back(8'($urandom));
      sdi_q.push_back(hdr(8'h00, ST_NSEC, 1'b1, 1'b1, nsec_len));
      push_bytes(sdi_q, n, 0, nsec_len, 1'b1);
      for (int i = 0; i < nsec_len; i += 16) begin
        logic [127:0] b = '0;
        for (int j = 0; j < 16 && i + j < nsec_len; j++) b[127-8*j -: 8] = n[i+j];
        cur_n = absorb_nsec(cur_n, b);
      end
    end
  endtask

  // lengths of nseg segments; all but the last are whole words
  function automatic void split(input int len, input int nseg, ref int lens[$]);
    int left = len;
    lens.delete();
    for (int i = 0; i < nseg - 1 && left > 4; i++) begin
      int l = 4 * (1 + ($urandom % ((left - 1) / 4)));
      lens.push_back(l);
      left -= l;
    end
    lens.push_back(left);
  endfunction

  task automatic run_op(input bit dec, input int ad_len, input int m_len,
                        input int ad_segs, input int m_segs, input bit bad_tag,
                        input bit empty_msg_hdr);
    logic [7:0]   ad[$], m[$], c[$];
    logic [127:0] npub, s, t, blk, p, cb;
    int           ad_l[$], m_l[$], pos;
    logic [31:0]  out[$];
    bit           has_ad_hdr, has_m_hdr;
    logic [3:0]   in_t, out_t;

    npub = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < ad_len; i++) ad.push_back(8'($urandom));
    for (int i = 0; i < m_len; i++)  m.push_back(8'($urandom));

    // reference cipher
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

    split(ad_len, ad_segs, ad_l);
    split(m_len, m_segs, m_l);
    if (ad_l.size() > 1 || m_l.size() > 1) n_multiseg++;
    has_ad_hdr = (ad_len > 0) || ($urandom % 2 == 1);
    has_m_hdr  = (m_len > 0) || empty_msg_hdr;
    if (ad_len == 0) ad_l = '{0};
    if (m_len == 0)  m_l  = '{0};

    // input stream
    pdi_q.push_back({msg_id, 4'h0, dec ? OP_DEC : OP_ENC, 8'h00, 8'h00});
    pdi_q.push_back(hdr(msg_id, ST_NPUB, !has_ad_hdr && !has_m_hdr, 1'b1, 16));
    for (int i = 0; i < 4; i++) pdi_q.push_back(npub[127-32*i -: 32]);
    if (!dec) out.push_back(hdr(msg_id, ST_NPUB, 1'b0, 1'b1, 16));
    if (!dec) for (int i = 0; i < 4; i++) out.push_back(npub[127-32*i -: 32]);

    pos = 0;
    if (has_ad_hdr) foreach (ad_l[k]) begin
      bit last = (k == ad_l.size() - 1);
      bit eoi  = last && !has_m_hdr;
      pdi_q.push_back(hdr(msg_id, ST_AD, eoi, last, ad_l[k]));
      push_bytes(pdi_q, ad, pos, ad_l[k], 1'b1);
      out.push_back(hdr(msg_id, ST_AD, dec ? eoi : 1'b0, last, ad_l[k]));
      push_bytes(out, ad, pos, ad_l[k], 1'b0);
      pos += ad_l[k];
    end

    in_t  = dec ? ST_CT : ST_MSG;
    out_t = dec ? ST_MSG : ST_CT;
    pos = 0;
    if (has_m_hdr) foreach (m_l[k]) begin
      bit last = (k == m_l.size() - 1);
      pdi_q.push_back(hdr(msg_id, in_t, last, last, m_l[k]));
      push_bytes(pdi_q, dec ? c : m, pos, m_l[k], 1'b1);
      out.push_back(hdr(msg_id, out_t, dec ? last : 1'b0, last, m_l[k]));
      push_bytes(out, dec ? m : c, pos, m_l[k], 1'b0);
      pos += m_l[k];
    end

    if (dec) begin
      logic [127:0] tt = bad_tag ? t ^ 128'h1 : t;
      pdi_q.push_back(hdr(msg_id, ST_TAG, 1'b1, 1'b1, 16));
      for (int i = 0; i < 4; i++) pdi_q.push_back(tt[127-32*i -: 32]);
    end else begin
      out.push_back(hdr(msg_id, ST_TAG, 1'b1, 1'b1, 16));
      for (int i = 0; i < 4; i++) out.push_back(t[127-32*i -: 32]);
    end

    if (dec && (bad_tag || out.size() > 512)) begin
      out.delete();
      out.push_back({ERR_CODE, msg_id, 16'h0000});
    end else if (dec) n_dec_ok++;
    else n_enc++;
    foreach (out[i]) exp_q.push_back(out[i]);
    msg_id++;
  endtask

  // ---------------------------------------------------------------- sequence
  bit hold_do = 1'b0;   // holds DO back so that the Bypass FIFO fills
  int n_before_long;    // PDI words queued before the long-AD operation

  initial begin
    load_key({$urandom, $urandom, $urandom, $urandom});
    run_op(0, 20, 37, 2, 3, 0, 0);      // encrypt, partial blocks, several segments
    run_op(1, 20, 37, 1, 2, 0, 0);      // decrypt, valid tag
    run_op(1, 16, 32, 1, 1, 1, 0);      // decrypt, corrupted tag
    run_op(0, 0, 0, 1, 1, 0, 1);        // encrypt, empty AD and message
    run_op(0, 13, 0, 1, 1, 0, 0);       // encrypt, AD only
    run_op(1, 0, 48, 1, 3, 0, 1);       // decrypt, no AD
    load_key({$urandom, $urandom, $urandom, $urandom}, 21);   // with a 21-byte Nsec
    n_before_long = pdi_q.size();
    run_op(0, 100, 200, 3, 4, 0, 0);    // long AD: fills the Bypass FIFO
    run_op(1, 100, 200, 2, 2, 0, 0);
    run_op(1, 8, 2200, 1, 2, 0, 0);     // does not fit the AUX FIFO
    for (int i = 0; i < 6; i++)
      run_op(1'(i % 2), $urandom % 70, $urandom % 90, 1 + $urandom % 3, 1 + $urandom % 3,
             (i % 4) == 3, 1'($urandom % 2));

    repeat (4) @(posedge clk);
    rst = 1'b0;
    fork
      begin
        // once the long-AD operation starts, stop the output until the FIFO is full
        automatic int total = pdi_q.size();
        while (pdi_q.size() > total - n_before_long - 8) @(posedge clk);
        hold_do = 1'b1;
        for (int i = 0; i < 400 && !dut.bypass_full; i++) @(posedge clk);
        hold_do = 1'b0;
      end
    join_none
    while (pdi_q.size() > 0 || exp_q.size() > 0) @(posedge clk);
    repeat (50) @(posedge clk);

    checks++; if (n_keys != 2)         begin failures++; $display("ERROR: %0d key updates", n_keys); end
    checks++; if (n_enc == 0)          begin failures++; $display("ERROR: no encryption"); end
    checks++; if (n_dec_ok == 0)       begin failures++; $display("ERROR: no valid decryption"); end
    checks++; if (n_dec_fail < 2)      begin failures++; $display("ERROR: %0d error words", n_dec_fail); end
    checks++; if (n_overflow == 0)     begin failures++; $display("ERROR: no AUX FIFO overflow"); end
    checks++; if (n_bypass_stall == 0) begin failures++; $display("ERROR: Bypass FIFO never full"); end
    checks++; if (n_partial == 0)      begin failures++; $display("ERROR: no partial block"); end
    checks++; if (n_nodata == 0)       begin failures++; $display("ERROR: no empty block"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("ERROR: no output back-pressure"); end
    checks++; if (n_overlap == 0)      begin failures++; $display("ERROR: no input overlapped processing"); end
    checks++; if (n_multiseg == 0)     begin failures++; $display("ERROR: no multi-segment input"); end
    checks++; if (n_nsec != 2)         begin failures++; $display("ERROR: %0d Nsec blocks", n_nsec); end
    checks++; if (pdi_valid || do_valid) begin failures++; $display("ERROR: unit not idle at the end"); end
    $display("mechanisms: keys=%0d enc=%0d dec_ok=%0d dec_fail=%0d overflow=%0d bypass_full=%0d partial=%0d nodata=%0d backpressure=%0d overlap=%0d multiseg=%0d nsec=%0d",
             n_keys, n_enc, n_dec_ok, n_dec_fail, n_overflow, n_bypass_stall, n_partial,
             n_nodata, n_backpressure, n_overlap, n_multiseg, n_nsec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired, %0d input words and %0d output words left",
             pdi_q.size(), exp_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
