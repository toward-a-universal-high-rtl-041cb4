// tb_pre_processor: test of the PreProcessor on its own.
//
// PDI and SDI words are sent with random gaps, the Bypass FIFO is modelled as
// a sink with a random full flag, and a CipherCore stand-in takes blocks after
// random delays, acknowledges keys and finishes tag checks. The testbench
// works out, from the byte strings it sends, every block the unit must
// deliver (contents with zero padding, bdi_size, AD/EOT/EOI/no-data/decrypt
// flags, Nsec blocks after a key), the words that must reach the Bypass
// FIFO, the key, the Npub, the expected tag and the AD and data byte counts,
// and compares them all.
module tb_pre_processor;
  import aead_pkg::*;

  logic clk, rst;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0]  pdi, sdi;
  logic         pdi_valid, pdi_ready, sdi_valid, sdi_ready;
  logic [127:0] key, bdi, iv, exp_tag;
  logic [31:0]  len_a, len_d;
  logic key_updated, key_needs_update, key_ready, iv_ready, bdi_ready, bdi_proc;
  logic bdi_ad, bdi_nsec, bdi_decrypt, bdi_eot, bdi_eoi, bdi_nodata, bdi_read;
  logic [3:0] bdi_size;
  logic exp_tag_ready, msg_auth_done, bypass_full, bypass_wr;

  pre_processor dut (.*);

  typedef struct packed {
    logic [127:0] data;
    logic [3:0]   size;
    logic         ad, eot, eoi, nodata, dec, nsec;
  } blk_t;

  int checks = 0, failures = 0;
  logic [31:0]  pdi_q[$], sdi_q[$], byp_q[$];
  blk_t         blk_q[$];
  logic [127:0] key_q[$], iv_q[$], tag_q[$];
  int           lena_q[$], lend_q[$];
  int n_blocks = 0, n_byp = 0, n_nodata = 0, n_bypass_stall = 0, n_nsec = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", what); end
  endtask

  // ------------------------------------------------------------ environment
  always @(posedge clk) begin
    if (rst) begin
      pdi_valid <= 1'b0; sdi_valid <= 1'b0; bypass_full <= 1'b0;
      key_updated <= 1'b0; bdi_read <= 1'b0; msg_auth_done <= 1'b0;
      pdi <= '0; sdi <= '0;
    end else begin
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
      bypass_full <= ($urandom % 5) == 0;
      if (pdi_valid && bypass_full) n_bypass_stall++;

      // bypass writes
      if (bypass_wr) begin
        n_byp++;
        check(!bypass_full, "bypass write while full");
        check(byp_q.size() > 0 && pdi == byp_q[0],
              $sformatf("bypass word %h, expected %h", pdi, byp_q.size() ? byp_q[0] : 0));
        if (byp_q.size() > 0) void'(byp_q.pop_front());
      end

      // CipherCore stand-in
      key_updated <= key_needs_update && !key_updated && ($urandom % 3 == 0);
      if (key_needs_update && key_updated) begin
        check(key == key_q[0], $sformatf("key %h, expected %h", key, key_q[0]));
        void'(key_q.pop_front());
      end
      bdi_read <= bdi_ready && !bdi_read && ($urandom % 3 == 0);
      if (bdi_read) begin
        blk_t e;
        e = blk_q.pop_front();
        n_blocks++;
        if (bdi_nodata) n_nodata++;
        check({bdi, bdi_size, bdi_ad, bdi_eot, bdi_eoi, bdi_nodata, bdi_decrypt, bdi_nsec} == e,
              $sformatf("block %0d: %h size %0d ad%b eot%b eoi%b nodata%b dec%b nsec%b, expected %h size %0d ad%b eot%b eoi%b nodata%b dec%b nsec%b",
                        n_blocks, bdi, bdi_size, bdi_ad, bdi_eot, bdi_eoi, bdi_nodata, bdi_decrypt,
                        bdi_nsec, e.data, e.size, e.ad, e.eot, e.eoi, e.nodata, e.dec, e.nsec));
        if (bdi_nsec) n_nsec++;
        else begin
          check(iv_ready && iv == iv_q[0], "iv with the block");
          check(bdi_proc, "bdi_proc during an operation");
        end
        if (bdi_eoi && !bdi_decrypt) begin
          check(len_a == lena_q[0] && len_d == lend_q[0],
                $sformatf("lengths %0d/%0d, expected %0d/%0d", len_a, len_d, lena_q[0], lend_q[0]));
          void'(lena_q.pop_front()); void'(lend_q.pop_front()); void'(iv_q.pop_front());
        end
      end
      msg_auth_done <= exp_tag_ready && !msg_auth_done && ($urandom % 4 == 0);
      if (msg_auth_done) begin
        check(exp_tag == tag_q[0], $sformatf("exp_tag %h, expected %h", exp_tag, tag_q[0]));
        check(len_a == lena_q[0] && len_d == lend_q[0], "lengths of a decryption");
        void'(tag_q.pop_front()); void'(lena_q.pop_front()); void'(lend_q.pop_front());
        void'(iv_q.pop_front());
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  function automatic logic [31:0] hdr(input logic [7:0] id, input logic [3:0] t,
                                      input bit eoi, input bit eot, input int len);
    return {id, t, 2'b00, eoi, eot, 16'(len)};
  endfunction

  task automatic push_bytes(input logic [7:0] b[$], input int from, input int len,
                            input bit to_bypass);
    for (int i = 0; i < len; i += 4) begin
      logic [31:0] w;
      for (int j = 0; j < 4; j++) w[31-8*j -: 8] = (i + j < len) ? b[from+i+j] : 8'($urandom);
      pdi_q.push_back(w);
      if (to_bypass) byp_q.push_back(w);
    end
  endtask

  // blocks of one data type: 16 bytes each, the last one zero padded
  task automatic push_blocks(input logic [7:0] b[$], input bit ad, input bit eoi,
                             input bit dec);
    for (int i = 0; i < b.size(); i += 16) begin
      blk_t e;
      int n = (b.size() - i < 16) ? b.size() - i : 16;
      e = '0;
      for (int j = 0; j < n; j++) e.data[127-8*j -: 8] = b[i+j];
      e.size = 4'(n);
      e.ad = ad; e.dec = dec;
      e.eot = (i + 16 >= b.size());
      e.eoi = e.eot && eoi;
      blk_q.push_back(e);
    end
  endtask

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

  // a key, followed by an Nsec segment (Key header EOI = 0) if nsec_len > 0;
  // Nsec bytes come out as blocks marked bdi_nsec
  task automatic load_key(input logic [127:0] k, input int nsec_len = 0);
    logic [7:0] n[$];
    pdi_q.push_back({8'h00, 4'h0, OP_ACTKEY, 8'h00, 8'h00});
    byp_q.push_back(pdi_q[$]);
    sdi_q.push_back({8'h00, 4'h0, OP_LDKEY, 8'h00, 8'h00});
    sdi_q.push_back(hdr(8'h00, ST_KEY, nsec_len == 0, 1'b1, 16));
    for (int i = 0; i < 4; i++) sdi_q.push_back(k[127-32*i -: 32]);
    key_q.push_back(k);
    if (nsec_len > 0) begin
      for (int i = 0; i < nsec_len; i++) n.push_back(8'($urandom));
      sdi_q.push_back(hdr(8'h00, ST_NSEC, 1'b1, 1'b1, nsec_len));
      for (int i = 0; i < nsec_len; i += 4) begin
        logic [31:0] w;
        for (int j = 0; j < 4; j++) w[31-8*j -: 8] = (i + j < nsec_len) ? n[i+j] : 8'($urandom);
        sdi_q.push_back(w);
      end
      for (int i = 0; i < nsec_len; i += 16) begin
        blk_t e = '0;
        int   c = (nsec_len - i < 16) ? nsec_len - i : 16;
        for (int j = 0; j < c; j++) e.data[127-8*j -: 8] = n[i+j];
        e.size = 4'(c);
        e.eot  = (i + 16 >= nsec_len);
        e.nsec = 1'b1;
        blk_q.push_back(e);
      end
    end
  endtask

  task automatic run_op(input bit dec, input int ad_len, input int m_len,
                        input int ad_segs, input int m_segs,
                        input bit has_ad_hdr, input bit has_m_hdr);
    logic [7:0]   ad[$], m[$];
    logic [127:0] npub, t;
    int           ad_l[$], m_l[$], pos;
    logic [31:0]  inst;
    logic [7:0]   id = 8'($urandom);
    blk_t         e;
    npub = {$urandom, $urandom, $urandom, $urandom};
    t    = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < ad_len; i++) ad.push_back(8'($urandom));
    for (int i = 0; i < m_len; i++)  m.push_back(8'($urandom));
    has_ad_hdr |= ad_len > 0;
    has_m_hdr  |= m_len > 0;
    split(ad_len, ad_segs, ad_l);
    split(m_len, m_segs, m_l);

    inst = {id, 4'h0, dec ? OP_DEC : OP_ENC, 8'h00, 8'h00};
    pdi_q.push_back(inst); byp_q.push_back(inst);
    pdi_q.push_back(hdr(id, ST_NPUB, !has_ad_hdr && !has_m_hdr, 1'b1, 16));
    byp_q.push_back(pdi_q[$]);
    for (int i = 0; i < 4; i++) begin
      pdi_q.push_back(npub[127-32*i -: 32]);
      byp_q.push_back(pdi_q[$]);
    end
    iv_q.push_back(npub);

    pos = 0;
    if (has_ad_hdr) foreach (ad_l[k]) begin
      bit last = (k == ad_l.size() - 1);
      pdi_q.push_back(hdr(id, ST_AD, last && !has_m_hdr, last, ad_l[k]));
      byp_q.push_back(pdi_q[$]);
      push_bytes(ad, pos, ad_l[k], 1'b1);
      pos += ad_l[k];
    end
    push_blocks(ad, 1'b1, !has_m_hdr, dec);

    pos = 0;
    if (has_m_hdr) foreach (m_l[k]) begin
      bit last = (k == m_l.size() - 1);
      pdi_q.push_back(hdr(id, dec ? ST_CT : ST_MSG, last, last, m_l[k]));
      byp_q.push_back(pdi_q[$]);
      push_bytes(m, pos, m_l[k], 1'b0);
      pos += m_l[k];
    end
    push_blocks(m, 1'b0, 1'b1, dec);

    // the segment that carries EOI is empty: an empty block closes the input
    if ((has_m_hdr && m_len == 0) || (!has_m_hdr && ad_len == 0)) begin
      e = '0;
      e.ad = !has_m_hdr && has_ad_hdr;
      e.eot = 1'b1; e.eoi = 1'b1; e.nodata = 1'b1; e.dec = dec;
      blk_q.push_back(e);
    end

    if (dec) begin
      pdi_q.push_back(hdr(id, ST_TAG, 1'b1, 1'b1, 16));
      byp_q.push_back(pdi_q[$]);
      for (int i = 0; i < 4; i++) pdi_q.push_back(t[127-32*i -: 32]);
      tag_q.push_back(t);
    end
    lena_q.push_back(ad_len);
    lend_q.push_back(m_len);
  endtask

  initial begin
    rst = 1'b1;
    load_key({$urandom, $urandom, $urandom, $urandom});
    run_op(0, 20, 37, 2, 2, 1, 1);
    run_op(1, 33, 16, 3, 1, 1, 1);
    run_op(0, 0, 0, 1, 1, 1, 1);     // empty AD and message
    run_op(1, 0, 0, 1, 1, 0, 0);     // only Npub and tag
    run_op(0, 7, 0, 1, 1, 1, 0);     // AD only, EOI on the AD segment
    run_op(1, 0, 5, 1, 1, 0, 1);
    load_key({$urandom, $urandom, $urandom, $urandom}, 37);   // with a 37-byte Nsec
    for (int i = 0; i < 10; i++)
      run_op(1'($urandom % 2), $urandom % 60, $urandom % 60, 1 + $urandom % 3,
             1 + $urandom % 3, 1'($urandom % 2), 1'($urandom % 2));
    repeat (3) @(posedge clk);
    rst = 1'b0;
    while (pdi_q.size() > 0 || sdi_q.size() > 0 || blk_q.size() > 0 || tag_q.size() > 0)
      @(posedge clk);
    repeat (20) @(posedge clk);
    check(byp_q.size() == 0 && key_q.size() == 0, "all bypass words and keys seen");
    check(n_nodata > 0 && n_bypass_stall > 0, "empty blocks and bypass stalls exercised");
    check(n_nsec == 3, $sformatf("%0d Nsec blocks, expected 3", n_nsec));
    check(!bdi_proc && !iv_ready && !key_needs_update && key_ready, "idle with a key at the end");
    $display("blocks=%0d bypass_words=%0d nodata=%0d bypass_stalls=%0d nsec=%0d",
             n_blocks, n_byp, n_nodata, n_bypass_stall, n_nsec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog, %0d words and %0d blocks left", pdi_q.size(), blk_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
