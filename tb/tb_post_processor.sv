// tb_post_processor: test of the PostProcessor with a 16-word AUX FIFO.
//
// The Bypass FIFO is modelled as a queue with random empty cycles; a
// CipherCore stand-in writes output blocks (with garbage beyond bdo_size),
// tags and tag-check results from an event list. The bypass stream also holds
// what the unit must drop: Activate Key instructions, the Npub of decryptions
// and their Tag headers. The expected output stream
// is built from the same byte strings: copied headers with Message and
// Ciphertext swapped and EOI cleared in encryptions, data cut to segment
// lengths with cleared tails, an appended Tag segment for encryptions, and
// for decryptions the stored output after a valid tag or a single error word
// after an invalid tag or an AUX FIFO overflow. It also checks that nothing of
// a decryption appears on the output before its tag check is done.
module tb_post_processor;
  import aead_pkg::*;

  logic clk, rst;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [127:0] bdo_data, tag_data;
  logic         bdo_ready, bdo_write, tag_ready, tag_write, msg_auth_valid, msg_auth_done;
  logic [4:0]   bdo_size;
  logic [31:0]  do_data, bypass_data, aux_din, aux_dout;
  logic         do_valid, do_ready, bypass_rd, bypass_empty;
  logic [3:0]   aux_ctrl;
  logic [2:0]   aux_status;

  post_processor dut (
    .clk, .rst, .bdo_data, .tag_data, .bdo_ready, .bdo_write, .bdo_size,
    .tag_ready, .tag_write, .msg_auth_valid, .msg_auth_done,
    .do_data, .do_valid, .do_ready, .bypass_rd, .bypass_empty, .bypass_data,
    .aux_fifo_din(aux_din), .aux_fifo_ctrl(aux_ctrl), .aux_fifo_dout(aux_dout),
    .aux_fifo_status(aux_status)
  );

  aux_fifo #(.W(32), .DEPTH(16)) u_aux (
    .clk, .rst, .din(aux_din), .ctrl(aux_ctrl), .dout(aux_dout), .status(aux_status)
  );

  typedef enum logic [1:0] {EV_BLOCK, EV_TAG, EV_AUTH} ev_kind_e;
  typedef struct packed {
    ev_kind_e     kind;
    logic [127:0] data;
    logic [4:0]   size;
    logic         ok;
  } ev_t;

  int checks = 0, failures = 0;
  logic [31:0] byp_q[$], exp_q[$];
  ev_t         ev_q[$];
  int          n_out = 0, n_err = 0, n_wait_violations = 0, n_aux_writes = 0;
  int          need_q[$];          // tag checks that must precede each word
  int          n_auth = 0, n_dec_ops = 0;
  int          delay = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst) begin
      bypass_empty <= 1'b1; bypass_data <= '0; do_ready <= 1'b0;
      bdo_write <= 1'b0; tag_write <= 1'b0; msg_auth_done <= 1'b0;
      msg_auth_valid <= 1'b0; bdo_data <= '0; bdo_size <= '0; tag_data <= '0;
    end else begin
      // Bypass FIFO model
      if (bypass_rd) begin
        check(!bypass_empty, "bypass read while empty");
        void'(byp_q.pop_front());
      end
      bypass_empty <= (byp_q.size() == 0) || ($urandom % 4 == 0);
      if (byp_q.size() > 0) bypass_data <= byp_q[0];
      do_ready <= ($urandom % 3) != 0;
      if (aux_ctrl[0]) n_aux_writes++;
      if (msg_auth_done) n_auth++;

      // output monitor
      if (do_valid && do_ready) begin
        logic [31:0] e;
        n_out++;
        if (need_q.size() > 0 && n_auth < need_q[0]) n_wait_violations++;
        if (need_q.size() > 0) void'(need_q.pop_front());
        e = exp_q.size() ? exp_q.pop_front() : 32'hDEAD_0BAD;
        check(do_data == e, $sformatf("output word %0d is %h, expected %h", n_out, do_data, e));
        if (do_data[31:24] == ERR_CODE && do_data[15:0] == 16'h0) n_err++;
      end

      // CipherCore stand-in
      bdo_write <= 1'b0; tag_write <= 1'b0; msg_auth_done <= 1'b0;
      if (delay > 0) delay--;
      else if (ev_q.size() > 0 && !bdo_write && !tag_write && !msg_auth_done) begin
        case (ev_q[0].kind)
          EV_BLOCK: if (bdo_ready) begin
            bdo_data  <= ev_q[0].data;
            bdo_size  <= ev_q[0].size;
            bdo_write <= 1'b1;
            void'(ev_q.pop_front()); delay = $urandom % 4;
          end
          EV_TAG: if (tag_ready) begin
            tag_data  <= ev_q[0].data;
            tag_write <= 1'b1;
            void'(ev_q.pop_front()); delay = $urandom % 4;
          end
          default: begin
            msg_auth_valid <= ev_q[0].ok;
            msg_auth_done  <= 1'b1;
            void'(ev_q.pop_front()); delay = $urandom % 4;
          end
        endcase
      end
    end
  end

  function automatic logic [31:0] hdr(input logic [7:0] id, input logic [3:0] t,
                                      input bit eoi, input bit eot, input int len);
    return {id, t, 2'b00, eoi, eot, 16'(len)};
  endfunction

  task automatic push_words(ref logic [31:0] q[$], input logic [7:0] b[$], input int from,
                            input int len, input bit garbage);
    for (int i = 0; i < len; i += 4) begin
      logic [31:0] w;
      for (int j = 0; j < 4; j++)
        w[31-8*j -: 8] = (i + j < len) ? b[from+i+j] : (garbage ? 8'($urandom) : 8'h00);
      q.push_back(w);
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

  // out: the output bytes of the CipherCore (ciphertext or plaintext)
  task automatic run_op(input bit dec, input int ad_len, input int m_len, input int ad_segs,
                        input int m_segs, input bit auth_ok);
    logic [7:0]   ad[$], o[$];
    logic [7:0]   id = 8'($urandom);
    logic [127:0] npub = {$urandom, $urandom, $urandom, $urandom};
    logic [127:0] t = {$urandom, $urandom, $urandom, $urandom};
    int           ad_l[$], m_l[$], pos;
    logic [31:0]  out[$];
    ev_t          ev;
    for (int i = 0; i < ad_len; i++) ad.push_back(8'($urandom));
    for (int i = 0; i < m_len; i++)  o.push_back(8'($urandom));
    split(ad_len, ad_segs, ad_l);
    split(m_len, m_segs, m_l);

    // an Activate Key instruction is passed on too, and must be dropped
    if ($urandom % 2) byp_q.push_back({8'h00, 4'h0, OP_ACTKEY, 8'h00, 8'h00});
    byp_q.push_back({id, 4'h0, dec ? OP_DEC : OP_ENC, 8'h00, 8'h00});
    // the Npub is in the bypass stream either way, but output only when encrypting
    byp_q.push_back(hdr(id, ST_NPUB, 1'b0, 1'b1, 16));
    if (!dec) out.push_back(byp_q[$]);
    for (int i = 0; i < 4; i++) begin
      byp_q.push_back(npub[127-32*i -: 32]);
      if (!dec) out.push_back(byp_q[$]);
    end
    pos = 0;
    foreach (ad_l[k]) begin
      bit last = (k == ad_l.size() - 1);
      byp_q.push_back(hdr(id, ST_AD, 1'b0, last, ad_l[k]));
      out.push_back(byp_q[$]);
      push_words(byp_q, ad, pos, ad_l[k], 1'b1);
      push_words(out, ad, pos, ad_l[k], 1'b0);
      pos += ad_l[k];
    end
    pos = 0;
    foreach (m_l[k]) begin
      bit last = (k == m_l.size() - 1);
      byp_q.push_back(hdr(id, dec ? ST_CT : ST_MSG, last, last, m_l[k]));
      out.push_back(hdr(id, dec ? ST_MSG : ST_CT, dec && last, last, m_l[k]));
      push_words(out, o, pos, m_l[k], 1'b0);
      pos += m_l[k];
    end
    // the received Tag header of a decryption is dropped
    if (dec) byp_q.push_back(hdr(id, ST_TAG, 1'b1, 1'b1, 16));
    for (int i = 0; i < m_len; i += 16) begin
      int n = (m_len - i < 16) ? m_len - i : 16;
      ev.kind = EV_BLOCK;
      ev.ok   = 1'b0;
      ev.size = 5'(n);
      for (int j = 0; j < 16; j++) ev.data[127-8*j -: 8] = (j < n) ? o[i+j] : 8'($urandom);
      ev_q.push_back(ev);
    end
    if (dec) begin
      ev.kind = EV_AUTH; ev.ok = auth_ok; ev.data = '0; ev.size = '0;
      ev_q.push_back(ev);
      if (!auth_ok || out.size() > 16) begin
        out.delete();
        out.push_back({ERR_CODE, id, 16'h0});
      end
    end else begin
      ev.kind = EV_TAG; ev.ok = 1'b0; ev.data = t; ev.size = '0;
      ev_q.push_back(ev);
      out.push_back(hdr(id, ST_TAG, 1'b1, 1'b1, 16));
      for (int i = 0; i < 4; i++) out.push_back(t[127-32*i -: 32]);
    end
    if (dec) n_dec_ops++;
    foreach (out[i]) begin
      exp_q.push_back(out[i]);
      need_q.push_back(dec ? n_dec_ops : 0);
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run_op(0, 20, 37, 1, 2, 1'b1);     // message segments split inside a block
    run_op(1, 8, 20, 1, 1, 1'b1);      // decryption, tag valid
    run_op(1, 8, 20, 1, 1, 1'b0);      // decryption, tag invalid
    run_op(1, 4, 80, 1, 1, 1'b1);      // decryption too long for the AUX FIFO
    run_op(0, 0, 0, 1, 1, 1'b1);       // empty AD and message
    for (int i = 0; i < 8; i++)
      run_op(1'(i % 2), $urandom % 20, $urandom % 40, 1 + $urandom % 2, 1 + $urandom % 3,
             1'(i % 3 != 2));
    while (exp_q.size() > 0 || ev_q.size() > 0) @(posedge clk);
    repeat (20) @(posedge clk);
    check(n_wait_violations == 0, $sformatf("%0d output words of a decryption before its tag check",
                                            n_wait_violations));
    check(n_err >= 3 && n_aux_writes > 0, "error words and AUX FIFO writes exercised");
    check(byp_q.size() == 0 && !do_valid, "everything consumed");
    $display("output words=%0d error words=%0d aux writes=%0d", n_out, n_err, n_aux_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog, %0d output words and %0d events left", exp_q.size(), ev_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
