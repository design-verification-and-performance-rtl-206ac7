// tb_taxi_rx: checks the receive back end. The testbench plays the receive FIFO,
// feeding a word stream made of packets of all five channels (AR and AW commands,
// write data beats of each AW burst, read data, write responses) mixed with link
// commands, and plays the link-command block by sending back the accumulated credit
// at random. It only sends a packet when it holds credit for it, so the test also
// checks that credit is returned exactly for the storage entries freed. The AXI
// outputs are stalled at random. Checks: every transfer is issued once, in order,
// with the sent fields; WLAST is high exactly on the last beat of each burst; ARQOS
// and AWQOS carry the forwarded QoS only when forwarding is enabled; credit, state
// and control link commands appear on their outputs; all credit comes back.
module tb_taxi_rx;
  import taxi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic srst = 0;
  logic [16:0] rd_word = '0;
  logic rd_empty = 1, rd_pop;
  logic m_ar_valid, m_ar_ready = 0, m_aw_valid, m_aw_ready = 0, m_w_valid, m_w_ready = 0;
  axi_a_t m_ar, m_aw;
  axi_w_t m_w;
  logic s_r_valid, s_r_ready = 0, s_b_valid, s_b_ready = 0;
  axi_r_t s_r;
  axi_b_t s_b;
  logic cred_ret_valid;
  chan_e cred_ret_ch;
  logic [CRED_CNTW-1:0] cred_ret_cnt;
  link_state_e remote_state;
  logic remote_en, remote_rst_req, qos_fwd_en = 1, rx_busy;
  logic [3:0] fwd_qos;
  logic [CRED_CNTW-1:0] cred_acc [NCH];
  logic cred_sent_valid = 0;
  chan_e cred_sent_ch = CH_AR;
  logic [CRED_CNTW-1:0] cred_sent_cnt = 0;
  int checks = 0, failures = 0;

  localparam int DEPTH [NCH] = '{8, 8, 32, 32, 8};
  logic [16:0] wq [$];
  axi_a_t exp_ar [$], exp_aw [$];
  axi_w_t exp_w [$];
  axi_r_t exp_r [$];
  axi_b_t exp_b [$];
  int credit [NCH], issued [NCH], pend_beats [$], wlens [$];
  int ret_sent [NCH], ret_seen [NCH], n_rst_sent = 0, n_rst_seen = 0;
  logic [3:0] qos_now = 0;

  taxi_rx #(.TAXI_DW(16)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_pkt(pkt_t p);
    chan_e ch = chan_e'(p[PKT_W-1 -: 3]);
    for (int i = 0; i < pkt_words(ch, 16); i++) wq.push_back({1'b1, p[PKT_W-1-16*i -: 16]});
    credit[ch]--;
  endtask
  task automatic send_lcmd(lcmd_e c, logic [12:0] arg);
    wq.push_back({1'b0, c, arg});
  endtask

  // receive FIFO pops and AXI handshakes, with the values before the rising edge
  always @(posedge clk) if (rst_n) begin
    if (rd_pop) begin
      chk(!rd_empty, "pop only when not empty");
      void'(wq.pop_front());
    end
    if (m_ar_valid && m_ar_ready) begin
      chk(exp_ar.size() != 0 && m_ar.id == exp_ar[0].id && m_ar.addr == exp_ar[0].addr && m_ar.len == exp_ar[0].len &&
          m_ar.size == exp_ar[0].size && m_ar.burst == exp_ar[0].burst && m_ar.prot == exp_ar[0].prot, "AR fields");
      chk(m_ar.qos == (qos_fwd_en ? qos_now : 4'd0), "ARQOS");
      void'(exp_ar.pop_front()); issued[CH_AR]++;
    end
    if (m_aw_valid && m_aw_ready) begin
      chk(exp_aw.size() != 0 && m_aw.id == exp_aw[0].id && m_aw.addr == exp_aw[0].addr && m_aw.len == exp_aw[0].len &&
          m_aw.size == exp_aw[0].size && m_aw.burst == exp_aw[0].burst && m_aw.prot == exp_aw[0].prot, "AW fields");
      chk(m_aw.qos == (qos_fwd_en ? qos_now : 4'd0), "AWQOS");
      void'(exp_aw.pop_front()); issued[CH_AW]++;
    end
    if (m_w_valid && m_w_ready) begin
      chk(exp_w.size() != 0 && m_w == exp_w[0], "W fields and WLAST");
      void'(exp_w.pop_front()); issued[CH_WD]++;
    end
    if (s_r_valid && s_r_ready) begin
      chk(exp_r.size() != 0 && s_r == exp_r[0], "R fields");
      void'(exp_r.pop_front()); issued[CH_RR]++;
    end
    if (s_b_valid && s_b_ready) begin
      chk(exp_b.size() != 0 && s_b == exp_b[0], "B fields");
      void'(exp_b.pop_front()); issued[CH_BR]++;
    end
    if (cred_sent_valid) credit[cred_sent_ch] += cred_sent_cnt;
    if (cred_ret_valid) ret_seen[cred_ret_ch] += cred_ret_cnt;
    if (remote_rst_req) n_rst_seen++;
  end

  function automatic axi_a_t rand_a(int len);
    axi_a_t a;
    a = '{id: 10'($urandom), addr: {4'($urandom), 32'($urandom)}, len: 4'(len), size: 3'($urandom),
          burst: 2'($urandom), prot: 1'($urandom), qos: '0};
    return a;
  endfunction

  // only_w: send just the write data still owed to AW bursts already sent
  task automatic add_traffic(bit only_w);
    int k = only_w ? 2 : $urandom % 7;
    case (k)
      0: if (credit[CH_AR] > 0) begin
           axi_a_t a = rand_a($urandom % 16);
           send_pkt(pack_a(CH_AR, a)); exp_ar.push_back(a);
         end
      1: if (credit[CH_AW] > 0) begin
           axi_a_t a = rand_a($urandom % 8);
           send_pkt(pack_a(CH_AW, a)); exp_aw.push_back(a);
           pend_beats.push_back(a.len + 1); wlens.push_back(a.len + 1);
         end
      2, 3: if (credit[CH_WD] > 0 && pend_beats.size() != 0) begin
           axi_w_t w = '{data: $urandom, strb: 4'($urandom), last: 1'b0};
           send_pkt(pack_w(w));
           pend_beats[0]--;
           w.last = pend_beats[0] == 0;
           if (w.last) void'(pend_beats.pop_front());
           exp_w.push_back(w);
         end
      4: if (credit[CH_RR] > 0) begin
           axi_r_t r = '{id: 10'($urandom), data: $urandom, resp: 2'($urandom), last: 1'($urandom)};
           send_pkt(pack_r(r)); exp_r.push_back(r);
         end
      5: if (credit[CH_BR] > 0) begin
           axi_b_t b = '{id: 10'($urandom), resp: 2'($urandom)};
           send_pkt(pack_b(b)); exp_b.push_back(b);
         end
      default: begin
           int c = $urandom % NCH;
           int n = 1 + $urandom % 20;
           send_lcmd(LC_CREDIT, {3'(c), 10'(n)}); ret_sent[c] += n;
         end
    endcase
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) begin credit[c] = DEPTH[c]; issued[c] = 0; ret_sent[c] = 0; ret_seen[c] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    // link commands: state, control, QoS
    @(negedge clk);
    send_lcmd(LC_STATE, 13'(LINK_READY));
    send_lcmd(LC_CTRL, 13'b11); n_rst_sent++;
    send_lcmd(LC_QOS, 13'd9);
    rd_empty = 0; rd_word = wq[0];
    while (wq.size() != 0) begin @(negedge clk); rd_empty = wq.size() == 0; rd_word = rd_empty ? '0 : wq[0]; end
    @(negedge clk); rd_empty = 1;
    repeat (2) @(negedge clk);
    chk(remote_state == LINK_READY && remote_en && n_rst_seen == 1 && fwd_qos == 9, "state, control and QoS commands");
    qos_now = 9;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (i == 4000) qos_fwd_en = 0;
      if (wq.size() < 20) add_traffic(i >= 5000);
      rd_empty = wq.size() == 0 || ($urandom % 4 == 0);
      rd_word = rd_empty ? '0 : wq[0];
      m_ar_ready = $urandom % 3 != 0; m_aw_ready = $urandom % 3 != 0; m_w_ready = $urandom % 2 != 0;
      s_r_ready = $urandom % 3 != 0; s_b_ready = $urandom % 3 != 0;
      cred_sent_valid = 0;
      begin
        automatic int c = $urandom % NCH;
        if (cred_acc[c] != 0 && $urandom % 4 == 0) begin
          cred_sent_valid = 1; cred_sent_ch = chan_e'(c); cred_sent_cnt = cred_acc[c];
        end
      end
    end
    @(negedge clk); rd_empty = 1; cred_sent_valid = 0;
    m_ar_ready = 1; m_aw_ready = 1; m_w_ready = 1; s_r_ready = 1; s_b_ready = 1;
    repeat (5) @(negedge clk);
    chk(!rx_busy, "receiver idle at end");
    for (int c = 0; c < NCH; c++) begin
      if (cred_acc[c] != 0) begin
        cred_sent_valid = 1; cred_sent_ch = chan_e'(c); cred_sent_cnt = cred_acc[c];
        @(negedge clk); cred_sent_valid = 0;
      end
    end
    @(negedge clk);
    chk(exp_ar.size() == 0 && exp_aw.size() == 0 && exp_w.size() == 0 && exp_r.size() == 0 && exp_b.size() == 0,
        "every transfer issued");
    for (int c = 0; c < NCH; c++) begin
      chk(credit[c] == DEPTH[c], $sformatf("all credit of channel %0d returned (%0d of %0d)", c, credit[c], DEPTH[c]));
      chk(ret_seen[c] == ret_sent[c], $sformatf("credit link commands of channel %0d", c));
      chk(issued[c] > 20, $sformatf("traffic on channel %0d: %0d", c, issued[c]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
