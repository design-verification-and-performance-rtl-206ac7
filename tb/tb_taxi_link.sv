// tb_taxi_link: end-to-end test of a whole Thin-AXI link at its default parameters.
//
// A subsystem-side AXI master (driven here) talks through the link to a memory
// model on the fabric side; a fabric-side master talks through the other direction
// to a peripheral model on the subsystem side. The AXI clocks (10 ns and 7 ns) are
// slower than and unrelated to the T-AXI clock (4 ns). The test walks the link
// through its life: dummy slave while disabled, enable from the link-master end,
// write and read bursts of every length with data checked against a shadow copy,
// many outstanding reads against a slow memory (credit exhaustion), QoS
// forwarding, a link reset with traffic before and after, swapping the link master,
// disable, and clock gating. Every mechanism is counted and must happen at least
// once: link stall, repeater holding, credit exhaustion, QoS forwarding, dummy
// slave, reset, clock gated off and on, outstanding counts in the status register.
module tb_taxi_link;
  import taxi_pkg::*;

  logic clk_src = 0, clk_u = 0, clk_d = 0;
  logic por_n = 0, rst_u_n = 0, rst_d_n = 0;
  always #2 clk_src = ~clk_src;
  always #5 clk_u = ~clk_u;
  always #3.5 clk_d = ~clk_d;

  // ---------------- DUT signals ----------------
  logic        clk_on;
  logic        u_psel = 0, u_penable = 0, u_pwrite = 0, d_psel = 0, d_penable = 0, d_pwrite = 0;
  logic [7:0]  u_paddr = 0, d_paddr = 0;
  logic [31:0] u_pwdata = 0, d_pwdata = 0, u_prdata, d_prdata;
  logic        u_pready, d_pready;
  link_state_e link_state_u, link_state_d;

  logic u_s_ar_valid = 0, u_s_ar_ready, u_s_aw_valid = 0, u_s_aw_ready, u_s_w_valid = 0, u_s_w_ready;
  logic u_s_r_valid, u_s_r_ready = 1, u_s_b_valid, u_s_b_ready = 1;
  axi_a_t u_s_ar = '0, u_s_aw = '0; axi_w_t u_s_w = '0; axi_r_t u_s_r; axi_b_t u_s_b;
  logic d_s_ar_valid = 0, d_s_ar_ready, d_s_aw_valid = 0, d_s_aw_ready, d_s_w_valid = 0, d_s_w_ready;
  logic d_s_r_valid, d_s_r_ready = 1, d_s_b_valid, d_s_b_ready = 1;
  axi_a_t d_s_ar = '0, d_s_aw = '0; axi_w_t d_s_w = '0; axi_r_t d_s_r; axi_b_t d_s_b;

  logic u_m_ar_valid, u_m_ar_ready, u_m_aw_valid, u_m_aw_ready, u_m_w_valid, u_m_w_ready;
  logic u_m_r_valid, u_m_r_ready, u_m_b_valid, u_m_b_ready;
  axi_a_t u_m_ar, u_m_aw; axi_w_t u_m_w; axi_r_t u_m_r; axi_b_t u_m_b;
  logic d_m_ar_valid, d_m_ar_ready, d_m_aw_valid, d_m_aw_ready, d_m_w_valid, d_m_w_ready;
  logic d_m_r_valid, d_m_r_ready, d_m_b_valid, d_m_b_ready;
  axi_a_t d_m_ar, d_m_aw; axi_w_t d_m_w; axi_r_t d_m_r; axi_b_t d_m_b;

  taxi_link dut (.*, .clk_taxi_src(clk_src), .clk_axi_u(clk_u), .clk_axi_d(clk_d));

  // ---------------- slave models ----------------
  int mem_slow = 0, per_slow = 0;
  logic mem_ar_hold = 0;
  int mem_wlast_err, per_wlast_err, mem_n_ar, per_n_ar;
  logic [3:0] mem_arqos, mem_awqos, per_arqos, per_awqos;
  tb_axi_mem u_mem (.clk(clk_d), .rst_n(rst_d_n), .slow(mem_slow), .ar_hold(mem_ar_hold),
    .ar_valid(d_m_ar_valid), .ar_ready(d_m_ar_ready), .ar(d_m_ar),
    .aw_valid(d_m_aw_valid), .aw_ready(d_m_aw_ready), .aw(d_m_aw),
    .w_valid(d_m_w_valid), .w_ready(d_m_w_ready), .w(d_m_w),
    .r_valid(d_m_r_valid), .r_ready(d_m_r_ready), .r(d_m_r),
    .b_valid(d_m_b_valid), .b_ready(d_m_b_ready), .b(d_m_b),
    .wlast_err(mem_wlast_err), .n_ar(mem_n_ar), .last_arqos(mem_arqos), .last_awqos(mem_awqos));
  tb_axi_mem u_per (.clk(clk_u), .rst_n(rst_u_n), .slow(per_slow), .ar_hold(1'b0),
    .ar_valid(u_m_ar_valid), .ar_ready(u_m_ar_ready), .ar(u_m_ar),
    .aw_valid(u_m_aw_valid), .aw_ready(u_m_aw_ready), .aw(u_m_aw),
    .w_valid(u_m_w_valid), .w_ready(u_m_w_ready), .w(u_m_w),
    .r_valid(u_m_r_valid), .r_ready(u_m_r_ready), .r(u_m_r),
    .b_valid(u_m_b_valid), .b_ready(u_m_b_ready), .b(u_m_b),
    .wlast_err(per_wlast_err), .n_ar(per_n_ar), .last_arqos(per_arqos), .last_awqos(per_awqos));

  // ---------------- scoreboard ----------------
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic [31:0] shadow [4096];      // expected memory contents (fabric side)
  logic [31:0] pshadow [4096];     // expected peripheral contents (subsystem side)
  initial for (int i = 0; i < 4096; i++) begin shadow[i] = 32'hA500_0000 | i; pshadow[i] = 32'hA500_0000 | i; end

  // ---------------- mechanism counters ----------------
  int n_link_stall = 0, n_rep_hold = 0, n_cred_zero = 0, n_qos_fwd = 0, n_dummy = 0;
  int n_reset = 0, n_gate_off = 0, n_gate_on = 0, n_out_cnt = 0, n_swap = 0;
  logic clk_on_q = 1;
  always @(posedge clk_src) begin
    if (dut.up_s[0] || dut.dn_s[0] || dut.up_s[dut.N_REP] || dut.dn_s[dut.N_REP]) n_link_stall++;
    if (dut.g_rep[0].u_rep_up.cnt != 0 || dut.g_rep[0].u_rep_dn.cnt != 0 ||
        dut.g_rep[1].u_rep_up.cnt != 0 || dut.g_rep[1].u_rep_dn.cnt != 0) n_rep_hold++;
    if (por_n && clk_on_q && !clk_on) n_gate_off++;
    if (por_n && !clk_on_q && clk_on) n_gate_on++;
    clk_on_q <= clk_on;
  end
  always @(posedge clk_u) begin
    if (link_state_u == LINK_ACTIVE && u_s_ar_valid && dut.u_up.u_tx.cred[CH_AR] == 0) n_cred_zero++;
    if (link_state_u == LINK_RESET) n_reset++;
  end

  // ---------------- APB ----------------
  task automatic apb_u(input bit wr, input logic [7:0] a, input logic [31:0] wd, output logic [31:0] rd);
    @(posedge clk_u); u_psel <= 1; u_pwrite <= wr; u_paddr <= a; u_pwdata <= wd;
    @(posedge clk_u); u_penable <= 1;
    @(posedge clk_u); rd = u_prdata; u_psel <= 0; u_penable <= 0; u_pwrite <= 0;
  endtask
  task automatic apb_d(input bit wr, input logic [7:0] a, input logic [31:0] wd, output logic [31:0] rd);
    @(posedge clk_d); d_psel <= 1; d_pwrite <= wr; d_paddr <= a; d_pwdata <= wd;
    @(posedge clk_d); d_penable <= 1;
    @(posedge clk_d); rd = d_prdata; d_psel <= 0; d_penable <= 0; d_pwrite <= 0;
  endtask

  // ---------------- subsystem-side master ----------------
  logic [9:0] next_id = 0;
  task automatic u_write(input logic [35:0] addr, input int len, input logic [3:0] qos, input bit check_resp);
    axi_a_t a = '0;
    a.id = next_id++; a.addr = addr; a.len = 4'(len); a.size = 3'd2; a.burst = 2'b01; a.qos = qos;
    @(posedge clk_u); u_s_aw <= a; u_s_aw_valid <= 1;
    do @(posedge clk_u); while (!u_s_aw_ready);
    u_s_aw_valid <= 0;
    for (int i = 0; i <= len; i++) begin
      logic [31:0] d = $urandom;
      u_s_w <= '{data: d, strb: 4'hF, last: i == len}; u_s_w_valid <= 1;
      do @(posedge clk_u); while (!u_s_w_ready);
      if (check_resp) shadow[12'(addr[13:2] + 12'(i))] = d;
    end
    u_s_w_valid <= 0;
    do @(posedge clk_u); while (!u_s_b_valid);
    if (check_resp) check(u_s_b.id == a.id && u_s_b.resp == 2'b00, "write response id/resp");
  endtask

  // reads: issue commands here, check data in the collector below
  logic [35:0] rq_addr [$];
  int          rq_len [$];
  logic [9:0]  rq_id [$];
  bit          rq_check [$];
  int          rbeat = 0;
  task automatic u_read_issue(input logic [35:0] addr, input int len, input logic [3:0] qos, input bit chk);
    axi_a_t a = '0;
    a.id = next_id++; a.addr = addr; a.len = 4'(len); a.size = 3'd2; a.burst = 2'b01; a.qos = qos;
    rq_addr.push_back(addr); rq_len.push_back(len); rq_id.push_back(a.id); rq_check.push_back(chk);
    @(posedge clk_u); u_s_ar <= a; u_s_ar_valid <= 1;
    do @(posedge clk_u); while (!u_s_ar_ready);
    u_s_ar_valid <= 0;
  endtask
  always @(posedge clk_u) begin
    if (rst_u_n && u_s_r_valid && u_s_r_ready) begin
      if (rq_addr.size() == 0) check(0, "read data with no read outstanding");
      else begin
        if (rq_check[0])
          check(u_s_r.data == shadow[12'(rq_addr[0][13:2] + 12'(rbeat))] && u_s_r.id == rq_id[0],
                $sformatf("read data addr %h beat %0d got %h", rq_addr[0], rbeat, u_s_r.data));
        check(u_s_r.last == (rbeat == rq_len[0]), "RLAST position");
        if (u_s_r.last) begin
          void'(rq_addr.pop_front()); void'(rq_len.pop_front()); void'(rq_id.pop_front());
          void'(rq_check.pop_front()); rbeat = 0;
        end else rbeat++;
      end
    end
  end
  task automatic u_wait_reads();
    while (rq_addr.size() != 0) @(posedge clk_u);
  endtask

  // ---------------- fabric-side master (single transfers) ----------------
  task automatic d_write(input logic [35:0] addr, input logic [31:0] d);
    axi_a_t a = '0;
    a.id = 10'h3F0; a.addr = addr; a.size = 3'd2; a.burst = 2'b01;
    @(posedge clk_d); d_s_aw <= a; d_s_aw_valid <= 1;
    d_s_w <= '{data: d, strb: 4'hF, last: 1'b1}; d_s_w_valid <= 1;
    fork
      begin do @(posedge clk_d); while (!d_s_aw_ready); d_s_aw_valid <= 0; end
      begin do @(posedge clk_d); while (!d_s_w_ready);  d_s_w_valid  <= 0; end
    join
    do @(posedge clk_d); while (!d_s_b_valid);
    check(d_s_b.id == 10'h3F0, "fabric-side write response id");
    pshadow[addr[13:2]] = d;
  endtask
  task automatic d_read(input logic [35:0] addr, input int len);
    axi_a_t a = '0;
    a.id = 10'h2A5; a.addr = addr; a.len = 4'(len); a.size = 3'd2; a.burst = 2'b01;
    @(posedge clk_d); d_s_ar <= a; d_s_ar_valid <= 1;
    do @(posedge clk_d); while (!d_s_ar_ready);
    d_s_ar_valid <= 0;
    for (int i = 0; i <= len; i++) begin
      do @(posedge clk_d); while (!d_s_r_valid);
      check(d_s_r.data == pshadow[12'(addr[13:2] + 12'(i))] && d_s_r.id == 10'h2A5 &&
            d_s_r.last == (i == len), $sformatf("fabric-side read beat %0d", i));
    end
  endtask

  task automatic wait_state(input link_state_e su, input link_state_e sd, input int max_cycles, input string what);
    int n = 0;
    while ((link_state_u != su || link_state_d != sd) && n < max_cycles) begin @(posedge clk_u); n++; end
    check(link_state_u == su && link_state_d == sd, what);
    repeat (40) @(posedge clk_u);   // let the last state commands cross
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk_src);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random ready on the subsystem master's response channels
  always @(posedge clk_u) u_s_r_ready <= ($urandom % 4) != 0;

  // ---------------- the test ----------------
  logic [31:0] rd;
  initial begin
    repeat (5) @(posedge clk_u);
    por_n = 1; rst_u_n = 1; rst_d_n = 1;
    repeat (10) @(posedge clk_u);

    // register defaults
    apb_u(0, 8'h00, 0, rd); check(rd == 32'h08, "subsystem TAXI_CTRL default 0x08");
    apb_d(0, 8'h00, 0, rd); check(rd == 32'h0C, "fabric TAXI_CTRL default (LinkCtrlMaster, QoS)");
    apb_u(0, 8'h0C, 0, rd); check(rd == 32'h401, "AR_CREDIT_CTRL default");
    apb_u(0, 8'h10, 0, rd); check(rd == 32'h0010_0401, "AW_CREDIT_CTRL default");
    apb_u(0, 8'h14, 0, rd); check(rd == 32'h1001, "RR_CREDIT_CTRL default");
    apb_u(0, 8'h18, 0, rd); check(rd == 32'h401, "BR_CREDIT_CTRL default");
    apb_u(0, 8'h04, 0, rd); check(rd[3:1] == 3'h0, "LinkState DISABLED after reset");

    // dummy slave while disabled
    u_read_issue(36'h100, 3, 0, 0);
    u_wait_reads();
    u_write(36'h100, 1, 0, 0);
    apb_u(0, 8'h04, 0, rd); check(rd[8], "DummyAccessed set"); if (rd[8]) n_dummy++;
    check(u_mem.n_ar == 0, "dummy slave kept traffic off the link");
    apb_u(1, 8'h04, 0, rd); apb_u(0, 8'h04, 0, rd); check(!rd[8], "DummyAccessed cleared by write");

    // enable from the link master (fabric end): raise the credits to their maxima first
    apb_u(1, 8'h0C, 32'h801, rd); apb_u(1, 8'h10, 32'h0020_0801, rd);
    apb_u(1, 8'h14, 32'h2001, rd); apb_u(1, 8'h18, 32'h801, rd);
    apb_d(1, 8'h0C, 32'h801, rd); apb_d(1, 8'h10, 32'h0020_0801, rd);
    apb_d(1, 8'h14, 32'h2001, rd); apb_d(1, 8'h18, 32'h801, rd);
    apb_d(1, 8'h00, 32'h0D, rd);
    wait_state(LINK_ACTIVE, LINK_ACTIVE, 2000, "both ends ACTIVE after enable");
    apb_u(0, 8'h04, 0, rd); check(rd == 32'h8000_0006, $sformatf("subsystem TAXI_STATUS 0x80000006 when active, got %h", rd));

    // write then read bursts of every length
    for (int len = 0; len < 16; len++) u_write(36'h1000 + 36'(len * 64), len, 0, 1);
    for (int len = 0; len < 16; len++) u_read_issue(36'h1000 + 36'(len * 64), len, 0, 1);
    u_wait_reads();
    check(mem_wlast_err == 0, "WLAST rebuilt at the far end");

    // many outstanding reads against a slow memory: credit runs out; outstanding count seen
    mem_slow = 12;
    fork
      for (int k = 0; k < 24; k++) u_read_issue(36'h1000 + 36'(k * 16), 7, 0, 1);
      begin
        repeat (60) @(posedge clk_u);
        apb_u(0, 8'h04, 0, rd);
        if (rd[20:13] != 0) n_out_cnt++;
        check(rd[20:13] != 0, "OutstandingReadCount non-zero during reads");
        check(!rd[0], "Idle low while reads outstanding");
      end
    join
    u_wait_reads();
    mem_slow = 0;

    // QoS forwarding: hold the memory's ARREADY so the QoS command overtakes the command
    mem_ar_hold = 1;
    u_read_issue(36'h2000, 0, 4'd9, 1);
    repeat (200) @(posedge clk_d);
    mem_ar_hold = 0;
    u_wait_reads();
    check(mem_arqos == 4'd9, "forwarded QoS applied to ARQOS at the far end");
    if (mem_arqos == 4'd9) n_qos_fwd++;

    // fabric master to subsystem peripheral (the other direction)
    d_write(36'h0040, 32'hCAFE_0001);
    d_write(36'h0044, 32'hCAFE_0002);
    d_read(36'h0040, 1);

    // clock gating: an idle link lets the clock stop
    repeat (300) @(posedge clk_src);
    check(n_gate_off > 0, "T-AXI clock gated off while idle");

    // link reset from the master end, with traffic before and after
    apb_d(1, 8'h00, 32'h0F, rd);
    while (link_state_d == LINK_ACTIVE) @(posedge clk_d);
    wait_state(LINK_ACTIVE, LINK_ACTIVE, 5000, "both ends ACTIVE again after reset");
    apb_d(0, 8'h00, 0, rd); check(rd[1] == 0, "Reset bit cleared itself");
    check(n_reset > 0, "subsystem end passed through LINK_RESET");
    apb_u(0, 8'h0C, 0, rd); check(rd == 32'h801, "credit register kept over link reset");
    u_write(36'h3000, 7, 0, 1);
    u_read_issue(36'h3000, 7, 0, 1);
    u_read_issue(36'h1000, 15, 0, 1);
    u_wait_reads();

    // swap the link master: disable, move LinkCtrlMaster, enable from the subsystem end
    apb_d(1, 8'h00, 32'h0C, rd);
    wait_state(LINK_DISABLED, LINK_DISABLED, 5000, "both ends DISABLED after disable");
    apb_u(0, 8'h04, 0, rd); check(rd[30] && rd[0], $sformatf("RemoteStatusShutdown and Idle when disabled, got %h", rd));
    apb_d(1, 8'h00, 32'h08, rd);
    apb_u(1, 8'h00, 32'h0D, rd);
    wait_state(LINK_ACTIVE, LINK_ACTIVE, 5000, "ACTIVE with subsystem end as link master");
    if (link_state_d == LINK_ACTIVE) n_swap++;
    u_write(36'h3400, 3, 0, 1);
    u_read_issue(36'h3400, 3, 0, 1);
    u_wait_reads();
    check(n_gate_on > 0, "T-AXI clock restarted on request");

    // every mechanism happened
    check(n_link_stall > 0, "link stall happened");
    check(n_rep_hold > 0, "repeater holding register used");
    check(n_cred_zero > 0, "transmit credit ran out");
    check(n_qos_fwd > 0, "QoS forwarded");
    check(n_dummy > 0, "dummy slave answered");
    check(n_out_cnt > 0, "outstanding count reported");
    check(n_swap > 0, "link master swapped");
    check(per_wlast_err == 0, "peripheral WLAST");
    $display("mechanisms: link_stall=%0d rep_hold=%0d cred_zero=%0d qos=%0d dummy=%0d reset=%0d gate_off=%0d gate_on=%0d out_cnt=%0d swap=%0d",
             n_link_stall, n_rep_hold, n_cred_zero, n_qos_fwd, n_dummy, n_reset, n_gate_off, n_gate_on, n_out_cnt, n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
