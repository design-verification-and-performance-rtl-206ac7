// tb_taxi_credit_sweep: workload test of a whole link; how the credit setting of each
// channel affects throughput.
//
// A subsystem-side master moves a fixed, DMA-like mix through the link to a memory
// on the fabric side: 32 reads and 16 writes, each an 8-beat burst. Reads and writes
// are issued from separate threads, so many are outstanding at once. For each
// setting, the credit registers at both ends are programmed, and then the link is
// reset from its master end so that the counters reload. The setting is either every
// channel at its maximum, or one channel (AR, AW, WD, RR or BR) at 1, 2, 4 ... up to
// its maximum with the others at theirs. The time the mix takes, in AXI clocks, is
// printed as one line per setting. A second mix of 64 single-beat writes repeats
// the BR and WD sweeps; there each data beat has its own write response. All read
// data is checked against a copy of the memory, and every written burst is read
// back untimed afterwards.
//
// Expected: a credit of 1 on the read-data channel (one beat in flight) or the
// write-data channel costs throughput compared with the maximum, because the sender
// then waits a full credit round trip for each beat. Each of those two channels is
// checked to be slower at 1 than at its maximum, as is BR with single-beat writes;
// the other settings are reported only. The credit maxima and the register layout follow the document; the mix and
// the clock ratio (AXI 10 ns, link 4 ns) are this test's own.
module tb_taxi_credit_sweep;
  import taxi_pkg::*;

  logic clk_src = 0, clk_u = 0, clk_d = 0;
  logic por_n = 0, rst_u_n = 0, rst_d_n = 0;
  always #2 clk_src = ~clk_src;
  always #5 clk_u = ~clk_u;
  always #3.5 clk_d = ~clk_d;

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

  int mem_wlast_err, per_wlast_err, mem_n_ar, per_n_ar;
  logic [3:0] mem_arqos, mem_awqos, per_arqos, per_awqos;
  tb_axi_mem u_mem (.clk(clk_d), .rst_n(rst_d_n), .slow(0), .ar_hold(1'b0),
    .ar_valid(d_m_ar_valid), .ar_ready(d_m_ar_ready), .ar(d_m_ar),
    .aw_valid(d_m_aw_valid), .aw_ready(d_m_aw_ready), .aw(d_m_aw),
    .w_valid(d_m_w_valid), .w_ready(d_m_w_ready), .w(d_m_w),
    .r_valid(d_m_r_valid), .r_ready(d_m_r_ready), .r(d_m_r),
    .b_valid(d_m_b_valid), .b_ready(d_m_b_ready), .b(d_m_b),
    .wlast_err(mem_wlast_err), .n_ar(mem_n_ar), .last_arqos(mem_arqos), .last_awqos(mem_awqos));
  tb_axi_mem u_per (.clk(clk_u), .rst_n(rst_u_n), .slow(0), .ar_hold(1'b0),
    .ar_valid(u_m_ar_valid), .ar_ready(u_m_ar_ready), .ar(u_m_ar),
    .aw_valid(u_m_aw_valid), .aw_ready(u_m_aw_ready), .aw(u_m_aw),
    .w_valid(u_m_w_valid), .w_ready(u_m_w_ready), .w(u_m_w),
    .r_valid(u_m_r_valid), .r_ready(u_m_r_ready), .r(u_m_r),
    .b_valid(u_m_b_valid), .b_ready(u_m_b_ready), .b(u_m_b),
    .wlast_err(per_wlast_err), .n_ar(per_n_ar), .last_arqos(per_arqos), .last_awqos(per_awqos));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic [31:0] shadow [4096];
  initial for (int i = 0; i < 4096; i++) shadow[i] = 32'hA500_0000 | i;

  task automatic apb_u(input logic [7:0] a, input logic [31:0] wd);
    @(posedge clk_u); u_psel <= 1; u_pwrite <= 1; u_paddr <= a; u_pwdata <= wd;
    @(posedge clk_u); u_penable <= 1;
    @(posedge clk_u); u_psel <= 0; u_penable <= 0; u_pwrite <= 0;
  endtask
  task automatic apb_d(input logic [7:0] a, input logic [31:0] wd);
    @(posedge clk_d); d_psel <= 1; d_pwrite <= 1; d_paddr <= a; d_pwdata <= wd;
    @(posedge clk_d); d_penable <= 1;
    @(posedge clk_d); d_psel <= 0; d_penable <= 0; d_pwrite <= 0;
  endtask

  // ---------------- read side: issue thread and checking collector ----------------
  logic [9:0]  next_id = 0;
  logic [35:0] rq_addr [$];
  int          rq_len [$];
  int          rbeat = 0;
  task automatic read_issue(input logic [35:0] addr, input int len);
    axi_a_t a = '0;
    a.id = next_id++; a.addr = addr; a.len = 4'(len); a.size = 3'd2; a.burst = 2'b01;
    rq_addr.push_back(addr); rq_len.push_back(len);
    @(posedge clk_u); u_s_ar <= a; u_s_ar_valid <= 1;
    do @(posedge clk_u); while (!u_s_ar_ready);
    u_s_ar_valid <= 0;
  endtask
  always @(posedge clk_u) begin
    if (rst_u_n && u_s_r_valid && u_s_r_ready) begin
      if (rq_addr.size() == 0) check(0, "read data with no read outstanding");
      else begin
        check(u_s_r.data == shadow[12'(rq_addr[0][13:2] + 12'(rbeat))],
              $sformatf("read data addr %h beat %0d got %h", rq_addr[0], rbeat, u_s_r.data));
        check(u_s_r.last == (rbeat == rq_len[0]), "RLAST position");
        if (u_s_r.last) begin
          void'(rq_addr.pop_front()); void'(rq_len.pop_front()); rbeat = 0;
        end else rbeat++;
      end
    end
  end

  // ---------------- write side: AW thread, W thread, response counter ----------------
  int n_b = 0;
  always @(posedge clk_u)
    if (rst_u_n && u_s_b_valid && u_s_b_ready) begin
      n_b++;
      check(u_s_b.resp == 2'b00, "write response OKAY");
    end
  task automatic write_aw(input logic [35:0] addr, input int len);
    axi_a_t a = '0;
    a.id = next_id++; a.addr = addr; a.len = 4'(len); a.size = 3'd2; a.burst = 2'b01;
    @(posedge clk_u); u_s_aw <= a; u_s_aw_valid <= 1;
    do @(posedge clk_u); while (!u_s_aw_ready);
    u_s_aw_valid <= 0;
  endtask
  task automatic write_w(input logic [35:0] addr, input int len);
    for (int i = 0; i <= len; i++) begin
      logic [31:0] d = $urandom;
      @(posedge clk_u); u_s_w <= '{data: d, strb: 4'hF, last: i == len}; u_s_w_valid <= 1;
      do @(posedge clk_u); while (!u_s_w_ready);
      u_s_w_valid <= 0;
      shadow[12'(addr[13:2] + 12'(i))] = d;   // read back only after the write completes
    end
  endtask

  localparam int NRD = 32, NWR = 16, BLEN = 7;

  // The timed mix. Reads come from 0x0000.., writes go to 0x2000.. (no overlap).
  // nrd reads and nwr writes, of blen+1 beats each.
  task automatic run_mix_n(input int nrd, input int nwr, input int blen, output int cycles);
    int t0 = 0, nb0 = n_b;
    fork
      for (int k = 0; k < nrd; k++) read_issue(36'(k * 32), blen);
      for (int k = 0; k < nwr; k++) write_aw(36'h2000 + 36'(k * 32), blen);
      for (int k = 0; k < nwr; k++) write_w(36'h2000 + 36'(k * 32), blen);
      while (rq_addr.size() != 0 || n_b - nb0 < nwr) begin @(posedge clk_u); t0++; end
    join
    cycles = t0;
    // untimed read-back of the written region
    for (int k = 0; k < nwr; k++) read_issue(36'h2000 + 36'(k * 32), blen);
    while (rq_addr.size() != 0) @(posedge clk_u);
  endtask
  task automatic run_mix(output int cycles);
    run_mix_n(NRD, NWR, BLEN, cycles);
  endtask
  // Second mix: 64 single-beat writes, one write response per beat.
  task automatic run_mix_single(output int cycles);
    run_mix_n(0, 64, 0, cycles);
  endtask

  task automatic wait_active(input string what);
    int n = 0;
    while ((link_state_u != LINK_ACTIVE || link_state_d != LINK_ACTIVE) && n < 5000) begin
      @(posedge clk_u); n++;
    end
    check(link_state_u == LINK_ACTIVE && link_state_d == LINK_ACTIVE, what);
    repeat (40) @(posedge clk_u);
  endtask

  // Program the four credit registers at both ends, then enable or reset the link.
  bit enabled = 0;
  task automatic set_credit(input int ar, input int aw, input int wd, input int rr, input int br);
    logic [31:0] v [4];
    v[0] = 32'((ar << 8) | 1); v[1] = 32'((wd << 16) | (aw << 8) | 1);
    v[2] = 32'((rr << 8) | 1); v[3] = 32'((br << 8) | 1);
    for (int i = 0; i < 4; i++) begin
      apb_u(8'h0C + 8'(4 * i), v[i]);
      apb_d(8'h0C + 8'(4 * i), v[i]);
    end
    if (!enabled) apb_d(8'h00, 32'h0D);       // enable from the link master
    else begin
      apb_d(8'h00, 32'h0F);                   // reset: counters reload
      while (link_state_d == LINK_ACTIVE) @(posedge clk_d);
    end
    enabled = 1;
    wait_active($sformatf("ACTIVE with credit AR %0d AW %0d WD %0d RR %0d BR %0d", ar, aw, wd, rr, br));
    check(int'(dut.u_up.u_tx.cred[CH_AR]) == ar && int'(dut.u_up.u_tx.cred[CH_WD]) == wd &&
          int'(dut.u_dn.u_tx.cred[CH_RR]) == rr, "credit counters loaded from the registers");
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (3000000) @(posedge clk_src);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_u) u_s_r_ready <= 1'b1;

  // ---------------- the sweep ----------------
  int cyc, base, rr1, wd1, rrmax, wdmax, br1, brmax;
  initial begin
    repeat (5) @(posedge clk_u);
    por_n = 1; rst_u_n = 1; rst_d_n = 1;
    repeat (10) @(posedge clk_u);

    set_credit(8, 8, 32, 32, 8);
    run_mix(base);
    $display("SWEEP all-max            cycles=%0d bytes/cycle=%0.2f", base, real'((NRD + NWR) * (BLEN + 1) * 4) / base);

    for (int c = 1; c <= 8; c *= 2) begin
      set_credit(c, 8, 32, 32, 8); run_mix(cyc);
      $display("SWEEP AR credit %2d       cycles=%0d", c, cyc);
    end
    for (int c = 1; c <= 8; c *= 2) begin
      set_credit(8, c, 32, 32, 8); run_mix(cyc);
      $display("SWEEP AW credit %2d       cycles=%0d", c, cyc);
    end
    for (int c = 1; c <= 32; c *= 2) begin
      set_credit(8, 8, c, 32, 8); run_mix(cyc);
      $display("SWEEP WD credit %2d       cycles=%0d", c, cyc);
      if (c == 1) wd1 = cyc;
      if (c == 32) wdmax = cyc;
    end
    for (int c = 1; c <= 32; c *= 2) begin
      set_credit(8, 8, 32, c, 8); run_mix(cyc);
      $display("SWEEP RR credit %2d       cycles=%0d", c, cyc);
      if (c == 1) rr1 = cyc;
      if (c == 32) rrmax = cyc;
    end
    for (int c = 1; c <= 8; c *= 2) begin
      set_credit(8, 8, 32, 32, c); run_mix(cyc);
      $display("SWEEP BR credit %2d       cycles=%0d", c, cyc);
    end

    // single-beat writes: the response channel now carries one item per data beat
    for (int c = 1; c <= 8; c *= 2) begin
      set_credit(8, 8, 32, 32, c); run_mix_single(cyc);
      $display("SWEEP single-beat writes, BR credit %2d  cycles=%0d", c, cyc);
      if (c == 1) br1 = cyc;
      if (c == 8) brmax = cyc;
    end
    for (int c = 1; c <= 32; c *= 4) begin
      set_credit(8, 8, c, 32, 8); run_mix_single(cyc);
      $display("SWEEP single-beat writes, WD credit %2d  cycles=%0d", c, cyc);
    end

    check(rr1 > rrmax, $sformatf("RR credit 1 slower than 32 (%0d vs %0d)", rr1, rrmax));
    check(wd1 > wdmax, $sformatf("WD credit 1 slower than 32 (%0d vs %0d)", wd1, wdmax));
    check(br1 > brmax, $sformatf("single-beat writes: BR credit 1 slower than 8 (%0d vs %0d)", br1, brmax));
    check(mem_wlast_err == 0, "WLAST rebuilt at the far end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
