// tb_taxi_end: checks one complete link end with its transmit wires looped back to
// its own receive wires, so the end talks to itself: commands from the AXI slave
// port come out of its own AXI master port, where a memory model answers, and the
// responses return through the link to the slave port. The end is built as link
// master. The test reads the ID and CTRL reset values; reads through the dummy
// slave before the link is enabled and checks DummyAccessed; enables the link and
// waits for ACTIVE (its own LC_STATE commands make it see a far end in READY);
// writes and reads back bursts of every length 0..15 with random stalls on the
// master side; checks WLAST at the memory, the outstanding counters and STATUS;
// then disables the link and checks that the clock request falls.
module tb_taxi_end;
  import taxi_pkg::*;
  logic clk = 0, clk_taxi = 0, rst_n = 0;
  always #5 clk = ~clk;
  always #2 clk_taxi = ~clk_taxi;
  logic psel = 0, penable = 0, pwrite = 0, pready;
  logic [7:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic s_ar_valid = 0, s_ar_ready, s_aw_valid = 0, s_aw_ready, s_w_valid = 0, s_w_ready;
  logic s_r_valid, s_r_ready = 1, s_b_valid, s_b_ready = 1;
  axi_a_t s_ar = '0, s_aw = '0;
  axi_w_t s_w = '0;
  axi_r_t s_r;
  axi_b_t s_b;
  logic m_ar_valid, m_ar_ready, m_aw_valid, m_aw_ready, m_w_valid, m_w_ready;
  logic m_r_valid, m_r_ready, m_b_valid, m_b_ready;
  axi_a_t m_ar, m_aw;
  axi_w_t m_w;
  axi_r_t m_r;
  axi_b_t m_b;
  logic tx_valid, tx_stall, clkreq;
  logic [15:0] tx_data;
  link_state_e link_state;
  int wlast_err, n_ar;
  logic [3:0] arqos, awqos;
  int checks = 0, failures = 0;
  logic [31:0] shadow [4096];

  taxi_end #(.MASTER_RST(1'b1), .TAXI_ID(32'h1234_5678)) dut (
    .clk_axi(clk), .rst_n, .clk_taxi, .rst_taxi_n(rst_n),
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready,
    .s_ar_valid, .s_ar_ready, .s_ar, .s_aw_valid, .s_aw_ready, .s_aw, .s_w_valid, .s_w_ready, .s_w,
    .s_r_valid, .s_r_ready, .s_r, .s_b_valid, .s_b_ready, .s_b,
    .m_ar_valid, .m_ar_ready, .m_ar, .m_aw_valid, .m_aw_ready, .m_aw, .m_w_valid, .m_w_ready, .m_w,
    .m_r_valid, .m_r_ready, .m_r, .m_b_valid, .m_b_ready, .m_b,
    .taxi_tx_valid(tx_valid), .taxi_tx_data(tx_data), .taxi_tx_stall(tx_stall),
    .taxi_rx_valid(tx_valid), .taxi_rx_data(tx_data), .taxi_rx_stall(tx_stall),
    .clkreq, .link_state);

  tb_axi_mem u_mem (.clk, .rst_n, .slow(3), .ar_hold(1'b0),
    .ar_valid(m_ar_valid), .ar_ready(m_ar_ready), .ar(m_ar),
    .aw_valid(m_aw_valid), .aw_ready(m_aw_ready), .aw(m_aw),
    .w_valid(m_w_valid), .w_ready(m_w_ready), .w(m_w),
    .r_valid(m_r_valid), .r_ready(m_r_ready), .r(m_r),
    .b_valid(m_b_valid), .b_ready(m_b_ready), .b(m_b),
    .wlast_err, .n_ar, .last_arqos(arqos), .last_awqos(awqos));

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic apb(input bit wr, input logic [7:0] a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk); psel = 1; pwrite = wr; paddr = a; pwdata = d;
    @(negedge clk); penable = 1; q = prdata;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  // drive at the falling edge; a handshake seen there completes at the next rising edge
  task automatic write_burst(logic [35:0] addr, int len, logic [9:0] id);
    @(negedge clk);
    s_aw_valid = 1; s_aw = '{id: id, addr: addr, len: 4'(len), size: 3'd2, burst: 2'b01, prot: 1'b0, qos: 4'd0};
    while (!s_aw_ready) @(negedge clk);
    @(negedge clk); s_aw_valid = 0;
    for (int i = 0; i <= len; i++) begin
      automatic logic [31:0] d = $urandom;
      s_w_valid = 1; s_w = '{data: d, strb: 4'hF, last: i == len};
      while (!s_w_ready) @(negedge clk);
      shadow[12'(addr[13:2] + 12'(i))] = d;
      @(negedge clk);
    end
    s_w_valid = 0;
    while (!s_b_valid) @(negedge clk);
    chk(s_b.id == id && s_b.resp == 2'b00, "B id and response");
    @(negedge clk);
  endtask

  task automatic read_burst(logic [35:0] addr, int len, logic [9:0] id, bit check_data);
    @(negedge clk);
    s_ar_valid = 1; s_ar = '{id: id, addr: addr, len: 4'(len), size: 3'd2, burst: 2'b01, prot: 1'b0, qos: 4'd0};
    while (!s_ar_ready) @(negedge clk);
    @(negedge clk); s_ar_valid = 0;
    for (int i = 0; i <= len; i++) begin
      s_r_ready = $urandom % 3 != 0;
      while (!(s_r_valid && s_r_ready)) begin @(negedge clk); s_r_ready = $urandom % 3 != 0; end
      chk(s_r.id == id && s_r.resp == 2'b00 && s_r.last == (i == len), "R id, response and RLAST");
      if (check_data) chk(s_r.data == shadow[12'(addr[13:2] + 12'(i))], $sformatf("read data %h beat %0d", addr, i));
      @(negedge clk);
    end
    s_r_ready = 1;
  endtask

  initial begin
    logic [31:0] q;
    for (int i = 0; i < 4096; i++) shadow[i] = 32'hA500_0000 | i;
    repeat (3) @(posedge clk); rst_n = 1;
    apb(0, 8'h7C, 0, q); chk(q == 32'h1234_5678, "ID register");
    apb(0, 8'h00, 0, q); chk(q == 32'h0C, "CTRL reset value of a link master");
    // the dummy slave answers while the link is disabled
    read_burst(36'h100, 1, 10'h3, 0);
    apb(0, 8'h04, 0, q); chk(q[8] && q[3:1] == 3'(LINK_DISABLED), "DummyAccessed after a dummy read");
    chk(n_ar == 0, "dummy read did not reach the link");
    apb(1, 8'h04, 0, q);
    // enable
    apb(1, 8'h00, 32'h0D, q);
    for (int i = 0; i < 3000 && link_state != LINK_ACTIVE; i++) @(negedge clk);
    chk(link_state == LINK_ACTIVE, "link active");
    repeat (50) @(negedge clk);
    apb(0, 8'h04, 0, q); chk(q[31] && q[3:1] == 3'(LINK_ACTIVE) && !q[8], "STATUS when active");
    for (int len = 0; len < 16; len++) write_burst(36'h4000 + 36'(len * 64), len, 10'(len));
    for (int len = 0; len < 16; len++) read_burst(36'h4000 + 36'(len * 64), len, 10'(100 + len), 1);
    chk(wlast_err == 0, "WLAST rebuilt correctly");
    chk(n_ar == 16, "16 reads reached the memory");
    apb(0, 8'h04, 0, q); chk(q[28:21] == 0 && q[20:13] == 0, "no transfers outstanding");
    // disable
    apb(1, 8'h00, 32'h0C, q);
    for (int i = 0; i < 3000 && link_state != LINK_DISABLED; i++) @(negedge clk);
    chk(link_state == LINK_DISABLED, "link disabled");
    repeat (100) @(negedge clk);
    chk(!clkreq, "clock request falls when disabled and quiet");
    apb(0, 8'h04, 0, q); chk(q[0], "idle when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
