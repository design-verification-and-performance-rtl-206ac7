// tb_axi_mem: behavioural AXI slave memory for the link testbenches. It stands for
// the memory controller port (or a peripheral) behind a link end's AXI master port.
//
// 4096 32-bit words, word address = addr[13:2]. Commands are served in arrival
// order, one read and one write at a time. Reads return LEN+1 beats with RLAST on
// the last. Writes take AW, then LEN+1 beats; the model checks that WLAST is high
// exactly on the last beat (it is rebuilt by the link) and counts errors in
// wlast_err. READY and VALID of the model are thinned by a pseudo-random pattern
// whose density is set by `slow` (0 = always ready, larger = more wait cycles), so
// the link sees back-pressure. ar_hold holds ARREADY low while set. The last
// ARQOS/AWQOS seen is kept for the QoS check.
module tb_axi_mem
  import taxi_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  int     slow,
  input  logic   ar_hold,
  input  logic   ar_valid, output logic ar_ready, input  axi_a_t ar,
  input  logic   aw_valid, output logic aw_ready, input  axi_a_t aw,
  input  logic   w_valid,  output logic w_ready,  input  axi_w_t w,
  output logic   r_valid,  input  logic r_ready,  output axi_r_t r,
  output logic   b_valid,  input  logic b_ready,  output axi_b_t b,
  output int     wlast_err,
  output int     n_ar,
  output logic [3:0] last_arqos,
  output logic [3:0] last_awqos
);
  logic [31:0] mem [4096];
  logic        rd_busy, wr_busy, w_done;
  axi_a_t      rcmd, wcmd;
  logic [4:0]  rbeat, wbeat;
  logic [31:0] lfsr;
  logic        gate;

  initial for (int i = 0; i < 4096; i++) mem[i] = 32'hA500_0000 | i;

  assign gate     = (slow == 0) || (lfsr[3:0] >= 4'(slow));
  assign ar_ready = !rd_busy && gate && !ar_hold;
  assign aw_ready = !wr_busy && gate;
  assign w_ready  = wr_busy && !w_done && gate;
  assign r_valid  = rd_busy && gate;
  assign r        = '{id: rcmd.id, data: mem[12'(rcmd.addr[13:2] + 12'(rbeat))],
                      resp: 2'b00, last: rbeat == 5'(rcmd.len)};
  assign b        = '{id: wcmd.id, resp: 2'b00};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_busy <= 0; wr_busy <= 0; w_done <= 0; b_valid <= 0;
      rbeat <= 0; wbeat <= 0; lfsr <= 32'hACE1; wlast_err <= 0; n_ar <= 0;
      last_arqos <= 0; last_awqos <= 0; rcmd <= '0; wcmd <= '0;
    end else begin
      lfsr <= {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
      if (ar_valid && ar_ready) begin
        rd_busy <= 1; rcmd <= ar; rbeat <= 0; n_ar <= n_ar + 1; last_arqos <= ar.qos;
      end else if (r_valid && r_ready) begin
        if (r.last) rd_busy <= 0;
        rbeat <= rbeat + 1;
      end
      if (aw_valid && aw_ready) begin
        wr_busy <= 1; wcmd <= aw; wbeat <= 0; last_awqos <= aw.qos;
      end
      if (w_valid && w_ready) begin
        mem[12'(wcmd.addr[13:2] + 12'(wbeat))] <= w.data;
        if (w.last != (wbeat == 5'(wcmd.len))) wlast_err <= wlast_err + 1;
        wbeat <= wbeat + 1;
        if (wbeat == 5'(wcmd.len)) w_done <= 1;
      end
      if (w_done && !b_valid) b_valid <= 1;
      if (b_valid && b_ready) begin
        b_valid <= 0; w_done <= 0; wr_busy <= 0;
      end
    end
  end
endmodule
