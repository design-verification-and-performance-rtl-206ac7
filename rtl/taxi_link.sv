// taxi_link: a complete Thin-AXI link between a subsystem and the main fabric.
//
// A star of point-to-point links connects each bus master to its own memory
// controller port; to keep the wires few, each link carries all five AXI channels,
// time-multiplexed, over a narrow word bus in each direction running on a fast,
// synchronous T-AXI clock. This module puts the pieces of one link together:
//
//   subsystem end (u_up, taxi_end)  --upstream words-->   N_REP repeaters --> fabric end
//   subsystem end                   <--downstream words-- N_REP repeaters <-- (u_dn, taxi_end)
//   link clock/power/reset controller (u_cpr, taxi_cpr) in the middle
//
// Each end has an AXI slave port (s_*), for a master on its side, and an AXI master
// port (m_*), for a slave on its side, so both masters and peripherals can sit on
// either side. Both ends and all repeaters share the gated clock clk_taxi from
// the controller, which runs while either end requests it. Each end has its own AXI
// clock and reset and its own APB register port; the fabric end resets as the
// link-control master.
//
// Ports: u_* belong to the subsystem end, d_* to the fabric end. clk_taxi_src is the
// free-running T-AXI clock from the controller's PLL; por_n resets the link clock
// domain. link_state_* and clk_on are visible for debug.
//
// From the document: the two ends, repeaters in each direction and a central clock
// and reset controller (Fig 3), the narrow, stalled word channels (Table 1), the
// link master at the fabric end (register dump of Fig 10). This design's own:
// the number of repeaters (N_REP) and the link word width default of 16.
module taxi_link
  import taxi_pkg::*;
#(
  parameter int unsigned TAXI_DW = 16,
  parameter int unsigned N_REP   = 2
) (
  input  logic        clk_taxi_src,
  input  logic        por_n,
  output logic        clk_on,
  // ---- subsystem end ----
  input  logic        clk_axi_u,
  input  logic        rst_u_n,
  input  logic        u_psel, input logic u_penable, input logic u_pwrite,
  input  logic [7:0]  u_paddr, input logic [31:0] u_pwdata,
  output logic [31:0] u_prdata, output logic u_pready,
  input  logic        u_s_ar_valid, output logic u_s_ar_ready, input  axi_a_t u_s_ar,
  input  logic        u_s_aw_valid, output logic u_s_aw_ready, input  axi_a_t u_s_aw,
  input  logic        u_s_w_valid,  output logic u_s_w_ready,  input  axi_w_t u_s_w,
  output logic        u_s_r_valid,  input  logic u_s_r_ready,  output axi_r_t u_s_r,
  output logic        u_s_b_valid,  input  logic u_s_b_ready,  output axi_b_t u_s_b,
  output logic        u_m_ar_valid, input  logic u_m_ar_ready, output axi_a_t u_m_ar,
  output logic        u_m_aw_valid, input  logic u_m_aw_ready, output axi_a_t u_m_aw,
  output logic        u_m_w_valid,  input  logic u_m_w_ready,  output axi_w_t u_m_w,
  input  logic        u_m_r_valid,  output logic u_m_r_ready,  input  axi_r_t u_m_r,
  input  logic        u_m_b_valid,  output logic u_m_b_ready,  input  axi_b_t u_m_b,
  output link_state_e link_state_u,
  // ---- fabric end ----
  input  logic        clk_axi_d,
  input  logic        rst_d_n,
  input  logic        d_psel, input logic d_penable, input logic d_pwrite,
  input  logic [7:0]  d_paddr, input logic [31:0] d_pwdata,
  output logic [31:0] d_prdata, output logic d_pready,
  input  logic        d_s_ar_valid, output logic d_s_ar_ready, input  axi_a_t d_s_ar,
  input  logic        d_s_aw_valid, output logic d_s_aw_ready, input  axi_a_t d_s_aw,
  input  logic        d_s_w_valid,  output logic d_s_w_ready,  input  axi_w_t d_s_w,
  output logic        d_s_r_valid,  input  logic d_s_r_ready,  output axi_r_t d_s_r,
  output logic        d_s_b_valid,  input  logic d_s_b_ready,  output axi_b_t d_s_b,
  output logic        d_m_ar_valid, input  logic d_m_ar_ready, output axi_a_t d_m_ar,
  output logic        d_m_aw_valid, input  logic d_m_aw_ready, output axi_a_t d_m_aw,
  output logic        d_m_w_valid,  input  logic d_m_w_ready,  output axi_w_t d_m_w,
  input  logic        d_m_r_valid,  output logic d_m_r_ready,  input  axi_r_t d_m_r,
  input  logic        d_m_b_valid,  output logic d_m_b_ready,  input  axi_b_t d_m_b,
  output link_state_e link_state_d
);
  logic clk_taxi, rst_taxi_n, clkreq_u, clkreq_d;

  // word channels: index 0 at the sending end, N_REP at the receiving end
  logic               up_v [N_REP+1];
  logic [TAXI_DW-1:0] up_d [N_REP+1];
  logic               up_s [N_REP+1];
  logic               dn_v [N_REP+1];
  logic [TAXI_DW-1:0] dn_d [N_REP+1];
  logic               dn_s [N_REP+1];

  taxi_cpr u_cpr (
    .clk_taxi_src, .por_n, .clkreq_u, .clkreq_d, .clk_taxi, .rst_taxi_n, .clk_on
  );

  taxi_end #(.TAXI_DW(TAXI_DW), .MASTER_RST(1'b0), .TAXI_ID(32'h7A_A1_00_01)) u_up (
    .clk_axi(clk_axi_u), .rst_n(rst_u_n), .clk_taxi, .rst_taxi_n,
    .psel(u_psel), .penable(u_penable), .pwrite(u_pwrite), .paddr(u_paddr),
    .pwdata(u_pwdata), .prdata(u_prdata), .pready(u_pready),
    .s_ar_valid(u_s_ar_valid), .s_ar_ready(u_s_ar_ready), .s_ar(u_s_ar),
    .s_aw_valid(u_s_aw_valid), .s_aw_ready(u_s_aw_ready), .s_aw(u_s_aw),
    .s_w_valid(u_s_w_valid), .s_w_ready(u_s_w_ready), .s_w(u_s_w),
    .s_r_valid(u_s_r_valid), .s_r_ready(u_s_r_ready), .s_r(u_s_r),
    .s_b_valid(u_s_b_valid), .s_b_ready(u_s_b_ready), .s_b(u_s_b),
    .m_ar_valid(u_m_ar_valid), .m_ar_ready(u_m_ar_ready), .m_ar(u_m_ar),
    .m_aw_valid(u_m_aw_valid), .m_aw_ready(u_m_aw_ready), .m_aw(u_m_aw),
    .m_w_valid(u_m_w_valid), .m_w_ready(u_m_w_ready), .m_w(u_m_w),
    .m_r_valid(u_m_r_valid), .m_r_ready(u_m_r_ready), .m_r(u_m_r),
    .m_b_valid(u_m_b_valid), .m_b_ready(u_m_b_ready), .m_b(u_m_b),
    .taxi_tx_valid(up_v[0]), .taxi_tx_data(up_d[0]), .taxi_tx_stall(up_s[0]),
    .taxi_rx_valid(dn_v[N_REP]), .taxi_rx_data(dn_d[N_REP]), .taxi_rx_stall(dn_s[N_REP]),
    .clkreq(clkreq_u), .link_state(link_state_u)
  );

  taxi_end #(.TAXI_DW(TAXI_DW), .MASTER_RST(1'b1), .TAXI_ID(32'h7A_A1_00_02)) u_dn (
    .clk_axi(clk_axi_d), .rst_n(rst_d_n), .clk_taxi, .rst_taxi_n,
    .psel(d_psel), .penable(d_penable), .pwrite(d_pwrite), .paddr(d_paddr),
    .pwdata(d_pwdata), .prdata(d_prdata), .pready(d_pready),
    .s_ar_valid(d_s_ar_valid), .s_ar_ready(d_s_ar_ready), .s_ar(d_s_ar),
    .s_aw_valid(d_s_aw_valid), .s_aw_ready(d_s_aw_ready), .s_aw(d_s_aw),
    .s_w_valid(d_s_w_valid), .s_w_ready(d_s_w_ready), .s_w(d_s_w),
    .s_r_valid(d_s_r_valid), .s_r_ready(d_s_r_ready), .s_r(d_s_r),
    .s_b_valid(d_s_b_valid), .s_b_ready(d_s_b_ready), .s_b(d_s_b),
    .m_ar_valid(d_m_ar_valid), .m_ar_ready(d_m_ar_ready), .m_ar(d_m_ar),
    .m_aw_valid(d_m_aw_valid), .m_aw_ready(d_m_aw_ready), .m_aw(d_m_aw),
    .m_w_valid(d_m_w_valid), .m_w_ready(d_m_w_ready), .m_w(d_m_w),
    .m_r_valid(d_m_r_valid), .m_r_ready(d_m_r_ready), .m_r(d_m_r),
    .m_b_valid(d_m_b_valid), .m_b_ready(d_m_b_ready), .m_b(d_m_b),
    .taxi_tx_valid(dn_v[0]), .taxi_tx_data(dn_d[0]), .taxi_tx_stall(dn_s[0]),
    .taxi_rx_valid(up_v[N_REP]), .taxi_rx_data(up_d[N_REP]), .taxi_rx_stall(up_s[N_REP]),
    .clkreq(clkreq_d), .link_state(link_state_d)
  );

  for (genvar i = 0; i < N_REP; i++) begin : g_rep
    taxi_repeater #(.TAXI_DW(TAXI_DW)) u_rep_up (
      .clk_taxi, .rst_n(rst_taxi_n),
      .in_valid(up_v[i]), .in_data(up_d[i]), .stall_out(up_s[i]),
      .out_valid(up_v[i+1]), .out_data(up_d[i+1]), .stall_in(up_s[i+1])
    );
    taxi_repeater #(.TAXI_DW(TAXI_DW)) u_rep_dn (
      .clk_taxi, .rst_n(rst_taxi_n),
      .in_valid(dn_v[i]), .in_data(dn_d[i]), .stall_out(dn_s[i]),
      .out_valid(dn_v[i+1]), .out_data(dn_d[i+1]), .stall_in(dn_s[i+1])
    );
  end
endmodule
