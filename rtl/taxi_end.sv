// taxi_end: one end of a Thin-AXI link. The same module serves as the subsystem end
// ("upstream", traffic towards memory) and the fabric end ("downstream"); only
// parameters differ. It turns AXI4 transfers into packets on a narrow word bus and
// back, and manages the link with credits, link commands and a state machine.
//
// Interfaces:
//   * AXI slave port s_* : a local master's AR/AW/W in, R/B out. Its commands go
//     over the link and are issued at the far end's AXI master port.
//   * AXI master port m_* : AR/AW/W out to a local slave, R/B in. It issues the far
//     end master's commands and sends the responses back.
//   * T-AXI wires: taxi_tx_* out with taxi_tx_stall in; taxi_rx_* in with
//     taxi_rx_stall out; all on clk_taxi.
//   * APB registers (taxi_regs), clocked by clk_axi.
//   * clkreq: asks the link clock controller for clk_taxi.
// Clocks: clk_axi for everything except the output stage, the input stage and one
// side of each asynchronous FIFO, which run on clk_taxi. rst_n resets the clk_axi
// side, rst_taxi_n the clk_taxi side (both asynchronous, released synchronously).
//
// Data path: AXI_ISO -> taxi_tx (mappers, credit, arbitration) -> Tx FIFO ->
// taxi_out_stage -> wires; wires -> taxi_in_stage (receive FIFO) -> taxi_rx
// (decode, per-channel storage, AXI issue). Control: taxi_link_ctrl (state
// machine), taxi_link_cmd (credit, QoS, state and control commands), taxi_tx_qos,
// taxi_dummy_slave, taxi_regs.
//
// The link is "quiet" when no read or write started here is outstanding, all
// credit given out has come back, no received word or stored transfer is waiting,
// no link command is waiting and the Tx FIFO is empty; the state machine waits for
// this before going idle, and clkreq is the opposite of it (or the link is between
// states, or clock gating is disabled by DisableTaxiClkGate).
//
// From the document: the block structure (Fig 4), the parameters TX_AWIDTH = 2,
// RXFIFO_AWIDTH = 5, the default credits and register map, the receive storage
// sizes implied by the largest credits used (AR/AW/BR 8, WD/RR 32). This design's
// own: everything on clk_axi except the wire stages, and the rule for clkreq.
module taxi_end
  import taxi_pkg::*;
#(
  parameter int unsigned TAXI_DW       = 16,
  parameter int unsigned TX_AWIDTH     = 2,
  parameter int unsigned RXFIFO_AWIDTH = 5,
  parameter int unsigned CREDW         = 8,
  parameter int unsigned RX_AR_AWIDTH  = 3,
  parameter int unsigned RX_AW_AWIDTH  = 3,
  parameter int unsigned RX_WD_AWIDTH  = 5,
  parameter int unsigned RX_RR_AWIDTH  = 5,
  parameter int unsigned RX_BR_AWIDTH  = 3,
  parameter logic        MASTER_RST    = 1'b0,
  parameter logic [31:0] TAXI_ID       = 32'h7A_A1_00_01
) (
  input  logic               clk_axi,
  input  logic               rst_n,
  input  logic               clk_taxi,
  input  logic               rst_taxi_n,
  // APB
  input  logic               psel,
  input  logic               penable,
  input  logic               pwrite,
  input  logic [7:0]         paddr,
  input  logic [31:0]        pwdata,
  output logic [31:0]        prdata,
  output logic               pready,
  // AXI slave port
  input  logic               s_ar_valid, output logic s_ar_ready, input  axi_a_t s_ar,
  input  logic               s_aw_valid, output logic s_aw_ready, input  axi_a_t s_aw,
  input  logic               s_w_valid,  output logic s_w_ready,  input  axi_w_t s_w,
  output logic               s_r_valid,  input  logic s_r_ready,  output axi_r_t s_r,
  output logic               s_b_valid,  input  logic s_b_ready,  output axi_b_t s_b,
  // AXI master port
  output logic               m_ar_valid, input  logic m_ar_ready, output axi_a_t m_ar,
  output logic               m_aw_valid, input  logic m_aw_ready, output axi_a_t m_aw,
  output logic               m_w_valid,  input  logic m_w_ready,  output axi_w_t m_w,
  input  logic               m_r_valid,  output logic m_r_ready,  input  axi_r_t m_r,
  input  logic               m_b_valid,  output logic m_b_ready,  input  axi_b_t m_b,
  // T-AXI wires
  output logic               taxi_tx_valid,
  output logic [TAXI_DW-1:0] taxi_tx_data,
  input  logic               taxi_tx_stall,
  input  logic               taxi_rx_valid,
  input  logic [TAXI_DW-1:0] taxi_rx_data,
  output logic               taxi_rx_stall,
  output logic               clkreq,
  output link_state_e        link_state
);
  // ---- control ----
  logic ctrl_en, ctrl_rst, ctrl_master, ctrl_qos_fwd, ctrl_force, ctrl_no_gate;
  link_state_e ctrl_force_state, remote_state, state;
  logic [CREDW-1:0] cred_init [NCH];
  logic [CREDW-1:0] cred [NCH];
  logic [7:0] rd_count, wr_count;
  logic srst, rst_done, ds_idle, dummy_hit, quiet, idle, all_back;
  logic remote_en, remote_rst_req;
  logic rx_busy, lcmd_pending;
  logic [AXI_QOSW-1:0] max_qos, fwd_qos;

  // ---- tx path ----
  logic l_ar_valid, l_ar_ready, l_aw_valid, l_aw_ready, l_w_valid, l_w_ready;
  logic l_r_valid, l_r_ready, l_b_valid, l_b_ready;
  axi_r_t l_r;
  axi_b_t l_b;
  logic cred_ret_valid;
  chan_e cred_ret_ch;
  logic [CRED_CNTW-1:0] cred_ret_cnt;
  logic lcmd_valid, lcmd_ready;
  pkt_t lcmd_pkt;
  logic txf_push, txf_full, txf_pop, txf_empty;
  logic [PKT_W:0] txf_wdata, txf_rdata;
  logic [TX_AWIDTH:0] txf_wcount;
  // ---- rx path ----
  logic [TAXI_DW:0] rxf_word;
  logic rxf_empty, rxf_pop;
  logic [CRED_CNTW-1:0] cred_acc [NCH];
  logic cred_sent_valid;
  chan_e cred_sent_ch;
  logic [CRED_CNTW-1:0] cred_sent_cnt;
  // ---- dummy ----
  logic d_ar_valid, d_ar_ready, d_aw_valid, d_aw_ready, d_w_valid, d_w_ready;
  logic d_r_valid, d_r_ready, d_b_valid, d_b_ready;
  axi_r_t d_r;
  axi_b_t d_b;

  assign link_state = state;

  taxi_regs #(
    .MASTER_RST(MASTER_RST), .TAXI_ID(TAXI_ID), .TAXI_DW(TAXI_DW), .TX_AWIDTH(TX_AWIDTH),
    .RXFIFO_AWIDTH(RXFIFO_AWIDTH), .CREDW(CREDW), .RX_AR_AWIDTH(RX_AR_AWIDTH),
    .RX_AW_AWIDTH(RX_AW_AWIDTH), .RX_WD_AWIDTH(RX_WD_AWIDTH), .RX_RR_AWIDTH(RX_RR_AWIDTH),
    .RX_BR_AWIDTH(RX_BR_AWIDTH)
  ) u_regs (
    .pclk(clk_axi), .presetn(rst_n), .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready,
    .ctrl_en, .ctrl_rst, .ctrl_master, .ctrl_qos_fwd, .ctrl_force, .ctrl_force_state,
    .ctrl_no_clk_gate(ctrl_no_gate), .cred_init,
    .state, .remote_state, .wr_count, .rd_count, .idle, .dummy_hit, .rst_done
  );

  taxi_link_ctrl u_ctrl (
    .clk(clk_axi), .rst_n, .is_master(ctrl_master), .ctrl_en, .ctrl_rst,
    .remote_en, .remote_rst_req, .remote_state, .force_en(ctrl_force),
    .force_state(ctrl_force_state), .ds_idle, .quiet, .state, .srst, .rst_done
  );

  assign quiet = rd_count == '0 && wr_count == '0 && all_back && !rx_busy && rxf_empty
                 && !lcmd_pending && txf_wcount == '0;
  assign idle  = quiet && state != LINK_ACTIVE;
  assign clkreq = !quiet || ctrl_no_gate ||
                  (state != LINK_DISABLED && state != LINK_ACTIVE);

  taxi_axi_iso u_iso (
    .clk(clk_axi), .rst_n, .srst,
    .to_dummy(state == LINK_DISABLED || state == LINK_WAIT_DS_IDLE),
    .accept_new(state == LINK_ACTIVE),
    .s_ar_valid, .s_ar_ready, .s_aw_valid, .s_aw_ready, .s_w_valid, .s_w_ready,
    .s_r_valid, .s_r_ready, .s_r, .s_b_valid, .s_b_ready, .s_b,
    .l_ar_valid, .l_ar_ready, .l_aw_valid, .l_aw_ready, .l_w_valid, .l_w_ready,
    .l_r_valid, .l_r_ready, .l_r, .l_b_valid, .l_b_ready, .l_b,
    .d_ar_valid, .d_ar_ready, .d_aw_valid, .d_aw_ready, .d_w_valid, .d_w_ready,
    .d_r_valid, .d_r_ready, .d_r, .d_b_valid, .d_b_ready, .d_b,
    .rd_count, .wr_count
  );

  taxi_dummy_slave u_dummy (
    .clk(clk_axi), .rst_n, .accept_new(state == LINK_DISABLED),
    .ar_valid(d_ar_valid), .ar_ready(d_ar_ready), .ar(s_ar),
    .aw_valid(d_aw_valid), .aw_ready(d_aw_ready), .aw(s_aw),
    .w_valid(d_w_valid), .w_ready(d_w_ready), .w(s_w),
    .r_valid(d_r_valid), .r_ready(d_r_ready), .r(d_r),
    .b_valid(d_b_valid), .b_ready(d_b_ready), .b(d_b),
    .idle(ds_idle), .hit(dummy_hit)
  );

  taxi_tx #(.CREDW(CREDW)) u_tx (
    .clk(clk_axi), .rst_n, .cred_load(state == LINK_DISABLED || srst), .cred_init,
    .ar_valid(l_ar_valid), .ar_ready(l_ar_ready), .ar(s_ar),
    .aw_valid(l_aw_valid), .aw_ready(l_aw_ready), .aw(s_aw),
    .w_valid(l_w_valid), .w_ready(l_w_ready), .w(s_w),
    .r_valid(m_r_valid), .r_ready(m_r_ready), .r(m_r),
    .b_valid(m_b_valid), .b_ready(m_b_ready), .b(m_b),
    .cred_ret_valid, .cred_ret_ch, .cred_ret_cnt,
    .lcmd_valid, .lcmd_pkt, .lcmd_ready,
    .fifo_push(txf_push), .fifo_data(txf_wdata), .fifo_full(txf_full),
    .cred, .all_back
  );

  taxi_tx_qos #(.QAW(RX_AR_AWIDTH > RX_AW_AWIDTH ? RX_AR_AWIDTH : RX_AW_AWIDTH)) u_qos (
    .clk(clk_axi), .rst_n, .srst,
    .ar_take(l_ar_valid && l_ar_ready), .ar_qos(s_ar.qos),
    .aw_take(l_aw_valid && l_aw_ready), .aw_qos(s_aw.qos),
    .cred_ret_valid, .cred_ret_ch, .cred_ret_cnt, .max_qos
  );

  taxi_link_cmd u_lcmd (
    .clk(clk_axi), .rst_n, .state, .is_master(ctrl_master), .ctrl_en, .ctrl_rst,
    .max_qos, .cred_acc, .lcmd_valid, .lcmd_pkt, .lcmd_ready,
    .cred_sent_valid, .cred_sent_ch, .cred_sent_cnt, .pending(lcmd_pending)
  );

  taxi_async_fifo #(.W(PKT_W+1), .AW(TX_AWIDTH)) u_txf (
    .wclk(clk_axi), .wrst_n(rst_n), .wpush(txf_push), .wdata(txf_wdata),
    .wfull(txf_full), .wcount(txf_wcount),
    .rclk(clk_taxi), .rrst_n(rst_taxi_n), .rpop(txf_pop), .rdata(txf_rdata), .rempty(txf_empty)
  );

  taxi_out_stage #(.TAXI_DW(TAXI_DW)) u_out (
    .clk_taxi, .rst_n(rst_taxi_n), .fifo_empty(txf_empty), .fifo_data(txf_rdata),
    .fifo_pop(txf_pop), .taxi_tx_valid, .taxi_tx_data, .taxi_tx_stall
  );

  taxi_in_stage #(.TAXI_DW(TAXI_DW), .RXFIFO_AWIDTH(RXFIFO_AWIDTH)) u_in (
    .clk_taxi, .rst_taxi_n, .taxi_rx_valid, .taxi_rx_data, .taxi_rx_stall,
    .clk_axi, .rst_n, .rd_pop(rxf_pop), .rd_word(rxf_word), .rd_empty(rxf_empty)
  );

  taxi_rx #(
    .TAXI_DW(TAXI_DW), .RX_AR_AWIDTH(RX_AR_AWIDTH), .RX_AW_AWIDTH(RX_AW_AWIDTH),
    .RX_WD_AWIDTH(RX_WD_AWIDTH), .RX_RR_AWIDTH(RX_RR_AWIDTH), .RX_BR_AWIDTH(RX_BR_AWIDTH)
  ) u_rx (
    .clk(clk_axi), .rst_n, .srst,
    .rd_word(rxf_word), .rd_empty(rxf_empty), .rd_pop(rxf_pop),
    .m_ar_valid, .m_ar_ready, .m_ar, .m_aw_valid, .m_aw_ready, .m_aw,
    .m_w_valid, .m_w_ready, .m_w,
    .s_r_valid(l_r_valid), .s_r_ready(l_r_ready), .s_r(l_r),
    .s_b_valid(l_b_valid), .s_b_ready(l_b_ready), .s_b(l_b),
    .cred_ret_valid, .cred_ret_ch, .cred_ret_cnt,
    .remote_state, .remote_en, .remote_rst_req,
    .qos_fwd_en(ctrl_qos_fwd), .fwd_qos,
    .cred_acc, .cred_sent_valid, .cred_sent_ch, .cred_sent_cnt, .rx_busy
  );
endmodule
