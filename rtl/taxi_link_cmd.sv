// taxi_link_cmd: link command arbiter of one link end, on the AXI clock. It decides
// which non-AXI command goes into the Tx FIFO next; taxi_tx gives these commands
// priority over AXI packets.
//
// Commands, in priority order:
//   LC_STATE  {state}        whenever this end's link state differs from the last
//                            state sent, so each end can follow the other;
//   LC_CTRL   {reset,enable} only at the link-master end (is_master), whenever its
//                            enable or reset request differs from the last sent;
//   LC_QOS    {qos}          whenever the forwarded maximum QoS changes;
//   LC_CREDIT {ch,count}     returns the storage freed at this end for one channel
//                            (the lowest-numbered channel with credit pending); the
//                            whole pending count is sent, and cred_sent_* tells
//                            taxi_rx to subtract it when the command is accepted.
// lcmd_pkt is valid while lcmd_valid is high and is consumed by lcmd_ready.
//
// From the document: credits returned by link commands, QoS forwarded by its own
// link command, link control commands carried even when the link is shut down
// (Sec 3.3, 3.4, 3.8, Fig 4). This design's own: the command set, their fields and
// the priority order.
module taxi_link_cmd
  import taxi_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  link_state_e          state,
  input  logic                 is_master,
  input  logic                 ctrl_en,
  input  logic                 ctrl_rst,
  input  logic [AXI_QOSW-1:0]  max_qos,
  input  logic [CRED_CNTW-1:0] cred_acc [NCH],
  output logic                 lcmd_valid,
  output pkt_t                 lcmd_pkt,
  input  logic                 lcmd_ready,
  output logic                 cred_sent_valid,
  output chan_e                cred_sent_ch,
  output logic [CRED_CNTW-1:0] cred_sent_cnt,
  output logic                 pending
);
  link_state_e         sent_state;
  logic [1:0]          sent_ctrl;
  logic [AXI_QOSW-1:0] sent_qos;
  logic                need_state, need_ctrl, need_qos, need_cred;
  chan_e               cch;

  assign need_state = state != sent_state;
  assign need_ctrl  = is_master && ({ctrl_rst, ctrl_en} != sent_ctrl);
  assign need_qos   = max_qos != sent_qos;

  always_comb begin
    need_cred = 1'b0;
    cch       = CH_AR;
    for (int c = NCH-1; c >= 0; c--)
      if (cred_acc[c] != '0) begin
        need_cred = 1'b1;
        cch       = chan_e'(c);
      end
  end

  always_comb begin
    lcmd_pkt = '0;
    if (need_state)     lcmd_pkt = pack_lcmd(LC_STATE,  13'(state));
    else if (need_ctrl) lcmd_pkt = pack_lcmd(LC_CTRL,   {11'd0, ctrl_rst, ctrl_en});
    else if (need_qos)  lcmd_pkt = pack_lcmd(LC_QOS,    13'(max_qos));
    else if (need_cred) lcmd_pkt = pack_lcmd(LC_CREDIT, {cch, cred_acc[cch]});
  end
  assign lcmd_valid = need_state || need_ctrl || need_qos || need_cred;
  assign pending    = lcmd_valid;

  assign cred_sent_valid = lcmd_ready && !need_state && !need_ctrl && !need_qos && need_cred;
  assign cred_sent_ch    = cch;
  assign cred_sent_cnt   = cred_acc[cch];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sent_state <= LINK_DISABLED;
      sent_ctrl  <= '0;
      sent_qos   <= '0;
    end else if (lcmd_ready) begin
      if (need_state)     sent_state <= state;
      else if (need_ctrl) sent_ctrl  <= {ctrl_rst, ctrl_en};
      else if (need_qos)  sent_qos   <= max_qos;
    end
  end
endmodule
