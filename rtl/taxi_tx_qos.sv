// taxi_tx_qos: QoS forwarding at the sending end of the link (tx_qos).
//
// AXI4 carries a QoS value with every command, but in a chain of queues a urgent
// command can wait behind a less urgent one. The link therefore does not carry
// A*QOS with the commands; instead this block works out the highest QoS of all read
// and write commands currently held in the link and the link sends it as a separate
// QoS link command, which the far end applies to every command it issues.
//
// A command is "in the link" from the cycle its mapper accepts it (ar_take/aw_take
// with its qos) until the far end frees its storage and the credit for it comes back
// (cred_ret_* for channel AR or AW). Credits for one channel come back in order, so
// each channel keeps its commands' QoS values in a small circular queue: a take
// pushes, a return of n credits drops the n oldest. max_qos is the maximum over
// both queues, registered; it is zero when nothing is in the link. srst empties
// the queues (link synchronous reset).
//
// From the document: forwarding the maximum QoS of outstanding transfers as a link
// command (Sec 3.8, Table 2). This design's own: the queue depth, equal to the far
// end's command storage (RX_AR_AWIDTH), beyond which credit cannot go.
module taxi_tx_qos
  import taxi_pkg::*;
#(
  parameter int unsigned QAW = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 srst,
  input  logic                 ar_take,
  input  logic [AXI_QOSW-1:0]  ar_qos,
  input  logic                 aw_take,
  input  logic [AXI_QOSW-1:0]  aw_qos,
  input  logic                 cred_ret_valid,
  input  chan_e                cred_ret_ch,
  input  logic [CRED_CNTW-1:0] cred_ret_cnt,
  output logic [AXI_QOSW-1:0]  max_qos
);
  localparam int D = 2**QAW;
  logic [AXI_QOSW-1:0] q   [2][D];
  logic [QAW:0]        wp  [2];
  logic [QAW:0]        rp  [2];
  logic [AXI_QOSW-1:0] mx;

  always_comb begin
    mx = '0;
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < D; i++) begin
        automatic logic [QAW-1:0] off = QAW'(i) - rp[c][QAW-1:0];
        if ({1'b0, off} < (wp[c] - rp[c]) && q[c][i] > mx) mx = q[c][i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 2; c++) begin wp[c] <= '0; rp[c] <= '0; end
      max_qos <= '0;
    end else if (srst) begin
      for (int c = 0; c < 2; c++) begin wp[c] <= '0; rp[c] <= '0; end
      max_qos <= '0;
    end else begin
      if (ar_take) begin q[0][wp[0][QAW-1:0]] <= ar_qos; wp[0] <= wp[0] + 1'b1; end
      if (aw_take) begin q[1][wp[1][QAW-1:0]] <= aw_qos; wp[1] <= wp[1] + 1'b1; end
      if (cred_ret_valid && (cred_ret_ch == CH_AR || cred_ret_ch == CH_AW)) begin
        automatic int c = (cred_ret_ch == CH_AR) ? 0 : 1;
        automatic logic [QAW:0] held = wp[c] - rp[c];
        rp[c] <= rp[c] + ((cred_ret_cnt > CRED_CNTW'(held)) ? held : (QAW+1)'(cred_ret_cnt));
      end
      max_qos <= mx;
    end
  end
endmodule
