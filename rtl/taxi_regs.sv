// taxi_regs: APB control and status registers of one link end.
//
// Map (byte offsets; 32-bit registers; unlisted offsets read 0, writes ignored):
//   0x00 TAXI_CTRL   [8] DisableTaxiClkGate [7:5] ForceLinkCtrlState [4] ForceLinkCtrl
//                    [3] QosForwardEnable [2] LinkCtrlMaster [1] Reset [0] Enable
//                    Reset clears itself when the link passes through its RESET state.
//   0x04 TAXI_STATUS [31] RemoteStatusActive [30] RemoteStatusShutdown
//                    [28:21] OutstandingWriteCount [20:13] OutstandingReadCount
//                    [8] DummyAccessed (any write clears it) [3:1] LinkState [0] Idle
//   0x0C TAXI_AR_CREDIT_CTRL [15:8] AR credit                 [0] bit 0
//   0x10 TAXI_AW_CREDIT_CTRL [23:16] WD credit [15:8] AW credit [0] bit 0
//   0x14 TAXI_RR_CREDIT_CTRL [15:8] RR credit                 [0] bit 0
//   0x18 TAXI_BR_CREDIT_CTRL [15:8] BR credit                 [0] bit 0
//   0x20..0x2C TAXI_PARAM_STATUS_0..3, read-only build parameters:
//        0: [31:24] TAXI_DW [23:16] TX_AWIDTH [15:8] RXFIFO_AWIDTH [7:0] CREDIT_DWIDTH
//        1: [31:24] RX_RR_AWIDTH [23:16] RX_WD_AWIDTH [15:8] RX_AW_AWIDTH [7:0] RX_AR_AWIDTH
//        2: [7:0] RX_BR_AWIDTH
//        3: [15:8] AXI data width [7:0] AXI ID width
//   0x7C TAXI_ID     read-only TAXI_ID parameter
// Credit values take effect when the link control logic reloads them (link reset
// or disabled state). The APB port has no wait states and no error response.
//
// From the document: the register names, offsets, the TAXI_CTRL and TAXI_STATUS bit
// fields, the credit-control reset values 0x401 / 0x00100401 / 0x1001 / 0x401 and
// the TAXI_CTRL reset value 0x08 (Fig 8, Fig 10, Tables 3 and 4). The dump also
// shows TAXI_CTRL = 0x0d at the fabric end; here the fabric end's LinkCtrlMaster
// reset value is a parameter and Enable always resets to 0, as Table 3 says.
// This design's own: the credit field positions (read from the dumped values), the
// parameter register layout, the meaning-free bit 0 of the credit registers (kept
// as a plain read/write bit) and the TAXI_ID value.
module taxi_regs
  import taxi_pkg::*;
#(
  parameter logic        MASTER_RST    = 1'b0,
  parameter logic [31:0] TAXI_ID       = 32'h7A_A1_00_01,
  parameter int unsigned TAXI_DW       = 16,
  parameter int unsigned TX_AWIDTH     = 2,
  parameter int unsigned RXFIFO_AWIDTH = 5,
  parameter int unsigned CREDW         = 8,
  parameter int unsigned RX_AR_AWIDTH  = 3,
  parameter int unsigned RX_AW_AWIDTH  = 3,
  parameter int unsigned RX_WD_AWIDTH  = 5,
  parameter int unsigned RX_RR_AWIDTH  = 5,
  parameter int unsigned RX_BR_AWIDTH  = 3
) (
  input  logic              pclk,
  input  logic              presetn,
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [7:0]        paddr,
  input  logic [31:0]       pwdata,
  output logic [31:0]       prdata,
  output logic              pready,
  // control outputs
  output logic              ctrl_en,
  output logic              ctrl_rst,
  output logic              ctrl_master,
  output logic              ctrl_qos_fwd,
  output logic              ctrl_force,
  output link_state_e       ctrl_force_state,
  output logic              ctrl_no_clk_gate,
  output logic [CREDW-1:0]  cred_init [NCH],
  // status inputs
  input  link_state_e       state,
  input  link_state_e       remote_state,
  input  logic [7:0]        wr_count,
  input  logic [7:0]        rd_count,
  input  logic              idle,
  input  logic              dummy_hit,
  input  logic              rst_done
);
  logic [8:0]  ctrl;
  logic        dummy_accessed;
  logic [31:0] cr_ar, cr_aw, cr_rr, cr_br;
  logic        wr_en;
  logic [31:0] status;

  assign wr_en  = psel && penable && pwrite;
  assign pready = 1'b1;

  assign ctrl_en          = ctrl[0];
  assign ctrl_rst         = ctrl[1];
  assign ctrl_master      = ctrl[2];
  assign ctrl_qos_fwd     = ctrl[3];
  assign ctrl_force       = ctrl[4];
  assign ctrl_force_state = link_state_e'(ctrl[7:5]);
  assign ctrl_no_clk_gate = ctrl[8];

  assign cred_init[CH_AR] = CREDW'(cr_ar[15:8]);
  assign cred_init[CH_AW] = CREDW'(cr_aw[15:8]);
  assign cred_init[CH_WD] = CREDW'(cr_aw[23:16]);
  assign cred_init[CH_RR] = CREDW'(cr_rr[15:8]);
  assign cred_init[CH_BR] = CREDW'(cr_br[15:8]);

  assign status = {remote_state == LINK_ACTIVE, remote_state == LINK_DISABLED, 1'b0,
                   wr_count, rd_count, 4'd0, dummy_accessed, 4'd0, state, idle};

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      ctrl           <= {5'b0_0000, 1'b1, MASTER_RST, 2'b00};
      dummy_accessed <= 1'b0;
      cr_ar          <= 32'h0000_0401;
      cr_aw          <= 32'h0010_0401;
      cr_rr          <= 32'h0000_1001;
      cr_br          <= 32'h0000_0401;
    end else begin
      if (rst_done) ctrl[1] <= 1'b0;
      if (dummy_hit) dummy_accessed <= 1'b1;
      if (wr_en) begin
        unique case (paddr)
          8'h00: ctrl  <= pwdata[8:0];
          8'h04: dummy_accessed <= 1'b0;
          8'h0C: cr_ar <= pwdata & 32'h0000_FF01;
          8'h10: cr_aw <= pwdata & 32'h00FF_FF01;
          8'h14: cr_rr <= pwdata & 32'h0000_FF01;
          8'h18: cr_br <= pwdata & 32'h0000_FF01;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (paddr)
      8'h00:   prdata = {23'd0, ctrl};
      8'h04:   prdata = status;
      8'h0C:   prdata = cr_ar;
      8'h10:   prdata = cr_aw;
      8'h14:   prdata = cr_rr;
      8'h18:   prdata = cr_br;
      8'h20:   prdata = {8'(TAXI_DW), 8'(TX_AWIDTH), 8'(RXFIFO_AWIDTH), 8'(CREDW)};
      8'h24:   prdata = {8'(RX_RR_AWIDTH), 8'(RX_WD_AWIDTH), 8'(RX_AW_AWIDTH), 8'(RX_AR_AWIDTH)};
      8'h28:   prdata = {24'd0, 8'(RX_BR_AWIDTH)};
      8'h2C:   prdata = {16'd0, 8'(AXI_DW), 8'(AXI_IDW)};
      8'h7C:   prdata = TAXI_ID;
      default: prdata = '0;
    endcase
  end
endmodule
