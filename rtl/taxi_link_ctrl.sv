// taxi_link_ctrl: link control state machine of one link end, on the AXI clock.
// It moves the end safely between disabled, active and reset. Both ends run one;
// the end whose LinkCtrlMaster bit is set (is_master) leads with its own Enable and
// Reset control bits, the other end follows the enable and reset requests that
// reach it in LC_CTRL link commands. Each end also sees the other's state
// (remote_state, from LC_STATE commands).
//
// States (encoding of the LinkState status field) and the transitions used here:
//   DISABLED     (0) dummy slave attached; enable request  -> WAIT_DS_IDLE
//   WAIT_DS_IDLE (1) no new commands to the dummy; dummy idle -> READY
//   READY        (2) enable dropped -> DISABLED; far end READY or ACTIVE -> ACTIVE
//   ACTIVE       (3) AXI traffic flows; reset request or enable dropped -> WAIT_IDLE
//   WAIT_IDLE    (4) new AR/AW held off; outstanding transfers done and all
//                    credit back (quiet) -> IDLE
//   IDLE         (5) far end no longer ACTIVE or WAIT_IDLE: reset request -> RESET,
//                    else -> DISABLED
//   RESET        (6) one-cycle synchronous reset of the control logic (srst): credit
//                    reloads, queues empty -> RESET_CLEAR
//   RESET_CLEAR  (7) enable request -> READY, else -> DISABLED
// force_en (ForceLinkCtrl) puts the machine in force_state, for lock-up recovery.
// rst_done pulses in RESET so the register Reset bit can clear itself. A follower
// keeps a reset request received from the master until it reaches RESET.
//
// From the document: the eight states and their meaning, master-led tracking, the
// reset sequence (hold off A*READY, wait for completion and credit, reset both ends,
// return to active), the force bits (Sec 5.1.3, 5.1.4, Tables 3 and 4). The
// transitions are not spelled out there; those above are this design's reading
// of the one-line state descriptions.
module taxi_link_ctrl
  import taxi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        is_master,
  input  logic        ctrl_en,
  input  logic        ctrl_rst,
  input  logic        remote_en,
  input  logic        remote_rst_req,
  input  link_state_e remote_state,
  input  logic        force_en,
  input  link_state_e force_state,
  input  logic        ds_idle,
  input  logic        quiet,
  output link_state_e state,
  output logic        srst,
  output logic        rst_done
);
  logic fol_rst;
  logic en_req, rst_req;

  assign en_req  = is_master ? ctrl_en  : remote_en;
  assign rst_req = is_master ? ctrl_rst : fol_rst;
  assign srst     = state == LINK_RESET;
  assign rst_done = state == LINK_RESET;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= LINK_DISABLED;
      fol_rst <= 1'b0;
    end else begin
      if (remote_rst_req)         fol_rst <= 1'b1;
      else if (state == LINK_RESET) fol_rst <= 1'b0;
      if (force_en) state <= force_state;
      else begin
        unique case (state)
          LINK_DISABLED:     if (en_req) state <= LINK_WAIT_DS_IDLE;
          LINK_WAIT_DS_IDLE: if (ds_idle) state <= LINK_READY;
          LINK_READY:
            if (!en_req) state <= LINK_DISABLED;
            else if (remote_state == LINK_READY || remote_state == LINK_ACTIVE)
              state <= LINK_ACTIVE;
          LINK_ACTIVE:       if (rst_req || !en_req) state <= LINK_WAIT_IDLE;
          LINK_WAIT_IDLE:    if (quiet) state <= LINK_IDLE;
          LINK_IDLE:
            if (remote_state != LINK_ACTIVE && remote_state != LINK_WAIT_IDLE)
              state <= rst_req ? LINK_RESET : LINK_DISABLED;
          LINK_RESET:        state <= LINK_RESET_CLEAR;
          LINK_RESET_CLEAR:  state <= en_req ? LINK_READY : LINK_DISABLED;
          default:           state <= LINK_DISABLED;
        endcase
      end
    end
  end
endmodule
