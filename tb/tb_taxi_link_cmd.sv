// tb_taxi_link_cmd: checks the choice of the next link command. The testbench
// changes the link state, the control bits and the QoS value at random, adds freed
// storage entries to the credit accumulators (which it owns, as the receiver does)
// and accepts commands at random. It checks the priority (state, then control,
// then QoS, then credit), that each accepted credit command carries the full
// accumulated count of the lowest-numbered channel with credit and is reported on
// cred_sent_*, that all credit is returned in the end, that the last state, control
// and QoS values sent are the current ones, and that control is sent only by the
// link master.
module tb_taxi_link_cmd;
  import taxi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  link_state_e state = LINK_DISABLED;
  logic is_master = 1, ctrl_en = 0, ctrl_rst = 0, lcmd_ready = 0, lcmd_valid, pending;
  logic [3:0] max_qos = 0;
  logic [CRED_CNTW-1:0] cred_acc [NCH];
  pkt_t lcmd_pkt;
  logic cred_sent_valid;
  chan_e cred_sent_ch;
  logic [CRED_CNTW-1:0] cred_sent_cnt;
  int checks = 0, failures = 0;
  int added [NCH], returned [NCH], taken [NCH];
  link_state_e last_state = LINK_DISABLED;
  logic [1:0] last_ctrl = 0;
  logic [3:0] last_qos = 0;
  int n_ctrl = 0;

  taxi_link_cmd dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // accepted commands, seen with the values before the edge
  always @(posedge clk) if (rst_n && lcmd_valid && lcmd_ready) begin
    automatic lcmd_e c = lcmd_e'(lcmd_pkt[PKT_W-1 -: 3]);
    automatic logic [12:0] arg = lcmd_pkt[PKT_W-4 -: 13];
    chk(lcmd_pkt[PKT_W-17:0] == '0, "single word");
    case (c)
      LC_STATE: begin chk(arg == 13'(state), "state value"); last_state = link_state_e'(arg[2:0]); end
      LC_CTRL: begin
        chk(state == last_state, "ctrl after state");
        chk(is_master, "ctrl only from master");
        last_ctrl = arg[1:0]; n_ctrl++;
      end
      LC_QOS: begin
        chk(state == last_state && (!is_master || {ctrl_rst, ctrl_en} == last_ctrl), "qos after state/ctrl");
        chk(arg == 13'(max_qos), "qos value"); last_qos = arg[3:0];
      end
      LC_CREDIT: begin
        automatic int ch = arg[12:10];
        automatic int lowest = -1;
        for (int k = NCH-1; k >= 0; k--) if (cred_acc[k] != 0) lowest = k;
        chk(state == last_state && max_qos == last_qos, "credit has lowest priority");
        chk(ch == lowest && arg[9:0] == cred_acc[ch], "credit channel and count");
        chk(cred_sent_valid && cred_sent_ch == chan_e'(ch) && cred_sent_cnt == arg[9:0], "cred_sent");
        returned[ch] += arg[9:0];
        taken[ch] += arg[9:0];
      end
      default: chk(0, "unknown command");
    endcase
    if (c != LC_CREDIT) chk(!cred_sent_valid, "no cred_sent for other commands");
  end

  // the accumulators, as the receiver keeps them
  task automatic add_credit(int ch, int n);
    added[ch] += n; cred_acc[ch] = cred_acc[ch] + CRED_CNTW'(n);
  endtask

  // credit sent at the last rising edge leaves the accumulator
  task automatic take_sent();
    for (int k = 0; k < NCH; k++) begin cred_acc[k] -= CRED_CNTW'(taken[k]); taken[k] = 0; end
  endtask

  initial begin
    for (int k = 0; k < NCH; k++) begin cred_acc[k] = 0; taken[k] = 0; added[k] = 0; returned[k] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      take_sent();
      if ($urandom % 50 == 0) state = link_state_e'($urandom % 8);
      if ($urandom % 80 == 0) {ctrl_rst, ctrl_en} = 2'($urandom);
      if ($urandom % 60 == 0) max_qos = 4'($urandom);
      if (i == 2000) is_master = 0;
      if ($urandom % 2 == 0) add_credit($urandom % NCH, 1 + $urandom % 3);
      lcmd_ready = $urandom % 3 != 0;
    end
    @(negedge clk); take_sent(); lcmd_ready = 1;
    repeat (30) begin
      @(negedge clk);
      take_sent();
    end
    for (int k = 0; k < NCH; k++) chk(added[k] == returned[k], $sformatf("all credit of channel %0d returned: %0d of %0d, acc %0d", k, returned[k], added[k], cred_acc[k]));
    chk(!lcmd_valid && !pending, "nothing pending at end");
    chk(last_state == state && last_qos == max_qos, "last values sent");
    chk(n_ctrl > 0, "control commands sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
