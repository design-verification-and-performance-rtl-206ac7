// tb_taxi_link_ctrl: checks the link state machine alone, with the remote state,
// the remote requests and the idle inputs driven by the testbench. It walks the
// enable path DISABLED -> WAIT_DS_IDLE -> READY -> ACTIVE (READY must wait for the
// remote end to be READY or ACTIVE), the reset path ACTIVE -> WAIT_IDLE -> IDLE ->
// RESET -> RESET_CLEAR -> READY (WAIT_IDLE must wait for quiet, IDLE must wait while
// the remote end is still ACTIVE, srst is high only in RESET), the disable path,
// a follower that obeys remote requests, and a forced state.
module tb_taxi_link_ctrl;
  import taxi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic is_master = 1, ctrl_en = 0, ctrl_rst = 0, remote_en = 0, remote_rst_req = 0;
  link_state_e remote_state = LINK_DISABLED, force_state = LINK_DISABLED, state;
  logic force_en = 0, ds_idle = 0, quiet = 0, srst, rst_done;
  int checks = 0, failures = 0;
  int n_srst = 0;

  taxi_link_ctrl dut (.*);

  always @(posedge clk) if (rst_n && srst) n_srst++;

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_state(link_state_e s, string what);
    checks++;
    if (state != s) begin failures++; $display("FAIL %s: state %s, expected %s", what, state.name(), s.name()); end
  endtask
  task automatic tick(int n = 1); repeat (n) @(posedge clk); #1; endtask

  initial begin
    tick(2); rst_n = 1; tick(2);
    expect_state(LINK_DISABLED, "after reset");
    ctrl_en = 1; tick();
    expect_state(LINK_WAIT_DS_IDLE, "enable");
    tick(3);
    expect_state(LINK_WAIT_DS_IDLE, "dummy slave busy");
    ds_idle = 1; tick();
    expect_state(LINK_READY, "dummy slave idle");
    tick(4);
    expect_state(LINK_READY, "remote disabled");
    remote_state = LINK_READY; tick();
    expect_state(LINK_ACTIVE, "remote ready");
    remote_state = LINK_ACTIVE;
    // link reset
    ctrl_rst = 1; tick();
    expect_state(LINK_WAIT_IDLE, "reset request");
    tick(3);
    expect_state(LINK_WAIT_IDLE, "not quiet");
    quiet = 1; tick();
    expect_state(LINK_IDLE, "quiet");
    tick(3);
    expect_state(LINK_IDLE, "remote still active");
    checks++; if (n_srst != 0) begin failures++; $display("FAIL srst too early"); end
    remote_state = LINK_IDLE; tick();
    expect_state(LINK_RESET, "remote idle");
    checks++; if (!srst || !rst_done) begin failures++; $display("FAIL srst not high in RESET"); end
    ctrl_rst = 0; tick();
    expect_state(LINK_RESET_CLEAR, "reset clear");
    checks++; if (srst) begin failures++; $display("FAIL srst after RESET"); end
    tick();
    expect_state(LINK_READY, "back to ready");
    checks++; if (n_srst != 1) begin failures++; $display("FAIL srst cycles %0d", n_srst); end
    remote_state = LINK_ACTIVE; tick();
    expect_state(LINK_ACTIVE, "active again");
    // disable
    ctrl_en = 0; quiet = 0; tick();
    expect_state(LINK_WAIT_IDLE, "disable");
    quiet = 1; remote_state = LINK_DISABLED; tick(2);
    expect_state(LINK_DISABLED, "disabled");
    // follower: own bits ignored, remote requests obeyed
    is_master = 0; ctrl_en = 1; tick(3);
    expect_state(LINK_DISABLED, "follower ignores own enable");
    remote_en = 1; remote_state = LINK_READY; tick(3);
    expect_state(LINK_ACTIVE, "follower enabled by remote");
    remote_state = LINK_ACTIVE;
    remote_rst_req = 1; tick(); remote_rst_req = 0;
    tick();   // the request is latched first
    expect_state(LINK_WAIT_IDLE, "follower reset request");
    remote_state = LINK_IDLE; tick(2);
    expect_state(LINK_RESET, "follower reset");
    tick(2);
    expect_state(LINK_READY, "follower ready after reset");
    remote_state = LINK_READY; tick(3);
    expect_state(LINK_ACTIVE, "follower reset only once");
    // forced state
    force_en = 1; force_state = LINK_IDLE; tick();
    expect_state(LINK_IDLE, "forced");
    force_en = 0; remote_en = 0; remote_state = LINK_DISABLED; tick();
    expect_state(LINK_DISABLED, "leave forced state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
