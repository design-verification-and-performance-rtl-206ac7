// tb_taxi_tx_qos: checks the tracking of the highest QoS among commands in the
// link. Random AR and AW takes with random QoS values and random in-order credit
// returns (up to the number held) are applied, at most 8 held per channel; a
// reference model keeps the same queues and max_qos must equal, one cycle later,
// the maximum QoS of the commands held, and zero when none are held; srst empties
// the queues. Credit returns for the data and response channels must be ignored.
module tb_taxi_tx_qos;
  import taxi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic srst = 0, ar_take = 0, aw_take = 0, cred_ret_valid = 0;
  logic [3:0] ar_qos = 0, aw_qos = 0, max_qos;
  chan_e cred_ret_ch = CH_AR;
  logic [CRED_CNTW-1:0] cred_ret_cnt = 0;
  int checks = 0, failures = 0;
  int mq [2][$];
  int m_before = 0;

  taxi_tx_qos #(.QAW(3)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int model_max();
    int m = 0;
    for (int c = 0; c < 2; c++) foreach (mq[c][i]) if (mq[c][i] > m) m = mq[c][i];
    return m;
  endfunction

  always @(posedge clk) if (rst_n) begin
    m_before = model_max();
    if (srst) begin mq[0].delete(); mq[1].delete(); m_before = 0; end
    else begin
      if (ar_take) mq[0].push_back(ar_qos);
      if (aw_take) mq[1].push_back(aw_qos);
      if (cred_ret_valid && cred_ret_ch inside {CH_AR, CH_AW}) begin
        automatic int c = cred_ret_ch == CH_AR ? 0 : 1;
        for (int k = 0; k < cred_ret_cnt && mq[c].size() != 0; k++) void'(mq[c].pop_front());
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (max_qos != 4'(m_before)) begin failures++; $display("FAIL max_qos %0d expected %0d", max_qos, m_before); end
      ar_take = mq[0].size() < 8 && ($urandom % 3 == 0); ar_qos = 4'($urandom);
      aw_take = mq[1].size() < 8 && ($urandom % 3 == 0); aw_qos = 4'($urandom % 8);
      cred_ret_valid = $urandom % 3 == 0;
      cred_ret_ch = chan_e'($urandom % 5);
      cred_ret_cnt = CRED_CNTW'(1 + $urandom % 4);
      if (cred_ret_ch == CH_AR && (ar_take || cred_ret_cnt > mq[0].size())) cred_ret_valid = 0;
      if (cred_ret_ch == CH_AW && (aw_take || cred_ret_cnt > mq[1].size())) cred_ret_valid = 0;
      srst = (i % 1000 == 999);
    end
    @(negedge clk); ar_take = 0; aw_take = 0; cred_ret_valid = 0; srst = 0;
    // drain both queues: max must fall to zero
    for (int c = 0; c < 2; c++) begin
      cred_ret_valid = 1; cred_ret_ch = c ? CH_AW : CH_AR; cred_ret_cnt = 8;
      @(negedge clk);
    end
    cred_ret_valid = 0;
    repeat (2) @(negedge clk);
    checks++; if (max_qos != 0) begin failures++; $display("FAIL max_qos not zero when empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
