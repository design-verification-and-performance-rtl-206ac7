// tb_taxi_tx: checks the transmit front end. Random traffic is offered on all five
// AXI channels (AR, AW, W from the local master, R and B from the local slave)
// together with link commands; the testbench plays the Tx FIFO (full at random)
// and the far end, which returns credit at random for packets it has received.
// It checks that every transfer appears exactly once, in order per channel, packed
// as the channel's packet; that a pending link command always wins the FIFO write;
// that no channel ever has more transfers in flight than its starting credit (and
// nothing is taken before the credit is loaded); that credit comes back up to the
// loaded values with all_back high at the end.
module tb_taxi_tx;
  import taxi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cred_load = 0;
  logic [7:0] cred_init [NCH];
  logic ar_valid = 0, ar_ready, aw_valid = 0, aw_ready, w_valid = 0, w_ready;
  logic r_valid = 0, r_ready, b_valid = 0, b_ready;
  axi_a_t ar = '0, aw = '0;
  axi_w_t w = '0;
  axi_r_t r = '0;
  axi_b_t b = '0;
  logic cred_ret_valid = 0;
  chan_e cred_ret_ch = CH_AR;
  logic [CRED_CNTW-1:0] cred_ret_cnt = 0;
  logic lcmd_valid = 0, lcmd_ready, fifo_push, fifo_full = 0, all_back;
  pkt_t lcmd_pkt = '0;
  logic [PKT_W:0] fifo_data;
  logic [7:0] cred [NCH];
  int checks = 0, failures = 0;
  pkt_t expq [NCH][$];
  int taken [NCH], received [NCH], returned [NCH];
  int n_lcmd = 0, n_lcmd_sent = 0;
  bit traffic = 1;
  logic [NCH-1:0] took = '0;

  taxi_tx #(.CREDW(8)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Tx FIFO and far-end receive side, on the values before the rising edge
  always @(posedge clk) if (rst_n) begin
    if (lcmd_valid && !fifo_full) chk(fifo_push && fifo_data[PKT_W], "link command wins");
    if (fifo_push) begin
      chk(!fifo_full, "no push when full");
      if (fifo_data[PKT_W]) begin
        chk(fifo_data[PKT_W-1:0] == lcmd_pkt, "link command packet");
        n_lcmd_sent++;
      end else begin
        automatic int c = fifo_data[PKT_W-1 -: 3];
        checks++;
        if (c >= NCH || expq[c].size() == 0 || fifo_data[PKT_W-1:0] != expq[c][0]) begin
          failures++; $display("FAIL packet of channel %0d: %h", c, fifo_data[PKT_W-1:0]);
        end else void'(expq[c].pop_front());
        if (c < NCH) received[c]++;
      end
    end
    if (cred_ret_valid) returned[cred_ret_ch] += cred_ret_cnt;
  end

  function automatic axi_a_t rand_a();
    axi_a_t a;
    a = '{id: 10'($urandom), addr: {4'($urandom), 32'($urandom)}, len: 4'($urandom), size: 3'($urandom),
          burst: 2'($urandom), prot: 1'($urandom), qos: '0};
    return a;
  endfunction

  initial begin
    cred_init[CH_AR] = 2; cred_init[CH_AW] = 3; cred_init[CH_WD] = 5; cred_init[CH_RR] = 4; cred_init[CH_BR] = 1;
    for (int c = 0; c < NCH; c++) begin taken[c] = 0; received[c] = 0; returned[c] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    // no credit loaded yet: nothing may be taken
    @(negedge clk); ar_valid = 1; w_valid = 1; b_valid = 1;
    repeat (3) @(negedge clk);
    chk(!ar_ready && !w_ready && !b_ready, "no transfer before credit is loaded");
    ar_valid = 0; w_valid = 0; b_valid = 0;
    cred_load = 1; @(negedge clk); cred_load = 0;
    chk(all_back && cred[CH_WD] == 5, "credit loaded");
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // in-flight limit
      for (int c = 0; c < NCH; c++)
        chk(taken[c] - returned[c] <= cred_init[c], $sformatf("credit limit of channel %0d", c));
      if (took[CH_AR]) ar_valid = 0;
      if (took[CH_AW]) aw_valid = 0;
      if (took[CH_WD]) w_valid = 0;
      if (took[CH_RR]) r_valid = 0;
      if (took[CH_BR]) b_valid = 0;
      if (i == 3500) traffic = 0;
      if (traffic) begin
        if (!ar_valid && $urandom % 2) begin ar_valid = 1; ar = rand_a(); end
        if (!aw_valid && $urandom % 2) begin aw_valid = 1; aw = rand_a(); end
        if (!w_valid && $urandom % 2) begin w_valid = 1; w = '{data: $urandom, strb: 4'($urandom), last: 1'b0}; end
        if (!r_valid && $urandom % 2) begin r_valid = 1; r = '{id: 10'($urandom), data: $urandom, resp: 2'($urandom), last: 1'($urandom)}; end
        if (!b_valid && $urandom % 2) begin b_valid = 1; b = '{id: 10'($urandom), resp: 2'($urandom)}; end
      end
      if (lcmd_valid && n_lcmd_sent == n_lcmd) lcmd_valid = 0;
      fifo_full = $urandom % 4 == 0;
      if (lcmd_valid) ;
      else if (!lcmd_valid && traffic && $urandom % 10 == 0) begin
        lcmd_valid = 1; lcmd_pkt = pack_lcmd(LC_QOS, 13'($urandom)); n_lcmd++;
      end
      begin
        automatic int c = $urandom % NCH;
        automatic int avail = received[c] - returned[c];
        cred_ret_valid = 0;
        if (avail > 0 && $urandom % 2 == 0) begin
          cred_ret_valid = 1; cred_ret_ch = chan_e'(c); cred_ret_cnt = CRED_CNTW'(1 + $urandom % avail);
        end
      end
      #1;
      // a transfer seen ready here is taken at the next rising edge; its valid
      // drops at the following falling edge
      took = '0;
      if (ar_valid && ar_ready) begin expq[CH_AR].push_back(pack_a(CH_AR, ar)); taken[CH_AR]++; took[CH_AR] = 1; end
      if (aw_valid && aw_ready) begin expq[CH_AW].push_back(pack_a(CH_AW, aw)); taken[CH_AW]++; took[CH_AW] = 1; end
      if (w_valid && w_ready) begin expq[CH_WD].push_back(pack_w(w)); taken[CH_WD]++; took[CH_WD] = 1; end
      if (r_valid && r_ready) begin expq[CH_RR].push_back(pack_r(r)); taken[CH_RR]++; took[CH_RR] = 1; end
      if (b_valid && b_ready) begin expq[CH_BR].push_back(pack_b(b)); taken[CH_BR]++; took[CH_BR] = 1; end
    end
    // return every outstanding credit
    @(negedge clk); fifo_full = 0; cred_ret_valid = 0;
    @(negedge clk); lcmd_valid = 0;
    repeat (10) @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      cred_ret_valid = 1; cred_ret_ch = chan_e'(c); cred_ret_cnt = CRED_CNTW'(received[c] - returned[c]);
      @(negedge clk);
    end
    cred_ret_valid = 0; @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      chk(expq[c].size() == 0, $sformatf("all transfers of channel %0d sent", c));
      chk(cred[c] == cred_init[c], $sformatf("credit of channel %0d restored", c));
      chk(taken[c] > 20, $sformatf("traffic on channel %0d", c));
    end
    chk(all_back, "all_back");
    chk(n_lcmd_sent == n_lcmd, "all link commands sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
