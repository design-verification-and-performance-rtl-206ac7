// tb_taxi_axi_iso: checks the switch between the link and the dummy slave and the
// outstanding counters. With to_dummy high every handshake must go to the dummy
// side only; with it low to the link side only, and accept_new low must block new
// AR/AW but still let W, R and B through. The read count must rise per AR and fall
// only on an R beat with RLAST; the write count per AW and per B; srst clears both.
module tb_taxi_axi_iso;
  import taxi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic srst = 0, to_dummy = 1, accept_new = 1;
  logic s_ar_valid = 0, s_ar_ready, s_aw_valid = 0, s_aw_ready, s_w_valid = 0, s_w_ready;
  logic s_r_valid, s_r_ready = 0, s_b_valid, s_b_ready = 0;
  axi_r_t s_r, l_r = '0, d_r = '0;
  axi_b_t s_b, l_b = '0, d_b = '0;
  logic l_ar_valid, l_ar_ready = 1, l_aw_valid, l_aw_ready = 1, l_w_valid, l_w_ready = 1;
  logic l_r_valid = 0, l_r_ready, l_b_valid = 0, l_b_ready;
  logic d_ar_valid, d_ar_ready = 1, d_aw_valid, d_aw_ready = 1, d_w_valid, d_w_ready = 1;
  logic d_r_valid = 0, d_r_ready, d_b_valid = 0, d_b_ready;
  logic [7:0] rd_count, wr_count;
  int checks = 0, failures = 0;

  taxi_axi_iso dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    // dummy side
    s_ar_valid = 1; s_aw_valid = 1; s_w_valid = 1; d_r_valid = 1; d_r.id = 10'h12; d_b_valid = 1;
    s_r_ready = 1; s_b_ready = 1; l_r_valid = 1; l_b_valid = 1; l_r.id = 10'h3;
    #1;
    chk(d_ar_valid && d_aw_valid && d_w_valid && !l_ar_valid && !l_aw_valid && !l_w_valid, "to dummy: valids");
    chk(s_r_valid && s_r.id == 10'h12 && d_r_ready && !l_r_ready && d_b_ready && !l_b_ready, "to dummy: responses");
    @(posedge clk); #1;
    chk(rd_count == 0 && wr_count == 0, "dummy traffic not counted");
    s_ar_valid = 0; s_aw_valid = 0; s_w_valid = 0; d_r_valid = 0; d_b_valid = 0;
    l_r_valid = 0; l_b_valid = 0;
    // link side
    to_dummy = 0;
    s_ar_valid = 1; #1;
    chk(l_ar_valid && !d_ar_valid && s_ar_ready, "AR to link");
    repeat (3) @(posedge clk); #1;
    chk(rd_count == 3, "three reads counted");
    s_ar_valid = 0; s_aw_valid = 1; #1;
    chk(l_aw_valid && !d_aw_valid, "AW to link");
    repeat (2) @(posedge clk); #1;
    s_aw_valid = 0;
    chk(wr_count == 2, "two writes counted");
    // accept_new low: AR/AW blocked, W/R/B pass
    accept_new = 0; s_ar_valid = 1; s_aw_valid = 1; s_w_valid = 1; #1;
    chk(!l_ar_valid && !s_ar_ready && !l_aw_valid && !s_aw_ready, "new commands blocked");
    chk(l_w_valid && s_w_ready, "W passes while blocked");
    @(posedge clk); #1;
    s_ar_valid = 0; s_aw_valid = 0; s_w_valid = 0;
    chk(rd_count == 3 && wr_count == 2, "blocked commands not counted");
    // R beats without RLAST do not count down
    l_r_valid = 1; l_r.last = 0; #1;
    chk(s_r_valid && s_r.id == 10'h3 && l_r_ready, "R from link");
    repeat (4) @(posedge clk); #1;
    chk(rd_count == 3, "R without RLAST");
    l_r.last = 1; repeat (2) @(posedge clk); #1;
    l_r_valid = 0;
    chk(rd_count == 1, "R with RLAST");
    s_r_ready = 0; l_r_valid = 1; repeat (2) @(posedge clk); #1; l_r_valid = 0;
    chk(rd_count == 1, "no count without RREADY");
    l_b_valid = 1; @(posedge clk); #1; l_b_valid = 0;
    chk(wr_count == 1, "B counted");
    srst = 1; @(posedge clk); #1; srst = 0;
    chk(rd_count == 0 && wr_count == 0, "srst clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
