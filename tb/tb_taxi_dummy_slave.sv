// tb_taxi_dummy_slave: checks the slave that answers the local master while the
// link is disabled. A read burst of LEN+1 beats must return exactly that many OKAY
// beats with the command's ID, RLAST on the final beat only and data following the
// LFSR; a write burst must give one OKAY B with the AW ID, whether W comes before or
// after AW; accept_new low must refuse new commands; hit must pulse on each accepted
// command and idle must be high only when nothing is in progress.
module tb_taxi_dummy_slave;
  import taxi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic accept_new = 1, ar_valid = 0, ar_ready, aw_valid = 0, aw_ready, w_valid = 0, w_ready;
  logic r_valid, r_ready = 1, b_valid, b_ready = 1, idle, hit;
  axi_a_t ar = '0, aw = '0;
  axi_w_t w = '0;
  axi_r_t r;
  axi_b_t b;
  int checks = 0, failures = 0, n_hit = 0;
  logic [31:0] lfsr = 32'h1;

  taxi_dummy_slave dut (.*);

  always @(posedge clk) if (hit) n_hit++;

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Signals are driven and sampled at the falling edge, so a handshake seen there
  // completes at the next rising edge.
  task automatic do_read(int id, int len);
    @(negedge clk); ar_valid = 1; ar.id = 10'(id); ar.len = 4'(len);
    while (!ar_ready) @(negedge clk);
    @(negedge clk); ar_valid = 0;
    for (int i = 0; i <= len; i++) begin
      while (!r_valid) @(negedge clk);
      chk(r.id == 10'(id) && r.resp == 2'b00, "R id/resp");
      chk(r.last == (i == len), $sformatf("RLAST beat %0d of %0d", i, len));
      chk(r.data == lfsr, "R data");
      lfsr = lfsr[0] ? ((lfsr >> 1) ^ 32'h8020_0003) : (lfsr >> 1);
      @(negedge clk);
    end
    chk(!r_valid, "no extra R beat");
  endtask

  task automatic send_w(int len);
    for (int i = 0; i <= len; i++) begin
      w_valid = 1; w.last = (i == len);
      while (!w_ready) @(negedge clk);
      @(negedge clk);
    end
    w_valid = 0;
  endtask

  task automatic do_write(int id, int len, bit w_first);
    @(negedge clk);
    if (w_first) send_w(len);
    aw_valid = 1; aw.id = 10'(id); aw.len = 4'(len);
    while (!aw_ready) @(negedge clk);
    @(negedge clk); aw_valid = 0;
    if (!w_first) send_w(len);
    while (!b_valid) @(negedge clk);
    chk(b.id == 10'(id) && b.resp == 2'b00, "B id/resp");
    @(negedge clk);
    chk(!b_valid, "single B");
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    chk(idle, "idle after reset");
    do_read(5, 0);
    do_read(17, 3);
    do_read(1023, 15);
    do_write(9, 0, 0);
    do_write(33, 7, 0);
    do_write(34, 2, 1);
    chk(n_hit == 6, "hit count");
    #1; chk(idle, "idle at end");
    // accept_new low refuses commands
    accept_new = 0; ar_valid = 1; aw_valid = 1;
    repeat (5) @(posedge clk); #1;
    chk(!ar_ready && !aw_ready && n_hit == 6, "refuse when accept_new low");
    ar_valid = 0; aw_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
