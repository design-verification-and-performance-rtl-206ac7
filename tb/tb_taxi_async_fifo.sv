// tb_taxi_async_fifo: checks the dual-clock FIFO with unrelated write (10 ns) and
// read (7 ns) clocks: 300 random words pushed with random gaps and popped at random,
// compared in order with a queue; the full flag must rise at the depth (4 entries)
// while the reader is stopped, and empty must hold after everything is read.
module tb_taxi_async_fifo;
  logic wclk = 0, rclk = 0, rst_n = 0;
  always #5 wclk = ~wclk;
  always #3.5 rclk = ~rclk;
  logic wpush = 0, rpop = 0, wfull, rempty;
  logic [15:0] wdata = 0, rdata;
  logic [2:0] wcount;
  int checks = 0, failures = 0;
  logic [15:0] q [$];
  bit stop_read = 1;

  taxi_async_fifo #(.W(16), .AW(2)) dut (.wclk, .wrst_n(rst_n), .wpush, .wdata, .wfull, .wcount,
    .rclk, .rrst_n(rst_n), .rpop, .rdata, .rempty);

  initial begin
    repeat (200000) @(posedge wclk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge rclk) begin
    if (rst_n && rpop && !rempty) begin
      checks++;
      if (q.size() == 0 || rdata != q[0]) begin failures++; $display("FAIL data %h", rdata); end
      if (q.size() != 0) void'(q.pop_front());
    end
    rpop <= !stop_read && ($urandom % 3 != 0);
  end

  initial begin
    repeat (3) @(posedge wclk); rst_n = 1; repeat (3) @(posedge wclk);
    // fill while the reader is stopped: full at 4
    for (int i = 0; i < 4; i++) begin
      @(posedge wclk); wpush <= 1; wdata <= 16'(i + 100); q.push_back(16'(i + 100));
    end
    @(posedge wclk); wpush <= 0;
    @(posedge wclk); checks++; if (!wfull || wcount != 4) begin failures++; $display("FAIL full"); end
    stop_read = 0;
    for (int i = 0; i < 300; i++) begin
      automatic logic [15:0] d = 16'($urandom);
      @(posedge wclk);
      while (wfull) @(posedge wclk);
      wpush <= 1; wdata <= d; q.push_back(d);
      @(posedge wclk); wpush <= 0;
      if ($urandom % 2) @(posedge wclk);
    end
    while (q.size() != 0) @(posedge wclk);
    repeat (10) @(posedge rclk);
    checks++; if (!rempty) begin failures++; $display("FAIL not empty at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
