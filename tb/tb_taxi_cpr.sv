// tb_taxi_cpr: checks the link clock gate and reset. After power-on reset the link
// reset must release after two source-clock edges while the clock runs; with both
// clock requests low the clock must stop after the hold time, with no short pulse
// on the gated clock; a request from either end must restart it within a few
// cycles and keep it running as long as the request stays high.
module tb_taxi_cpr;
  logic src = 0, por_n = 0, clkreq_u = 0, clkreq_d = 0, clk_taxi, rst_taxi_n, clk_on;
  always #2 src = ~src;
  int checks = 0, failures = 0;
  int edges = 0;
  realtime t_rise = 0;

  taxi_cpr #(.CLK_HOLD(8)) dut (.clk_taxi_src(src), .por_n, .clkreq_u, .clkreq_d, .clk_taxi, .rst_taxi_n, .clk_on);

  always @(posedge clk_taxi) begin edges++; t_rise = $realtime; end
  // every high phase of the gated clock must be a full source half period
  always @(negedge clk_taxi) if (por_n && ($realtime - t_rise) != 2.0) begin
    failures++; $display("FAIL short clock pulse at %0t", $realtime);
  end

  initial begin
    #20000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic cnt_edges(int n, output int e);
    int e0 = edges; repeat (n) @(posedge src); e = edges - e0;
  endtask

  initial begin
    int e;
    #11 por_n = 1;
    chk(!rst_taxi_n, "reset held at power-on");
    repeat (3) @(posedge src); #0.5;
    chk(rst_taxi_n, "reset released");
    // no request: clock stops after the hold time
    repeat (20) @(posedge src);
    cnt_edges(20, e);
    chk(e == 0, "clock stopped without request");
    chk(!clk_on, "clk_on low");
    clkreq_u = 1; repeat (5) @(posedge src);
    cnt_edges(50, e);
    chk(e == 50, "clock runs on subsystem request");
    clkreq_u = 0; repeat (20) @(posedge src);
    cnt_edges(10, e); chk(e == 0, "stopped again");
    clkreq_d = 1; repeat (5) @(posedge src);
    cnt_edges(30, e); chk(e == 30, "clock runs on fabric request");
    clkreq_d = 0;
    cnt_edges(8, e); chk(e == 8, "held after request drops");
    repeat (20) @(posedge src);
    cnt_edges(10, e); chk(e == 0, "stopped after hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
