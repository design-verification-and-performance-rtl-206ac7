// tb_taxi_repeater: checks one repeater stage. A source sends numbered words,
// mixing AXI words (valid high), link commands (valid low, non-zero) and idle
// cycles, and obeys the link stall rule (a word in cycle t+1 only if stall_out was
// low in cycle t). The sink raises stall_in at random. Every non-idle word must
// come out once, in order, with its valid bit; with stall_in low the stage must
// pass a word in exactly one cycle and never stall its source.
module tb_taxi_repeater;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, stall_out, out_valid, stall_in = 0;
  logic [15:0] in_data = 0, out_data;
  int checks = 0, failures = 0;
  logic [16:0] q [$];
  bit random_stall = 0;
  int nsent = 0;

  taxi_repeater #(.TAXI_DW(16)) dut (.clk_taxi(clk), .rst_n, .in_valid, .in_data, .stall_out,
    .out_valid, .out_data, .stall_in);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // sink
  always @(posedge clk) begin
    if (rst_n && (out_valid || out_data != 0)) begin
      checks++;
      if (q.size() == 0 || {out_valid, out_data} != q[0]) begin
        failures++; $display("FAIL got %b %h", out_valid, out_data);
      end
      if (q.size() != 0) void'(q.pop_front());
    end
    stall_in <= random_stall && ($urandom % 3 == 0);
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    // unstalled: one-cycle pass-through, no stall
    @(posedge clk); in_valid <= 1; in_data <= 16'h1234; q.push_back({1'b1, 16'h1234});
    @(posedge clk); in_valid <= 0; in_data <= 0;
    #1; checks++; if (!(out_valid && out_data == 16'h1234)) begin failures++; $display("FAIL latency"); end
    checks++; if (stall_out) begin failures++; $display("FAIL stalled while idle"); end
    repeat (3) @(posedge clk);
    random_stall = 1;
    while (nsent < 2000) begin
      @(posedge clk);
      if (!stall_out && ($urandom % 5 != 0)) begin
        automatic logic v = ($urandom % 4) != 0;
        automatic logic [15:0] d = 16'(nsent + 1);
        in_valid <= v; in_data <= d; q.push_back({v, d}); nsent++;
      end else begin
        in_valid <= 0; in_data <= 0;
      end
    end
    @(posedge clk); in_valid <= 0; in_data <= 0;
    random_stall = 0;
    repeat (20) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("FAIL %0d words lost", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
