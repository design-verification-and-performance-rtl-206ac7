// tb_taxi_in_stage: checks the link input stage and its receive FIFO. A source on
// the link clock (5 ns) sends numbered AXI words, link commands and idle cycles,
// obeying the stall rule; the reader on the AXI clock (7 ns) pops at random and
// sometimes stops for a long time. Every non-idle word must be read once, in order,
// with its valid bit, idle cycles must not be stored, the FIFO must never overflow
// (an assertion inside the stage), and stall must be raised while the reader stops.
module tb_taxi_in_stage;
  logic clk_taxi = 0, clk_axi = 0, rst_n = 0;
  always #2.5 clk_taxi = ~clk_taxi;
  always #3.5 clk_axi = ~clk_axi;
  logic taxi_rx_valid = 0, taxi_rx_stall, rd_pop = 0, rd_empty;
  logic [15:0] taxi_rx_data = 0;
  logic [16:0] rd_word;
  int checks = 0, failures = 0, nsent = 0, n_stall = 0;
  logic [16:0] q [$];
  bit reader_stop = 0;

  taxi_in_stage #(.TAXI_DW(16), .RXFIFO_AWIDTH(5), .STALL_MARGIN(4)) dut (.clk_taxi, .rst_taxi_n(rst_n),
    .taxi_rx_valid, .taxi_rx_data, .taxi_rx_stall, .clk_axi, .rst_n, .rd_pop, .rd_word, .rd_empty);

  initial begin
    repeat (200000) @(posedge clk_taxi);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk_axi) begin
    if (rst_n && rd_pop && !rd_empty) begin
      checks++;
      if (q.size() == 0 || rd_word != q[0]) begin failures++; $display("FAIL read %h", rd_word); end
      if (q.size() != 0) void'(q.pop_front());
    end
    rd_pop <= !reader_stop && ($urandom % 4 != 0);
  end

  always @(negedge clk_taxi) if (rst_n && taxi_rx_stall && reader_stop) n_stall++;

  initial begin
    repeat (5) @(posedge clk_taxi); rst_n = 1; repeat (5) @(posedge clk_taxi);
    for (int i = 0; i < 3000; i++) begin
      if (i % 500 == 100) reader_stop = 1;
      if (i % 500 == 200) reader_stop = 0;
      @(negedge clk_taxi);
      if (!taxi_rx_stall && ($urandom % 4 != 0)) begin
        automatic logic v = ($urandom % 3) != 0;
        automatic logic [15:0] d = 16'(nsent + 1);
        taxi_rx_valid = v; taxi_rx_data = d; q.push_back({v, d}); nsent++;
      end else begin
        taxi_rx_valid = 0; taxi_rx_data = 0;
      end
    end
    @(negedge clk_taxi); taxi_rx_valid = 0; taxi_rx_data = 0;
    reader_stop = 0;
    repeat (200) @(posedge clk_axi);
    checks++; if (q.size() != 0) begin failures++; $display("FAIL %0d words lost", q.size()); end
    checks++; if (nsent < 1000) begin failures++; $display("FAIL only %0d words accepted", nsent); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL stall never raised"); end
    checks++; if (!rd_empty) begin failures++; $display("FAIL idle words stored"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
