// tb_taxi_out_stage: checks the serialiser that turns transmit FIFO entries into
// link words. The testbench plays the FIFO: it offers random packets of every
// channel and single-word link commands, and raises the link stall at random. The
// words on the link must be exactly the packets cut MSB first into 16-bit words,
// 4/4/3/3/1 words for AR/AW/WD/RR/BR, with valid high for AXI words and low for
// link commands; no word may appear in the cycle after a stall cycle; and with no
// stall a packet must go out back to back, one word per cycle.
module tb_taxi_out_stage;
  import taxi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fifo_empty = 1, fifo_pop, taxi_tx_valid, taxi_tx_stall = 0;
  logic [PKT_W:0] fifo_data = '0;
  logic [15:0] taxi_tx_data;
  int checks = 0, failures = 0;
  logic [PKT_W:0] pkts [$];
  logic [16:0] exp_words [$];
  bit random_stall = 0;
  int n_words = 0, t_first = -1, t_last = -1, cyc = 0;

  taxi_out_stage #(.TAXI_DW(16)) dut (.clk_taxi(clk), .*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int nwords(logic [PKT_W:0] e);
    return e[PKT_W] ? 1 : pkt_words(chan_e'(e[PKT_W-1 -: 3]), 16);
  endfunction

  // FIFO model and link monitor, both on the falling edge
  always @(negedge clk) begin
    cyc++;
    if (rst_n) begin
      if (taxi_tx_valid || taxi_tx_data != 0) begin
        checks++;
        if (taxi_tx_stall) begin failures++; $display("FAIL word after stall"); end
        if (exp_words.size() == 0 || {taxi_tx_valid, taxi_tx_data} != exp_words[0]) begin
          failures++; $display("FAIL word %b %h", taxi_tx_valid, taxi_tx_data);
        end
        if (exp_words.size() != 0) void'(exp_words.pop_front());
        n_words++;
        if (t_first < 0) t_first = cyc;
        t_last = cyc;
      end
    end
    fifo_empty = pkts.size() == 0;
    fifo_data  = fifo_empty ? '0 : pkts[0];
    taxi_tx_stall = random_stall && ($urandom % 3 == 0);
  end

  // the pop is taken with the values the design sees at the rising edge
  always @(posedge clk) if (rst_n && fifo_pop) void'(pkts.pop_front());

  task automatic add(logic [PKT_W:0] e);
    int n = nwords(e);
    pkts.push_back(e);
    for (int i = 0; i < n; i++)
      exp_words.push_back({!e[PKT_W], e[PKT_W-1-16*i -: 16]});
  endtask

  function automatic logic [PKT_W:0] rand_pkt();
    logic [PKT_W:0] e;
    for (int i = 0; i < 4; i++) e[i*32 +: 32] = $urandom;
    if ($urandom % 5 == 0) begin
      e[PKT_W] = 1'b1;
      e[PKT_W-1 -: 3] = 3'(1 + $urandom % 4);       // non-zero link command
      e[PKT_W-17:0] = '0;
    end else begin
      e[PKT_W] = 1'b0;
      e[PKT_W-1 -: 3] = 3'($urandom % 5);
    end
    return e;
  endfunction

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // back-to-back: an AR packet then a BR packet, no stall: 5 words in 5 cycles
    @(posedge clk);
    add(pack_a(CH_AR, '{id: 10'h3FF, addr: 36'hF_1234_5678, len: 4'hF, size: 3'd2, burst: 2'd1, prot: 1'b1, qos: '0}));
    add(pack_b('{id: 10'h155, resp: 2'b10}));
    repeat (10) @(posedge clk);
    checks++; if (n_words != 5 || t_last - t_first != 4) begin failures++; $display("FAIL back-to-back %0d %0d", n_words, t_last - t_first); end
    random_stall = 1;
    for (int i = 0; i < 400; i++) begin
      add(rand_pkt());
      while (pkts.size() > 3) @(posedge clk);
    end
    while (pkts.size() != 0) @(posedge clk);
    random_stall = 0;
    repeat (5) @(posedge clk);
    checks++; if (exp_words.size() != 0) begin failures++; $display("FAIL %0d words missing", exp_words.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
