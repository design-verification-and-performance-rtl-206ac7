// taxi_in_stage: the receive side of a link end on the T-AXI clock: input stage,
// word decode and the shared receive FIFO that carries the words into the AXI
// clock domain.
//
// Each incoming word is registered (input stage). Idle cycles (valid low, zero
// word) are dropped; AXI packet words (valid high) and link commands (valid low,
// non-zero) are written as {valid, word} into the asynchronous receive FIFO of
// 2**RXFIFO_AWIDTH entries, read on clk_axi by taxi_rx.
//
// Link stall: the FIFO can be emptied more slowly than the link fills it when the
// AXI clock is slow relative to the T-AXI clock. taxi_rx_stall, a register, is
// raised while fewer than STALL_MARGIN entries are free as seen from the write
// side; the margin covers the words already in flight when the sender sees the
// stall (its reaction cycle and this stage's input register). Because the credit
// scheme guarantees the FIFO is always drained, these stalls are short.
//
// From the document: input stage, decode, the 32-entry asynchronous receive FIFO
// and the stall towards the transmitter (Fig 4, Sec 3.3, Sec 5.2.1.2). This design's
// own: the stall threshold. In the document link commands are split off before the
// FIFO; here they pass through it, which keeps all control logic on one clock.
module taxi_in_stage #(
  parameter int unsigned TAXI_DW       = 16,
  parameter int unsigned RXFIFO_AWIDTH = 5,
  parameter int unsigned STALL_MARGIN  = 4
) (
  input  logic               clk_taxi,
  input  logic               rst_taxi_n,
  input  logic               taxi_rx_valid,
  input  logic [TAXI_DW-1:0] taxi_rx_data,
  output logic               taxi_rx_stall,
  input  logic               clk_axi,
  input  logic               rst_n,
  input  logic               rd_pop,
  output logic [TAXI_DW:0]   rd_word,     // {valid, word}
  output logic               rd_empty
);
  logic               in_v;
  logic [TAXI_DW-1:0] in_d;
  logic               wr;
  logic               wfull;
  logic [RXFIFO_AWIDTH:0] wcount;
  localparam int unsigned DEPTH = 2**RXFIFO_AWIDTH;

  always_ff @(posedge clk_taxi or negedge rst_taxi_n) begin
    if (!rst_taxi_n) begin
      in_v          <= 1'b0;
      in_d          <= '0;
      taxi_rx_stall <= 1'b1;
    end else begin
      in_v          <= taxi_rx_valid;
      in_d          <= taxi_rx_data;
      taxi_rx_stall <= (DEPTH - 32'(wcount)) < STALL_MARGIN + 32'(wr);
    end
  end

  assign wr = in_v || (in_d != '0);

  taxi_async_fifo #(.W(TAXI_DW+1), .AW(RXFIFO_AWIDTH)) u_rx_fifo (
    .wclk(clk_taxi), .wrst_n(rst_taxi_n), .wpush(wr), .wdata({in_v, in_d}),
    .wfull(wfull), .wcount(wcount),
    .rclk(clk_axi), .rrst_n(rst_n), .rpop(rd_pop), .rdata(rd_word), .rempty(rd_empty)
  );

  a_rx_fifo_no_overflow: assert property (@(posedge clk_taxi) disable iff (!rst_taxi_n)
                                          !(wr && wfull));
endmodule
