// taxi_cpr: clock, power and reset controller of the link (the T-AXI LCPR at the
// middle of the link). It hands the one synchronous T-AXI clock to both ends and
// to the repeaters, runs it only while an end asks for it, and makes the T-AXI
// reset.
//
// Clock: each end raises an asynchronous clock request (clkreq_u, clkreq_d) while
// it has work on the link. The OR of both requests is synchronised by two flops on
// the free-running source clock and then held for CLK_HOLD further cycles after it
// drops, so the last words and credits can drain. The enable is re-timed on the
// falling edge and ANDed with the source clock, which gives a glitch-free gated
// clock (the enable only changes while the clock is low).
//
// Reset: rst_taxi_n is asserted asynchronously with por_n and released on the
// second rising edge of the source clock after por_n rises (its rising edge is
// synchronous to the T-AXI clock). The clock runs while reset is asserted.
//
// From the document: clock driven to both ends when either request is active,
// asynchronous requests, reset with its rising edge synchronised to clk_taxi
// (Sec 3.4, 3.6, Table 1). This design's own: the hold count and the gating
// circuit. The PLL that makes the source clock is outside this block.
module taxi_cpr #(
  parameter int unsigned CLK_HOLD = 8
) (
  input  logic clk_taxi_src,
  input  logic por_n,
  input  logic clkreq_u,
  input  logic clkreq_d,
  output logic clk_taxi,
  output logic rst_taxi_n,
  output logic clk_on
);
  logic [1:0] req_sync;
  logic [1:0] rst_sync;
  logic [$clog2(CLK_HOLD+1)-1:0] hold;
  logic en_n;

  always_ff @(posedge clk_taxi_src or negedge por_n) begin
    if (!por_n) begin
      rst_sync <= '0;
      req_sync <= '0;
      hold     <= '0;
      clk_on   <= 1'b1;
    end else begin
      rst_sync <= {rst_sync[0], 1'b1};
      req_sync <= {req_sync[0], clkreq_u | clkreq_d};
      if (req_sync[1] || !rst_sync[1]) begin
        hold   <= ($clog2(CLK_HOLD+1))'(CLK_HOLD);
        clk_on <= 1'b1;
      end else if (hold != '0) begin
        hold   <= hold - 1'b1;
      end else begin
        clk_on <= 1'b0;
      end
    end
  end
  assign rst_taxi_n = rst_sync[1];

  always_ff @(negedge clk_taxi_src or negedge por_n) begin
    if (!por_n) en_n <= 1'b1;
    else        en_n <= clk_on;
  end

  assign clk_taxi = clk_taxi_src & en_n;
endmodule
