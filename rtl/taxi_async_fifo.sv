// taxi_async_fifo: dual-clock FIFO between the AXI clock domain and the T-AXI
// clock domain. The link uses it twice in each end: as the wide, shallow Tx FIFO
// (one whole packet per entry, written on clk_axi, read on clk_taxi) and as the
// receive FIFO (one link word per entry, written on clk_taxi, read on clk_axi).
//
// It is the usual Gray-coded pointer design: each side keeps a binary pointer one
// bit wider than the address and publishes its Gray code, which the other side
// passes through a two-flop synchroniser. full and wcount are computed on the
// write clock, empty on the read clock; both are pessimistic while a pointer update
// is in flight, never optimistic. rdata shows the head while !rempty and is taken
// by rpop. wcount (entries as seen from the write side) lets the receive FIFO raise
// its stall early. Each side has its own active-low asynchronous reset; both sides
// must be reset together.
//
// From the document: that both FIFOs are asynchronous, and the default depths of 4
// (TX_AWIDTH = 2) and 32 words (RXFIFO_AWIDTH = 5). The pointer scheme is this
// design's own.
module taxi_async_fifo #(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 2
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wpush,
  input  logic [W-1:0]  wdata,
  output logic          wfull,
  output logic [AW:0]   wcount,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rpop,
  output logic [W-1:0]  rdata,
  output logic          rempty
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0]  rbin_w;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    for (int i = AW; i >= 0; i--) b[i] = (i == AW) ? g[i] : (b[i+1] ^ g[i]);
    return b;
  endfunction

  // ---- write side ----
  assign rbin_w = gray2bin(rgray_w2);
  assign wcount = wbin - rbin_w;
  assign wfull  = wcount == (AW+1)'(2**AW);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wpush && !wfull) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wpush && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  // ---- read side ----
  assign rempty = rgray == wgray_r2;
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rpop && !rempty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n) !(wpush && wfull));
endmodule
