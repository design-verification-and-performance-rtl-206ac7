// taxi_sync_fifo: single-clock FIFO used as per-channel storage at the receive end
// of the link (the de-mapper storage whose size sets each channel's credit) and for
// small bookkeeping queues.
//
// Storage is a register array of 2**AW words addressed by read and write pointers
// one bit wider than the address, so full and empty are told apart without a
// separate flag. Interface: push/wdata write when !full; pop takes the head
// (rdata, shown whenever !empty) when !empty; count is the fill level. srst empties
// it synchronously (used by the link's synchronous reset). Push and pop in the same
// cycle are allowed. This structure is this design's own; the document gives only
// the depths (Sec 5.2.1).
module taxi_sync_fifo #(
  parameter int unsigned W  = 8,
  parameter int unsigned AW = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          srst,
  input  logic          push,
  input  logic [W-1:0]  wdata,
  input  logic          pop,
  output logic [W-1:0]  rdata,
  output logic          full,
  output logic          empty,
  output logic [AW:0]   count
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wp, rp;

  assign count = wp - rp;
  assign full  = count == (AW+1)'(2**AW);
  assign empty = count == '0;
  assign rdata = mem[rp[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else if (srst) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push && !full) wp <= wp + 1'b1;
      if (pop && !empty) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp[AW-1:0]] <= wdata;
  end

  // A write into a full FIFO or a read from an empty one is a protocol error of the user.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n || srst) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || srst) !(pop && empty));
endmodule
