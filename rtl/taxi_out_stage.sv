// taxi_out_stage: the transmit side of a link end on the T-AXI clock. It reads
// entries from the Tx FIFO and sends them on the narrow link, one TAXI_DW-bit word
// per clock, from the top of the packet down.
//
// An entry is {is_link_command, packet}. A link command goes out as one word with
// valid low; an AXI packet goes out as pkt_words(channel) words with valid high.
// Cycles with nothing to send carry valid low and an all-zero word (idle).
// The FIFO entry is popped with its last word.
//
// Stall rule of the link (used by every sender): the word on the wires in cycle
// t+1 may be a real word only if stall was low in cycle t. The outputs are
// registered, so the stall input has no combinational path to the outputs.
//
// From the document: time-division multiplexing of all AXI channels and link
// commands onto one word bus, valid high only for AXI data, stall from the receiver
// (Table 1, Sec 3.0). This design's own: word order and the stall timing above.
module taxi_out_stage
  import taxi_pkg::*;
#(
  parameter int unsigned TAXI_DW = 16
) (
  input  logic               clk_taxi,
  input  logic               rst_n,
  input  logic               fifo_empty,
  input  logic [PKT_W:0]     fifo_data,
  output logic               fifo_pop,
  output logic               taxi_tx_valid,
  output logic [TAXI_DW-1:0] taxi_tx_data,
  input  logic               taxi_tx_stall
);
  localparam int NW_MAX = PKT_W / TAXI_DW;
  logic [$clog2(NW_MAX+1)-1:0] idx;
  logic        is_lcmd;
  chan_e       ch;
  int unsigned nw;
  logic        send, last;
  logic [TAXI_DW-1:0] word;

  assign is_lcmd = fifo_data[PKT_W];
  assign ch      = chan_e'(fifo_data[PKT_W-1 -: 3]);
  assign nw      = is_lcmd ? 1 : pkt_words(ch, TAXI_DW);
  assign send    = !fifo_empty && !taxi_tx_stall;
  assign last    = (int'(idx) == nw - 1);
  assign fifo_pop = send && last;

  always_comb begin
    word = '0;
    for (int i = 0; i < NW_MAX; i++)
      if (int'(idx) == i) word = fifo_data[PKT_W-1-i*TAXI_DW -: TAXI_DW];
  end

  always_ff @(posedge clk_taxi or negedge rst_n) begin
    if (!rst_n) begin
      idx           <= '0;
      taxi_tx_valid <= 1'b0;
      taxi_tx_data  <= '0;
    end else begin
      taxi_tx_valid <= send && !is_lcmd;
      taxi_tx_data  <= send ? word : '0;
      if (send) idx <= last ? '0 : idx + 1'b1;
    end
  end
endmodule
