// taxi_repeater: one repeater stage on a T-AXI channel (Repeater 0..N). It
// re-registers the word and valid on their way to the receiver and passes the stall
// back towards the transmitter, also through a register boundary, so long links
// can be split into single-cycle hops.
//
// How it works: words normally go straight from the input to the output register.
// Because the stall it receives reaches the previous stage one cycle late, words
// can still arrive after the next stage has stalled; up to two of them are kept in
// a holding buffer. The repeater stalls its own sender whenever the holding buffer
// is not empty, and empties it (oldest first, one word per cycle) once the stall
// from downstream is gone. It follows the link's stall rule: an output word in
// cycle t+1 only if stall_in was low in cycle t. Idle cycles (valid low, word zero)
// are not stored; link commands (valid low, non-zero word) are.
//
// From the document: a registered stall rippling back through each repeater, each
// storing data in a holding register to cope with the stall delay (Table 1,
// Fig 3). This design's own: the two-word holding buffer and the bypass.
module taxi_repeater #(
  parameter int unsigned TAXI_DW = 16
) (
  input  logic               clk_taxi,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [TAXI_DW-1:0] in_data,
  output logic               stall_out,
  output logic               out_valid,
  output logic [TAXI_DW-1:0] out_data,
  input  logic               stall_in
);
  typedef struct packed {
    logic               v;
    logic [TAXI_DW-1:0] d;
  } word_t;

  word_t hold [2];
  logic [1:0] cnt;
  logic in_word;
  word_t in_w;

  assign in_w      = '{v: in_valid, d: in_data};
  assign in_word   = in_valid || (in_data != '0);
  assign stall_out = cnt != 2'd0;

  always_ff @(posedge clk_taxi or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      hold[0]   <= '0;
      hold[1]   <= '0;
    end else begin
      out_valid <= 1'b0;
      out_data  <= '0;
      if (!stall_in && cnt != 2'd0) begin
        // drain the oldest held word; a word arriving now is held behind it
        {out_valid, out_data} <= hold[0];
        if (in_word) begin
          if (cnt == 2'd1) hold[0] <= in_w;
          else begin hold[0] <= hold[1]; hold[1] <= in_w; end
        end else begin
          hold[0] <= hold[1];
          cnt     <= cnt - 2'd1;
        end
      end else if (!stall_in) begin
        {out_valid, out_data} <= in_w;        // bypass
      end else if (in_word) begin
        hold[cnt[0]] <= in_w;                 // stalled: keep the arriving word
        cnt          <= cnt + 2'd1;
      end
    end
  end

  a_hold_no_overflow: assert property (@(posedge clk_taxi) disable iff (!rst_n)
                                       !(cnt == 2'd2 && stall_in && in_word));
endmodule
