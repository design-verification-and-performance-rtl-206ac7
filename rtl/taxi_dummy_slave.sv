// taxi_dummy_slave: the AXI slave switched onto a link end's AXI slave port while
// the link is disabled, so that a master that still issues transfers gets answers
// instead of hanging the bus.
//
// Writes: the AW command and the write beats (up to WLAST) are accepted and
// discarded, then one write response with the command's ID is returned. Reads: the
// AR command is accepted and LEN+1 beats of pseudo-random data (a 32-bit Galois
// LFSR, x^32+x^22+x^2+x+1) are returned with the command's ID and RLAST on the last
// beat. Both responses are OKAY. One read and one write can be in progress at a
// time. accept_new low holds off new AR/AW commands while transfers in progress
// finish; idle is high when nothing is in progress. hit pulses for each command
// taken (it sets the DummyAccessed status bit).
//
// From the document: writes swallowed with a response, reads answered with random
// data, the DummyAccessed bit, waiting for the dummy slave to go idle (Sec 5.1.1,
// Table 4). This design's own: the LFSR, the OKAY response and one transfer per
// direction at a time.
module taxi_dummy_slave
  import taxi_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   accept_new,
  input  logic   ar_valid,
  output logic   ar_ready,
  input  axi_a_t ar,
  input  logic   aw_valid,
  output logic   aw_ready,
  input  axi_a_t aw,
  input  logic   w_valid,
  output logic   w_ready,
  input  axi_w_t w,
  output logic   r_valid,
  input  logic   r_ready,
  output axi_r_t r,
  output logic   b_valid,
  input  logic   b_ready,
  output axi_b_t b,
  output logic   idle,
  output logic   hit
);
  logic                rd_busy;
  logic [AXI_IDW-1:0]  rd_id;
  logic [AXI_LENW-1:0] rd_left;
  logic [31:0]         lfsr;
  logic                aw_got, w_done;
  logic [AXI_IDW-1:0]  wr_id;

  assign ar_ready = accept_new && !rd_busy;
  assign aw_ready = accept_new && !aw_got && !b_valid;
  assign w_ready  = !w_done && !b_valid;
  assign r_valid  = rd_busy;
  assign r        = '{id: rd_id, data: AXI_DW'(lfsr), resp: 2'b00, last: rd_left == '0};
  assign b        = '{id: wr_id, resp: 2'b00};
  assign idle     = !rd_busy && !aw_got && !w_done && !b_valid;
  assign hit      = (ar_valid && ar_ready) || (aw_valid && aw_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_busy <= 1'b0;
      rd_id   <= '0;
      rd_left <= '0;
      lfsr    <= 32'h1;
      aw_got  <= 1'b0;
      w_done  <= 1'b0;
      wr_id   <= '0;
      b_valid <= 1'b0;
    end else begin
      if (ar_valid && ar_ready) begin
        rd_busy <= 1'b1;
        rd_id   <= ar.id;
        rd_left <= ar.len;
      end else if (r_valid && r_ready) begin
        lfsr <= lfsr[0] ? ((lfsr >> 1) ^ 32'h8020_0003) : (lfsr >> 1);
        if (rd_left == '0) rd_busy <= 1'b0;
        else rd_left <= rd_left - 1'b1;
      end
      if (aw_valid && aw_ready) begin
        aw_got <= 1'b1;
        wr_id  <= aw.id;
      end
      if (w_valid && w_ready && w.last) w_done <= 1'b1;
      if (aw_got && w_done && !b_valid) begin
        b_valid <= 1'b1;
        aw_got  <= 1'b0;
        w_done  <= 1'b0;
      end else if (b_valid && b_ready) b_valid <= 1'b0;
    end
  end
endmodule
