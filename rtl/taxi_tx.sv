// taxi_tx: transmit front end of one link end, on the AXI clock. It holds the four
// AXI command mappers (ARMAP, AWMAP for AW and write data, RRMAP, BRMAP), the
// per-channel transmit credit counters and the arbitration that writes one packet
// per cycle into the Tx FIFO.
//
// Credit: each of the five link channels (AR, AW, WD, RR, BR) has a counter loaded
// with its starting credit (cred_init, from the credit-control registers) while
// cred_load is high; all_back tells when every loaded credit has come back.
// A mapper takes an AXI transfer only when its counter is above zero and spends
// one credit per transfer: one per AR or AW command, one per write data beat, one per read data beat, one per write response. Credit comes back in
// LC_CREDIT link commands from the far end (cred_ret_*) and is added. Because a
// mapper can never send more words than the far end can store, a stalled AXI
// channel at the far end can never fill the shared receive FIFO.
//
// Each mapper packs the accepted transfer into a packet held in a one-entry slot.
// The arbiter gives a pending link command (lcmd_*) priority, then serves the five
// slots round-robin; a packet is written when the Tx FIFO is not full. A slot that
// is granted can take a new transfer in the same cycle.
//
// From the document: the credit rule (Sec 3.3, 5.2), the mapper split and a channel
// arbiter ahead of the Tx FIFO with link commands merged by a link arbiter (Fig 4).
// This design's own: round-robin order, link-command priority, one-entry slots and
// 8-bit counters. The document places the link arbiter after the Tx FIFO on the
// T-AXI clock; here link commands enter the same FIFO, so all credit and control
// logic runs on one clock.
module taxi_tx
  import taxi_pkg::*;
#(
  parameter int unsigned CREDW = 8    // CREDIT_DWIDTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cred_load,
  input  logic [CREDW-1:0]  cred_init [NCH],
  // AXI slave side: commands and write data from the local master
  input  logic              ar_valid,
  output logic              ar_ready,
  input  axi_a_t            ar,
  input  logic              aw_valid,
  output logic              aw_ready,
  input  axi_a_t            aw,
  input  logic              w_valid,
  output logic              w_ready,
  input  axi_w_t            w,
  // AXI master side: responses from the local slave
  input  logic              r_valid,
  output logic              r_ready,
  input  axi_r_t            r,
  input  logic              b_valid,
  output logic              b_ready,
  input  axi_b_t            b,
  // credit returned by the far end
  input  logic              cred_ret_valid,
  input  chan_e             cred_ret_ch,
  input  logic [CRED_CNTW-1:0] cred_ret_cnt,
  // link command to send
  input  logic              lcmd_valid,
  input  pkt_t              lcmd_pkt,
  output logic              lcmd_ready,
  // Tx FIFO write port: {is_link_command, packet}
  output logic              fifo_push,
  output logic [PKT_W:0]    fifo_data,
  input  logic              fifo_full,
  // status
  output logic [CREDW-1:0]  cred [NCH],
  output logic              all_back      // every credit loaded has come back
);
  logic [CREDW-1:0] cred_max [NCH];
  logic [NCH-1:0] slot_v, take, grant;
  pkt_t           slot_p [NCH];
  logic [NCH-1:0] has_cred;
  logic [2:0]     rr_ptr;
  logic           pick_any;
  logic [2:0]     pick;

  always_comb begin
    for (int c = 0; c < NCH; c++) has_cred[c] = cred[c] != '0;
  end

  // ---- arbitration: link command first, then round-robin over the slots ----
  always_comb begin
    pick_any = 1'b0;
    pick     = '0;
    for (int k = 0; k < NCH; k++) begin
      automatic int c = (int'(rr_ptr) + k) % NCH;
      if (!pick_any && slot_v[c]) begin
        pick_any = 1'b1;
        pick     = 3'(c);
      end
    end
  end

  assign lcmd_ready = lcmd_valid && !fifo_full;
  always_comb begin
    grant = '0;
    if (!fifo_full && !lcmd_valid && pick_any) grant[pick] = 1'b1;
  end
  assign fifo_push = lcmd_ready || (grant != '0);
  assign fifo_data = lcmd_ready ? {1'b1, lcmd_pkt} : {1'b0, slot_p[pick]};

  // ---- mappers: a slot takes a transfer when free (or being emptied) and credit remains ----
  logic [NCH-1:0] room;
  always_comb begin
    for (int c = 0; c < NCH; c++) room[c] = (!slot_v[c] || grant[c]) && has_cred[c];
  end
  assign ar_ready = room[CH_AR];
  assign aw_ready = room[CH_AW];
  assign w_ready  = room[CH_WD];
  assign r_ready  = room[CH_RR];
  assign b_ready  = room[CH_BR];

  assign take[CH_AR] = ar_valid && ar_ready;
  assign take[CH_AW] = aw_valid && aw_ready;
  assign take[CH_WD] = w_valid  && w_ready;
  assign take[CH_RR] = r_valid  && r_ready;
  assign take[CH_BR] = b_valid  && b_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_v <= '0;
      rr_ptr <= '0;
    end else begin
      for (int c = 0; c < NCH; c++) begin
        if (take[c])       slot_v[c] <= 1'b1;
        else if (grant[c]) slot_v[c] <= 1'b0;
      end
      if (grant != '0) rr_ptr <= (pick == 3'(NCH-1)) ? 3'd0 : pick + 3'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (take[CH_AR]) slot_p[CH_AR] <= pack_a(CH_AR, ar);
    if (take[CH_AW]) slot_p[CH_AW] <= pack_a(CH_AW, aw);
    if (take[CH_WD]) slot_p[CH_WD] <= pack_w(w);
    if (take[CH_RR]) slot_p[CH_RR] <= pack_r(r);
    if (take[CH_BR]) slot_p[CH_BR] <= pack_b(b);
  end

  // ---- transmit credit counters ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin
        cred[c]     <= '0;
        cred_max[c] <= '0;
      end
    end else if (cred_load) begin
      for (int c = 0; c < NCH; c++) begin
        cred[c]     <= cred_init[c];
        cred_max[c] <= cred_init[c];
      end
    end else begin
      for (int c = 0; c < NCH; c++) begin
        automatic logic [CREDW-1:0] add;
        add = (cred_ret_valid && cred_ret_ch == chan_e'(c)) ? CREDW'(cred_ret_cnt) : '0;
        cred[c] <= cred[c] + add - CREDW'(take[c]);
      end
    end
  end

  always_comb begin
    all_back = 1'b1;
    for (int c = 0; c < NCH; c++) if (cred[c] != cred_max[c]) all_back = 1'b0;
  end

  a_spend_with_credit: assert property (@(posedge clk) disable iff (!rst_n)
                                        (take & ~has_cred) == '0);
endmodule
