// taxi_rx: receive back end of one link end, on the AXI clock (rx_dec, the four
// TAXI-to-AXI re-assembly units, RX QoS and the credit accumulators).
//
// Decode: one word per clock is taken from the receive FIFO. A word with valid low
// is a link command and is acted on at once: LC_CREDIT returns credit to this end's
// transmitter (cred_ret_*), LC_QOS updates the forwarded QoS, LC_STATE records the
// far end's link state and LC_CTRL carries the link master's enable and reset
// request. Words with valid high are collected into a packet; the first word names
// the channel, which fixes how many words follow. A complete packet is written, one
// clock later, into that channel's storage FIFO.
//
// Re-assembly: each channel has its own storage FIFO of 2**RX_*_AWIDTH entries (the
// far end's credit for that channel must not exceed it). AR and AW commands are
// issued on the AXI master port towards the local slave, write data on the W
// channel with WLAST rebuilt from the burst length of the matching AW (kept in a
// small queue in arrival order); read data and write responses are issued on the
// AXI slave port back to the local master. With qos_fwd_en set, ARQOS and AWQOS of
// every issued command are the last QoS value forwarded by the far end, else zero.
//
// Credit return: every transfer issued frees one storage entry; the freed entries
// of each channel are counted in cred_acc until taxi_link_cmd sends them back
// (cred_sent_*), at which point they are subtracted. An AW command also holds an
// entry of the burst-length queue until the last beat of its write data has been
// issued, so AW credit is freed at that point rather than when the AW itself is
// issued; otherwise a master sending many AW commands ahead of their data could
// overflow the length queue.
//
// From the document: the per-channel storage, the credit returned when the de-mapper
// issues an AXI transfer, WLAST not carried, QoS forwarding by link command
// (Sec 3.3, 3.8, Table 2, Fig 4). This design's own: one word per clock decode
// (the document's receiver can read several words per clock), packet and command
// formats, storage depths for RR, WD and BR.
module taxi_rx
  import taxi_pkg::*;
#(
  parameter int unsigned TAXI_DW      = 16,
  parameter int unsigned RX_AR_AWIDTH = 3,
  parameter int unsigned RX_AW_AWIDTH = 3,
  parameter int unsigned RX_WD_AWIDTH = 5,
  parameter int unsigned RX_RR_AWIDTH = 5,
  parameter int unsigned RX_BR_AWIDTH = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               srst,
  // receive FIFO read port
  input  logic [TAXI_DW:0]   rd_word,
  input  logic               rd_empty,
  output logic               rd_pop,
  // AXI master port towards the local slave
  output logic               m_ar_valid,
  input  logic               m_ar_ready,
  output axi_a_t             m_ar,
  output logic               m_aw_valid,
  input  logic               m_aw_ready,
  output axi_a_t             m_aw,
  output logic               m_w_valid,
  input  logic               m_w_ready,
  output axi_w_t             m_w,
  // AXI slave port back to the local master
  output logic               s_r_valid,
  input  logic               s_r_ready,
  output axi_r_t             s_r,
  output logic               s_b_valid,
  input  logic               s_b_ready,
  output axi_b_t             s_b,
  // link commands received
  output logic               cred_ret_valid,
  output chan_e              cred_ret_ch,
  output logic [CRED_CNTW-1:0] cred_ret_cnt,
  output link_state_e        remote_state,
  output logic               remote_en,
  output logic               remote_rst_req,   // one-cycle pulse
  input  logic               qos_fwd_en,
  output logic [AXI_QOSW-1:0] fwd_qos,
  // credit to return
  output logic [CRED_CNTW-1:0] cred_acc [NCH],
  input  logic               cred_sent_valid,
  input  chan_e              cred_sent_ch,
  input  logic [CRED_CNTW-1:0] cred_sent_cnt,
  output logic               rx_busy           // storage not empty or packet in progress
);
  localparam int NW_MAX = PKT_W / TAXI_DW;

  // ---------------- decode ----------------
  logic               w_v;
  logic [TAXI_DW-1:0] w_d;
  logic               asm_busy;
  chan_e              asm_ch;
  logic [$clog2(NW_MAX+1)-1:0] asm_idx;
  pkt_t               asm_buf;
  logic               disp_v;
  pkt_t               disp_p;
  chan_e              disp_ch;
  lcmd_e              lc;
  logic [12:0]        larg;

  assign rd_pop = !rd_empty;
  assign {w_v, w_d} = rd_word;
  assign lc   = lcmd_e'(w_d[TAXI_DW-1 -: 3]);
  assign larg = w_d[TAXI_DW-4 -: 13];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asm_busy       <= 1'b0;
      asm_ch         <= CH_AR;
      asm_idx        <= '0;
      asm_buf        <= '0;
      disp_v         <= 1'b0;
      disp_p         <= '0;
      disp_ch        <= CH_AR;
      cred_ret_valid <= 1'b0;
      cred_ret_ch    <= CH_AR;
      cred_ret_cnt   <= '0;
      remote_state   <= LINK_DISABLED;
      remote_en      <= 1'b0;
      remote_rst_req <= 1'b0;
      fwd_qos        <= '0;
    end else begin
      disp_v         <= 1'b0;
      cred_ret_valid <= 1'b0;
      remote_rst_req <= 1'b0;
      if (srst) asm_busy <= 1'b0;
      if (rd_pop && !w_v) begin
        unique case (lc)
          LC_CREDIT: begin
            cred_ret_valid <= 1'b1;
            cred_ret_ch    <= chan_e'(larg[12:10]);
            cred_ret_cnt   <= larg[9:0];
          end
          LC_QOS:   fwd_qos      <= larg[AXI_QOSW-1:0];
          LC_STATE: remote_state <= link_state_e'(larg[2:0]);
          LC_CTRL: begin
            remote_en      <= larg[0];
            remote_rst_req <= larg[1];
          end
          default: ;
        endcase
      end else if (rd_pop && w_v) begin
        automatic chan_e       ch  = asm_busy ? asm_ch : chan_e'(w_d[TAXI_DW-1 -: 3]);
        automatic int unsigned nw  = pkt_words(ch, TAXI_DW);
        automatic pkt_t        pbuf = asm_busy ? asm_buf : '0;
        automatic int unsigned i   = asm_busy ? int'(asm_idx) : 0;
        for (int k = 0; k < NW_MAX; k++)
          if (k == i) pbuf[PKT_W-1-k*TAXI_DW -: TAXI_DW] = w_d;
        if (i == nw - 1) begin
          disp_v   <= 1'b1;
          disp_p   <= pbuf;
          disp_ch  <= ch;
          asm_busy <= 1'b0;
          asm_idx  <= '0;
        end else begin
          asm_busy <= 1'b1;
          asm_ch   <= ch;
          asm_buf  <= pbuf;
          asm_idx  <= asm_idx + 1'b1;
        end
      end
    end
  end

  // ---------------- per-channel storage ----------------
  logic ar_empty, aw_empty, wd_empty, rr_empty, br_empty;
  logic ar_full, aw_full, wd_full, rr_full, br_full;
  logic ar_pop, aw_pop, wd_pop, rr_pop, br_pop;
  pkt_t ar_q, aw_q, wd_q, rr_q, br_q;
  logic [RX_AR_AWIDTH:0] ar_cnt;
  logic [RX_AW_AWIDTH:0] aw_cnt, lq_cnt;
  logic [RX_WD_AWIDTH:0] wd_cnt;
  logic [RX_RR_AWIDTH:0] rr_cnt;
  logic [RX_BR_AWIDTH:0] br_cnt;

  taxi_sync_fifo #(.W(PKT_W), .AW(RX_AR_AWIDTH)) u_ar_q (.clk, .rst_n, .srst,
    .push(disp_v && disp_ch == CH_AR), .wdata(disp_p), .pop(ar_pop), .rdata(ar_q),
    .full(ar_full), .empty(ar_empty), .count(ar_cnt));
  taxi_sync_fifo #(.W(PKT_W), .AW(RX_AW_AWIDTH)) u_aw_q (.clk, .rst_n, .srst,
    .push(disp_v && disp_ch == CH_AW), .wdata(disp_p), .pop(aw_pop), .rdata(aw_q),
    .full(aw_full), .empty(aw_empty), .count(aw_cnt));
  taxi_sync_fifo #(.W(PKT_W), .AW(RX_WD_AWIDTH)) u_wd_q (.clk, .rst_n, .srst,
    .push(disp_v && disp_ch == CH_WD), .wdata(disp_p), .pop(wd_pop), .rdata(wd_q),
    .full(wd_full), .empty(wd_empty), .count(wd_cnt));
  taxi_sync_fifo #(.W(PKT_W), .AW(RX_RR_AWIDTH)) u_rr_q (.clk, .rst_n, .srst,
    .push(disp_v && disp_ch == CH_RR), .wdata(disp_p), .pop(rr_pop), .rdata(rr_q),
    .full(rr_full), .empty(rr_empty), .count(rr_cnt));
  taxi_sync_fifo #(.W(PKT_W), .AW(RX_BR_AWIDTH)) u_br_q (.clk, .rst_n, .srst,
    .push(disp_v && disp_ch == CH_BR), .wdata(disp_p), .pop(br_pop), .rdata(br_q),
    .full(br_full), .empty(br_empty), .count(br_cnt));

  // burst lengths of received AW commands, for WLAST
  logic [AXI_LENW-1:0] lq_head, beat;
  logic lq_empty, lq_full, lq_pop;
  taxi_sync_fifo #(.W(AXI_LENW), .AW(RX_AW_AWIDTH)) u_len_q (.clk, .rst_n, .srst,
    .push(disp_v && disp_ch == CH_AW), .wdata(unpack_a(disp_p).len), .pop(lq_pop),
    .rdata(lq_head), .full(lq_full), .empty(lq_empty), .count(lq_cnt));

  // ---------------- AXI issue ----------------
  always_comb begin
    m_ar       = unpack_a(ar_q);
    m_ar.qos   = qos_fwd_en ? fwd_qos : '0;
    m_aw       = unpack_a(aw_q);
    m_aw.qos   = qos_fwd_en ? fwd_qos : '0;
    m_w        = unpack_w(wd_q);
    m_w.last   = beat == lq_head;
    s_r        = unpack_r(rr_q);
    s_b        = unpack_b(br_q);
  end
  assign m_ar_valid = !ar_empty;
  assign m_aw_valid = !aw_empty;
  assign m_w_valid  = !wd_empty && !lq_empty;
  assign s_r_valid  = !rr_empty;
  assign s_b_valid  = !br_empty;
  assign ar_pop = m_ar_valid && m_ar_ready;
  assign aw_pop = m_aw_valid && m_aw_ready;
  assign wd_pop = m_w_valid  && m_w_ready;
  assign rr_pop = s_r_valid  && s_r_ready;
  assign br_pop = s_b_valid  && s_b_ready;
  assign lq_pop = wd_pop && m_w.last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                beat <= '0;
    else if (srst)             beat <= '0;
    else if (wd_pop)           beat <= m_w.last ? '0 : beat + 1'b1;
  end

  // ---------------- credit accumulation ----------------
  logic [NCH-1:0] freed;
  assign freed = {br_pop, rr_pop, wd_pop, lq_pop, ar_pop};   // index = chan_e
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) cred_acc[c] <= '0;
    end else if (srst) begin
      for (int c = 0; c < NCH; c++) cred_acc[c] <= '0;
    end else begin
      for (int c = 0; c < NCH; c++) begin
        automatic logic [CRED_CNTW-1:0] sub;
        sub = (cred_sent_valid && cred_sent_ch == chan_e'(c)) ? cred_sent_cnt : '0;
        cred_acc[c] <= cred_acc[c] + CRED_CNTW'(freed[c]) - sub;
      end
    end
  end

  assign rx_busy = asm_busy || disp_v || !ar_empty || !aw_empty || !wd_empty
                   || !rr_empty || !br_empty;

  // Credit guarantees there is always room: a full storage FIFO here is a credit error.
  a_storage_room: assert property (@(posedge clk) disable iff (!rst_n)
    !(disp_v && ((disp_ch == CH_AR && ar_full) || (disp_ch == CH_AW && aw_full) ||
                 (disp_ch == CH_WD && wd_full) || (disp_ch == CH_RR && rr_full) ||
                 (disp_ch == CH_BR && br_full))));
endmodule
