// taxi_axi_iso: AXI isolation at a link end's AXI slave port (AXI_ISO). It decides
// where the local master's transfers go, and counts the outstanding ones.
//
// to_dummy high (link disabled, or waiting for the dummy slave to finish): all five
// channels are connected to the dummy slave. Otherwise they are connected to the
// link: AR and AW pass only while accept_new is high (link active); in every other
// state A*READY is held low so no new transfer enters, while write data, read data
// and write responses of transfers already started keep flowing.
//
// rd_count counts read commands that have entered the link and whose last read
// beat has not yet been returned; wr_count counts write commands whose response has
// not yet been returned. They are counted from acceptance. srst clears them.
//
// From the document: the dummy slave switched in while disabled, A*READY held off
// during reset, the outstanding read and write counts of the status register
// (Sec 5.1.1, 5.1.3, Table 4, Fig 4). This design's own: the multiplexing. The
// AR/AW/W payloads go to both sinks straight from the port; only handshakes pass here.
module taxi_axi_iso
  import taxi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       srst,
  input  logic       to_dummy,
  input  logic       accept_new,
  // from / to the local master
  input  logic       s_ar_valid, output logic s_ar_ready,
  input  logic       s_aw_valid, output logic s_aw_ready,
  input  logic       s_w_valid,  output logic s_w_ready,
  output logic       s_r_valid,  input  logic s_r_ready,  output axi_r_t s_r,
  output logic       s_b_valid,  input  logic s_b_ready,  output axi_b_t s_b,
  // to / from the link
  output logic       l_ar_valid, input  logic l_ar_ready,
  output logic       l_aw_valid, input  logic l_aw_ready,
  output logic       l_w_valid,  input  logic l_w_ready,
  input  logic       l_r_valid,  output logic l_r_ready,  input axi_r_t l_r,
  input  logic       l_b_valid,  output logic l_b_ready,  input axi_b_t l_b,
  // to / from the dummy slave
  output logic       d_ar_valid, input  logic d_ar_ready,
  output logic       d_aw_valid, input  logic d_aw_ready,
  output logic       d_w_valid,  input  logic d_w_ready,
  input  logic       d_r_valid,  output logic d_r_ready,  input axi_r_t d_r,
  input  logic       d_b_valid,  output logic d_b_ready,  input axi_b_t d_b,
  output logic [7:0] rd_count,
  output logic [7:0] wr_count
);
  logic lnk;
  assign lnk = !to_dummy;

  assign l_ar_valid = s_ar_valid && lnk && accept_new;
  assign l_aw_valid = s_aw_valid && lnk && accept_new;
  assign l_w_valid  = s_w_valid  && lnk;
  assign d_ar_valid = s_ar_valid && to_dummy;
  assign d_aw_valid = s_aw_valid && to_dummy;
  assign d_w_valid  = s_w_valid  && to_dummy;

  assign s_ar_ready = to_dummy ? d_ar_ready : (accept_new && l_ar_ready);
  assign s_aw_ready = to_dummy ? d_aw_ready : (accept_new && l_aw_ready);
  assign s_w_ready  = to_dummy ? d_w_ready  : l_w_ready;

  assign s_r_valid  = to_dummy ? d_r_valid : l_r_valid;
  assign s_r        = to_dummy ? d_r       : l_r;
  assign s_b_valid  = to_dummy ? d_b_valid : l_b_valid;
  assign s_b        = to_dummy ? d_b       : l_b;
  assign l_r_ready  = s_r_ready && lnk;
  assign l_b_ready  = s_b_ready && lnk;
  assign d_r_ready  = s_r_ready && to_dummy;
  assign d_b_ready  = s_b_ready && to_dummy;

  logic rd_inc, rd_dec, wr_inc, wr_dec;
  assign rd_inc = l_ar_valid && l_ar_ready;
  assign rd_dec = l_r_valid && l_r_ready && l_r.last;
  assign wr_inc = l_aw_valid && l_aw_ready;
  assign wr_dec = l_b_valid && l_b_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_count <= '0;
      wr_count <= '0;
    end else if (srst) begin
      rd_count <= '0;
      wr_count <= '0;
    end else begin
      rd_count <= rd_count + 8'(rd_inc) - 8'(rd_dec);
      wr_count <= wr_count + 8'(wr_inc) - 8'(wr_dec);
    end
  end
endmodule
