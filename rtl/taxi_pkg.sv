// taxi_pkg: types and constants shared by every block of the Thin-AXI (T-AXI) link.
//
// The link carries a reduced AXI4 over a narrow, time-multiplexed word bus. This
// package fixes the AXI subset that crosses the link (10-bit IDs, 36-bit addresses,
// 4-bit burst length, one PROT bit, no LOCK/CACHE/REGION, QoS sent apart from the
// commands), the channel and link-command codes, the link-state encoding and the
// packing of each channel into a link packet.
//
// Following the document: the field widths of the carried AXI signals (ID 10 bits,
// ADDR 36 bits, LEN 4 bits, SIZE 3, BURST 2, only PROT[1]), the eight link states
// and their numbers, and the rule that AXI words are sent with valid high and link
// commands with valid low. This design's own choices: the 32-bit AXI data width,
// the channel codes, the link-command word layout and the bit order inside packets.
//
// Packet layout: a packet is left-aligned in a PKT_W-bit vector. Its top three bits
// are the channel code, followed by the channel payload; the transmitter sends the
// vector from the MSB down, TAXI_DW bits per word, for pkt_words() words. A link
// command is one word whose top 16 bits are {lcmd[2:0], argument[12:0]}.
package taxi_pkg;

  // ---- AXI subset carried by the link ----
  localparam int AXI_IDW   = 10;   // A*ID[9:0]
  localparam int AXI_AW    = 36;   // A*ADDR[35:0], 64 GB
  localparam int AXI_LENW  = 4;    // A*LEN[3:0], 16-beat bursts
  localparam int AXI_DW    = 32;   // data width of the AXI ports
  localparam int AXI_SW    = AXI_DW / 8;
  localparam int AXI_QOSW  = 4;

  typedef struct packed {
    logic [AXI_IDW-1:0]  id;
    logic [AXI_AW-1:0]   addr;
    logic [AXI_LENW-1:0] len;
    logic [2:0]          size;
    logic [1:0]          burst;
    logic                prot;   // carries A*PROT[1] only
    logic [AXI_QOSW-1:0] qos;    // not carried per command: forwarded by QoS link command
  } axi_a_t;                     // AR and AW channels

  typedef struct packed {
    logic [AXI_DW-1:0] data;
    logic [AXI_SW-1:0] strb;
    logic              last;    // not carried: rebuilt from AWLEN at the receiver
  } axi_w_t;

  typedef struct packed {
    logic [AXI_IDW-1:0] id;
    logic [AXI_DW-1:0]  data;
    logic [1:0]         resp;
    logic               last;
  } axi_r_t;

  typedef struct packed {
    logic [AXI_IDW-1:0] id;
    logic [1:0]         resp;
  } axi_b_t;

  // ---- channels and packets ----
  typedef enum logic [2:0] {
    CH_AR = 3'd0, CH_AW = 3'd1, CH_WD = 3'd2, CH_RR = 3'd3, CH_BR = 3'd4
  } chan_e;
  localparam int NCH = 5;

  localparam int A_PW = AXI_IDW + AXI_AW + AXI_LENW + 3 + 2 + 1;  // 56
  localparam int W_PW = AXI_DW + AXI_SW;                          // 36
  localparam int R_PW = AXI_IDW + AXI_DW + 2 + 1;                 // 45
  localparam int B_PW = AXI_IDW + 2;                              // 12
  localparam int PKT_W = 96;       // multiple of 16, 32 and 48; holds 3 + A_PW

  typedef logic [PKT_W-1:0] pkt_t;

  // ---- link commands (sent with valid low) ----
  typedef enum logic [2:0] {
    LC_IDLE = 3'd0, LC_CREDIT = 3'd1, LC_QOS = 3'd2, LC_STATE = 3'd3, LC_CTRL = 3'd4
  } lcmd_e;
  localparam int CRED_CNTW = 10;   // credit count field of LC_CREDIT

  // ---- link control states (Table 4 LinkState encoding) ----
  typedef enum logic [2:0] {
    LINK_DISABLED    = 3'h0,
    LINK_WAIT_DS_IDLE= 3'h1,
    LINK_READY       = 3'h2,
    LINK_ACTIVE      = 3'h3,
    LINK_WAIT_IDLE   = 3'h4,
    LINK_IDLE        = 3'h5,
    LINK_RESET       = 3'h6,
    LINK_RESET_CLEAR = 3'h7
  } link_state_e;

  // Payload width of a channel.
  function automatic int chan_pw(chan_e ch);
    case (ch)
      CH_AR, CH_AW: return A_PW;
      CH_WD:        return W_PW;
      CH_RR:        return R_PW;
      default:      return B_PW;
    endcase
  endfunction

  // Number of link words a packet of channel ch takes on a dw-bit link.
  function automatic int pkt_words(chan_e ch, int dw);
    return (3 + chan_pw(ch) + dw - 1) / dw;
  endfunction

  // ---- packing (payload left-aligned below the channel code) ----
  function automatic pkt_t pack_a(chan_e ch, axi_a_t a);
    pkt_t p = '0;
    p[PKT_W-1 -: 3]      = ch;
    p[PKT_W-4 -: A_PW]   = {a.id, a.addr, a.len, a.size, a.burst, a.prot};
    return p;
  endfunction

  function automatic pkt_t pack_w(axi_w_t w);
    pkt_t p = '0;
    p[PKT_W-1 -: 3]      = CH_WD;
    p[PKT_W-4 -: W_PW]   = {w.data, w.strb};
    return p;
  endfunction

  function automatic pkt_t pack_r(axi_r_t r);
    pkt_t p = '0;
    p[PKT_W-1 -: 3]      = CH_RR;
    p[PKT_W-4 -: R_PW]   = {r.id, r.data, r.resp, r.last};
    return p;
  endfunction

  function automatic pkt_t pack_b(axi_b_t b);
    pkt_t p = '0;
    p[PKT_W-1 -: 3]      = CH_BR;
    p[PKT_W-4 -: B_PW]   = {b.id, b.resp};
    return p;
  endfunction

  function automatic axi_a_t unpack_a(pkt_t p);
    axi_a_t a;
    {a.id, a.addr, a.len, a.size, a.burst, a.prot} = p[PKT_W-4 -: A_PW];
    a.qos = '0;
    return a;
  endfunction

  function automatic axi_w_t unpack_w(pkt_t p);
    axi_w_t w;
    {w.data, w.strb} = p[PKT_W-4 -: W_PW];
    w.last = 1'b0;
    return w;
  endfunction

  function automatic axi_r_t unpack_r(pkt_t p);
    axi_r_t r;
    {r.id, r.data, r.resp, r.last} = p[PKT_W-4 -: R_PW];
    return r;
  endfunction

  function automatic axi_b_t unpack_b(pkt_t p);
    axi_b_t b;
    {b.id, b.resp} = p[PKT_W-4 -: B_PW];
    return b;
  endfunction

  // A link command, left-aligned like a packet.
  function automatic pkt_t pack_lcmd(lcmd_e c, logic [12:0] arg);
    pkt_t p = '0;
    p[PKT_W-1 -: 16] = {c, arg};
    return p;
  endfunction

endpackage
