// ipd_pkg -- types and constants shared by the inter-packet-delay (IPD) secure channel.
//
// A secret bit stream is hidden in the time gaps between ordinary data packets that one
// NoC node sends to another. This package fixes the packet format seen at a node's
// network interface, the symbol type carried by the timing channel, the default 1B2T
// code-book and the default delay levels and decision thresholds.
//
// Packet format: a header (packet type, destination node), the flag bits (transmitter
// address of ADDR_W bits followed by a one-bit tag that marks a packet whose arrival time
// carries covert information) and a DATA_W-bit payload. The flag-bit layout, the address
// width p = log2(network size) = 6 for an 8x8 mesh, the 256-bit flit, 8 covert bits per
// covert packet, the code-book (0 -> "20", 1 -> "01") and the delays 10/30/50 cycles with
// thresholds 20/40 cycles follow the published scheme. The packet-type field and its
// encoding, the one-flit payload and the symbol width are this design's own choices.
package ipd_pkg;

  // Node address width p = log2(64) for the 8x8 mesh.
  localparam int unsigned ADDR_W      = 6;
  // Payload width: one 256-bit flit.
  localparam int unsigned DATA_W      = 256;
  // Covert bits per covert packet.
  localparam int unsigned COVERT_BITS = 8;
  // Width of every cycle counter (delays, time stamps, timers).
  localparam int unsigned CNT_W       = 16;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [CNT_W-1:0]  cnt_t;
  // One channel symbol: a trit (0, 1, 2) for nBmT coding, a bit for the binary channel.
  typedef logic [1:0]        sym_t;

  typedef enum logic [2:0] {
    PT_DATA      = 3'd0,  // normal data packet (may carry covert timing when tagged)
    PT_REQ       = 3'd1,  // transmitter asks the receiver to open a session
    PT_ACK       = 3'd2,  // receiver acknowledges REQ or a complete covert packet
    PT_NACK      = 3'd3,  // receiver found an error in a covert packet
    PT_TER       = 3'd4,  // transmitter closes the session
    PT_PROBE     = 3'd5,  // congestion probe
    PT_PROBE_ACK = 3'd6   // probe echoed by the receiver
  } ptype_e;

  typedef struct packed {
    ptype_e             ptype;
    addr_t              dst;
    addr_t              flag_addr;  // flag bits: transmitter address (p bits)
    logic               flag_tag;   // flag bits: 1 = arrival time must be parsed
    logic [DATA_W-1:0]  data;
  } pkt_t;

  // 1B2T code-book. Entry k is the code word of binary group k; trit j of a code word
  // sits at bits [2j+1:2j], and trit 0 is sent first. "20" -> {t1=0,t0=2}, "01" -> {t1=1,t0=0}.
  localparam int unsigned BLK_N = 1;
  localparam int unsigned BLK_M = 2;
  localparam logic [2*BLK_M-1:0] CODEBOOK_1B2T [2**BLK_N] = '{4'b0010, 4'b0100};

  // Delay levels l'_0, l'_1, l'_2 and thresholds T1, T2 of the block-coded channel (cycles).
  localparam int unsigned NLEV = 3;
  localparam cnt_t LEVELS_DEF [NLEV]   = '{16'd10, 16'd30, 16'd50};
  localparam cnt_t THRESH_DEF [NLEV-1] = '{16'd20, 16'd40};

endpackage
