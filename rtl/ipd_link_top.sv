// ipd_link_top -- one secure inter-packet-delay channel across an untrusted NoC.
//
// The top holds the two ends of the channel: the transmitter endpoint (ipd_tx) at node
// tx_addr and the receiver endpoint (ipd_rx) at node rx_addr. The network between them is
// not part of this design: both endpoints' injection and ejection ports are brought out,
// and the NoC (or a model of it) carries carrier and control packets between the two
// nodes in both directions. Secret data enters as covert packets at the transmitter and
// leaves, after acknowledgement, at the receiver; ordinary application data for the peer
// flows alongside and is used as carrier traffic.
//
// Default configuration (the published main one): 1B2T block coding, delays 10/30/50
// cycles, thresholds 20/40 cycles, 8 covert bits per covert packet, 6-bit node addresses
// for an 8x8 mesh. Delay levels and thresholds are run-time inputs (raising the thresholds
// keeps the channel working through long congestion). Protocol timers (LIFETIME,
// CONG_RTT, BACKOFF, GAP_LIMIT) are this design's own values.
module ipd_link_top
  import ipd_pkg::*;
#(
  parameter int unsigned N         = BLK_N,
  parameter int unsigned M         = BLK_M,
  parameter logic [2*M-1:0] CODEBOOK [2**N] = CODEBOOK_1B2T,
  parameter int unsigned NL        = NLEV,
  parameter int unsigned CBITS     = COVERT_BITS,
  parameter int unsigned MAX_CORR  = 1,
  parameter int unsigned LIFETIME  = 4096,
  parameter int unsigned CONG_RTT  = 256,
  parameter int unsigned BACKOFF   = 1024,
  parameter int unsigned GAP_LIMIT = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  addr_t             tx_addr,
  input  addr_t             rx_addr,
  input  cnt_t              levels [NL],
  input  cnt_t              thresh [NL-1],
  // transmitter side: covert packets and ordinary traffic in
  input  logic              tx_cv_valid,
  output logic              tx_cv_ready,
  input  logic [CBITS-1:0]  tx_cv_data,
  input  logic              tx_cv_last,
  input  logic              tx_app_valid,
  output logic              tx_app_ready,
  input  logic [DATA_W-1:0] tx_app_data,
  // transmitter node's NoC ports
  output logic              tx_inj_valid,
  input  logic              tx_inj_ready,
  output pkt_t              tx_inj_pkt,
  input  logic              tx_ej_valid,
  input  pkt_t              tx_ej_pkt,
  // receiver node's NoC ports
  input  logic              rx_ej_valid,
  input  pkt_t              rx_ej_pkt,
  output logic              rx_inj_valid,
  input  logic              rx_inj_ready,
  output pkt_t              rx_inj_pkt,
  // receiver side: ordinary traffic and recovered covert packets out
  output logic              rx_app_valid,
  output logic [DATA_W-1:0] rx_app_data,
  output logic              rx_cv_valid,
  output logic [CBITS-1:0]  rx_cv_data,
  // status
  output logic              tx_in_session,
  output logic              rx_in_session,
  output logic              ev_retx_timeout,
  output logic              ev_retx_nack,
  output logic              ev_congested,
  output logic              ev_packet_acked,
  output logic              ev_dummy,
  output logic              ev_corrected,
  output logic              ev_nack,
  output logic              ev_dropped
);

  ipd_tx #(
    .N(N), .M(M), .CODEBOOK(CODEBOOK), .NL(NL), .CBITS(CBITS),
    .LIFETIME(LIFETIME), .CONG_RTT(CONG_RTT), .BACKOFF(BACKOFF)
  ) u_tx (
    .clk, .rst_n, .my_addr(tx_addr), .peer_addr(rx_addr), .levels,
    .cv_valid(tx_cv_valid), .cv_ready(tx_cv_ready), .cv_data(tx_cv_data), .cv_last(tx_cv_last),
    .app_valid(tx_app_valid), .app_ready(tx_app_ready), .app_data(tx_app_data),
    .inj_valid(tx_inj_valid), .inj_ready(tx_inj_ready), .inj_pkt(tx_inj_pkt),
    .ej_valid(tx_ej_valid), .ej_pkt(tx_ej_pkt),
    .in_session(tx_in_session),
    .ev_retx_timeout, .ev_retx_nack, .ev_congested, .ev_packet_acked, .ev_dummy
  );

  ipd_rx #(
    .N(N), .M(M), .CODEBOOK(CODEBOOK), .NL(NL), .CBITS(CBITS),
    .MAX_CORR(MAX_CORR), .GAP_LIMIT(GAP_LIMIT)
  ) u_rx (
    .clk, .rst_n, .my_addr(rx_addr), .peer_addr(tx_addr), .thresh,
    .ej_valid(rx_ej_valid), .ej_pkt(rx_ej_pkt),
    .inj_valid(rx_inj_valid), .inj_ready(rx_inj_ready), .inj_pkt(rx_inj_pkt),
    .app_valid(rx_app_valid), .app_data(rx_app_data),
    .cv_valid(rx_cv_valid), .cv_data(rx_cv_data),
    .in_session(rx_in_session),
    .ev_corrected, .ev_nack, .ev_dropped
  );

endmodule
