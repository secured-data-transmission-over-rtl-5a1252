// ipd_rx -- receiver endpoint of the IPD secure channel at one NoC node.
//
// Every packet ejected at this node is looked at. Data packets go on to the application
// (app_*) unchanged; those tagged by the watched transmitter also have their arrival times
// differenced by the IPD extractor (ipd_extractor). Each received delay is sliced by the
// thresholds into a symbol (ipd_threshold_decoder), M symbols are decoded back to N bits
// with error correction (nbmt_decoder), and the session controller (ipd_rx_ctrl) assembles
// covert packets, delivers them on cv_* and answers the transmitter with ACK, NACK or
// PROBE_ACK through the injection port.
//
// The chain IPD extraction -> threshold decoding -> block decoding follows the published
// receiver; the silence limit GAP_LIMIT (cycles without a carrier after which a partial
// covert packet is dropped) and the reply path are this design's own. GAP_LIMIT must be
// larger than the largest delay level plus the network's delay jitter, and the
// transmitter's lifetime must exceed one burst plus GAP_LIMIT.
//
// Interface: ej_valid/ej_pkt is the node's ejection port (always accepted, no
// back-pressure); inj_* its injection port (valid/ready). thresh[] are the ascending
// decision thresholds in cycles. app_valid and cv_valid are single-cycle pulses. Reply
// packets carry the receiver's address with the tag cleared and an all-zero payload.
module ipd_rx
  import ipd_pkg::*;
#(
  parameter int unsigned N         = BLK_N,
  parameter int unsigned M         = BLK_M,
  parameter logic [2*M-1:0] CODEBOOK [2**N] = CODEBOOK_1B2T,
  parameter int unsigned NL        = NLEV,
  parameter int unsigned CBITS     = COVERT_BITS,
  parameter int unsigned MAX_CORR  = 1,
  parameter int unsigned GAP_LIMIT = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  addr_t             my_addr,
  input  addr_t             peer_addr,
  input  cnt_t              thresh [NL-1],
  // NoC ejection and injection ports
  input  logic              ej_valid,
  input  pkt_t              ej_pkt,
  output logic              inj_valid,
  input  logic              inj_ready,
  output pkt_t              inj_pkt,
  // ordinary data packets to the application
  output logic              app_valid,
  output logic [DATA_W-1:0] app_data,
  // recovered covert packets
  output logic              cv_valid,
  output logic [CBITS-1:0]  cv_data,
  // status
  output logic              in_session,
  output logic              ev_corrected,
  output logic              ev_nack,
  output logic              ev_dropped
);

  logic   mine;
  logic   rx_ctl;
  logic   ipd_valid, ref_evt, gap_evt, rearm, dec_clear;
  cnt_t   ipd;
  logic   sym_valid;
  sym_t   sym;
  logic   grp_valid, grp_corr, grp_unc;
  logic [N-1:0] grp_bits;
  ptype_e rp_type;

  assign mine      = ej_valid && ej_pkt.dst == my_addr;
  assign rx_ctl    = mine && ej_pkt.ptype != PT_DATA && ej_pkt.flag_addr == peer_addr;
  assign app_valid = mine && ej_pkt.ptype == PT_DATA;
  assign app_data  = ej_pkt.data;

  ipd_extractor u_ext (
    .clk, .rst_n, .watch_addr(peer_addr), .gap_limit(cnt_t'(GAP_LIMIT)), .rearm,
    .pkt_valid(mine), .pkt(ej_pkt),
    .ipd_valid, .ipd, .ref_o(ref_evt), .gap_o(gap_evt)
  );

  ipd_threshold_decoder #(.NL(NL)) u_thr (
    .clk, .rst_n, .thresh, .ipd_valid, .ipd, .sym_valid, .sym
  );

  nbmt_decoder #(.N(N), .M(M), .CODEBOOK(CODEBOOK), .MAX_CORR(MAX_CORR)) u_dec (
    .clk, .rst_n, .clear(dec_clear), .sym_valid, .sym,
    .out_valid(grp_valid), .out_bits(grp_bits), .out_corrected(grp_corr),
    .out_uncorrectable(grp_unc)
  );

  assign ev_corrected = grp_valid && grp_corr;

  ipd_rx_ctrl #(.N(N), .CBITS(CBITS)) u_ctrl (
    .clk, .rst_n,
    .rx_valid(rx_ctl), .rx_type(ej_pkt.ptype),
    .ref_evt, .gap_evt,
    .grp_valid, .grp_bits, .grp_uncorrectable(grp_unc),
    .rearm, .dec_clear,
    .rp_valid(inj_valid), .rp_ready(inj_ready), .rp_type,
    .cv_valid, .cv_data, .in_session, .ev_nack, .ev_dropped
  );

  always_comb begin
    inj_pkt           = '0;
    inj_pkt.ptype     = rp_type;
    inj_pkt.dst       = peer_addr;
    inj_pkt.flag_addr = my_addr;
  end

endmodule
