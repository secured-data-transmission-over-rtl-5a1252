// ipd_tx -- transmitter endpoint of the IPD secure channel at one NoC node.
//
// Covert packets enter on cv_*. The session controller (ipd_tx_ctrl) splits each one into
// N-bit groups, the block encoder (nbmt_encoder) turns every group into M trits, the IPD
// generator (ipd_generator) turns every trit into a delay from the level table, and the
// pacer (ipd_pacer) sends tagged carrier packets to the peer node spaced by those delays,
// using the application's own packets for the peer as carriers and dummies when there are
// none. Control packets (REQ, PROBE, TER) from the controller share the injection port:
// the pacer owns it during a burst so that no control packet disturbs the gaps, and
// otherwise a waiting control packet goes before untagged application traffic. Control
// packets ejected at this node (ACK, NACK, PROBE_ACK) are passed to the controller.
//
// The chain encoder -> IPD generation -> packet release and the code-book come from the
// published transmitter; the injection arbitration is this design's own. With the default
// 1B2T coding an 8-bit covert packet becomes 16 delays, carried by 17 packets.
//
// Interface: inj_* is the node's injection port (valid/ready); ej_valid/ej_pkt is the
// node's ejection port (always accepted; only the type and destination of an ejected packet
// are used). levels[] holds the delay per symbol in cycles.
module ipd_tx
  import ipd_pkg::*;
#(
  parameter int unsigned N        = BLK_N,
  parameter int unsigned M        = BLK_M,
  parameter logic [2*M-1:0] CODEBOOK [2**N] = CODEBOOK_1B2T,
  parameter int unsigned NL       = NLEV,
  parameter int unsigned CBITS    = COVERT_BITS,
  parameter int unsigned LIFETIME = 4096,
  parameter int unsigned CONG_RTT = 256,
  parameter int unsigned BACKOFF  = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  addr_t             my_addr,
  input  addr_t             peer_addr,
  input  cnt_t              levels [NL],
  // covert packets
  input  logic              cv_valid,
  output logic              cv_ready,
  input  logic [CBITS-1:0]  cv_data,
  input  logic              cv_last,
  // ordinary application packets for the peer
  input  logic              app_valid,
  output logic              app_ready,
  input  logic [DATA_W-1:0] app_data,
  // NoC injection and ejection ports
  output logic              inj_valid,
  input  logic              inj_ready,
  output pkt_t              inj_pkt,
  input  logic              ej_valid,
  input  pkt_t              ej_pkt,
  // status
  output logic              in_session,
  output logic              ev_retx_timeout,
  output logic              ev_retx_nack,
  output logic              ev_congested,
  output logic              ev_packet_acked,
  output logic              ev_dummy
);

  logic         grp_valid, grp_ready, grp_last;
  logic [N-1:0] grp_bits;
  logic         cp_valid, cp_ready;
  ptype_e       cp_type;
  logic         sym_valid, sym_ready, sym_last;
  sym_t         sym;
  logic         d_valid, d_ready, d_last;
  cnt_t         d_cycles;
  logic         pc_valid, pc_ready, pacer_busy;
  pkt_t         pc_pkt;
  logic         rx_ctl;

  assign rx_ctl = ej_valid && ej_pkt.ptype != PT_DATA && ej_pkt.dst == my_addr;

  ipd_tx_ctrl #(
    .N(N), .CBITS(CBITS), .LIFETIME(LIFETIME), .CONG_RTT(CONG_RTT), .BACKOFF(BACKOFF)
  ) u_ctrl (
    .clk, .rst_n,
    .cv_valid, .cv_ready, .cv_data, .cv_last,
    .grp_valid, .grp_ready, .grp_bits, .grp_last,
    .cp_valid, .cp_ready, .cp_type,
    .rx_valid(rx_ctl), .rx_type(ej_pkt.ptype),
    .pacer_busy,
    .in_session, .ev_retx_timeout, .ev_retx_nack, .ev_congested, .ev_packet_acked
  );

  nbmt_encoder #(.N(N), .M(M), .CODEBOOK(CODEBOOK)) u_enc (
    .clk, .rst_n,
    .in_valid(grp_valid), .in_ready(grp_ready), .in_bits(grp_bits), .in_last(grp_last),
    .out_valid(sym_valid), .out_ready(sym_ready), .out_sym(sym), .out_last(sym_last)
  );

  ipd_generator #(.NL(NL)) u_gen (
    .clk, .rst_n, .levels,
    .in_valid(sym_valid), .in_ready(sym_ready), .in_sym(sym), .in_last(sym_last),
    .out_valid(d_valid), .out_ready(d_ready), .out_delay(d_cycles), .out_last(d_last)
  );

  ipd_pacer u_pacer (
    .clk, .rst_n, .my_addr, .peer_addr,
    .pass_en(!cp_valid),
    .d_valid, .d_ready, .d_cycles, .d_last,
    .app_valid, .app_ready, .app_data,
    .out_valid(pc_valid), .out_ready(pc_ready), .out_pkt(pc_pkt),
    .busy(pacer_busy), .dummy_o(ev_dummy)
  );

  // injection multiplexer: burst > control packet > untagged application traffic
  logic sel_ctrl;
  assign sel_ctrl = cp_valid && !pacer_busy;
  assign cp_ready = sel_ctrl && inj_ready;
  assign pc_ready = !sel_ctrl && inj_ready;
  assign inj_valid = sel_ctrl ? 1'b1 : pc_valid;
  always_comb begin
    if (sel_ctrl) begin
      inj_pkt           = '0;
      inj_pkt.ptype     = cp_type;
      inj_pkt.dst       = peer_addr;
      inj_pkt.flag_addr = my_addr;
    end else begin
      inj_pkt = pc_pkt;
    end
  end

endmodule
