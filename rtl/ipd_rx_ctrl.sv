// ipd_rx_ctrl -- session protocol of the covert receiver.
//
// The controller answers the transmitter and rebuilds covert packets from decoded groups:
//   * REQ opens a session (or restarts it) and is answered with ACK; TER closes it.
//   * PROBE is echoed with PROBE_ACK at any time, so the transmitter can time the network.
//   * In a session, each decoded group of N bits is placed into the covert packet being
//     assembled (bit 0 first). After ceil(CBITS/N) groups the packet is complete (the
//     zero padding of the last group is dropped): if no group in it was uncorrectable it
//     is delivered on cv_* and answered with ACK, otherwise it is discarded and answered
//     with NACK. Either way the extractor is re-armed so the next carrier is taken as the
//     reference packet of a new covert packet.
//   * A reference carrier (ref_evt) or a silence reported by the extractor (gap_evt) drops
//     a partly assembled covert packet; the transmitter's timer will resend it.
// Session opening/closing, acknowledging whole covert packets rather than single bits and
// NACK on a detected error follow the published protocol; what counts as a detected error
// (an uncorrectable group), the reply priorities and the discarding rules are this
// design's own choices.
//
// Interface: rx_valid/rx_type report control packets ejected at this node; grp_* are the
// decoder's output pulses; rp_* requests a reply packet (valid/ready), PROBE_ACK first,
// then NACK, then ACK. cv_valid pulses with a delivered covert packet (no back-pressure).
module ipd_rx_ctrl
  import ipd_pkg::*;
#(
  parameter int unsigned N     = BLK_N,
  parameter int unsigned CBITS = COVERT_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rx_valid,
  input  ptype_e           rx_type,
  input  logic             ref_evt,
  input  logic             gap_evt,
  input  logic             grp_valid,
  input  logic [N-1:0]     grp_bits,
  input  logic             grp_uncorrectable,
  output logic             rearm,
  output logic             dec_clear,
  output logic             rp_valid,
  input  logic             rp_ready,
  output ptype_e           rp_type,
  output logic             cv_valid,
  output logic [CBITS-1:0] cv_data,
  output logic             in_session,
  output logic             ev_nack,
  output logic             ev_dropped
);

  localparam int unsigned GROUPS = (CBITS + N - 1) / N;
  localparam int unsigned GW     = $clog2(GROUPS + 1);

  logic             sess_q;
  logic [GW-1:0]    cnt_q;
  logic             err_q;
  logic [GROUPS*N-1:0] buf_q;
  logic             ack_p, nack_p, pack_p;

  assign in_session = sess_q;
  assign dec_clear  = ref_evt || gap_evt;

  logic got_req, got_ter, got_probe;
  assign got_req   = rx_valid && rx_type == PT_REQ;
  assign got_ter   = rx_valid && rx_type == PT_TER;
  assign got_probe = rx_valid && rx_type == PT_PROBE;

  assign rp_valid = ack_p || nack_p || pack_p;
  always_comb begin
    if (pack_p)      rp_type = PT_PROBE_ACK;
    else if (nack_p) rp_type = PT_NACK;
    else             rp_type = PT_ACK;
  end

  logic             take;       // a decoded group belongs to the current covert packet
  logic             complete;
  logic [GROUPS*N-1:0] buf_next;
  assign take     = sess_q && grp_valid && !got_req;
  assign complete = take && (cnt_q == GW'(GROUPS - 1));
  always_comb begin
    buf_next = buf_q;
    buf_next[cnt_q*N +: N] = grp_bits;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sess_q     <= 1'b0;
      cnt_q      <= '0;
      err_q      <= 1'b0;
      buf_q      <= '0;
      ack_p      <= 1'b0;
      nack_p     <= 1'b0;
      pack_p     <= 1'b0;
      rearm      <= 1'b0;
      cv_valid   <= 1'b0;
      cv_data    <= '0;
      ev_nack    <= 1'b0;
      ev_dropped <= 1'b0;
    end else begin
      rearm      <= 1'b0;
      cv_valid   <= 1'b0;
      ev_nack    <= 1'b0;
      ev_dropped <= 1'b0;

      // reply queue: the packet on offer leaves on rp_ready
      if (rp_valid && rp_ready) begin
        if (pack_p)      pack_p <= 1'b0;
        else if (nack_p) nack_p <= 1'b0;
        else             ack_p  <= 1'b0;
      end
      if (got_probe) pack_p <= 1'b1;

      if (got_req) begin
        sess_q <= 1'b1;
        ack_p  <= 1'b1;
        cnt_q  <= '0;
        err_q  <= 1'b0;
        rearm  <= 1'b1;
      end else if (got_ter) begin
        sess_q <= 1'b0;
        cnt_q  <= '0;
        err_q  <= 1'b0;
        rearm  <= 1'b1;
      end else if (dec_clear && !take) begin
        if (cnt_q != '0) ev_dropped <= 1'b1;
        cnt_q <= '0;
        err_q <= 1'b0;
      end else if (complete) begin
        cnt_q <= '0;
        err_q <= 1'b0;
        rearm <= 1'b1;
        if (err_q || grp_uncorrectable) begin
          nack_p  <= 1'b1;
          ev_nack <= 1'b1;
        end else begin
          ack_p    <= 1'b1;
          cv_valid <= 1'b1;
          cv_data  <= buf_next[CBITS-1:0];
        end
      end else if (take) begin
        buf_q <= buf_next;
        cnt_q <= cnt_q + 1'b1;
        if (grp_uncorrectable) err_q <= 1'b1;
      end
    end
  end

endmodule
