// ipd_tx_ctrl -- session protocol of the covert transmitter.
//
// The controller moves a stream of covert packets (COVERT_BITS secret bits each) over the
// timing channel with stop-and-wait reliability:
//   1. It opens a session with a REQ packet and waits for the receiver's ACK; a REQ left
//      unanswered for LIFETIME cycles is sent again.
//   2. Before each covert packet it sends a PROBE and times the round trip to the
//      receiver's PROBE_ACK. A round trip above CONG_RTT cycles means the network is
//      congested: it waits BACKOFF cycles and probes again.
//   3. It feeds the covert packet, N bits per group (bit 0 first, the last group padded
//      with zeroes when CBITS is not a multiple of N), to the block encoder and
//      starts the packet's lifetime timer. It then waits for the receiver's verdict: an ACK
//      releases the packet and moves on to the next one; a NACK, or no ACK within LIFETIME
//      cycles of the start, sends the same covert packet again (after a new probe).
//   4. After the ACK of the packet marked last it closes the session with TER.
// REQ/ACK/TER, probing by round-trip delay, the lifetime timer, one covert packet in
// flight, and retransmission on NACK or timeout follow the published protocol. The probe
// limit, back-off time, lifetime value, unlimited retries and the absence of sequence
// numbers are this design's own choices.
//
// Interface: cv_* is the covert-packet input (valid/ready; a packet is consumed when it is
// acknowledged, so cv_data must stay stable until then). grp_* feeds the encoder
// (valid/ready, grp_last on the final group). cp_* requests a control packet of type
// cp_type from the injection multiplexer (valid/ready). rx_valid/rx_type report control
// packets ejected at this node. pacer_busy holds off a resend until the previous burst has
// left. The ev_* outputs pulse once per event for monitoring.
module ipd_tx_ctrl
  import ipd_pkg::*;
#(
  parameter int unsigned N          = BLK_N,
  parameter int unsigned CBITS      = COVERT_BITS,
  parameter int unsigned LIFETIME   = 4096,
  parameter int unsigned CONG_RTT   = 256,
  parameter int unsigned BACKOFF    = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  // covert packets from the secure application
  input  logic             cv_valid,
  output logic             cv_ready,
  input  logic [CBITS-1:0] cv_data,
  input  logic             cv_last,
  // bit groups to the block encoder
  output logic             grp_valid,
  input  logic             grp_ready,
  output logic [N-1:0]     grp_bits,
  output logic             grp_last,
  // control packets to send
  output logic             cp_valid,
  input  logic             cp_ready,
  output ptype_e           cp_type,
  // control packets received
  input  logic             rx_valid,
  input  ptype_e           rx_type,
  input  logic             pacer_busy,
  // status
  output logic             in_session,
  output logic             ev_retx_timeout,
  output logic             ev_retx_nack,
  output logic             ev_congested,
  output logic             ev_packet_acked
);

  localparam int unsigned GROUPS = (CBITS + N - 1) / N;
  localparam int unsigned GW     = (GROUPS > 1) ? $clog2(GROUPS) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_REQ, S_W_REQACK, S_PROBE, S_W_PROBE, S_BACKOFF, S_SEND, S_W_ACK, S_DRAIN, S_TER
  } state_e;

  state_e        state_q;
  cnt_t          timer_q;
  logic [GW-1:0] grp_q;

  logic got_ack, got_nack, got_pack;
  assign got_ack  = rx_valid && rx_type == PT_ACK;
  assign got_nack = rx_valid && rx_type == PT_NACK;
  assign got_pack = rx_valid && rx_type == PT_PROBE_ACK;

  assign cp_valid = (state_q == S_REQ) || (state_q == S_PROBE && cv_valid) || (state_q == S_TER);
  always_comb begin
    unique case (state_q)
      S_REQ:   cp_type = PT_REQ;
      S_TER:   cp_type = PT_TER;
      default: cp_type = PT_PROBE;
    endcase
  end

  assign grp_valid  = (state_q == S_SEND);
  logic [GROUPS*N-1:0] cv_padded;
  assign cv_padded  = (GROUPS*N)'(cv_data);
  assign grp_bits   = cv_padded[grp_q*N +: N];
  assign grp_last   = (grp_q == GW'(GROUPS - 1));
  assign cv_ready   = (state_q == S_W_ACK) && got_ack;
  assign in_session = (state_q != S_IDLE);

  logic timeout;
  assign timeout = (timer_q >= cnt_t'(LIFETIME));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q         <= S_IDLE;
      timer_q         <= '0;
      grp_q           <= '0;
      ev_retx_timeout <= 1'b0;
      ev_retx_nack    <= 1'b0;
      ev_congested    <= 1'b0;
      ev_packet_acked <= 1'b0;
    end else begin
      ev_retx_timeout <= 1'b0;
      ev_retx_nack    <= 1'b0;
      ev_congested    <= 1'b0;
      ev_packet_acked <= 1'b0;
      if (timer_q != '1) timer_q <= timer_q + 1'b1;
      unique case (state_q)
        S_IDLE: if (cv_valid) state_q <= S_REQ;
        S_REQ: if (cp_ready) begin
          state_q <= S_W_REQACK;
          timer_q <= '0;
        end
        S_W_REQACK: begin
          if (got_ack)      state_q <= S_PROBE;
          else if (timeout) state_q <= S_REQ;
        end
        S_PROBE: if (cv_valid && cp_ready) begin
          state_q <= S_W_PROBE;
          timer_q <= '0;
        end
        S_W_PROBE: begin
          if (got_pack) begin
            timer_q <= '0;
            grp_q   <= '0;
            if (timer_q <= cnt_t'(CONG_RTT)) begin
              state_q <= S_SEND;
            end else begin
              state_q      <= S_BACKOFF;
              ev_congested <= 1'b1;
            end
          end else if (timeout) begin
            state_q <= S_PROBE;
          end
        end
        S_BACKOFF: if (timer_q >= cnt_t'(BACKOFF)) state_q <= S_PROBE;
        S_SEND: if (grp_ready) begin
          grp_q <= grp_q + 1'b1;
          if (grp_last) state_q <= S_W_ACK;
        end
        S_W_ACK: begin
          if (got_ack) begin
            ev_packet_acked <= 1'b1;
            state_q         <= cv_last ? S_TER : S_PROBE;
          end else if (got_nack) begin
            ev_retx_nack <= 1'b1;
            state_q      <= S_DRAIN;
          end else if (timeout) begin
            ev_retx_timeout <= 1'b1;
            state_q         <= S_DRAIN;
          end
        end
        S_DRAIN: if (!pacer_busy) state_q <= S_PROBE;
        S_TER: if (cp_ready) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
