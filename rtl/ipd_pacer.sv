// ipd_pacer -- releases carrier packets with the requested inter-packet delays.
//
// A burst of K delays d1..dK turns into K+1 tagged data packets to the peer node: the
// first (reference) packet leaves as soon as the burst starts, and packet i+1 leaves
// exactly d_i cycles after packet i was accepted by the network (t_{i+1} = t_i + d_i).
// Every carrier carries the flag bits: the tag set to 1 and the sender's own address.
// The payload is taken from the application's queue of ordinary packets for the peer; if
// the application has nothing to send at that moment a dummy packet with an all-zero
// payload goes out instead, so the timing never waits for real traffic. Outside a burst,
// and when pass_en is high and no burst is waiting, application packets go straight
// through with the tag cleared.
//
// The send-time rule, the flag bits and the use of dummy packets follow the published
// scheme. Measuring each delay from the cycle the previous packet was actually accepted
// (so back-pressure delays later packets instead of shortening a gap), the zero payload of
// dummies and the pass-through of untagged traffic are this design's own choices.
//
// Interface: delay stream d_* (valid/ready, last marks the final delay of a burst);
// application stream app_* (valid/ready); packet output out_* (valid/ready). busy is high
// from the start of a burst until its last packet is accepted; dummy_o pulses when a dummy
// carrier is accepted. A delay of 0 or 1 sends the next packet on the following cycle.
module ipd_pacer
  import ipd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  addr_t             my_addr,
  input  addr_t             peer_addr,
  input  logic              pass_en,
  // delay stream
  input  logic              d_valid,
  output logic              d_ready,
  input  cnt_t              d_cycles,
  input  logic              d_last,
  // application packets for the peer
  input  logic              app_valid,
  output logic              app_ready,
  input  logic [DATA_W-1:0] app_data,
  // packets to the network
  output logic              out_valid,
  input  logic              out_ready,
  output pkt_t              out_pkt,
  output logic              busy,
  output logic              dummy_o
);

  typedef enum logic [1:0] {S_IDLE, S_REF, S_WAIT} state_e;
  state_e state_q;
  cnt_t   age_q;      // cycles since the previous carrier was accepted

  logic carrier;      // a tagged carrier is being offered this cycle
  logic fire;
  logic pass_ok;       // untagged pass-through allowed this cycle
  assign pass_ok = (state_q == S_IDLE) && pass_en && !d_valid;

  always_comb begin
    carrier = 1'b0;
    unique case (state_q)
      S_REF:   carrier = 1'b1;
      S_WAIT:  carrier = d_valid && (age_q >= d_cycles);
      default: carrier = 1'b0;
    endcase
  end

  assign busy      = (state_q != S_IDLE);
  assign out_valid = carrier || (pass_ok && app_valid);
  assign fire      = out_valid && out_ready;
  assign app_ready = out_ready && (carrier || pass_ok);
  assign d_ready   = (state_q == S_WAIT) && carrier && out_ready;
  assign dummy_o   = carrier && out_ready && !app_valid;

  always_comb begin
    out_pkt           = '0;
    out_pkt.ptype     = PT_DATA;
    out_pkt.dst       = peer_addr;
    out_pkt.flag_addr = my_addr;
    out_pkt.flag_tag  = carrier;
    out_pkt.data      = app_valid ? app_data : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      age_q   <= '0;
    end else begin
      if (age_q != '1) age_q <= age_q + 1'b1;
      unique case (state_q)
        S_IDLE: if (d_valid) state_q <= S_REF;
        S_REF: if (fire) begin
          state_q <= S_WAIT;
          age_q   <= cnt_t'(1);
        end
        S_WAIT: if (fire) begin
          age_q <= cnt_t'(1);
          if (d_last) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
