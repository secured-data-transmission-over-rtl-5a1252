// ipd_extractor -- measures the inter-packet delays of one covert transmitter.
//
// Every packet ejected at this node is inspected. A data packet whose tag flag is set and
// whose flag address equals watch_addr is a carrier: its arrival cycle is compared with
// the arrival cycle of the previous carrier, and the difference d_i = t_{i+1} - t_i is
// emitted as one received IPD. The difference is kept as an age counter that restarts at
// every carrier arrival, which gives the same value as subtracting two time stamps and
// cannot wrap (it saturates at 2^CNT_W - 1).
//
// The first carrier of a covert packet has no predecessor and is reported as a reference
// (ref_o). The extractor is armed for a reference after reset, when the controller pulses
// rearm (a covert packet has been completed), and when no carrier has arrived for more than
// gap_limit cycles; the last case pulses gap_o once, telling the controller that a partial
// covert packet was lost. Arrival-time differencing follows the published receiver; the
// reference/re-arm rules and the silence limit are this design's own way to find where a
// covert packet starts.
//
// Timing: ipd_valid/ref_o are registered and appear one cycle after the packet. Only the
// packet type and the flag bits are looked at; destination and payload are left unread.
module ipd_extractor
  import ipd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  addr_t watch_addr,
  input  cnt_t  gap_limit,
  input  logic  rearm,
  input  logic  pkt_valid,
  input  pkt_t  pkt,
  output logic  ipd_valid,
  output cnt_t  ipd,
  output logic  ref_o,
  output logic  gap_o
);

  cnt_t age_q;
  logic armed_q;
  logic carrier;

  assign carrier = pkt_valid && pkt.ptype == PT_DATA && pkt.flag_tag &&
                   pkt.flag_addr == watch_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      age_q     <= '0;
      armed_q   <= 1'b1;
      ipd_valid <= 1'b0;
      ipd       <= '0;
      ref_o     <= 1'b0;
      gap_o     <= 1'b0;
    end else begin
      ipd_valid <= 1'b0;
      ref_o     <= 1'b0;
      gap_o     <= 1'b0;
      if (carrier) begin
        age_q   <= cnt_t'(1);
        armed_q <= 1'b0;
        if (armed_q || rearm) begin
          ref_o <= 1'b1;
        end else begin
          ipd_valid <= 1'b1;
          ipd       <= age_q;
        end
      end else begin
        if (age_q != '1) age_q <= age_q + 1'b1;
        if (rearm) armed_q <= 1'b1;
        if (!armed_q && age_q >= gap_limit) begin
          armed_q <= 1'b1;
          gap_o   <= 1'b1;
        end
      end
    end
  end

endmodule
