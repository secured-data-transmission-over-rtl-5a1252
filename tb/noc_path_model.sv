// noc_path_model -- behavioural model of one direction of a NoC path (testbench only).
//
// Not synthesizable. Packets injected at one node come out at the other after a latency of
// base + a random jitter of 0..jitter cycles + a per-packet extra delay, in order and at
// most one per cycle (a later packet never overtakes an earlier one). With drop_tagged
// high, the next tagged data packet is discarded, as a malicious router would do; dropped
// pulses when that happens. The injection port is always ready.
module noc_path_model
  import ipd_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  int   base,
  input  int   jitter,
  input  int   extra,
  input  logic drop_tagged,
  output logic dropped,
  input  logic in_valid,
  output logic in_ready,
  input  pkt_t in_pkt,
  output logic out_valid,
  output pkt_t out_pkt
);
  longint cyc = 0;
  longint last_arr = 0;
  longint arr_q[$];
  pkt_t   pkt_q[$];

  assign in_ready = 1'b1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    out_valid <= 1'b0;
    dropped   <= 1'b0;
    if (rst_n && in_valid) begin
      if (drop_tagged && in_pkt.ptype == PT_DATA && in_pkt.flag_tag) begin
        dropped <= 1'b1;
      end else begin
        longint a;
        a = cyc + longint'(base) + longint'($urandom_range(0, jitter)) + longint'(extra);
        if (a <= last_arr) a = last_arr + 1;
        last_arr = a;
        arr_q.push_back(a);
        pkt_q.push_back(in_pkt);
      end
    end
    if (arr_q.size() != 0 && arr_q[0] <= cyc) begin
      void'(arr_q.pop_front());
      out_pkt   <= pkt_q.pop_front();
      out_valid <= 1'b1;
    end
  end
endmodule
