// ipd_generator -- maps channel symbols to inter-packet delays.
//
// For every symbol s on the input it emits the delay levels[s], in clock cycles, that the
// pacer must leave between two consecutive carrier packets. With three levels this is the
// ternary mapping of the block-coded channel (0 -> l'0, 1 -> l'1, 2 -> l'2; by default 10,
// 30 and 50 cycles); with two levels it is the binary channel (0 -> l0, 1 -> l1). The
// level table is a run-time input so software can retune it; the default values are the
// published ones. The output register and valid/ready handshake are this design's own.
//
// Interface: valid/ready in and out, one register stage (one cycle of latency, full rate).
// The `last` flag marking the final symbol of a covert packet passes through unchanged.
// A symbol at or above NLEV takes the largest level.
module ipd_generator
  import ipd_pkg::*;
#(
  parameter int unsigned NL = NLEV
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cnt_t  levels [NL],
  input  logic  in_valid,
  output logic  in_ready,
  input  sym_t  in_sym,
  input  logic  in_last,
  output logic  out_valid,
  input  logic  out_ready,
  output cnt_t  out_delay,
  output logic  out_last
);

  cnt_t level_sel;
  always_comb begin
    level_sel = levels[NL-1];
    for (int unsigned k = 0; k < NL; k++)
      if (32'(in_sym) == k) level_sel = levels[k];
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_delay <= '0;
      out_last  <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_delay <= level_sel;
        out_last  <= in_last;
      end
    end
  end

endmodule
