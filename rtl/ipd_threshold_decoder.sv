// ipd_threshold_decoder -- turns a received inter-packet delay back into a symbol.
//
// The delay is compared with NL-1 ascending decision thresholds; the symbol is the number
// of thresholds that the delay reaches. For the block-coded channel (three levels) this is
// 0 below T1, 1 from T1 up to T2, and 2 from T2 on, with T1 = 20 and T2 = 40 cycles by
// default; for the binary channel (two levels) it is 0 below T0 and 1 from T0 on (T0 = 30).
// These rules and values follow the published scheme. Thresholds are run-time inputs so
// that they can be raised while the network is congested; they must be ascending.
//
// Timing: one register stage; sym_valid follows ipd_valid by one cycle. No back-pressure.
module ipd_threshold_decoder
  import ipd_pkg::*;
#(
  parameter int unsigned NL = NLEV
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cnt_t  thresh [NL-1],
  input  logic  ipd_valid,
  input  cnt_t  ipd,
  output logic  sym_valid,
  output sym_t  sym
);

  sym_t level;
  always_comb begin
    level = '0;
    for (int unsigned k = 0; k < NL-1; k++)
      if (ipd >= thresh[k]) level = sym_t'(k + 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_valid <= 1'b0;
      sym       <= '0;
    end else begin
      sym_valid <= ipd_valid;
      if (ipd_valid) sym <= level;
    end
  end

endmodule
