// nbmt_decoder -- nBmT block decoder with nearest-code-word error correction.
//
// Received trits are collected M at a time (trit 0 first). A complete group is compared
// with every code word of the code-book and decoded to the binary group of the nearest
// one. Distance is the sum over the M positions of |received trit - code trit|: a delay
// pushed across one threshold moves a trit by one level, so this distance counts such
// slips. With the default 1B2T code-book ("20" for 0, "01" for 1) every one of the nine
// possible trit pairs has a unique nearest code word, so any single slip is corrected.
// A group whose distance is non-zero is reported as corrected; one whose distance exceeds
// MAX_CORR is reported as uncorrectable (the receiver answers it with a NACK).
//
// Decoding by code-book look-up with error correction follows the published scheme; the
// distance measure, the tie rule (lowest code index wins) and the uncorrectable limit are
// this design's own choices.
//
// Interface: sym_valid pulses carry trits (no back-pressure); clear drops a partial group.
// Timing: out_valid pulses one cycle after the M-th trit of a group.
module nbmt_decoder
  import ipd_pkg::*;
#(
  parameter int unsigned N = BLK_N,
  parameter int unsigned M = BLK_M,
  parameter logic [2*M-1:0] CODEBOOK [2**N] = CODEBOOK_1B2T,
  parameter int unsigned MAX_CORR = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         sym_valid,
  input  sym_t         sym,
  output logic         out_valid,
  output logic [N-1:0] out_bits,
  output logic         out_corrected,
  output logic         out_uncorrectable
);

  localparam int unsigned IW = $clog2(M + 1);
  localparam int unsigned DW = $clog2(2 * M + 1) + 1;

  logic [2*M-1:0] word_q;
  logic [IW-1:0]  cnt_q;
  logic [2*M-1:0] word_full;   // the group including the trit arriving now

  always_comb begin
    word_full = word_q;
    word_full[2*cnt_q +: 2] = sym;
  end

  // nearest code word
  logic [N-1:0]  best_idx;
  logic [DW-1:0] best_dist;
  always_comb begin
    logic [DW-1:0] dsum;
    logic [1:0]    r, c;
    best_idx  = '0;
    best_dist = '1;
    for (int unsigned k = 0; k < 2**N; k++) begin
      dsum = '0;
      for (int unsigned j = 0; j < M; j++) begin
        r = word_full[2*j +: 2];
        c = CODEBOOK[k][2*j +: 2];
        dsum = dsum + DW'((r > c) ? 2'(r - c) : 2'(c - r));
      end
      if (dsum < best_dist) begin
        best_dist = dsum;
        best_idx  = N'(k);
      end
    end
  end

  logic group_done;
  assign group_done = sym_valid && !clear && (cnt_q == IW'(M - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q            <= '0;
      cnt_q             <= '0;
      out_valid         <= 1'b0;
      out_bits          <= '0;
      out_corrected     <= 1'b0;
      out_uncorrectable <= 1'b0;
    end else begin
      out_valid <= group_done;
      if (clear) begin
        cnt_q  <= '0;
        word_q <= '0;
      end else if (sym_valid) begin
        word_q <= word_full;
        cnt_q  <= group_done ? '0 : cnt_q + 1'b1;
      end
      if (group_done) begin
        out_bits          <= best_idx;
        out_corrected     <= (best_dist != '0);
        out_uncorrectable <= (best_dist > DW'(MAX_CORR));
      end
    end
  end

endmodule
