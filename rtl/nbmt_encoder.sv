// nbmt_encoder -- nBmT block encoder: n binary bits in, m ternary symbols (trits) out.
//
// Each n-bit group presented on the input is looked up in the code-book and its m-trit
// code word is emitted one trit per accepted output beat, trit 0 first. With the default
// 1B2T code-book a 0 becomes the trit pair "2,0" and a 1 becomes "0,1", so the bit string
// 010 becomes 2,0, 0,1, 2,0. The code-book and the mapping follow the published scheme;
// the streaming interface and the flag that marks the last group of a covert packet are
// this design's own.
//
// Interface: valid/ready on both sides. in_last travels with the group and comes out on its
// final trit (out_last). Timing: a group is accepted when the encoder is empty or its last
// trit is leaving, so a stream of groups leaves at one trit per cycle with no bubbles; the
// first trit appears one cycle after the group is accepted.
module nbmt_encoder
  import ipd_pkg::*;
#(
  parameter int unsigned N = BLK_N,
  parameter int unsigned M = BLK_M,
  parameter logic [2*M-1:0] CODEBOOK [2**N] = CODEBOOK_1B2T
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [N-1:0] in_bits,
  input  logic         in_last,
  output logic         out_valid,
  input  logic         out_ready,
  output sym_t         out_sym,
  output logic         out_last
);

  logic [2*M-1:0]       word_q;
  logic [$clog2(M+1)-1:0] idx_q;
  logic                 full_q;
  logic                 last_q;

  logic leaving_last;
  assign leaving_last = full_q && out_ready && (idx_q == ($clog2(M+1))'(M-1));
  assign in_ready     = !full_q || leaving_last;

  assign out_valid = full_q;
  assign out_sym   = word_q[2*idx_q +: 2];
  assign out_last  = last_q && (idx_q == ($clog2(M+1))'(M-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q <= '0;
      idx_q  <= '0;
      full_q <= 1'b0;
      last_q <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        word_q <= CODEBOOK[in_bits];
        last_q <= in_last;
        idx_q  <= '0;
        full_q <= 1'b1;
      end else if (leaving_last) begin
        full_q <= 1'b0;
      end else if (full_q && out_ready) begin
        idx_q <= idx_q + 1'b1;
      end
    end
  end

endmodule
