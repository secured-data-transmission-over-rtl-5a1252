// nbmt_decoder_tb -- checks 1B2T decoding and error correction.
// All nine received trit pairs are decoded and compared with a table worked out by hand
// for the code words "20" (bit 0) and "01" (bit 1) with nearest-word decoding by summed
// trit differences: 20, 10, 21, 22 give 0; 01, 00, 02, 11, 12 give 1; every pair other
// than a code word is flagged as corrected; 12 and 22 (distance 2) are uncorrectable. The
// published example 0,1,2,0 must give bits 1, 0. A clear between the two trits of a group
// must drop the first one.
module nbmt_decoder_tb;
  import ipd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, sym_valid, out_valid, out_bits, out_corrected, out_uncorrectable;
  sym_t sym;

  nbmt_decoder dut (.*);

  int checks = 0, failures = 0;
  // expected: {bit, corrected, uncorrectable} indexed by first*3+second
  logic [2:0] expt [9] = '{
    3'b110,   // 00
    3'b100,   // 01
    3'b110,   // 02
    3'b010,   // 10
    3'b110,   // 11
    3'b111,   // 12
    3'b000,   // 20
    3'b010,   // 21
    3'b011    // 22
  };

  task automatic trit(input int t);
    sym_valid <= 1; sym <= sym_t'(t);
    @(posedge clk);
    sym_valid <= 0;
  endtask

  task automatic group(input int a, input int b, input logic [2:0] e);
    trit(a); trit(b);
    @(posedge clk);
    checks++;
    if (!out_valid || {out_bits, out_corrected, out_uncorrectable} !== e) begin
      failures++;
      $display("FAIL %0d%0d got v=%0b %b exp %b", a, b, out_valid,
               {out_bits, out_corrected, out_uncorrectable}, e);
    end
  endtask

  initial begin
    clear = 0; sym_valid = 0; sym = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++)
      for (int i = 0; i < 9; i++) group(i / 3, i % 3, expt[i]);
    // published example
    group(0, 1, 3'b100);
    group(2, 0, 3'b000);
    // clear drops a partial group
    trit(1);
    clear <= 1; @(posedge clk); clear <= 0;
    group(2, 0, 3'b000);
    // random back-to-back trits
    for (int i = 0; i < 200; i++) begin
      int a, b;
      a = $urandom_range(0, 2); b = $urandom_range(0, 2);
      sym_valid <= 1; sym <= sym_t'(a); @(posedge clk);
      sym <= sym_t'(b); @(posedge clk);
      sym_valid <= 0;
      @(posedge clk);
      checks++;
      if (!out_valid || {out_bits, out_corrected, out_uncorrectable} !== expt[a*3+b]) begin
        failures++; $display("FAIL random %0d%0d", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
