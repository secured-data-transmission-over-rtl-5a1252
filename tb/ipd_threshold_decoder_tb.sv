// ipd_threshold_decoder_tb -- checks the delay slicer in both channel forms.
// Ternary form: with T1 = 32 and T2 = 78 the delays 10, 56, 105, 7 must give 0, 1, 2, 0;
// then every delay from 0 to 120 is checked against the default thresholds 20/40.
// Binary form (two levels): with T0 = 55 the delays 10, 56, 65, 7 must give 0, 1, 1, 0;
// then a sweep against T0 = 30. The output must follow the input by one cycle.
module ipd_threshold_decoder_tb;
  import ipd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cnt_t thr3 [2];
  cnt_t thr2 [1];
  logic v, sv3, sv2;
  cnt_t ipd;
  sym_t s3, s2;

  ipd_threshold_decoder #(.NL(3)) dut3 (.clk, .rst_n, .thresh(thr3), .ipd_valid(v), .ipd,
                                        .sym_valid(sv3), .sym(s3));
  ipd_threshold_decoder #(.NL(2)) dut2 (.clk, .rst_n, .thresh(thr2), .ipd_valid(v), .ipd,
                                        .sym_valid(sv2), .sym(s2));

  int checks = 0, failures = 0;

  task automatic one(input int d, input int e3, input int e2);
    v <= 1; ipd <= cnt_t'(d);
    @(posedge clk);
    v <= 0;
    @(posedge clk);
    checks++;
    if (!sv3 || !sv2 || s3 != sym_t'(e3) || s2 != sym_t'(e2)) begin
      failures++; $display("FAIL d=%0d got %0d/%0d exp %0d/%0d", d, s3, s2, e3, e2);
    end
  endtask

  initial begin
    v = 0; ipd = 0;
    thr3 = '{16'd32, 16'd78};
    thr2 = '{16'd55};
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(10, 0, 0); one(56, 1, 1); one(105, 2, 1); one(7, 0, 0); one(65, 1, 1);
    thr3 = '{16'd20, 16'd40};
    thr2 = '{16'd30};
    for (int d = 0; d <= 120; d++) one(d, d < 20 ? 0 : d < 40 ? 1 : 2, d < 30 ? 0 : 1);
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
