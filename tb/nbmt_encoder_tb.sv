// nbmt_encoder_tb -- checks the 1B2T block encoder.
// Random bit groups go in, with random back-pressure on the output. Every trit that comes
// out is compared with the code word expected from the code-book written out here by hand
// (0 -> 2,0 and 1 -> 0,1, first trit first), including the last-flag position. A final
// phase with the output always ready checks the rate: one trit per cycle, no bubbles.
module nbmt_encoder_tb;
  import ipd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_bits, in_last, out_valid, out_ready, out_last;
  sym_t out_sym;
  int checks = 0, failures = 0;

  nbmt_encoder dut (.*);

  // expected trit stream
  sym_t exp_sym[$];
  logic exp_last[$];
  int   free_run;

  task automatic push_group(input logic b, input logic l);
    if (b == 1'b0) begin exp_sym.push_back(2'd2); exp_sym.push_back(2'd0); end
    else           begin exp_sym.push_back(2'd0); exp_sym.push_back(2'd1); end
    exp_last.push_back(1'b0); exp_last.push_back(l);
  endtask

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    sym_t e; logic el;
    e = exp_sym.pop_front(); el = exp_last.pop_front();
    checks++;
    if (out_sym !== e || out_last !== el) begin
      failures++;
      $display("FAIL trit got %0d/%0b exp %0d/%0b", out_sym, out_last, e, el);
    end
  end

  int ncycles, ntrits;
  initial begin
    in_valid = 0; in_bits = 0; in_last = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random phase
    for (int g = 0; g < 200; g++) begin
      in_valid <= 1; in_bits <= 1'($urandom); in_last <= (g % 8 == 7);
      out_ready <= 1'($urandom);
      @(posedge clk);
      while (!(in_valid && in_ready)) begin out_ready <= 1'($urandom); @(posedge clk); end
      push_group(in_bits, in_last);
    end
    in_valid <= 0;
    out_ready <= 1;
    repeat (5) @(posedge clk);
    // rate phase: 16 groups back to back must give 32 trits in 32 cycles
    ntrits = 0; ncycles = 0;
    fork
      begin
        for (int g = 0; g < 16; g++) begin
          in_valid <= 1; in_bits <= 1'(g); in_last <= (g == 15);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          push_group(in_bits, in_last);
        end
        in_valid <= 0;
      end
      begin
        @(posedge clk iff out_valid);
        while (ntrits < 32) begin
          if (out_valid) ntrits++;
          ncycles++;
          @(posedge clk);
        end
      end
    join
    checks++;
    if (ncycles != 32) begin failures++; $display("FAIL rate: 32 trits took %0d cycles", ncycles); end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_sym.size() != 0) begin failures++; $display("FAIL %0d trits missing", exp_sym.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
