// ipd_generator_tb -- checks the symbol-to-delay mapping.
// Random symbols (0, 1, 2) go in under random output back-pressure; each delay that comes
// out must equal 10, 30 or 50 cycles for symbol 0, 1 or 2, in order, with the last flag
// kept. The level table is then changed at run time and checked again.
module ipd_generator_tb;
  import ipd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cnt_t levels [3];
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  sym_t in_sym;
  cnt_t out_delay;
  int checks = 0, failures = 0;
  cnt_t exp_d[$];
  logic exp_l[$];

  ipd_generator dut (.*);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    cnt_t e; logic l;
    e = exp_d.pop_front(); l = exp_l.pop_front();
    checks++;
    if (out_delay !== e || out_last !== l) begin
      failures++; $display("FAIL got %0d exp %0d", out_delay, e);
    end
  end

  task automatic run(input int n, input int unsigned l0, l1, l2);
    for (int i = 0; i < n; i++) begin
      sym_t s;
      s = sym_t'($urandom_range(0, 2));
      in_valid <= 1; in_sym <= s; in_last <= (i == n - 1);
      out_ready <= 1'($urandom);
      @(posedge clk);
      while (!in_ready) begin out_ready <= 1'($urandom); @(posedge clk); end
      exp_d.push_back(cnt_t'(s == 0 ? l0 : s == 1 ? l1 : l2));
      exp_l.push_back(i == n - 1);
    end
    in_valid <= 0; out_ready <= 1;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    levels = '{16'd10, 16'd30, 16'd50};
    in_valid = 0; in_sym = 0; in_last = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(300, 10, 30, 50);
    levels = '{16'd7, 16'd77, 16'd700};
    run(100, 7, 77, 700);
    checks++;
    if (exp_d.size() != 0) begin failures++; $display("FAIL missing outputs"); end
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
