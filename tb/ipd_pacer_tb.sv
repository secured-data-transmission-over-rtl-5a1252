// ipd_pacer_tb -- checks packet release times, flag bits, dummies and pass-through.
// Bursts of random delays (10/30/50 cycles, plus a few short ones) are fed in. The cycle at
// which each packet is accepted by the network is recorded; the gap between consecutive
// carriers of a burst must equal the requested delay exactly while the network is always
// ready, and be at least the delay (t_next = max(t_prev + d, first ready cycle)) under
// random back-pressure. Each burst of K delays must produce K+1 tagged carriers with the
// sender's address, real payloads while the application has packets and all-zero dummy
// payloads when it has none. Between bursts application packets must leave untagged.
module ipd_pacer_tb;
  import ipd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  addr_t my_addr = 6'd2, peer_addr = 6'd45;
  logic pass_en, d_valid, d_ready, d_last, app_valid, app_ready, out_valid, out_ready, busy, dummy_o;
  cnt_t d_cycles;
  logic [DATA_W-1:0] app_data;
  pkt_t out_pkt;

  ipd_pacer dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // delays of the burst being sent, in order
  int     exp_d[$];
  longint last_send;
  int     carriers, dummies, untagged, app_seq, exp_app;
  bit     strict, first_of_burst;
  logic   ready_prev;

  // application source: numbered payloads while app_on
  bit app_on;
  assign app_valid = app_on;
  assign app_data  = DATA_W'(app_seq);
  always @(posedge clk) if (app_valid && app_ready) app_seq <= app_seq + 1;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (out_pkt.ptype != PT_DATA || out_pkt.dst != peer_addr || out_pkt.flag_addr != my_addr) begin
      failures++; $display("FAIL header");
    end
    if (out_pkt.flag_tag) begin
      carriers++;
      checks++;
      if (app_valid ? (out_pkt.data != DATA_W'(app_seq)) : (out_pkt.data != '0)) begin
        failures++; $display("FAIL payload");
      end
      if (!app_valid) dummies++;
      if (first_of_burst) begin
        first_of_burst = 0;
      end else begin
        int d; longint gap;
        d = exp_d.pop_front();
        gap = cyc - last_send;
        checks++;
        if (strict ? (gap != d) : (gap < d)) begin
          failures++; $display("FAIL gap %0d for delay %0d (strict=%0b)", gap, d, strict);
        end
      end
      last_send = cyc;
    end else begin
      untagged++;
    end
  end

  task automatic burst(input int k, input bit short_ones);
    first_of_burst = 1;
    for (int i = 0; i < k; i++) begin
      int d;
      d = short_ones && (i % 4 == 3) ? $urandom_range(0, 3) : 10 + 20 * $urandom_range(0, 2);
      exp_d.push_back((d < 1) ? 1 : d);
      d_valid <= 1; d_cycles <= cnt_t'(d); d_last <= (i == k - 1);
      @(posedge clk);
      while (!d_ready) @(posedge clk);
    end
    d_valid <= 0;
    while (busy) @(posedge clk);
  endtask

  int c0;
  initial begin
    pass_en = 1; d_valid = 0; d_cycles = 0; d_last = 0; out_ready = 1; app_on = 0; app_seq = 0;
    carriers = 0; dummies = 0; untagged = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // exact gaps, mixed real and dummy carriers
    strict = 1;
    for (int b = 0; b < 10; b++) begin
      app_on = (b % 2 == 0);
      c0 = carriers;
      burst(16, b > 5);
      checks++;
      if (carriers - c0 != 17) begin failures++; $display("FAIL burst carried %0d packets", carriers - c0); end
    end
    // pass-through between bursts
    app_on = 1;
    repeat (20) @(posedge clk);
    app_on = 0;
    checks++;
    if (untagged < 15) begin failures++; $display("FAIL pass-through %0d", untagged); end
    // back-pressure
    strict = 0;
    fork
      begin
        for (int b = 0; b < 5; b++) burst(16, 0);
      end
      begin
        while (exp_d.size() != 0 || busy || d_valid) begin
          out_ready <= 1'($urandom);
          @(posedge clk);
        end
        out_ready <= 1;
      end
    join
    checks++;
    if (dummies == 0) begin failures++; $display("FAIL no dummy carriers"); end
    $display("carriers=%0d dummies=%0d untagged=%0d", carriers, dummies, untagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
