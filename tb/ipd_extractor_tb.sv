// ipd_extractor_tb -- checks arrival-time differencing.
// Carriers of the watched node arrive at cycles 40, 50, 106, 171 and 178 (relative to a
// start point): the first is a reference and the delays must come out as 10, 56, 65 and 7.
// Packets that are untagged, from another node or control packets arriving in between
// must be ignored. A silence longer than the limit must raise the gap event once and make
// the next carrier a reference, and so must a re-arm pulse. A random phase compares the
// output with delays computed from the drive times.
module ipd_extractor_tb;
  import ipd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  addr_t watch_addr = 6'd2;
  cnt_t  gap_limit = 16'd200;
  logic  rearm, pkt_valid, ipd_valid, ref_o, gap_o;
  pkt_t  pkt;
  cnt_t  ipd;

  ipd_extractor dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int exp_ipd[$];
  int refs = 0, gaps = 0;
  always @(posedge clk) if (rst_n) begin
    if (ipd_valid) begin
      int e;
      checks++;
      if (exp_ipd.size() == 0) begin failures++; $display("FAIL unexpected ipd %0d", ipd); end
      else begin
        e = exp_ipd.pop_front();
        if (ipd != cnt_t'(e)) begin failures++; $display("FAIL ipd %0d exp %0d", ipd, e); end
      end
    end
    if (ref_o) refs++;
    if (gap_o) gaps++;
  end

  task automatic send(input bit tag, input addr_t a, input ptype_e t);
    pkt_valid <= 1; pkt.flag_tag <= tag; pkt.flag_addr <= a; pkt.ptype <= t;
    @(posedge clk);
    pkt_valid <= 0;
  endtask

  task automatic wait_until(input longint t);
    while (cyc < t - 1) @(posedge clk);
  endtask

  longint t0;
  int r0, g0;
  initial begin
    rearm = 0; pkt_valid = 0; pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    t0 = cyc + 10;
    exp_ipd = '{10, 56, 65, 7};
    wait_until(t0 + 40);  send(1, watch_addr, PT_DATA);
    wait_until(t0 + 50);  send(1, watch_addr, PT_DATA);
    wait_until(t0 + 60);  send(0, watch_addr, PT_DATA);   // untagged
    wait_until(t0 + 70);  send(1, 6'd9, PT_DATA);         // other transmitter
    wait_until(t0 + 80);  send(1, watch_addr, PT_ACK);    // control packet
    wait_until(t0 + 106); send(1, watch_addr, PT_DATA);
    wait_until(t0 + 171); send(1, watch_addr, PT_DATA);
    wait_until(t0 + 178); send(1, watch_addr, PT_DATA);
    repeat (3) @(posedge clk);
    checks++;
    if (refs != 1 || exp_ipd.size() != 0) begin failures++; $display("FAIL example refs=%0d left=%0d", refs, exp_ipd.size()); end
    // silence -> gap event, next carrier is a reference
    g0 = gaps; r0 = refs;
    repeat (250) @(posedge clk);
    send(1, watch_addr, PT_DATA);
    repeat (2) @(posedge clk);
    checks++;
    if (gaps != g0 + 1 || refs != r0 + 1) begin failures++; $display("FAIL gap handling"); end
    // re-arm
    exp_ipd = '{35};   // 2 + 32 idle cycles after the reference's own cycle
    repeat (32) @(posedge clk);
    send(1, watch_addr, PT_DATA);
    r0 = refs;
    rearm <= 1; @(posedge clk); rearm <= 0;
    repeat (20) @(posedge clk);
    send(1, watch_addr, PT_DATA);
    repeat (2) @(posedge clk);
    checks++;
    if (refs != r0 + 1 || exp_ipd.size() != 0) begin failures++; $display("FAIL rearm"); end
    // random delays, starting from a new reference
    rearm <= 1; @(posedge clk); rearm <= 0;
    send(1, watch_addr, PT_DATA);
    for (int i = 0; i < 200; i++) begin
      int d;
      d = $urandom_range(1, 150);
      exp_ipd.push_back(d);
      repeat (d - 1) @(posedge clk);
      send(1, watch_addr, PT_DATA);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (exp_ipd.size() != 0) begin failures++; $display("FAIL random phase, %0d left", exp_ipd.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
