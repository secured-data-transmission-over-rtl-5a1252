// ipd_rx_ctrl_tb -- checks the receiver's session protocol.
// Decoded groups are fed in directly. Before a REQ nothing may be delivered; a REQ must
// be answered with ACK; a PROBE with PROBE_ACK. Eight good groups must deliver the byte
// (bit 0 first), answer ACK and re-arm the extractor. A packet with an uncorrectable
// group (first, middle or last) must be answered with NACK and not delivered. A gap event in the middle of a
// packet must drop the partial packet, so that the next eight groups form a clean packet.
// After TER groups are ignored again. Reply packets are accepted with random back-pressure.
module ipd_rx_ctrl_tb;
  import ipd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       rx_valid, ref_evt, gap_evt, grp_valid, grp_uncorrectable;
  ptype_e     rx_type;
  logic [0:0] grp_bits;
  logic       rearm, dec_clear, rp_valid, rp_ready, cv_valid, in_session, ev_nack, ev_dropped;
  ptype_e     rp_type;
  logic [7:0] cv_data;

  ipd_rx_ctrl dut (.*);

  int checks = 0, failures = 0;
  ptype_e replies[$];
  logic [7:0] delivered[$];
  int rearms = 0, drops = 0;

  always @(posedge clk) if (rst_n) begin
    if (rp_valid && rp_ready) replies.push_back(rp_type);
    if (cv_valid) delivered.push_back(cv_data);
    if (rearm) rearms++;
    if (ev_dropped) drops++;
    rp_ready <= 1'($urandom);
  end

  task automatic ctl(input ptype_e t);
    rx_valid <= 1; rx_type <= t; @(posedge clk); rx_valid <= 0; @(posedge clk);
  endtask
  task automatic grp(input logic b, input logic bad);
    grp_valid <= 1; grp_bits <= b; grp_uncorrectable <= bad; @(posedge clk);
    grp_valid <= 0; grp_uncorrectable <= 0; repeat (3) @(posedge clk);
  endtask
  task automatic byte_(input logic [7:0] v, input int bad_at);
    ref_evt <= 1; @(posedge clk); ref_evt <= 0;
    for (int i = 0; i < 8; i++) grp(v[i], i == bad_at);
    repeat (10) @(posedge clk);
  endtask
  task automatic expect_reply(input ptype_e t);
    repeat (10) @(posedge clk);
    checks++;
    if (replies.size() != 1 || replies[0] != t) begin
      failures++; $display("FAIL reply exp %s got %0d replies", t.name(), replies.size());
    end
    replies.delete();
  endtask
  task automatic expect_delivered(input int n, input logic [7:0] v);
    checks++;
    if (delivered.size() != n || (n > 0 && delivered[0] != v)) begin
      failures++; $display("FAIL delivered %0d", delivered.size());
    end
    delivered.delete();
  endtask

  initial begin
    rx_valid = 0; rx_type = PT_DATA; ref_evt = 0; gap_evt = 0; grp_valid = 0; grp_bits = 0;
    grp_uncorrectable = 0; rp_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    byte_(8'h55, -1);            expect_delivered(0, 0);  // no session yet
    checks++; if (replies.size() != 0) begin failures++; $display("FAIL reply outside session"); end
    ctl(PT_REQ);                 expect_reply(PT_ACK);
    checks++; if (!in_session) begin failures++; $display("FAIL session not open"); end
    ctl(PT_PROBE);               expect_reply(PT_PROBE_ACK);
    byte_(8'hA7, -1);            expect_reply(PT_ACK);  expect_delivered(1, 8'hA7);
    byte_(8'h3C, 5);             expect_reply(PT_NACK); expect_delivered(0, 0);
    byte_(8'h3C, 7);             expect_reply(PT_NACK); expect_delivered(0, 0);
    byte_(8'h3C, 0);             expect_reply(PT_NACK); expect_delivered(0, 0);
    // partial packet then silence
    ref_evt <= 1; @(posedge clk); ref_evt <= 0;
    for (int i = 0; i < 3; i++) grp(1, 0);
    gap_evt <= 1; @(posedge clk); gap_evt <= 0;
    byte_(8'h3C, -1);            expect_reply(PT_ACK);  expect_delivered(1, 8'h3C);
    checks++; if (drops != 1) begin failures++; $display("FAIL drops=%0d", drops); end
    checks++; if (rearms < 4) begin failures++; $display("FAIL rearms=%0d", rearms); end
    ctl(PT_TER);
    checks++; if (in_session) begin failures++; $display("FAIL session still open"); end
    byte_(8'h99, -1);            expect_delivered(0, 0);
    checks++; if (replies.size() != 0) begin failures++; $display("FAIL reply after TER"); end
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
