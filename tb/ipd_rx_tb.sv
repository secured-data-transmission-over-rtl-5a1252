// ipd_rx_tb -- end-to-end check of the receiver endpoint.
// A scripted transmitter opens a session (REQ, expecting ACK), probes (expecting
// PROBE_ACK) and sends covert bytes as tagged carriers whose gaps it computes itself from
// the bits (bit 0 -> 50,10 cycles; bit 1 -> 10,30 cycles), each gap disturbed by a random
// jitter of -4..+4 cycles. Bytes must come out unchanged and be answered with ACK. One
// byte is sent with one gap moved across a threshold (must be corrected, still ACK), one
// with a code pair made uncorrectable (must get NACK and not be delivered), and one is cut
// short so the silence limit must drop it. Untagged data must reach the application.
module ipd_rx_tb;
  import ipd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  addr_t my_addr = 6'd63, peer_addr = 6'd2;
  cnt_t thresh [2];
  logic ej_valid, inj_valid, inj_ready, app_valid, cv_valid;
  pkt_t ej_pkt, inj_pkt;
  logic [DATA_W-1:0] app_data;
  logic [7:0] cv_data;
  logic in_session, ev_corrected, ev_nack, ev_dropped;

  ipd_rx #(.GAP_LIMIT(200)) dut (.*);

  int checks = 0, failures = 0;
  ptype_e replies[$];
  logic [7:0] delivered[$];
  int n_app = 0, n_corr = 0, n_nack = 0, n_drop = 0;

  always @(posedge clk) if (rst_n) begin
    if (inj_valid && inj_ready) begin
      replies.push_back(inj_pkt.ptype);
      checks++;
      if (inj_pkt.dst != peer_addr || inj_pkt.flag_addr != my_addr) begin failures++; $display("FAIL reply header"); end
    end
    if (cv_valid) delivered.push_back(cv_data);
    if (app_valid) n_app++;
    n_corr += int'(ev_corrected);
    n_nack += int'(ev_nack);
    n_drop += int'(ev_dropped);
  end

  task automatic pkt(input ptype_e t, input bit tag, input logic [DATA_W-1:0] d);
    pkt_t p;
    p = '0; p.ptype = t; p.dst = my_addr; p.flag_addr = peer_addr; p.flag_tag = tag; p.data = d;
    @(negedge clk);
    ej_valid = 1; ej_pkt = p;
    @(posedge clk);
    @(negedge clk);
    ej_valid = 0;
  endtask

  // send one byte: mode 0 clean, 1 one slip, 2 uncorrectable pair, 3 truncated
  task automatic send_byte(input logic [7:0] v, input int mode);
    int gaps[16];
    for (int b = 0; b < 8; b++) begin
      gaps[2*b]   = v[b] ? 10 : 50;
      gaps[2*b+1] = v[b] ? 30 : 10;
    end
    if (mode == 1) gaps[5] = v[2] ? 22 : 27;          // second trit: 1 -> 0 or 0 -> 1
    if (mode == 2) begin gaps[6] = 50; gaps[7] = 50; end // pair 22
    pkt(PT_DATA, 1, 1);
    for (int i = 0; i < ((mode == 3) ? 9 : 16); i++) begin
      int g;
      g = gaps[i] + $urandom_range(0, 8) - 4;
      if (mode == 1 && i == 5) g = gaps[i];
      if (mode == 2 && (i == 6 || i == 7)) g = gaps[i];
      repeat (g - 1) @(posedge clk);
      pkt(PT_DATA, 1, DATA_W'(i + 2));
    end
  endtask

  task automatic expect_reply(input ptype_e t);
    repeat (20) @(posedge clk);
    checks++;
    if (replies.size() != 1 || replies[0] != t) begin
      failures++; $display("FAIL expected %s, %0d replies", t.name(), replies.size());
    end
    replies.delete();
  endtask

  logic [7:0] v;
  initial begin
    thresh = '{16'd20, 16'd40};
    ej_valid = 0; ej_pkt = '0; inj_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    pkt(PT_REQ, 0, 0);   expect_reply(PT_ACK);
    pkt(PT_PROBE, 0, 0); expect_reply(PT_PROBE_ACK);
    for (int k = 0; k < 8; k++) begin
      v = 8'($urandom);
      send_byte(v, 0); expect_reply(PT_ACK);
      checks++;
      if (delivered.size() != 1 || delivered[0] != v) begin failures++; $display("FAIL byte %0d", k); end
      delivered.delete();
      repeat ($urandom_range(50, 150)) @(posedge clk);
      pkt(PT_DATA, 0, 7);   // ordinary traffic between covert packets
    end
    v = 8'h5A; send_byte(v, 1); expect_reply(PT_ACK);
    checks++; if (delivered.size() != 1 || delivered[0] != v || n_corr == 0) begin failures++; $display("FAIL correction"); end
    delivered.delete();
    repeat (100) @(posedge clk);
    v = 8'hC3; send_byte(v, 2); expect_reply(PT_NACK);
    checks++; if (delivered.size() != 0 || n_nack != 1) begin failures++; $display("FAIL nack"); end
    repeat (100) @(posedge clk);
    send_byte(8'h11, 3);
    repeat (300) @(posedge clk);
    checks++; if (n_drop != 1 || replies.size() != 0 || delivered.size() != 0) begin failures++; $display("FAIL drop %0d", n_drop); end
    v = 8'h96; send_byte(v, 0); expect_reply(PT_ACK);
    checks++; if (delivered.size() != 1 || delivered[0] != v) begin failures++; $display("FAIL after drop"); end
    pkt(PT_TER, 0, 0);
    repeat (5) @(posedge clk);
    checks++; if (in_session) begin failures++; $display("FAIL still in session"); end
    checks++; if (n_app != 11 * 17 + 10 + 8) begin failures++; $display("FAIL app packets %0d", n_app); end
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
