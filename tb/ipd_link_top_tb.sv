// ipd_link_top_tb -- end-to-end test of the secure IPD channel at default parameters.
//
// The transmitter sits at node 2 and the receiver at node 63 of an 8x8 mesh; a
// behavioural model stands in for the NoC in each direction, with a latency of 3 cycles
// per hop (2 for the router, 1 for the link) over the XY route plus 5 cycles for a 5-flit
// packet, and a random jitter standing for other traffic. Twelve random covert bytes are
// sent and must arrive in order, unchanged and exactly once. Along the way every
// mechanism of the channel is made to happen and counted:
//   * packet 6 is received with T2 raised to 60, so every level-2 delay reads as 1 and the
//     block decoder must correct it;
//   * packet 7's first attempt is received with both thresholds at 5, giving
//     uncorrectable code pairs: NACK and retransmission;
//   * packet 8's first attempt loses a carrier in the network: the receiver drops the
//     partial packet after the silence and the transmitter resends on lifetime expiry;
//   * packet 9's first probe is held 300 cycles in the network: the transmitter sees
//     congestion and backs off;
//   * packets 10 and 11 travel with a larger jitter (a flooding node);
//   * the application at the transmitter has ordinary packets only part of the time, so
//     dummy carriers and untagged pass-through traffic both occur.
// Every burst of a clean covert packet must take exactly sum(delays) cycles at the
// injection port (60 cycles per 0 bit, 40 per 1 bit), and every packet handed to the
// network (minus the one dropped) must reach the receiver's application port.
module ipd_link_top_tb;
  import ipd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NPKT = 12;
  addr_t tx_addr = 6'd2, rx_addr = 6'd63;
  cnt_t  levels [3];
  cnt_t  thresh [2];

  logic tx_cv_valid, tx_cv_ready, tx_cv_last, tx_app_valid, tx_app_ready;
  logic [7:0] tx_cv_data, rx_cv_data;
  logic [DATA_W-1:0] tx_app_data, rx_app_data;
  logic tx_inj_valid, tx_inj_ready, tx_ej_valid, rx_ej_valid, rx_inj_valid, rx_inj_ready;
  pkt_t tx_inj_pkt, tx_ej_pkt, rx_ej_pkt, rx_inj_pkt;
  logic rx_app_valid, rx_cv_valid, tx_in_session, rx_in_session;
  logic ev_retx_timeout, ev_retx_nack, ev_congested, ev_packet_acked, ev_dummy;
  logic ev_corrected, ev_nack, ev_dropped;

  ipd_link_top dut (.*);

  // network: 3 cycles per hop on the XY route, plus 5 cycles of packet serialisation
  int hops, base, jit, fwd_extra;
  logic drop_req, fwd_dropped, rev_dropped;
  noc_path_model fwd (.clk, .rst_n, .base, .jitter(jit), .extra(fwd_extra),
                      .drop_tagged(drop_req), .dropped(fwd_dropped),
                      .in_valid(tx_inj_valid), .in_ready(tx_inj_ready), .in_pkt(tx_inj_pkt),
                      .out_valid(rx_ej_valid), .out_pkt(rx_ej_pkt));
  noc_path_model rev (.clk, .rst_n, .base, .jitter(jit), .extra(0),
                      .drop_tagged(1'b0), .dropped(rev_dropped),
                      .in_valid(rx_inj_valid), .in_ready(rx_inj_ready), .in_pkt(rx_inj_pkt),
                      .out_valid(tx_ej_valid), .out_pkt(tx_ej_pkt));

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // covert source
  logic [7:0] pkts [NPKT];
  int cv_idx = 0;
  assign tx_cv_valid = (cv_idx < NPKT);
  assign tx_cv_data  = pkts[cv_idx < NPKT ? cv_idx : 0];
  assign tx_cv_last  = (cv_idx == NPKT - 1);
  always @(posedge clk) if (tx_cv_valid && tx_cv_ready) cv_idx <= cv_idx + 1;

  // ordinary traffic: present 60% of the time
  assign tx_app_valid = (cyc % 1000) < 600;
  assign tx_app_data  = DATA_W'(cyc + 1);

  // event counters
  int n_to = 0, n_retx_nack = 0, n_cong = 0, n_acked = 0, n_dummy = 0, n_corr = 0;
  int n_nack = 0, n_drop = 0, n_lost = 0, n_pass = 0, n_sent_data = 0, n_rx_app = 0;
  always @(posedge clk) if (rst_n) begin
    n_to        += int'(ev_retx_timeout);
    n_retx_nack += int'(ev_retx_nack);
    n_cong      += int'(ev_congested);
    n_acked     += int'(ev_packet_acked);
    n_dummy     += int'(ev_dummy);
    n_corr      += int'(ev_corrected);
    n_nack      += int'(ev_nack);
    n_drop      += int'(ev_dropped);
    n_lost      += int'(fwd_dropped);
    n_rx_app    += int'(rx_app_valid);
    if (tx_inj_valid && tx_inj_ready && tx_inj_pkt.ptype == PT_DATA) begin
      n_sent_data++;
      if (!tx_inj_pkt.flag_tag) n_pass++;
    end
  end

  // burst timing at the injection port, per attempt
  int     car_in_burst = 0, attempts_of [NPKT], clean_bursts = 0;
  longint burst_t0;
  always @(posedge clk) if (rst_n && tx_inj_valid && tx_inj_ready && tx_inj_pkt.ptype == PT_DATA
                            && tx_inj_pkt.flag_tag) begin
    if (car_in_burst == 0) burst_t0 = cyc;
    car_in_burst++;
    if (car_in_burst == 17) begin
      int expd;
      expd = 0;
      for (int b = 0; b < 8; b++) expd += tx_cv_data[b] ? 40 : 60;
      checks++;
      if (cyc - burst_t0 != longint'(expd)) begin
        failures++; $display("FAIL burst of packet %0d took %0d cycles, expected %0d", cv_idx, cyc - burst_t0, expd);
      end else clean_bursts++;
      car_in_burst = 0;
      attempts_of[cv_idx]++;
    end
  end

  // fault injection tied to the covert packet in flight
  always_comb begin
    levels = '{16'd10, 16'd30, 16'd50};
    thresh = '{16'd20, 16'd40};
    if (cv_idx == 6) thresh = '{16'd20, 16'd60};
    if (cv_idx == 7 && n_nack == 0) thresh = '{16'd5, 16'd5};
    drop_req  = (cv_idx == 8 && attempts_of[8] == 0 && car_in_burst == 5 && n_lost == 0);
    fwd_extra = (cv_idx == 9 && n_cong == 0 && tx_inj_valid && tx_inj_pkt.ptype == PT_PROBE) ? 300 : 0;
    jit       = (cv_idx >= 10) ? 8 : 6;
  end

  // receiver side
  int rx_idx = 0;
  always @(posedge clk) if (rst_n && rx_cv_valid) begin
    checks++;
    if (rx_idx >= NPKT || rx_cv_data != pkts[rx_idx]) begin
      failures++; $display("FAIL covert packet %0d: got %h", rx_idx, rx_cv_data);
    end
    rx_idx++;
  end

  initial begin
    for (int i = 0; i < NPKT; i++) pkts[i] = 8'($urandom);
    pkts[6] = 8'h00;   // all zeros: every group has a level-2 delay to be corrected
    hops = 5 + 7;      // node 2 = (2,0) to node 63 = (7,7)
    base = 3 * hops + 5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!(cv_idx == NPKT && !tx_in_session) && cyc < 150000) @(posedge clk);
    checks++; if (cyc >= 150000) begin failures++; $display("FAIL transfer not finished after 150000 cycles"); end
    repeat (500) @(posedge clk);
    checks++; if (rx_idx != NPKT)  begin failures++; $display("FAIL %0d covert packets delivered", rx_idx); end
    checks++; if (rx_in_session)   begin failures++; $display("FAIL receiver session still open"); end
    checks++; if (n_acked != NPKT) begin failures++; $display("FAIL %0d packets acknowledged", n_acked); end
    checks++; if (n_rx_app != n_sent_data - n_lost) begin
      failures++; $display("FAIL app packets: sent %0d lost %0d received %0d", n_sent_data, n_lost, n_rx_app);
    end
    checks++; if (clean_bursts < NPKT) begin failures++; $display("FAIL only %0d exact bursts", clean_bursts); end
    $display("mechanisms: corrected=%0d nack=%0d retx_nack=%0d lost=%0d rx_dropped=%0d retx_timeout=%0d congested=%0d dummy=%0d passthrough=%0d",
             n_corr, n_nack, n_retx_nack, n_lost, n_drop, n_to, n_cong, n_dummy, n_pass);
    checks++; if (n_corr == 0)      begin failures++; $display("FAIL no correction happened"); end
    checks++; if (n_nack == 0 || n_retx_nack == 0) begin failures++; $display("FAIL no NACK retransmission"); end
    checks++; if (n_lost == 0 || n_drop == 0)      begin failures++; $display("FAIL no loss handling"); end
    checks++; if (n_to == 0)        begin failures++; $display("FAIL no lifetime expiry"); end
    checks++; if (n_cong == 0)      begin failures++; $display("FAIL no congestion back-off"); end
    checks++; if (n_dummy == 0)     begin failures++; $display("FAIL no dummy carrier"); end
    checks++; if (n_pass == 0)      begin failures++; $display("FAIL no pass-through traffic"); end
    $display("finished at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
