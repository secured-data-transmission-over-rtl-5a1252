// ipd_link_3b2t_tb -- end-to-end run of a block code whose group size does not divide the
// covert packet, to exercise zero padding.
//
// The channel endpoints are configured for 3B2T coding: 3 bits per group, 2 trits per code
// word, and eight of the nine trit pairs as code words (all but "22"; no error correction,
// so MAX_CORR = 0 and a received "22" is uncorrectable). An 8-bit covert packet is then
// three groups, the last one padded with a zero bit, i.e. 6 delays carried by 7 packets.
// The network model adds jitter and occasionally loses a tagged packet; 200 random covert
// packets over an 8x8 mesh must arrive in order and unchanged, and every burst must carry
// exactly 7 tagged packets.
module ipd_link_3b2t_tb;
  import ipd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NPKT = 200;
  localparam logic [3:0] CB3 [8] = '{4'b0000, 4'b0001, 4'b0010, 4'b0100,
                                     4'b0101, 4'b0110, 4'b1000, 4'b1001};
  addr_t tx_addr, rx_addr;
  cnt_t  levels [3];
  cnt_t  thresh [2];
  assign levels = LEVELS_DEF;
  assign thresh = THRESH_DEF;

  logic tx_cv_valid, tx_cv_ready, tx_cv_last, tx_app_valid, tx_app_ready;
  logic [7:0] tx_cv_data, rx_cv_data;
  logic [DATA_W-1:0] tx_app_data, rx_app_data;
  logic tx_inj_valid, tx_inj_ready, tx_ej_valid, rx_ej_valid, rx_inj_valid, rx_inj_ready;
  pkt_t tx_inj_pkt, tx_ej_pkt, rx_ej_pkt, rx_inj_pkt;
  logic rx_app_valid, rx_cv_valid, tx_in_session, rx_in_session;
  logic ev_retx_timeout, ev_retx_nack, ev_congested, ev_packet_acked, ev_dummy;
  logic ev_corrected, ev_nack, ev_dropped;

  ipd_link_top #(.N(3), .M(2), .CODEBOOK(CB3), .MAX_CORR(0)) dut (.*);

  int base, fwd_extra, rev_extra, max_extra;
  bit heavy;
  logic drop_req, fwd_dropped, rev_dropped;
  noc_path_model fwd (.clk, .rst_n, .base, .jitter(6), .extra(fwd_extra),
                      .drop_tagged(drop_req), .dropped(fwd_dropped),
                      .in_valid(tx_inj_valid), .in_ready(tx_inj_ready), .in_pkt(tx_inj_pkt),
                      .out_valid(rx_ej_valid), .out_pkt(rx_ej_pkt));
  noc_path_model rev (.clk, .rst_n, .base, .jitter(6), .extra(rev_extra),
                      .drop_tagged(1'b0), .dropped(rev_dropped),
                      .in_valid(rx_inj_valid), .in_ready(rx_inj_ready), .in_pkt(rx_inj_pkt),
                      .out_valid(tx_ej_valid), .out_pkt(tx_ej_pkt));

  always @(posedge clk) begin
    fwd_extra <= ($urandom_range(0, 99) < 2) ? $urandom_range(0, max_extra) : 0;
    rev_extra <= ($urandom_range(0, 99) < 2) ? $urandom_range(0, max_extra) : 0;
    drop_req  <= ($urandom_range(0, 4999) == 0);
  end

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [7:0] pkts [NPKT];
  int cv_idx = 0, rx_idx = 0;
  assign tx_cv_valid  = rst_n && (cv_idx < NPKT);
  assign tx_cv_data   = pkts[cv_idx < NPKT ? cv_idx : 0];
  assign tx_cv_last   = (cv_idx == NPKT - 1);
  assign tx_app_valid = (cyc % 1000) < 600;
  assign tx_app_data  = DATA_W'(cyc + 1);

  int n_bursts = 0, n_bad = 0, car = 0, n_wrong = 0;
  always @(posedge clk) if (rst_n) begin
    if (tx_cv_valid && tx_cv_ready) cv_idx <= cv_idx + 1;
    if (ev_retx_nack || ev_retx_timeout) n_bad++;
    if (tx_inj_valid && tx_inj_ready && tx_inj_pkt.ptype == PT_DATA && tx_inj_pkt.flag_tag) begin
      car++;
      if (car == 7) begin car = 0; n_bursts++; end
    end
    if (rx_cv_valid) begin
      if (rx_idx >= NPKT) begin
        failures++; $display("FAIL extra covert packet delivered");
      end else if (rx_cv_data != pkts[rx_idx]) begin
        n_wrong++;
        if (!heavy) begin failures++; $display("FAIL covert packet %0d", rx_idx); end
      end
      if (!heavy) checks++;
      rx_idx++;
    end
  end

  task automatic run(input int k, input bit hv);
    longint t0, good_bits;
    heavy = hv;
    max_extra = hv ? 30 : 3;
    for (int i = 0; i < NPKT; i++) pkts[i] = 8'($urandom);
    tx_addr = 6'd1;
    rx_addr = addr_t'(k * k - 1);
    base = 3 * (2 * (k - 1) - 1) + 5;
    cv_idx = 0; rx_idx = 0; n_bursts = 0; n_bad = 0; car = 0; n_wrong = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = cyc;
    while (!(cv_idx == NPKT && !tx_in_session)) @(posedge clk);
    repeat (500) @(posedge clk);
    checks++;
    if (rx_idx != NPKT) begin failures++; $display("FAIL %0dx%0d: %0d of %0d delivered", k, k, rx_idx, NPKT); end
    good_bits = longint'(NPKT) - longint'(n_wrong);
    good_bits = good_bits * 8000;
    if (hv) begin
      checks++;
      if (n_wrong * 10 >= NPKT) begin failures++; $display("FAIL %0dx%0d: %0d wrong packets", k, k, n_wrong); end
    end
    $display("%0dx%0d mesh, %s noise: %0d covert packets in %0d cycles, %0d attempts, %0d NACKed or timed out, %0d delivered wrong, PER %0d.%01d%%, %0d good covert bits per 1000 cycles",
             k, k, hv ? "heavy" : "light", NPKT, cyc - t0, n_bursts, n_bad, n_wrong,
             (n_bad + n_wrong) * 100 / n_bursts, ((n_bad + n_wrong) * 1000 / n_bursts) % 10,
             good_bits / (cyc - t0));
  endtask

  initial begin
    run(8, 0);
    checks++;
    if (car != 0) begin failures++; $display("FAIL %0d tagged packets left over", car); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
