// ipd_tx_tb -- end-to-end check of the transmitter endpoint.
// A scripted receiver node answers REQ and PROBE after 30 cycles and reads the covert
// bits back from the timing of the tagged carriers it sees on the injection port, using
// its own table (10 -> 0, 30 -> 1, 50 -> 2 cycles; trit pair 20 -> bit 0, 01 -> bit 1).
// Every gap must be exactly one of the three levels, each covert packet must take 17
// carriers, the recovered bytes must equal those sent, and the session must end with TER.
// The application supplies ordinary packets only part of the time, so both real and dummy
// carriers and untagged pass-through packets must appear.
module ipd_tx_tb;
  import ipd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  addr_t my_addr = 6'd2, peer_addr = 6'd63;
  cnt_t levels [3];
  logic cv_valid, cv_ready, cv_last, app_valid, app_ready, inj_valid, inj_ready, ej_valid;
  logic [7:0] cv_data;
  logic [DATA_W-1:0] app_data;
  pkt_t inj_pkt, ej_pkt;
  logic in_session, ev_retx_timeout, ev_retx_nack, ev_congested, ev_packet_acked, ev_dummy;

  ipd_tx dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int NPKT = 6;
  logic [7:0] pkts [NPKT];
  int cv_idx = 0;
  assign cv_valid = (cv_idx < NPKT);
  assign cv_data  = pkts[cv_idx < NPKT ? cv_idx : 0];
  assign cv_last  = (cv_idx == NPKT - 1);
  always @(posedge clk) if (cv_valid && cv_ready) cv_idx <= cv_idx + 1;

  // application traffic: on for 300 cycles, off for 200
  assign app_valid = (cyc % 500) < 300;
  assign app_data  = DATA_W'(cyc);

  // scripted receiver
  longint due[$];
  ptype_e what[$];
  always @(posedge clk) begin
    ej_valid <= 0;
    for (int i = 0; i < due.size(); i++)
      if (due[i] <= cyc) begin
        ej_valid <= 1; ej_pkt <= '0; ej_pkt.ptype <= what[i]; ej_pkt.dst <= my_addr;
        ej_pkt.flag_addr <= peer_addr;
        due.delete(i); what.delete(i);
        break;
      end
  end

  int ncar = 0, ters = 0, untagged = 0, dummies = 0, reals = 0, got_pkts = 0;
  longint last_t;
  int trits[$];
  logic [7:0] rx_byte;
  always @(posedge clk) if (rst_n && inj_valid && inj_ready) begin
    checks++;
    if (inj_pkt.dst != peer_addr || inj_pkt.flag_addr != my_addr) begin failures++; $display("FAIL header"); end
    case (inj_pkt.ptype)
      PT_REQ, PT_PROBE: begin
        due.push_back(cyc + 30);
        what.push_back(inj_pkt.ptype == PT_REQ ? PT_ACK : PT_PROBE_ACK);
      end
      PT_TER: ters++;
      PT_DATA: begin
        if (!inj_pkt.flag_tag) untagged++;
        else begin
          if (inj_pkt.data == '0) dummies++; else reals++;
          if (ncar > 0) begin
            longint g; int t;
            g = cyc - last_t;
            t = (g == 10) ? 0 : (g == 30) ? 1 : (g == 50) ? 2 : -1;
            checks++;
            if (t < 0) begin failures++; $display("FAIL gap %0d", g); end
            trits.push_back(t);
          end
          last_t = cyc;
          ncar++;
          if (ncar == 17) begin
            for (int b = 0; b < 8; b++) begin
              int a, c;
              a = trits[2*b]; c = trits[2*b+1];
              rx_byte[b] = (a == 0 && c == 1);
              checks++;
              if (!((a == 2 && c == 0) || (a == 0 && c == 1))) begin failures++; $display("FAIL code word %0d%0d", a, c); end
            end
            checks++;
            if (rx_byte != pkts[got_pkts]) begin failures++; $display("FAIL byte %h exp %h", rx_byte, pkts[got_pkts]); end
            got_pkts++;
            trits.delete();
            ncar = 0;
            due.push_back(cyc + 30); what.push_back(PT_ACK);
          end
        end
      end
      default: begin failures++; $display("FAIL unexpected packet type"); end
    endcase
  end

  initial begin
    levels = '{16'd10, 16'd30, 16'd50};
    for (int i = 0; i < NPKT; i++) pkts[i] = 8'($urandom);
    inj_ready = 1; ej_valid = 0; ej_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!(ters == 1 && !in_session)) @(posedge clk);
    repeat (10) @(posedge clk);
    checks++; if (got_pkts != NPKT) begin failures++; $display("FAIL got %0d packets", got_pkts); end
    checks++; if (dummies == 0 || reals == 0) begin failures++; $display("FAIL dummies=%0d reals=%0d", dummies, reals); end
    checks++; if (untagged == 0) begin failures++; $display("FAIL no pass-through traffic"); end
    $display("dummies=%0d real carriers=%0d untagged=%0d", dummies, reals, untagged);
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
