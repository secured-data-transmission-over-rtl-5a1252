// ipd_tx_ctrl_tb -- checks the transmitter's session protocol against a scripted receiver.
// The scripted receiver ignores the first REQ (so the REQ must be repeated after the
// lifetime), answers probes after 20 cycles except one answered after 80 (above the
// congestion limit, so the controller must back off and probe again), NACKs the first
// attempt of covert packet 1 and stays silent on the first attempt of covert packet 2 (so
// it must be resent after the lifetime). Every attempt must present the packet's bits
// LSB first, one group per beat; packets must be consumed in order only when acknowledged,
// and TER must follow the acknowledgement of the last one.
module ipd_tx_ctrl_tb;
  import ipd_pkg::*;
  localparam int LIFE = 300, CRTT = 40, BOFF = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       cv_valid, cv_ready, cv_last;
  logic [7:0] cv_data;
  logic       grp_valid, grp_ready, grp_last;
  logic [0:0] grp_bits;
  logic       cp_valid, cp_ready;
  ptype_e     cp_type;
  logic       rx_valid;
  ptype_e     rx_type;
  logic       pacer_busy, in_session, ev_retx_timeout, ev_retx_nack, ev_congested, ev_packet_acked;

  ipd_tx_ctrl #(.LIFETIME(LIFE), .CONG_RTT(CRTT), .BACKOFF(BOFF)) dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // covert packets to send
  localparam int NPKT = 4;
  logic [7:0] pkts [NPKT] = '{8'hA5, 8'h3C, 8'hF0, 8'h01};
  int cv_idx = 0;
  assign cv_valid = (cv_idx < NPKT);
  assign cv_data  = pkts[cv_idx < NPKT ? cv_idx : 0];
  assign cv_last  = (cv_idx == NPKT - 1);
  always @(posedge clk) if (cv_valid && cv_ready) cv_idx <= cv_idx + 1;

  // scheduled replies
  longint  due[$];
  ptype_e  what[$];
  always @(posedge clk) begin
    rx_valid <= 0;
    for (int i = 0; i < due.size(); i++)
      if (due[i] <= cyc) begin
        rx_valid <= 1; rx_type <= what[i];
        due.delete(i); what.delete(i);
        break;
      end
  end
  task automatic reply(input int after, input ptype_e t);
    due.push_back(cyc + longint'(after)); what.push_back(t);
  endtask

  int reqs = 0, probes = 0, ters = 0, attempts = 0, nbits = 0;
  int attempts_of [NPKT];
  logic [7:0] got;
  longint busy_until = 0;
  assign pacer_busy = (cyc < busy_until);

  always @(posedge clk) if (rst_n) begin
    if (cp_valid && cp_ready) begin
      case (cp_type)
        PT_REQ:   begin reqs++; if (reqs > 1) reply(20, PT_ACK); end
        PT_PROBE: begin probes++; reply(probes == 3 ? 80 : 20, PT_PROBE_ACK); end
        PT_TER:   ters++;
        default:  begin failures++; $display("FAIL bad control packet"); end
      endcase
    end
    if (grp_valid && grp_ready) begin
      got[nbits] = grp_bits[0];
      nbits++;
      checks++;
      if (grp_last != (nbits == 8)) begin failures++; $display("FAIL last flag"); end
      if (nbits == 8) begin
        nbits = 0;
        attempts++;
        attempts_of[cv_idx]++;
        checks++;
        if (got != pkts[cv_idx]) begin failures++; $display("FAIL packet %0d bits %h", cv_idx, got); end
        busy_until = cyc + 50;
        if (cv_idx == 1 && attempts_of[1] == 1) reply(70, PT_NACK);
        else if (cv_idx == 2 && attempts_of[2] == 1) ;  // lost
        else reply(70, PT_ACK);
      end
    end
  end

  int n_to = 0, n_nack = 0, n_cong = 0, n_ack = 0;
  always @(posedge clk) if (rst_n) begin
    n_to   += int'(ev_retx_timeout);
    n_nack += int'(ev_retx_nack);
    n_cong += int'(ev_congested);
    n_ack  += int'(ev_packet_acked);
  end

  initial begin
    rx_valid = 0; rx_type = PT_ACK; cp_ready = 1; grp_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!(ters == 1 && !in_session)) begin
      grp_ready <= 1'($urandom);
      @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks++; if (reqs != 2)          begin failures++; $display("FAIL reqs=%0d", reqs); end
    checks++; if (cv_idx != NPKT)     begin failures++; $display("FAIL consumed %0d", cv_idx); end
    checks++; if (attempts != 6)      begin failures++; $display("FAIL attempts=%0d", attempts); end
    checks++; if (n_to != 1 || n_nack != 1 || n_cong != 1 || n_ack != NPKT) begin
      failures++; $display("FAIL events to=%0d nack=%0d cong=%0d ack=%0d", n_to, n_nack, n_cong, n_ack);
    end
    checks++; if (probes != 7)        begin failures++; $display("FAIL probes=%0d", probes); end
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
