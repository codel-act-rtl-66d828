// tb_codel_act_tcp: runs the CoDel-ACT egress pipeline, at its default
// parameters, as the manager of one bottleneck queue shared by TCP-like flows,
// in the traffic scenarios the design is meant for:
//   100 Mb/s, 1, 3 and 10 flows, RTT 5-10 ms
//   1 Gb/s, 10, 30 and 50 flows, RTT 3-25 ms
//   100 Mb/s, 3 flows, RTT 10, 100 and 300 ms
//
// The network is an event-driven model in the testbench: 1500-byte packets,
// a link that serves one packet per 120 us (12 us at 1 Gb/s), a tail-drop
// buffer holding 200 ms of traffic, and window-based senders with slow start
// and additive increase, halving their window at most once per RTT when a loss
// is reported. A packet's loss or acknowledgement reaches its sender one RTT
// after it leaves the queue. Senders are not rate-capped, which loads the queue
// harder than paced senders would. Every departing packet is offered to the
// pipeline with its egress time and queue delay, ten clock cycles apart, and
// its verdict decides whether it is acknowledged or lost.
//
// Checks: every verdict equals the sequential model in codel_ref_pkg; in every
// scenario CoDel drops packets and state is synchronised by recirculation; and
// after a 2 s warm-up the mean queue delay is below a quarter of the buffer
// (50 ms), i.e. no standing queue is left. The mean and 99th-percentile queue
// delay, drops, tail drops and recirculations are printed per scenario.
// SIM_NS of traffic (10 s) is simulated per scenario.
module tb_codel_act_tcp;
  import codel_pkg::*;
  import codel_ref_pkg::*;

  localparam longint unsigned SIM_NS  = 64'd10_000_000_000;
  localparam longint unsigned WARM_NS = 64'd2_000_000_000;  // excluded from statistics
  localparam int MAXF = 50;
  localparam longint unsigned BUF_NS = 64'd200_000_000;  // buffer size in time

  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_ready, out_valid, out_drop, recirc, init_hist;
  data_meta_t  in_meta, out_meta;
  codel_regs_t regs;

  codel_act_egress dut (.clk, .rst_n, .in_valid, .in_ready, .in_meta, .out_valid, .out_meta,
                        .out_drop, .recirc, .init_hist, .regs);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_recirc = 0;
  bit got_out, got_drop;

  always @(posedge clk) begin
    if (rst_n && recirc) n_recirc++;
    if (rst_n && out_valid) begin
      got_out  <= 1'b1;
      got_drop <= out_drop;
    end
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // network model state
  real             cwnd[MAXF], ssthresh[MAXF];
  int              inflight[MAXF];
  longint unsigned rtt[MAXF], last_cut[MAXF];
  longint unsigned ev_t[MAXF][$];
  bit              ev_loss[MAXF][$];
  int              q_flow[$];
  longint unsigned q_enq[$];
  int              hist[64];   // queue delay histogram, 1 ms bins

  // offer one departing packet to the pipeline and return its verdict
  task automatic offer(input longint unsigned now, input longint unsigned qd, output bit drop);
    got_out = 0;
    in_valid = 1;
    in_meta.now = ts_t'(now);
    in_meta.qdelay = ts_t'(qd);
    in_meta.id = in_meta.id + 1'b1;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 0;
    repeat (9) @(posedge clk);
    #1;
    check(got_out, "verdict returned");
    drop = got_drop;
  endtask

  task automatic send_more(input int f, input longint unsigned t, input int buf_pkts,
                           inout int tail_drops);
    while (real'(inflight[f]) < cwnd[f] - 1e-9 || inflight[f] == 0) begin
      inflight[f]++;
      if (q_flow.size() >= buf_pkts) begin
        tail_drops++;
        ev_t[f].push_back(t + rtt[f]);
        ev_loss[f].push_back(1'b1);
      end else begin
        q_flow.push_back(f);
        q_enq.push_back(t);
      end
    end
  endtask

  task automatic run_scenario(input string name, input int nflows, input longint unsigned svc_ns,
                              input longint unsigned rtt_lo, input longint unsigned rtt_hi);
    codel_model m;
    longint unsigned link_free, t, tnext_ev, sum_qd, npk, d, qd;
    int  fsel, tail_drops, p99, acc, dut_drops, mism, buf_pkts;
    bit  drop, exp_drop;

    m = new(INTERVAL_NS, TARGET_NS);
    buf_pkts = int'(BUF_NS / svc_ns);
    rst_n = 0;
    n_recirc = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    q_flow.delete(); q_enq.delete();
    foreach (hist[i]) hist[i] = 0;
    tail_drops = 0; sum_qd = 0; npk = 0; dut_drops = 0; mism = 0;
    for (int f = 0; f < nflows; f++) begin
      cwnd[f] = 2.0; ssthresh[f] = 1.0e9; inflight[f] = 0; last_cut[f] = 0;
      rtt[f] = rtt_lo + ((rtt_hi - rtt_lo) * longint'(f)) / ((nflows > 1) ? nflows - 1 : 1);
      ev_t[f].delete(); ev_loss[f].delete();
      send_more(f, 64'(f) * 1000, buf_pkts, tail_drops);
    end
    link_free = 0;
    t = 0;
    while (t < SIM_NS) begin
      // earliest sender event
      fsel = -1; tnext_ev = '1;
      for (int f = 0; f < nflows; f++)
        if (ev_t[f].size() > 0 && ev_t[f][0] < tnext_ev) begin tnext_ev = ev_t[f][0]; fsel = f; end
      if (q_flow.size() > 0) begin
        d = (link_free > q_enq[0]) ? link_free : q_enq[0];
        if (fsel < 0 || d <= tnext_ev) begin
          int f;
          f  = q_flow.pop_front();
          qd = d - q_enq.pop_front();
          t  = d;
          link_free = d + svc_ns;
          offer(d + 64'd1_000_000_000, qd, drop);   // timestamps start at 1 s
          exp_drop = m.step(d + 64'd1_000_000_000, qd);
          if (drop != exp_drop) mism++;
          check(drop == exp_drop, "verdict equals model");
          if (drop) dut_drops++;
          if (d >= WARM_NS) begin
            sum_qd += qd; npk++;
            hist[(qd / 1_000_000 > 63) ? 63 : int'(qd / 1_000_000)]++;
          end
          ev_t[f].push_back(d + rtt[f]);
          ev_loss[f].push_back(drop);
          continue;
        end
      end
      if (fsel < 0) break;
      // sender event: acknowledgement or loss report
      begin
        bit loss;
        t = ev_t[fsel].pop_front();
        loss = ev_loss[fsel].pop_front();
        inflight[fsel]--;
        if (loss) begin
          if (t - last_cut[fsel] >= rtt[fsel]) begin
            ssthresh[fsel] = (cwnd[fsel] / 2.0 > 2.0) ? cwnd[fsel] / 2.0 : 2.0;
            cwnd[fsel] = ssthresh[fsel];
            last_cut[fsel] = t;
          end
        end else if (cwnd[fsel] < ssthresh[fsel]) cwnd[fsel] += 1.0;
        else cwnd[fsel] += 1.0 / cwnd[fsel];
        send_more(fsel, t, buf_pkts, tail_drops);
      end
    end
    acc = 0; p99 = 63;
    for (int i = 63; i >= 0; i--) begin
      acc += hist[i];
      if (longint'(acc) * 100 <= longint'(npk)) p99 = i;
    end
    $display("%-34s packets %7d  mean qdelay %6.3f ms  p99 < %0d ms  drops %5d  tail drops %0d  recirculations %0d",
             name, npk, real'(sum_qd) / real'(npk) / 1.0e6, p99 + 1, dut_drops, tail_drops, n_recirc);
    check(dut_drops > 0, "CoDel dropped packets");
    check(real'(sum_qd) / real'(npk) < real'(BUF_NS) / 4.0, "no standing queue");
    check(n_recirc > 0, "state synchronised by recirculation");
  endtask

  initial begin
    in_valid = 0;
    in_meta = '0;
    run_scenario("100 Mb/s,  1 flow,  RTT 5-10 ms",   1, 120_000, 5_000_000, 10_000_000);
    run_scenario("100 Mb/s,  3 flows, RTT 5-10 ms",   3, 120_000, 5_000_000, 10_000_000);
    run_scenario("100 Mb/s, 10 flows, RTT 5-10 ms",  10, 120_000, 5_000_000, 10_000_000);
    run_scenario("1 Gb/s,   10 flows, RTT 3-25 ms",  10,  12_000, 3_000_000, 25_000_000);
    run_scenario("1 Gb/s,   30 flows, RTT 3-25 ms",  30,  12_000, 3_000_000, 25_000_000);
    run_scenario("1 Gb/s,   50 flows, RTT 3-25 ms",  50,  12_000, 3_000_000, 25_000_000);
    run_scenario("100 Mb/s,  3 flows, RTT 10 ms",     3, 120_000, 10_000_000, 10_000_000);
    run_scenario("100 Mb/s,  3 flows, RTT 100 ms",    3, 120_000, 100_000_000, 100_000_000);
    run_scenario("100 Mb/s,  3 flows, RTT 300 ms",    3, 120_000, 300_000_000, 300_000_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
