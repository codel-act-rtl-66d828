// tb_codel_act_egress: end-to-end test of the CoDel-ACT egress pipeline at its
// default parameters (INTERVAL 100 ms, TARGET 5 ms).
//
// Traffic: one packet every 100 us of egress time (the rate of 1500-byte
// packets on a 120 Mb/s link) through a simple closed-loop queue: while a
// "sender" is overdriving the link (2000 of every 2500 packets) every packet
// adds 30 us of queue delay, otherwise 400 us drain, and each drop takes 2 ms off
// it (the sender backing off). This produces
// repeated congestion cycles close together (so codel_init reuses the drop
// history), and after a 3 s silence a cycle that must start again from one.
//
// Phase 1 (exact): packets are offered twelve clock cycles apart, so each
// mirror packet has written its registers before the next data packet, and the
// sequential model in codel_ref_pkg must agree with the pipeline on every
// drop verdict and, before every packet, on every state register. Each
// packet must leave four cycles after it is accepted, in order.
// Phase 2 (line rate): packets are offered every cycle; mirrors then take
// slots from data packets, so in_ready must fall; every packet must still
// leave exactly once and in order.
// Each mechanism (pass, first violation, history reuse, restart from one,
// drop, cycle end, recirculation, input stall) is counted and must occur.
module tb_codel_act_egress;
  import codel_pkg::*;
  import codel_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_ready, out_valid, out_drop, recirc, init_hist;
  data_meta_t  in_meta, out_meta;
  codel_regs_t regs;

  codel_act_egress dut (.clk, .rst_n, .in_valid, .in_ready, .in_meta, .out_valid, .out_meta,
                        .out_drop, .recirc, .init_hist, .regs);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_recirc = 0, n_hist_dut = 0, n_stall = 0, n_out = 0, n_drop_dut = 0;
  longint cycle = 0;

  initial begin
    repeat (2_000_000) @(posedge clk);
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

  // output monitor: order, latency, verdict
  typedef struct { int id; longint acc_cycle; bit drop; bit exact; } exp_t;
  exp_t exp_q[$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (recirc) n_recirc++;
      if (init_hist) n_hist_dut++;
      if (in_valid && !in_ready) n_stall++;
      if (out_valid) begin
        exp_t e;
        n_out++;
        if (out_drop) n_drop_dut++;
        if (exp_q.size() == 0) begin
          check(0, "unexpected output packet");
        end else begin
          e = exp_q.pop_front();
          check(int'(out_meta.id) == e.id, "output order");
          if (e.exact) begin
            check(cycle - e.acc_cycle == 4, "latency four cycles");
            check(out_drop == e.drop, "drop verdict");
          end
        end
      end
    end
  end

  codel_model m;
  longint unsigned now, qd;
  bit              overdrive;
  int              id = 0;

  function automatic bit regs_match();
    return regs.dropping == m.dropping && regs.prev_dropping == m.prev_dropping &&
           regs.count_i == cnt_t'(m.count_i) && regs.count_i_sh == cnt_t'(m.count_i_sh) &&
           regs.drop_next_i == ts_t'(m.drop_next_i) &&
           regs.drop_next_i_sh == ts_t'(m.drop_next_i_sh) &&
           regs.last_count == cnt_t'(m.last_count) && regs.count_u == cnt_t'(m.count_u) &&
           regs.drop_next_u == ts_t'(m.drop_next_u);
  endfunction

  // queue model: next queue delay, given whether the last packet was dropped
  task automatic advance_queue(input bit dropped);
    now = now + 100_000;
    if (overdrive) qd = qd + 30_000;
    else if (qd >= 400_000) qd = qd - 400_000;
    else qd = 0;
    if (dropped) qd = (qd > 2_000_000) ? qd - 2_000_000 : 0;
  endtask

  task automatic send(input bit exact);
    exp_t e;
    in_valid = 1;
    in_meta.id = ID_W'(id);
    in_meta.now = ts_t'(now);
    in_meta.qdelay = ts_t'(qd);
    while (1) begin
      @(posedge clk);
      if (in_ready) break;
      #1;
    end
    e.id = id;
    e.acc_cycle = cycle;  // value before this edge's update
    e.exact = exact;
    e.drop = exact ? m.step(now, qd) : 1'b0;
    exp_q.push_back(e);
    id++;
    #1;
    in_valid = 0;
  endtask

  initial begin
    bit d;
    in_valid = 0;
    in_meta = '0;
    m = new(INTERVAL_NS, TARGET_NS);
    now = 64'd1_000_000_000;
    qd = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // phase 1: spaced, exact comparison
    for (int k = 0; k < 20000; k++) begin
      // a 3 s silence half way
      overdrive = ((k % 2500) < 2000);
      if (k == 10000) now = now + 64'd3_000_000_000;
      check(regs_match(), "state registers");
      send(1);
      d = m.dropped;
      advance_queue(d);
      repeat (11) @(posedge clk);
      #1;
    end
    repeat (10) @(posedge clk);
    #1;
    check(regs_match(), "final state registers");
    check(n_drop_dut == m.n_drop, "drop total");
    check(n_recirc == m.n_init + m.n_cend, "one recirculation per init and per cycle end");
    check(n_hist_dut == m.n_hist, "history reuse count");

    // phase 2: line rate, conservation and stalls
    for (int k = 0; k < 4000; k++) begin
      overdrive = ((k % 500) < 300);
      send(0);
      advance_queue(1'b0);
    end
    repeat (20) @(posedge clk);
    #1;
    check(exp_q.size() == 0, "every packet left");
    check(n_out == id, "packet count");

    $display("passes %0d, first violations %0d (history %0d, from one %0d), drops %0d, cycle ends %0d",
             m.n_pass, m.n_init, m.n_hist, m.n_reset, m.n_drop, m.n_cend);
    $display("recirculations %0d, input stalls %0d, packets %0d", n_recirc, n_stall, n_out);
    check(m.n_pass > 0, "mechanism: no violation");
    check(m.n_init > 0, "mechanism: first violation (codel_init)");
    check(m.n_hist > 0, "mechanism: count from history");
    check(m.n_reset > 0, "mechanism: count restarts from one");
    check(m.n_drop > 0, "mechanism: drop (codel_update)");
    check(m.n_cend > 0, "mechanism: cycle end sync");
    check(n_recirc > 0, "mechanism: recirculation");
    check(n_stall > 0, "mechanism: input stall for a mirror");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
