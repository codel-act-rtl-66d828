// tb_codel_update: drives codel_update with violating data packets at random
// times, cycle-end packets and PKT_SYNC_INIT packets, and checks one cycle later
// the drop verdict (now >= dropNextU), the count step of two, the new dropNextU
// (old + INTERVAL/sqrt(count), from the reference model), the cycle-end mirror
// and its payload, and the register load from a sync packet.
module tb_codel_update;
  import codel_pkg::*;
  import codel_ref_pkg::*;

  logic  clk = 0, rst_n = 0;
  pipe_t in_p, out_p;
  cnt_t  count_u_q;
  ts_t   drop_next_u_q;
  int    checks = 0, failures = 0;
  int    n_drop = 0, n_keep = 0, n_mirror = 0;

  codel_update dut (.clk, .rst_n, .in_p, .out_p, .count_u_q, .drop_next_u_q);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  longint unsigned m_c, m_dn;

  task automatic send_sync(input longint unsigned c, input longint unsigned dn);
    pipe_t s;
    s = PIPE_IDLE;
    s.valid = 1; s.kind = PKT_SYNC_INIT;
    s.pay.count = cnt_t'(c); s.pay.drop_next = ts_t'(dn);
    in_p = s;
    @(posedge clk); #1;
    m_c = c; m_dn = dn;
    check(count_u_q == cnt_t'(m_c) && drop_next_u_q == ts_t'(m_dn), "sync load");
    check(!out_p.drop && !out_p.mirror, "sync neither drops nor mirrors");
    in_p = PIPE_IDLE;
  endtask

  // kind: 0 violation (not first), 1 first violation, 2 cycle end, 3 no violation
  task automatic send_data(input longint unsigned now, input int kind);
    pipe_t s;
    bit    exp_drop;
    longint unsigned oc, odn;
    s = PIPE_IDLE;
    s.valid = 1; s.kind = PKT_DATA; s.meta.now = ts_t'(now);
    s.violation  = (kind <= 1);
    s.first_viol = (kind == 1);
    s.cycle_end  = (kind == 2);
    in_p = s;
    @(posedge clk); #1;
    oc = m_c; odn = m_dn;
    exp_drop = (kind == 0) && (now >= m_dn);
    if (exp_drop) begin
      m_c  = m_c + 2;
      m_dn = m_dn + ref_spacing(m_c, INTERVAL_NS);
      n_drop++;
    end else if (kind == 0) n_keep++;
    check(out_p.drop == exp_drop, "drop verdict");
    check(count_u_q == cnt_t'(m_c), "countU");
    check(drop_next_u_q == ts_t'(m_dn), "dropNextU");
    if (kind == 2) begin
      n_mirror++;
      check(out_p.mirror && out_p.mirror_kind == PKT_SYNC_UPD, "cycle-end mirror");
      check(out_p.pay.count == cnt_t'(oc) && out_p.pay.drop_next == ts_t'(odn), "mirror payload");
    end else begin
      check(!out_p.mirror, "no mirror");
    end
    in_p = PIPE_IDLE;
  endtask

  initial begin
    longint unsigned t;
    in_p = PIPE_IDLE;
    m_c = 0; m_dn = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // a congestion cycle as codel_init would start it: count 1 at t0, dropNext t0+100ms
    send_sync(2, 64'd1_100_000_000);
    send_data(64'd1_050_000_000, 0);   // too early
    send_data(64'd1_100_000_000, 0);   // drop, count 2, dropNext += 70.71 ms
    check(count_u_q == 4 && drop_next_u_q == ts_t'(64'd1_170_710_678), "second spacing INTERVAL/sqrt(2)");
    send_data(64'd1_120_000_000, 1);   // first violation packets are not codel_update's
    send_data(64'd1_200_000_000, 3);   // no violation
    send_data(64'd1_200_000_001, 2);   // cycle end: mirror countU/dropNextU

    // random cycles
    t = 64'd10_000_000_000;
    for (int cyc = 0; cyc < 60; cyc++) begin
      send_sync(2 * $urandom_range(1, 20), t + $urandom_range(0, 100_000_000));
      for (int k = 0; k < 60; k++) begin
        int r;
        t = t + $urandom_range(0, 20_000_000);
        r = $urandom_range(0, 9);
        send_data(t, (r < 7) ? 0 : (r == 7) ? 1 : (r == 8) ? 2 : 3);
      end
      t = t + 64'd1_000_000_000;
    end
    check(n_drop > 100 && n_keep > 100 && n_mirror > 20, "drops, keeps and mirrors seen");
    $display("drops %0d, kept %0d, mirrors %0d", n_drop, n_keep, n_mirror);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
