// tb_codel_init: drives codel_init with directed and random sequences of
// first-violation data packets and both kinds of synchronisation packet, and
// checks against a model of CoDel's entry rule (delta = countI - lastCount,
// history reused when delta > 2 (doubled) and the last dropNext is less than
// 16*INTERVAL ago, otherwise count = 2): the mirror request, its payload, the
// hist_used pulse, the shadow registers and the registers written by sync
// packets, all one cycle after the packet enters.
module tb_codel_init;
  import codel_pkg::*;
  import codel_ref_pkg::*;

  logic  clk = 0, rst_n = 0;
  pipe_t in_p, out_p;
  logic  hist_used;
  cnt_t  count_i_q, count_i_sh_q, last_count_q;
  ts_t   drop_next_i_q, drop_next_i_sh_q;
  int    checks = 0, failures = 0;
  int    n_hist = 0, n_one = 0;

  codel_init dut (.clk, .rst_n, .in_p, .out_p, .hist_used, .count_i_q, .count_i_sh_q,
                  .drop_next_i_q, .drop_next_i_sh_q, .last_count_q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // model state
  longint unsigned m_ci, m_dni, m_lc, m_cish, m_dnish;

  task automatic send_sync(input pkt_kind_e k, input longint unsigned c, input longint unsigned dn,
                           input longint unsigned lc);
    pipe_t s;
    s = PIPE_IDLE;
    s.valid = 1; s.kind = k;
    s.pay.count = cnt_t'(c); s.pay.drop_next = ts_t'(dn); s.pay.last_count = cnt_t'(lc);
    in_p = s;
    @(posedge clk); #1;
    if (k == PKT_SYNC_UPD) begin m_ci = c; m_dni = dn; end
    else                   m_lc = lc;
    check(!out_p.mirror, "no mirror from sync");
    check(!hist_used, "no hist pulse from sync");
    check(count_i_q == cnt_t'(m_ci) && drop_next_i_q == ts_t'(m_dni) && last_count_q == cnt_t'(m_lc),
          "sync writes");
    in_p = PIPE_IDLE;
  endtask

  task automatic send_data(input longint unsigned now, input bit first);
    pipe_t s;
    longint delta, since;
    longint unsigned cnew, dn, old_ci;
    bit hist;
    s = PIPE_IDLE;
    s.valid = 1; s.kind = PKT_DATA; s.meta.now = ts_t'(now);
    s.meta.qdelay = ts_t'(TARGET_NS + 1);
    s.violation = 1; s.first_viol = first;
    in_p = s;
    @(posedge clk); #1;
    if (first) begin
      delta = longint'(m_ci) - longint'(m_lc);
      since = longint'(now) - longint'(m_dni);
      hist  = (delta > 2) && (since < longint'(16 * INTERVAL_NS));
      cnew  = hist ? longint'(delta) : 2;
      dn    = now + ref_spacing(cnew, INTERVAL_NS);
      old_ci = m_ci;
      m_cish = cnew; m_dnish = dn;
      if (hist) n_hist++; else n_one++;
      check(out_p.mirror && out_p.mirror_kind == PKT_SYNC_INIT, "mirror requested");
      check(out_p.pay.count == cnt_t'(cnew), "new count");
      check(out_p.pay.drop_next == ts_t'(dn), "new dropNext");
      check(out_p.pay.last_count == cnt_t'(old_ci), "lastCount payload");
      check(hist_used == hist, "hist_used");
    end else begin
      check(!out_p.mirror && !hist_used, "no init for a later violation");
    end
    check(count_i_sh_q == cnt_t'(m_cish) && drop_next_i_sh_q == ts_t'(m_dnish), "shadow registers");
    check(count_i_q == cnt_t'(m_ci) && last_count_q == cnt_t'(m_lc) && drop_next_i_q == ts_t'(m_dni),
          "read-only registers unchanged");
    check(out_p.meta.now == ts_t'(now) && out_p.valid, "packet passes");
    in_p = PIPE_IDLE;
  endtask

  initial begin
    longint unsigned t;
    in_p = PIPE_IDLE;
    m_ci = 0; m_dni = 0; m_lc = 0; m_cish = 0; m_dnish = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // after reset: count 1 (doubled 2), dropNext = now + INTERVAL exactly
    send_data(64'd1_000_000_000, 1);
    check(out_p.pay.drop_next == ts_t'(64'd1_100_000_000), "first dropNext = now + INTERVAL");
    // history: countI = 10, lastCount = 4, last dropNext 1 ms ago -> count 6
    send_sync(PKT_SYNC_UPD, 10, 64'd2_000_000_000, 0);
    send_sync(PKT_SYNC_INIT, 0, 0, 4);
    send_data(64'd2_001_000_000, 1);
    check(out_p.pay.count == 6, "count from history");
    // same history but 16*INTERVAL ago -> count 1
    send_data(64'd3_600_000_000, 1);
    check(out_p.pay.count == 2, "stale history resets");
    // count below lastCount -> count 1
    send_sync(PKT_SYNC_INIT, 0, 0, 20);
    send_data(64'd2_001_000_000, 1);
    check(out_p.pay.count == 2, "negative delta resets");
    // a later violation is left to codel_update
    send_data(64'd2_002_000_000, 0);

    // random sequences
    t = 64'd5_000_000_000;
    for (int k = 0; k < 2000; k++) begin
      int sel;
      sel = $urandom_range(0, 5);
      t = t + $urandom_range(0, 400_000_000);
      case (sel)
        0, 1: send_data(t, 1);
        2:    send_data(t, 0);
        3:    send_sync(PKT_SYNC_UPD, $urandom_range(0, 300),
                        t - $urandom_range(0, 2_000_000_000), 0);
        4:    send_sync(PKT_SYNC_INIT, 0, 0, $urandom_range(0, 200));
        default: begin in_p = PIPE_IDLE; @(posedge clk); #1; end
      endcase
    end
    check(n_hist > 20 && n_one > 20, "both entry rules seen");
    $display("history %0d, reset %0d", n_hist, n_one);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
