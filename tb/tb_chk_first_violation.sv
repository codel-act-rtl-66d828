// tb_chk_first_violation: drives random data packets (queue delays around
// TARGET) mixed with synchronisation packets and idle cycles into the stage,
// and compares the three flags one cycle later with a model of the previous
// packet's violation bit. Also checks that sync packets leave flags clear and
// do not disturb the state, and that the payload passes through.
module tb_chk_first_violation;
  import codel_pkg::*;

  logic  clk = 0, rst_n = 0;
  pipe_t in_p, out_p;
  logic  dropping_q, prev_dropping_q;
  int    checks = 0, failures = 0;
  int    n_first = 0, n_end = 0;

  chk_first_violation dut (.clk, .rst_n, .in_p, .out_p, .dropping_q, .prev_dropping_q);

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

  bit    prev_viol;
  pipe_t sent;

  initial begin
    in_p = PIPE_IDLE;
    prev_viol = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      int sel;
      bit exp_v, exp_f, exp_e;
      sel  = $urandom_range(0, 9);
      sent = PIPE_IDLE;
      if (sel < 7) begin
        sent.valid       = 1;
        sent.kind        = PKT_DATA;
        sent.meta.id     = ID_W'(k);
        sent.meta.now    = ts_t'(k) * 1000;
        // bursts: long runs above or below TARGET
        sent.meta.qdelay = ((k / 17) % 2 == 1) ? ts_t'(TARGET_NS + $urandom_range(0, 3000000))
                                               : ts_t'($urandom_range(0, 5200000));
        if ($urandom_range(0, 19) == 0) sent.meta.qdelay = ts_t'(TARGET_NS);
        if ($urandom_range(0, 19) == 0) sent.meta.qdelay = ts_t'(TARGET_NS - 1);
      end else if (sel < 9) begin
        sent.valid = 1;
        sent.kind  = (sel == 7) ? PKT_SYNC_INIT : PKT_SYNC_UPD;
        sent.pay.count = cnt_t'($urandom);
        sent.meta.qdelay = ts_t'(TARGET_NS + 10);  // must be ignored
      end
      in_p <= sent;
      @(posedge clk);
      #1;
      if (sent.valid && sent.kind == PKT_DATA) begin
        exp_v = sent.meta.qdelay >= TARGET_NS;
        exp_f = exp_v && !prev_viol;
        exp_e = !exp_v && prev_viol;
        prev_viol = exp_v;
        check(out_p.violation == exp_v, "violation");
        check(out_p.first_viol == exp_f, "first_viol");
        check(out_p.cycle_end == exp_e, "cycle_end");
        check(out_p.meta == sent.meta, "meta passes");
        if (exp_f) n_first++;
        if (exp_e) n_end++;
      end else begin
        check(!out_p.violation && !out_p.first_viol && !out_p.cycle_end, "flags clear");
        check(out_p.valid == sent.valid, "valid passes");
        if (sent.valid) check(out_p.pay == sent.pay && out_p.kind == sent.kind, "sync passes");
      end
      check(dropping_q == prev_viol && prev_dropping_q == prev_viol, "state");
    end
    check(n_first > 20 && n_end > 20, "both events seen");
    $display("first violations %0d, cycle ends %0d", n_first, n_end);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
