// tb_recirc_path: pushes mirror packets at random (at most one per cycle, as
// the pipeline end does) while offering data packets on the valid-ready input,
// and checks that every mirror comes out once and in order, ahead of waiting
// data, one cycle after it could first leave; that in_ready is low exactly
// while a mirror is queued; that accepted data packets come out in order one
// cycle later; and that recirc marks the recirculated slots.
module tb_recirc_path;
  import codel_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       in_valid, in_ready, mir_valid, recirc;
  data_meta_t in_meta;
  mirror_t    mir;
  pipe_t      out_p;
  int         checks = 0, failures = 0;
  int         n_stall = 0, n_mir = 0, n_data = 0;

  recirc_path dut (.clk, .rst_n, .in_valid, .in_ready, .in_meta, .mir_valid, .mir,
                   .out_p, .recirc);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  mirror_t mq[$];
  int      mq_len_before;
  bit      exp_data;
  data_meta_t exp_meta;
  mirror_t exp_mir;
  bit      exp_mirror;

  initial begin
    in_valid = 0; in_meta = '0; mir_valid = 0; mir = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int k = 0; k < 5000; k++) begin
      // stimulus for this cycle (set 1 time unit after the edge)
      in_valid = ($urandom_range(0, 3) != 0);
      in_meta.id = ID_W'(k);
      in_meta.now = ts_t'(k);
      in_meta.qdelay = ts_t'($urandom);
      mir_valid = ($urandom_range(0, 3) == 0);
      mir.kind = ($urandom_range(0, 1) == 1) ? PKT_SYNC_INIT : PKT_SYNC_UPD;
      mir.pay.count = cnt_t'($urandom);
      mir.pay.drop_next = ts_t'(k);
      mir.pay.last_count = cnt_t'(k);
      // expected output after this edge
      check(in_ready == (mq.size() == 0), "in_ready only when no mirror waits");
      exp_mirror = (mq.size() != 0);
      if (exp_mirror) exp_mir = mq.pop_front();
      exp_data = !exp_mirror && in_valid;
      exp_meta = in_meta;
      if (in_valid && !in_ready) n_stall++;
      if (mir_valid) mq.push_back(mir);
      @(posedge clk);
      #1;
      check(recirc == exp_mirror, "recirc pulse");
      if (exp_mirror) begin
        n_mir++;
        check(out_p.valid && out_p.kind == exp_mir.kind && out_p.pay == exp_mir.pay, "mirror out");
      end else if (exp_data) begin
        n_data++;
        check(out_p.valid && out_p.kind == PKT_DATA && out_p.meta == exp_meta, "data out");
      end else begin
        check(!out_p.valid, "idle slot");
      end
      check(!out_p.first_viol && !out_p.mirror && !out_p.drop, "flags clear");
    end
    check(n_stall > 100 && n_mir > 100 && n_data > 100, "stalls, mirrors and data seen");
    $display("stalls %0d, mirrors %0d, data %0d", n_stall, n_mir, n_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
