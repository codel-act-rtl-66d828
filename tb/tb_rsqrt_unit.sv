// tb_rsqrt_unit: checks the math unit against INTERVAL*sqrt(2/x) computed with
// real arithmetic. Small doubled counts (x <= 31) must be exact to 1 ns; every
// other input must be within 2 %. Covers every x up to 4096, then powers of two,
// their neighbours and random values up to 2^32-1.
module tb_rsqrt_unit;
  import codel_pkg::*;

  cnt_t x;
  ts_t  y;
  int   checks = 0, failures = 0;
  real  worst = 0.0;

  rsqrt_unit dut (.x(x), .y(y));

  task automatic check_one(input cnt_t xv);
    real exact, err;
    x = xv;
    #1;
    exact = real'(INTERVAL_NS) * $sqrt(2.0 / real'(xv));
    err   = (real'(y) - exact) / exact;
    if (err < 0) err = -err;
    if (err > worst) worst = err;
    checks++;
    if (xv <= 31) begin
      if ((real'(y) - exact > 1.0) || (exact - real'(y) > 1.0)) begin
        failures++;
        $display("FAIL x=%0d y=%0d exact=%f", xv, y, exact);
      end
    end else if (err > 0.02) begin
      failures++;
      $display("FAIL x=%0d y=%0d exact=%f err=%f", xv, y, exact, err);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // x = 2 is count = 1: exactly INTERVAL
    x = 2; #1; checks++;
    if (y != ts_t'(INTERVAL_NS)) begin failures++; $display("FAIL x=2 y=%0d", y); end
    for (int unsigned v = 1; v <= 4096; v++) check_one(cnt_t'(v));
    for (int s = 12; s < 32; s++) begin
      check_one(cnt_t'(64'd1 << s));
      check_one(cnt_t'((64'd1 << s) - 1));
      check_one(cnt_t'((64'd1 << s) + 1));
    end
    for (int k = 0; k < 2000; k++) begin
      cnt_t v;
      v = cnt_t'($urandom);
      if (v == 0) v = 1;
      check_one(v);
    end
    $display("worst relative error %f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
