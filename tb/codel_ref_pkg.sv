// codel_ref_pkg: reference models for the CoDel-ACT testbenches, written from
// the algorithm rather than from the RTL.
//
// ref_spacing(x) gives the spacing the math unit is specified to return for a
// doubled count x, using real arithmetic: exact INTERVAL*sqrt(2/x) (rounded)
// while x has at most five significant bits, otherwise the table rule
// "keep four bits after the leading one, add half an LSB, round the table
// value, shift right by floor(p/2)".
//
// codel_model is a sequential CoDel-ACT model: packets are processed one at a
// time and a mirror packet takes effect before the next data packet, which is
// what the pipeline does when packets are at least ten cycles apart (a
// mirror needs nine cycles to reach codel_update).
package codel_ref_pkg;

  function automatic longint unsigned ref_spacing(input longint unsigned x,
                                                  input longint unsigned interval);
    int    p, q, r;
    real   m, base;
    longint unsigned xs, top;
    xs = (x == 0) ? 1 : x;
    p = 0;
    for (int b = 0; b < 32; b++) if (xs[b]) p = b;
    q = p / 2;
    r = p % 2;
    if (p <= 4) begin
      m = real'(xs) / real'(64'd1 << p);
      base = real'(interval) * $sqrt(2.0 / (m * real'(1 << r)));
      return longint'(base) >> q;   // real to integer conversion rounds
    end
    top  = xs >> (p - 4);                     // 1xxxx
    m    = (real'(top) + 0.5) / 16.0;
    base = real'(interval) * $sqrt(2.0 / (m * real'(1 << r)));
    return longint'(base) >> q;
  endfunction

  class codel_model;
    longint unsigned interval, target;
    bit              dropping, prev_dropping;
    longint unsigned count_i, count_i_sh, drop_next_i, drop_next_i_sh, last_count;
    longint unsigned count_u, drop_next_u;
    // what the last packet did
    bit              first_viol, cycle_end, hist_used, dropped;
    // mechanism counters
    int              n_init, n_hist, n_reset, n_drop, n_cend, n_pass;

    function new(longint unsigned interval_ns, longint unsigned target_ns);
      interval = interval_ns;
      target   = target_ns;
      dropping = 0; prev_dropping = 0;
      count_i = 0; count_i_sh = 0; drop_next_i = 0; drop_next_i_sh = 0; last_count = 0;
      count_u = 0; drop_next_u = 0;
      n_init = 0; n_hist = 0; n_reset = 0; n_drop = 0; n_cend = 0; n_pass = 0;
    endfunction

    // one data packet; returns 1 if it is to be dropped
    function bit step(input longint unsigned now, input longint unsigned qdelay);
      bit     viol;
      longint delta, since;
      longint unsigned cnew, dn;
      viol          = qdelay >= target;
      first_viol    = viol && !dropping;
      cycle_end     = !viol && prev_dropping;
      dropping      = viol;
      prev_dropping = viol;
      hist_used     = 0;
      dropped       = 0;
      if (!viol) n_pass++;
      if (first_viol) begin
        n_init++;
        delta = longint'(count_i) - longint'(last_count);
        since = longint'(now) - longint'(drop_next_i);
        if (delta > 2 && since < longint'(16 * interval)) begin
          cnew = longint'(delta); hist_used = 1; n_hist++;
        end else begin
          cnew = 2; n_reset++;
        end
        dn = now + ref_spacing(cnew, interval);
        count_i_sh = cnew;
        drop_next_i_sh = dn;
        // its mirror: lastCount, then countU / dropNextU
        last_count  = count_i;
        count_u     = cnew;
        drop_next_u = dn;
      end else if (viol) begin
        if (longint'(now) - longint'(drop_next_u) >= 0) begin
          dropped = 1;
          n_drop++;
          count_u     = count_u + 2;
          drop_next_u = drop_next_u + ref_spacing(count_u, interval);
        end
      end
      if (cycle_end) begin
        n_cend++;
        count_i     = count_u;
        drop_next_i = drop_next_u;
      end
      return dropped;
    endfunction
  endclass

endpackage
