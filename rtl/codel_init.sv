// codel_init: second stage of the CoDel-ACT egress program, CoDel's entry into
// a congestion cycle.
//
// For a data packet flagged first_viol (all counts are doubled, see codel_pkg):
//   delta      = countI - lastCount
//   recent     = now - dropNextI < 16*INTERVAL
//   count_new  = (delta > 2*1 and recent) ? delta : 2*1
//   dropNext   = now + INTERVAL/sqrt(count_new/2)        (own rsqrt_unit)
// count_new and dropNext are written to the shadow registers countI' and
// dropNextI', and the packet is marked to emit a PKT_SYNC_INIT mirror packet
// carrying <count_new, dropNext, lastCount := old countI>. countI, dropNextI
// and lastCount themselves are only read here: a register may be touched once
// per packet, so their writes come back later through recirculation:
//   PKT_SYNC_UPD  (made at the end of a cycle by codel_update's side) writes
//                 countI and dropNextI;
//   PKT_SYNC_INIT (this stage's own mirror, on its way to codel_update)
//                 writes lastCount.
// As in the CoDel listing this design follows, lastCount takes the count of the
// cycle that just ended, before the new count is chosen; delta is compared as
// a signed number so that a count below lastCount falls back to 1.
//
// One packet per cycle, one cycle of latency; `hist_used` pulses with out_p
// when the new count was taken from the drop history (delta) instead of 1.
// All registers reset to zero (this design's choice).
module codel_init
  import codel_pkg::*;
#(
  parameter longint unsigned INTERVAL = INTERVAL_NS  // ns
) (
  input  logic  clk,
  input  logic  rst_n,
  input  pipe_t in_p,
  output pipe_t out_p,
  output logic  hist_used,
  output cnt_t  count_i_q,
  output cnt_t  count_i_sh_q,
  output ts_t   drop_next_i_q,
  output ts_t   drop_next_i_sh_q,
  output cnt_t  last_count_q
);

  localparam logic signed [TS_W-1:0] RECENT_WINDOW = (TS_W)'(16 * INTERVAL);

  logic                     do_init, sync_upd, sync_init;
  logic signed [CNT_W:0]    delta;
  logic                     recent, use_hist;
  cnt_t                     count_new;
  ts_t                      spacing, drop_next_new;

  always_comb begin
    do_init   = in_p.valid && (in_p.kind == PKT_DATA) && in_p.first_viol;
    sync_upd  = in_p.valid && (in_p.kind == PKT_SYNC_UPD);
    sync_init = in_p.valid && (in_p.kind == PKT_SYNC_INIT);
    delta     = signed'({1'b0, count_i_q}) - signed'({1'b0, last_count_q});
    recent    = ts_diff(in_p.meta.now, drop_next_i_q) < RECENT_WINDOW;
    use_hist  = (delta > 2) && recent;
    count_new = use_hist ? cnt_t'(delta) : cnt_t'(2);
    drop_next_new = in_p.meta.now + spacing;
  end

  rsqrt_unit #(.INTERVAL(INTERVAL)) u_rsqrt (.x(count_new), .y(spacing));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_i_q        <= '0;
      count_i_sh_q     <= '0;
      drop_next_i_q    <= '0;
      drop_next_i_sh_q <= '0;
      last_count_q     <= '0;
      hist_used        <= 1'b0;
      out_p            <= PIPE_IDLE;
    end else begin
      out_p     <= in_p;
      hist_used <= do_init && use_hist;
      if (do_init) begin
        count_i_sh_q        <= count_new;
        drop_next_i_sh_q    <= drop_next_new;
        out_p.mirror        <= 1'b1;
        out_p.mirror_kind   <= PKT_SYNC_INIT;
        out_p.pay.count     <= count_new;
        out_p.pay.drop_next <= drop_next_new;
        out_p.pay.last_count <= count_i_q;
      end
      if (sync_upd) begin
        count_i_q     <= in_p.pay.count;
        drop_next_i_q <= in_p.pay.drop_next;
      end
      if (sync_init) last_count_q <= in_p.pay.last_count;
    end
  end

endmodule
