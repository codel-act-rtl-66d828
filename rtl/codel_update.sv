// codel_update: third stage of the CoDel-ACT egress program, CoDel's dropping
// state.
//
// For a data packet that violates TARGET but is not the first violation of
// its cycle (all counts are doubled, see codel_pkg):
//   if now >= dropNextU:              (mark_to_drop)
//     drop the packet
//     countU    += 2                  (one drop, doubled)
//     dropNextU += INTERVAL/sqrt(countU/2)   (own rsqrt_unit)
// countU and dropNextU are each read and written once, in this one stage.
// For a data packet flagged cycle_end the two registers are only read, and the
// packet is marked to emit a PKT_SYNC_UPD mirror packet carrying them back to
// codel_init. A PKT_SYNC_INIT packet (made by codel_init at the start of a
// cycle) overwrites countU and dropNextU with the values it carries.
// Timestamps are compared as wrapping signed distances.
//
// One packet per cycle, one cycle of latency. Registers reset to zero (this
// design's choice).
module codel_update
  import codel_pkg::*;
#(
  parameter longint unsigned INTERVAL = INTERVAL_NS  // ns
) (
  input  logic  clk,
  input  logic  rst_n,
  input  pipe_t in_p,
  output pipe_t out_p,
  output cnt_t  count_u_q,
  output ts_t   drop_next_u_q
);

  logic is_data, do_update, do_drop, do_sync_rd, sync_init;
  cnt_t count_inc;
  ts_t  spacing;

  always_comb begin
    is_data    = in_p.valid && (in_p.kind == PKT_DATA);
    do_update  = is_data && in_p.violation && !in_p.first_viol;
    do_drop    = do_update && (ts_diff(in_p.meta.now, drop_next_u_q) >= 0);
    do_sync_rd = is_data && in_p.cycle_end;
    sync_init  = in_p.valid && (in_p.kind == PKT_SYNC_INIT);
    count_inc  = count_u_q + cnt_t'(2);
  end

  rsqrt_unit #(.INTERVAL(INTERVAL)) u_rsqrt (.x(count_inc), .y(spacing));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_u_q     <= '0;
      drop_next_u_q <= '0;
      out_p         <= PIPE_IDLE;
    end else begin
      out_p      <= in_p;
      out_p.drop <= do_drop;
      if (do_drop) begin
        count_u_q     <= count_inc;
        drop_next_u_q <= drop_next_u_q + spacing;
      end
      if (do_sync_rd) begin
        out_p.mirror         <= 1'b1;
        out_p.mirror_kind    <= PKT_SYNC_UPD;
        out_p.pay.count      <= count_u_q;
        out_p.pay.drop_next  <= drop_next_u_q;
        out_p.pay.last_count <= '0;
      end
      if (sync_init) begin
        count_u_q     <= in_p.pay.count;
        drop_next_u_q <= in_p.pay.drop_next;
      end
    end
  end

endmodule
