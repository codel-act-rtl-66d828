// codel_act_egress: the CoDel active queue manager of one egress queue, built
// the CoDel-ACT way, as a pipeline in which every state register sits in one
// stage and is read-modified-written at most once per packet.
//
// Stages (one packet per cycle, four cycles from in_meta to out_meta):
//   0 recirc_path          merges recirculated mirror packets (first) with data
//   1 chk_first_violation  dropping / prevDropping: violation, first violation,
//                          end of congestion cycle
//   2 codel_init           countI, countI', dropNextI, dropNextI', lastCount
//   3 codel_update         countU, dropNextU: mark_to_drop
//   then the data packet leaves on out_* (with out_drop set if it must be
//   discarded) and a mirror, if one was asked for, goes back to stage 0.
//
// CoDel's count and dropNext are needed both when a congestion cycle starts
// (codel_init) and while it lasts (codel_update). Because a register belongs
// to one stage, each function has its own copy, and the copies are brought
// together by mirror packets: codel_init's mirror hands the new count and
// dropNext to codel_update (and writes lastCount), and the first packet after
// a cycle hands codel_update's count and dropNext back to codel_init. This
// split and the doubled counts follow the CoDel-ACT scheme; the pipeline
// timing, the packet format, the recirculation FIFO and the math unit's
// table are this design's own.
//
// Interface: in_valid/in_ready/in_meta, valid-ready, carries the egress
// timestamp and queue delay of each packet; out_valid/out_meta/out_drop give
// every data packet back with its verdict; recirc pulses when a mirror packet
// enters the pipeline; regs shows every state register.
module codel_act_egress
  import codel_pkg::*;
#(
  parameter longint unsigned INTERVAL     = INTERVAL_NS,  // ns
  parameter longint unsigned TARGET       = TARGET_NS,    // ns
  parameter int              RECIRC_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  data_meta_t  in_meta,
  output logic        out_valid,
  output data_meta_t  out_meta,
  output logic        out_drop,
  output logic        recirc,
  output logic        init_hist,
  output codel_regs_t regs
);

  pipe_t   p0, p1, p2, p3;
  logic    mir_valid;
  mirror_t mir;

  recirc_path #(.DEPTH(RECIRC_DEPTH)) u_recirc (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_meta,
    .mir_valid, .mir,
    .out_p(p0), .recirc
  );

  chk_first_violation #(.TARGET(TARGET)) u_chk (
    .clk, .rst_n, .in_p(p0), .out_p(p1),
    .dropping_q(regs.dropping), .prev_dropping_q(regs.prev_dropping)
  );

  codel_init #(.INTERVAL(INTERVAL)) u_init (
    .clk, .rst_n, .in_p(p1), .out_p(p2), .hist_used(init_hist),
    .count_i_q(regs.count_i), .count_i_sh_q(regs.count_i_sh),
    .drop_next_i_q(regs.drop_next_i), .drop_next_i_sh_q(regs.drop_next_i_sh),
    .last_count_q(regs.last_count)
  );

  codel_update #(.INTERVAL(INTERVAL)) u_update (
    .clk, .rst_n, .in_p(p2), .out_p(p3),
    .count_u_q(regs.count_u), .drop_next_u_q(regs.drop_next_u)
  );

  // Egress end: data packets leave, mirrors go back to stage 0.
  always_comb begin
    out_valid = p3.valid && (p3.kind == PKT_DATA);
    out_meta  = p3.meta;
    out_drop  = out_valid && p3.drop;
    mir_valid = out_valid && p3.mirror;
    mir.kind  = p3.mirror_kind;
    mir.pay   = p3.pay;
  end

endmodule
