// chk_first_violation: first stage of the CoDel-ACT egress program.
//
// Every data packet is classified by its queue delay (sojourn time):
//   violation  = qdelay >= TARGET
//   first_viol = violation and the previous data packet did not violate
//   cycle_end  = no violation and the previous data packet did
// Each flag comes from one stateful register that is read, updated and written
// once per packet, as a switch stage allows: `dropping` yields first_viol and
// `prev_dropping` yields cycle_end; both store the packet's violation bit. A
// first violation sends the packet to codel_init; a violation that is not the
// first goes to codel_update; a cycle end makes the later stages emit a mirror
// packet that carries countU and dropNextU back to codel_init.
//
// Synchronisation (mirror) packets pass through untouched and leave the
// registers alone. One packet per cycle, one cycle of latency. Both registers
// reset to "not dropping" (a reset value of this design's choosing).
module chk_first_violation
  import codel_pkg::*;
#(
  parameter longint unsigned TARGET = TARGET_NS  // ns
) (
  input  logic  clk,
  input  logic  rst_n,
  input  pipe_t in_p,
  output pipe_t out_p,
  output logic  dropping_q,
  output logic  prev_dropping_q
);

  logic is_data, viol;

  always_comb begin
    is_data = in_p.valid && (in_p.kind == PKT_DATA);
    viol    = in_p.meta.qdelay >= ts_t'(TARGET);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dropping_q      <= 1'b0;
      prev_dropping_q <= 1'b0;
      out_p           <= PIPE_IDLE;
    end else begin
      out_p <= in_p;
      if (is_data) begin
        dropping_q       <= viol;
        prev_dropping_q  <= viol;
        out_p.violation  <= viol;
        out_p.first_viol <= viol && !dropping_q;
        out_p.cycle_end  <= !viol && prev_dropping_q;
      end else begin
        out_p.violation  <= 1'b0;
        out_p.first_viol <= 1'b0;
        out_p.cycle_end  <= 1'b0;
      end
    end
  end

endmodule
