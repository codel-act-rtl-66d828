// recirc_path: the recirculation loop and the pipeline entry of the CoDel-ACT
// egress program.
//
// Register copies in different stages are kept in step by mirror packets: the
// end of the pipeline pushes a mirror (kind and carried register values) into
// this block, which holds it in a small FIFO standing in for the mirror session
// and the traffic manager, and sends it into the egress pipeline again.
// Mirrors take priority over new data packets: while the FIFO holds one,
// in_ready is low and the data packet waits (a one-cycle stall per mirror). The
// FIFO, its depth and the priority are this design's choices.
//
// Because at most one mirror is pushed per cycle and one is popped in every
// cycle the FIFO is not empty, it never holds more than one entry; an
// assertion checks that a push never meets a full FIFO.
//
// Interface: in_valid/in_ready/in_meta is a valid-ready handshake for data
// packets; mir_valid/mir is a push without backpressure; out_p is the
// registered pipeline slot (one cycle of latency); recirc pulses with out_p
// when the slot holds a recirculated packet.
module recirc_path
  import codel_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  data_meta_t in_meta,
  input  logic       mir_valid,
  input  mirror_t    mir,
  output pipe_t      out_p,
  output logic       recirc
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  mirror_t         mem [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;
  logic [AW:0]     level;
  logic            empty, full, pop, push;

  always_comb begin
    empty    = (level == '0);
    full     = (level == (AW+1)'(DEPTH));
    pop      = !empty;
    push     = mir_valid;
    in_ready = empty;
  end

  always_ff @(posedge clk) begin
    if (push && !full) mem[wr_ptr] <= mir;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      level  <= '0;
      out_p  <= PIPE_IDLE;
      recirc <= 1'b0;
    end else begin
      if (push && !full) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)           rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      level <= level + (AW+1)'(push && !full) - (AW+1)'(pop);

      out_p  <= PIPE_IDLE;
      recirc <= pop;
      if (pop) begin
        out_p.valid <= 1'b1;
        out_p.kind  <= mem[rd_ptr].kind;
        out_p.pay   <= mem[rd_ptr].pay;
      end else if (in_valid) begin
        out_p.valid <= 1'b1;
        out_p.kind  <= PKT_DATA;
        out_p.meta  <= in_meta;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("recirculation FIFO overflow");

endmodule
