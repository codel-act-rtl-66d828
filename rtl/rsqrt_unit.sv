// rsqrt_unit: the math unit that gives CoDel's drop spacing INTERVAL/sqrt(count).
//
// The pipeline keeps drop counts doubled, so the input is x = 2*count and the
// result is INTERVAL/sqrt(x/2) = INTERVAL*sqrt(2)/sqrt(x). Feeding the math unit
// the doubled count, and adding two per drop, is how the design gets an accurate
// spacing; the way the unit works inside is this design's own choice:
//
//   x = 2^p * m, 1 <= m < 2, p = position of the leading one, p = 2q + r.
//   1/sqrt(x) = 2^-q / sqrt(m * 2^r).
//   The MANT_W bits after the leading one index a table of
//   INTERVAL*sqrt(2/(m*2^r)), one table per parity r, and the entry is shifted
//   right by q.
//
// While p <= MANT_W no bits are lost, and the "edge" tables, computed at the
// exact m, give the result to within 1 ns. Above that the dropped low bits are
// replaced by half an LSB ("mid" tables), which keeps the error below about
// 1.6 % for MANT_W = 4. Tables are computed at elaboration time by a constant
// function (integer square root), so no data file is needed.
//
// Purely combinational, used inside one pipeline stage. x = 0 is treated as
// x = 1.
module rsqrt_unit
  import codel_pkg::*;
#(
  parameter longint unsigned INTERVAL = INTERVAL_NS,  // ns
  parameter int              MANT_W   = 4             // table index bits
) (
  input  cnt_t x,    // doubled count, 2*count
  output ts_t  y     // INTERVAL / sqrt(x/2), ns
);

  localparam int NT = 1 << MANT_W;
  localparam int PW = $clog2(CNT_W);

  // floor(sqrt(v)) for a 128-bit v, bit by bit.
  function automatic logic [63:0] isqrt128(input logic [127:0] v);
    logic [63:0]  r, c;
    logic [127:0] t;
    r = '0;
    for (int b = 63; b >= 0; b--) begin
      c    = r;
      c[b] = 1'b1;
      t    = {64'd0, c};
      if (t * t <= v) r = c;
    end
    return r;
  endfunction

  // round(INTERVAL * sqrt(2*den_scale / (num * 2^r))), where num/den_scale = m.
  function automatic ts_t entry(input int unsigned num, input int unsigned den_scale,
                                input int unsigned r);
    logic [127:0] v;
    logic [63:0]  s;
    v = 128'(INTERVAL) * 128'(INTERVAL) * 128'(2 * den_scale) * 128'd4;
    v = v / (128'(num) << r);
    s = isqrt128(v);            // 2 * result, truncated
    return ts_t'((s + 64'd1) >> 1);
  endfunction

  ts_t tbl_edge [2][NT];
  ts_t tbl_mid  [2][NT];

  for (genvar r = 0; r < 2; r++) begin : g_par
    for (genvar i = 0; i < NT; i++) begin : g_ent
      localparam ts_t E_EDGE = entry(NT + i, NT, r);
      localparam ts_t E_MID  = entry(2 * NT + 2 * i + 1, 2 * NT, r);
      assign tbl_edge[r][i] = E_EDGE;
      assign tbl_mid[r][i]  = E_MID;
    end
  end

  cnt_t                xs;
  logic [PW-1:0]       p;
  logic [MANT_W-1:0]   idx;
  ts_t                 base;

  always_comb begin
    xs = (x == '0) ? cnt_t'(1) : x;
    // leading one
    p = '0;
    for (int b = 0; b < CNT_W; b++)
      if (xs[b]) p = PW'(b);
    // the MANT_W bits below the leading one, left aligned (zero filled)
    idx  = MANT_W'({xs, {MANT_W{1'b0}}} >> p);
    base = (int'(p) <= MANT_W) ? tbl_edge[p[0]][idx] : tbl_mid[p[0]][idx];
    y    = base >> (p >> 1);
  end

endmodule
