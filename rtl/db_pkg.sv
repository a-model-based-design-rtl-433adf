// Shared types and arithmetic for the multi-set delayed-buffering (DB)
// floating-point accumulator and the cubic SVM kernel built on it.
//
// Every operand travelling through the accumulator is a pair of an IEEE-754
// single-precision value and a set identifier (SID) naming the input vector
// it belongs to. The SID width is chosen so that the counter can tell apart
// the at most ceil(5p/3) vectors that can be inside the accumulator at once
// (p = 11 gives 19 sets, 5 bits); that bound is the one the delayed-buffering
// method is known for, the width derived from it is this design's choice.
//
// fp32_add and fp32_mul are the combinational cores of the "adder with
// latency" and "multiplier with latency" blocks: round to nearest even,
// subnormal inputs and results flushed to signed zero, infinities handled,
// any NaN input or invalid operation returns the quiet NaN 0x7FC00000.
// The flush-to-zero and NaN choices are this design's own.
package db_pkg;

  localparam int unsigned FP_W    = 32;
  localparam int unsigned P_DEF   = 11;                        // adder latency p
  localparam int unsigned MAX_SETS = (5 * P_DEF + 2) / 3;      // ceil(5p/3)
  localparam int unsigned SID_W   = $clog2(MAX_SETS + 1);
  localparam int unsigned NSID    = 1 << SID_W;

  typedef logic [FP_W-1:0]  fp32_t;
  typedef logic [SID_W-1:0] sid_t;

  // One operand of the accumulator: value tagged with its set identifier.
  typedef struct packed {
    fp32_t data;
    sid_t  sid;
  } item_t;

  // Sources of the adder's A input (A_Switch).
  typedef enum logic [1:0] {A_IN = 2'd0, A_IBUF = 2'd1, A_RBUF = 2'd2} a_sel_t;
  // Sources of the adder's B input (B_Switch).
  typedef enum logic [1:0] {B_SUM = 2'd0, B_IBUF = 2'd1, B_ZERO = 2'd2, B_IN = 2'd3} b_sel_t;
  // Read modes of the input buffer: 1 = one cell to A, 2 = a pair to A and B,
  // 3 = one cell to B.
  typedef enum logic [1:0] {IB_NONE = 2'd0, IB_A = 2'd1, IB_PAIR = 2'd2, IB_B = 2'd3} ib_mode_t;

  // Operation chosen by the main control logic for the adder in one cycle.
  typedef enum logic [3:0] {
    OP_NONE     = 4'd0,  // adder idle
    OP_IN_SUM   = 4'd1,  // input element + adder output of the same set
    OP_SUM_RBUF = 4'd2,  // adder output + buffered sum of the same set
    OP_SUM_IBUF = 4'd3,  // adder output + buffered input of the same set
    OP_IN_IBUF  = 4'd4,  // input element + buffered input of the same set
    OP_IN_ZERO  = 4'd5,  // lone input element of a finished set + 0
    OP_IB_PAIR  = 4'd6,  // two buffered inputs of the same set
    OP_RB_IB    = 4'd7,  // buffered sum + buffered input of the same set
    OP_IB_ZERO  = 4'd8   // lone buffered input of a finished set + 0
  } op_t;

  localparam fp32_t FP_QNAN = 32'h7FC0_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;

  // Number of leading zeros of a 27-bit vector (27 when it is zero).
  function automatic int unsigned lzc27(input logic [26:0] v);
    int unsigned n;
    n = 27;
    for (int i = 0; i < 27; i++) begin
      if (v[i]) n = 26 - i;
    end
    return n;
  endfunction

  // Single-precision addition, round to nearest even, flush to zero.
  function automatic fp32_t fp32_add(input fp32_t a, input fp32_t b);
    logic        sa, sb, sx, sy, so;
    logic [7:0]  ea, eb, ex, ey;
    logic [22:0] ma, mb;
    logic [26:0] mx, my, my_sh, nrm;
    logic [27:0] sum;
    logic [24:0] rnd;
    logic        sticky, inc;
    int          d, e, lz;
    fp32_t       r;
    sa = a[31]; ea = a[30:23]; ma = a[22:0];
    sb = b[31]; eb = b[30:23]; mb = b[22:0];
    if ((ea == 8'hFF && ma != 0) || (eb == 8'hFF && mb != 0)) return FP_QNAN;
    if (ea == 8'hFF && eb == 8'hFF) return (sa == sb) ? a : FP_QNAN;
    if (ea == 8'hFF) return a;
    if (eb == 8'hFF) return b;
    if (ea == 0 && eb == 0) return {sa & sb, 31'd0};
    if (ea == 0) return b;
    if (eb == 0) return a;
    // x is the operand of larger magnitude
    if ({ea, ma} >= {eb, mb}) begin
      sx = sa; ex = ea; mx = {1'b1, ma, 3'b000};
      sy = sb; ey = eb; my = {1'b1, mb, 3'b000};
    end else begin
      sx = sb; ex = eb; mx = {1'b1, mb, 3'b000};
      sy = sa; ey = ea; my = {1'b1, ma, 3'b000};
    end
    d = int'(ex) - int'(ey);
    if (d > 26) begin
      my_sh  = 27'd0;
      sticky = 1'b1;
    end else begin
      my_sh  = my >> d;
      sticky = |(my & ((27'd1 << d) - 27'd1));
    end
    my_sh[0] = my_sh[0] | sticky;
    so = sx;
    e  = int'(ex);
    if (sx == sy) begin
      sum = {1'b0, mx} + {1'b0, my_sh};
      if (sum[27]) begin
        nrm = sum[27:1];
        nrm[0] = nrm[0] | sum[0];
        e = e + 1;
      end else begin
        nrm = sum[26:0];
      end
    end else begin
      nrm = mx - my_sh;
      if (nrm == 27'd0) return 32'h0000_0000;
      lz  = int'(lzc27(nrm));
      nrm = nrm << lz;
      e   = e - lz;
    end
    if (e <= 0) return {so, 31'd0};
    inc = nrm[2] & (nrm[1] | nrm[0] | nrm[3]);
    rnd = {1'b0, nrm[26:3]} + {24'd0, inc};
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 1;
    end
    if (e >= 255) return {so, 8'hFF, 23'd0};
    r = {so, 8'(e), rnd[22:0]};
    return r;
  endfunction

  // Single-precision multiplication, round to nearest even, flush to zero.
  function automatic fp32_t fp32_mul(input fp32_t a, input fp32_t b);
    logic        s, g, st, inc;
    logic [7:0]  ea, eb;
    logic [22:0] ma, mb;
    logic [47:0] prod;
    logic [24:0] rnd;
    logic [23:0] m;
    int          e;
    s  = a[31] ^ b[31];
    ea = a[30:23]; ma = a[22:0];
    eb = b[30:23]; mb = b[22:0];
    if ((ea == 8'hFF && ma != 0) || (eb == 8'hFF && mb != 0)) return FP_QNAN;
    if (ea == 8'hFF || eb == 8'hFF) begin
      if (ea == 0 || eb == 0) return FP_QNAN;
      return {s, 8'hFF, 23'd0};
    end
    if (ea == 0 || eb == 0) return {s, 31'd0};
    prod = {1'b1, ma} * {1'b1, mb};
    e    = int'(ea) + int'(eb) - 127;
    if (prod[47]) begin
      m  = prod[47:24];
      g  = prod[23];
      st = |prod[22:0];
      e  = e + 1;
    end else begin
      m  = prod[46:23];
      g  = prod[22];
      st = |prod[21:0];
    end
    if (e <= 0) return {s, 31'd0};
    inc = g & (st | m[0]);
    rnd = {1'b0, m} + {24'd0, inc};
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e), rnd[22:0]};
  endfunction

endpackage
