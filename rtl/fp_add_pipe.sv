// fp_add_pipe: pipelined IEEE-754 floating-point adder with ALPHA stages.
//
// The reduction circuits are built from alpha-stage pipelined floating-point
// adders that accept one addition per clock. This module is such an adder for
// any IEEE-754 binary format (EXP_W exponent bits, MAN_W fraction bits: 8/23
// for single, 11/52 for double precision). A tag of TAG_W bits travels with
// each operation and leaves with its sum, so the surrounding control knows
// which set and tree level a sum belongs to.
//
// How it works: five register stages do the arithmetic,
//   1. unpack, detect special operands, order the operands so that x has
//      the larger magnitude, and take the exponent difference;
//   2. shift y right to align it with x, folding the bits shifted out into
//      a sticky bit (three extra bits: guard, round, sticky);
//   3. add or subtract the significands;
//   4. normalise: one step right after a carry, or left by the leading-zero
//      count after a cancelling subtraction;
//   5. round to nearest even, detect overflow and underflow, and pack;
// and ALPHA-5 further registers bring the latency to exactly ALPHA cycles,
// which is what the reduction circuits depend on. ALPHA must be at least 5.
//
// Number handling (this design's choice; only "IEEE format" is required):
// round to nearest even; subnormal inputs are read as zero and results
// below the normal range are flushed to zero of the same sign; infinities
// add as IEEE specifies; any NaN operand or inf + (-inf) yields the quiet
// NaN with sign 0 and fraction MSB set. Exceptions are not signalled.
//
// Interface and timing: in_valid/in_a/in_b/in_tag sampled at a rising clk
// edge appear as out_valid/out_sum/out_tag ALPHA rising edges later. There
// is no back-pressure: a new operation may enter every cycle. rst_n is an
// active-low synchronous reset that clears the valid bits only.
module fp_add_pipe #(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52,
  parameter int unsigned ALPHA = 14,
  parameter int unsigned TAG_W = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [EXP_W+MAN_W:0]     in_a,
  input  logic [EXP_W+MAN_W:0]     in_b,
  input  logic [TAG_W-1:0]         in_tag,
  output logic                     out_valid,
  output logic [EXP_W+MAN_W:0]     out_sum,
  output logic [TAG_W-1:0]         out_tag
);

  localparam int unsigned W     = EXP_W + MAN_W + 1;
  localparam int unsigned SW    = MAN_W + 4;          // 1.fraction + G,R,S
  localparam int unsigned XW    = EXP_W + 2;          // signed exponent width
  localparam int unsigned DW    = $clog2(SW + 1);     // alignment shift width
  localparam int unsigned STAGES = 5;                 // arithmetic stages
  localparam logic [EXP_W-1:0] EMAX = '1;

  initial begin
    assert (ALPHA >= STAGES) else $error("fp_add_pipe: ALPHA must be at least 5");
  end

  // ---------------- stage 1: unpack, special cases, order ----------------
  typedef struct packed {
    logic                 special;   // result already known (zero, inf, NaN)
    logic [W-1:0]         spec_val;
    logic                 sx;
    logic                 sub;       // effective subtraction
    logic [EXP_W-1:0]     ex;
    logic [SW-1:0]        mx;        // {1, fraction, 000}
    logic [SW-1:0]        my;
    logic [DW-1:0]        d;         // exponent difference, saturated to SW
  } s1_t;

  typedef struct packed {
    logic                 special;
    logic [W-1:0]         spec_val;
    logic                 sx;
    logic                 sub;
    logic [EXP_W-1:0]     ex;
    logic [SW-1:0]        mx;
    logic [SW-1:0]        my_sh;     // aligned y with sticky in bit 0
  } s2_t;

  typedef struct packed {
    logic                 special;
    logic [W-1:0]         spec_val;
    logic                 sr;
    logic [EXP_W-1:0]     ex;
    logic                 sub;
    logic [SW:0]          sum;
  } s3_t;

  typedef struct packed {
    logic                 special;
    logic [W-1:0]         spec_val;
    logic                 sr;
    logic signed [XW-1:0] er;
    logic [SW-1:0]        norm;      // hidden bit at SW-1
  } s4_t;

  s1_t s1_n, s1_q;
  s2_t s2_n, s2_q;
  s3_t s3_n, s3_q;
  s4_t s4_n, s4_q;
  logic [W-1:0] s5_n;

  always_comb begin
    logic             sa, sb;
    logic [EXP_W-1:0] ea, eb;
    logic [MAN_W-1:0] fa, fb;
    logic             a_zero, b_zero, a_inf, b_inf, a_nan, b_nan, a_big;
    int unsigned      diff;

    {sa, ea, fa} = in_a;
    {sb, eb, fb} = in_b;
    a_zero = (ea == '0);
    b_zero = (eb == '0);
    a_inf  = (ea == EMAX) && (fa == '0);
    b_inf  = (eb == EMAX) && (fb == '0);
    a_nan  = (ea == EMAX) && (fa != '0);
    b_nan  = (eb == EMAX) && (fb != '0);

    s1_n.special  = 1'b1;
    s1_n.spec_val = '0;
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      s1_n.spec_val = {1'b0, EMAX, 1'b1, {(MAN_W-1){1'b0}}};
    else if (a_inf)           s1_n.spec_val = {sa, EMAX, {MAN_W{1'b0}}};
    else if (b_inf)           s1_n.spec_val = {sb, EMAX, {MAN_W{1'b0}}};
    else if (a_zero && b_zero) s1_n.spec_val = {sa & sb, {(W-1){1'b0}}};
    else if (a_zero)          s1_n.spec_val = in_b;
    else if (b_zero)          s1_n.spec_val = in_a;
    else                      s1_n.special  = 1'b0;

    a_big   = ({ea, fa} >= {eb, fb});
    s1_n.sx  = a_big ? sa : sb;
    s1_n.sub = (sa != sb);
    s1_n.ex  = a_big ? ea : eb;
    s1_n.mx  = a_big ? {1'b1, fa, 3'b000} : {1'b1, fb, 3'b000};
    s1_n.my  = a_big ? {1'b1, fb, 3'b000} : {1'b1, fa, 3'b000};
    diff     = a_big ? int'(ea) - int'(eb) : int'(eb) - int'(ea);
    s1_n.d   = (diff >= SW) ? DW'(SW) : DW'(diff);
  end

  // ---------------- stage 2: align ----------------
  always_comb begin
    logic sticky;
    s2_n.special  = s1_q.special;
    s2_n.spec_val = s1_q.spec_val;
    s2_n.sx       = s1_q.sx;
    s2_n.sub      = s1_q.sub;
    s2_n.ex       = s1_q.ex;
    s2_n.mx       = s1_q.mx;
    if (int'(s1_q.d) >= int'(SW)) begin
      s2_n.my_sh = '0;
      sticky     = 1'b1;
    end else begin
      s2_n.my_sh = s1_q.my >> s1_q.d;
      sticky     = ((s2_n.my_sh << s1_q.d) != s1_q.my);
    end
    s2_n.my_sh[0] = s2_n.my_sh[0] | sticky;
  end

  // ---------------- stage 3: add or subtract ----------------
  always_comb begin
    s3_n.special  = s2_q.special;
    s3_n.spec_val = s2_q.spec_val;
    s3_n.sr       = s2_q.sx;
    s3_n.ex       = s2_q.ex;
    s3_n.sub      = s2_q.sub;
    if (s2_q.sub) s3_n.sum = {1'b0, s2_q.mx} - {1'b0, s2_q.my_sh};
    else          s3_n.sum = {1'b0, s2_q.mx} + {1'b0, s2_q.my_sh};
  end

  // ---------------- stage 4: normalise ----------------
  always_comb begin
    int unsigned lz;
    lz            = 0;
    s4_n.special  = s3_q.special;
    s4_n.spec_val = s3_q.spec_val;
    s4_n.sr       = s3_q.sr;
    s4_n.er       = XW'(s3_q.ex);
    s4_n.norm     = s3_q.sum[SW-1:0];
    if (s3_q.sum[SW]) begin
      // carry out of an addition: one step right, keep the sticky bit
      s4_n.norm    = s3_q.sum[SW:1];
      s4_n.norm[0] = s3_q.sum[1] | s3_q.sum[0];
      s4_n.er      = s4_n.er + 1;
    end else if (s3_q.sub) begin
      if (s3_q.sum == '0 && !s3_q.special) begin
        // exact cancellation gives +0
        s4_n.special  = 1'b1;
        s4_n.spec_val = '0;
      end else begin
        lz = SW;
        for (int i = 0; i < int'(SW); i++)
          if (s3_q.sum[i]) lz = SW - 1 - i;
        s4_n.norm = s3_q.sum[SW-1:0] << lz;
        s4_n.er   = s4_n.er - XW'(lz);
      end
    end
  end

  // ---------------- stage 5: round, range check, pack ----------------
  always_comb begin
    logic                 round_up;
    logic [MAN_W:0]       fr;
    logic signed [XW-1:0] er;
    round_up = s4_q.norm[2] && (s4_q.norm[1] || s4_q.norm[0] || s4_q.norm[3]);
    fr       = {1'b0, s4_q.norm[SW-2:3]} + (MAN_W+1)'(round_up);
    er       = s4_q.er;
    if (fr[MAN_W]) er = er + 1;   // rounding carried into a new bit
    if (s4_q.special)       s5_n = s4_q.spec_val;
    else if (er <= 0)       s5_n = {s4_q.sr, {(W-1){1'b0}}};           // flush to zero
    else if (er >= XW'(EMAX)) s5_n = {s4_q.sr, EMAX, {MAN_W{1'b0}}};   // overflow
    else                    s5_n = {s4_q.sr, er[EXP_W-1:0], fr[MAN_W-1:0]};
  end

  // ---------------- registers ----------------
  localparam int unsigned DL = ALPHA - STAGES + 1;   // stage-5 register + delay

  logic [ALPHA-1:0]  v_q;
  logic [TAG_W-1:0]  t_q [ALPHA];
  logic [W-1:0]      d_q [DL];

  always_ff @(posedge clk) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= (v_q << 1) | ALPHA'(in_valid);
  end

  always_ff @(posedge clk) begin
    s1_q   <= s1_n;
    s2_q   <= s2_n;
    s3_q   <= s3_n;
    s4_q   <= s4_n;
    d_q[0] <= s5_n;
    for (int i = 1; i < int'(DL); i++) d_q[i] <= d_q[i-1];
    t_q[0] <= in_tag;
    for (int i = 1; i < int'(ALPHA); i++) t_q[i] <= t_q[i-1];
  end

  assign out_valid = v_q[ALPHA-1];
  assign out_sum   = d_q[DL-1];
  assign out_tag   = t_q[ALPHA-1];

endmodule
