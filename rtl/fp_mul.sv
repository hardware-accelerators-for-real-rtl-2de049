// fp_mul: combinational IEEE-754 binary floating-point multiplier.
//
// The default format is binary16 (half precision): sign at bit 15, a 5-bit
// biased exponent at bits 14..10 (bias 15) and a 10-bit fraction at bits
// 9..0. With EXP_W=8, MAN_W=23 the same module multiplies binary32.
// How it works: each operand is unpacked into a significand with its hidden
// bit (0 for subnormals, whose exponent is then taken as 1) and an exponent;
// the significands are multiplied exactly; the product is normalised by a
// leading-one shift; a result below the normal range is shifted right into a
// subnormal with the shifted-out bits kept as a sticky bit; the result is
// rounded to nearest, ties to even, by adding the round-up bit to the packed
// {exponent, fraction} field, so a carry out of the fraction moves the
// exponent and an overflow lands on infinity. Special cases: NaN in, or
// infinity times zero, gives the quiet NaN with only the top fraction bit
// set; infinity times non-zero gives a signed infinity; a zero operand gives
// a signed zero. No exception flags are produced.
// The format comes from the binary16 layout; the rounding mode and the
// handling of subnormals and special values are this design's choice
// (standard IEEE-754 defaults). Purely combinational: y follows a and b.
module fp_mul #(
  parameter int unsigned EXP_W = 5,
  parameter int unsigned MAN_W = 10,
  localparam int unsigned FP_W = 1 + EXP_W + MAN_W
) (
  input  logic [FP_W-1:0] a,
  input  logic [FP_W-1:0] b,
  output logic [FP_W-1:0] y
);

  localparam int unsigned SIG_W  = MAN_W + 1;      // significand with hidden bit
  localparam int unsigned PROD_W = 2 * SIG_W;      // exact product width
  localparam int          BIAS   = (1 << (EXP_W - 1)) - 1;
  localparam int          EMAX   = (1 << EXP_W) - 1;

  logic              sa, sb, sy;
  logic [EXP_W-1:0]  ea, eb;
  logic [MAN_W-1:0]  fa, fb;
  logic [SIG_W-1:0]  ma, mb;
  logic              a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic [PROD_W-1:0] prod, norm, shr;
  int                lead, exp_r, rshift;
  logic              sticky, guard, round_up;
  logic [EXP_W+MAN_W-1:0] packed_r, rounded;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sy     = sa ^ sb;
    a_zero = (ea == '0) && (fa == '0);
    b_zero = (eb == '0) && (fb == '0);
    a_inf  = (ea == '1) && (fa == '0);
    b_inf  = (eb == '1) && (fb == '0);
    a_nan  = (ea == '1) && (fa != '0);
    b_nan  = (eb == '1) && (fb != '0);
    ma     = {ea != '0, fa};
    mb     = {eb != '0, fb};

    prod = PROD_W'(ma) * PROD_W'(mb);

    // position of the leading one of the product
    lead = 0;
    for (int i = 0; i < PROD_W; i++) if (prod[i]) lead = i;

    // value = prod * 2^(ea' + eb' - 2*BIAS - 2*MAN_W), ea' = max(ea,1)
    // normalised so that the leading one sits at bit PROD_W-1
    norm  = prod << (PROD_W - 1 - lead);
    exp_r = ((ea == '0) ? 1 : int'(ea)) + ((eb == '0) ? 1 : int'(eb)) - BIAS
            - (2 * MAN_W) + lead;

    // below the normal range: shift right into the subnormal field
    rshift = (exp_r < 1) ? (1 - exp_r) : 0;
    if (rshift > PROD_W) rshift = PROD_W;
    shr    = norm >> rshift;
    sticky = 1'b0;
    for (int i = 0; i < PROD_W; i++) if (i < rshift && norm[i]) sticky = 1'b1;

    // keep MAN_W fraction bits below the leading position, then guard/sticky
    guard = shr[PROD_W - 2 - MAN_W];
    for (int i = 0; i < PROD_W - 2 - MAN_W; i++) if (shr[i]) sticky = 1'b1;
    packed_r = {(exp_r < 1) ? EXP_W'(0) : EXP_W'(exp_r), shr[PROD_W-2 -: MAN_W]};
    round_up = guard && (sticky || packed_r[0]);
    rounded  = packed_r + (EXP_W+MAN_W)'(round_up);

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};
    else if (a_inf || b_inf)
      y = {sy, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    else if (a_zero || b_zero)
      y = {sy, {(EXP_W+MAN_W){1'b0}}};
    else if (exp_r >= EMAX)
      y = {sy, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    else
      y = {sy, rounded};
  end

endmodule
