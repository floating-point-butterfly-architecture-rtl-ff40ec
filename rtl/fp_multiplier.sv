// IEEE-754 floating-point multiplier with an HSD partial product reduction.
//
// Datapath: the sign is the XOR of the operand signs; the exponents are added
// and the bias removed; the two significands (hidden bit included) are
// multiplied by a radix-4 Booth partial product generator (booth_pp_gen)
// followed by a cascade of hybrid signed-digit adders and one final HSD to
// binary conversion (hsd_pp_reduction). The 2M-bit product is normalised by
// at most one place, rounded to nearest, ties to even, and packed.
//
// The Booth generation and the HSD reduction follow the structure the
// design is built around; the handling of special values is this design's
// own choice, kept simple as is usual in FFT datapaths:
//   * zero and subnormal inputs are read as zero (flush to zero), and a
//     result below the normal range becomes a zero of the result's sign;
//   * a result above the range becomes infinity;
//   * NaN in, or zero times infinity, gives the quiet NaN 0x7FC00000 (for
//     single precision); infinity times a finite nonzero value is infinity.
//
// Interface: a, b the operands, y the product, all {sign, exponent,
// fraction} of EXP_W + FRAC_W + 1 bits. Purely combinational.
module fp_multiplier
  import hsd_pkg::*;
#(
  parameter int unsigned EXP_W   = EXP_W_DEF,
  parameter int unsigned FRAC_W  = FRAC_W_DEF,
  parameter int unsigned SPACING = SD_SPACING_DEF
) (
  input  logic [EXP_W+FRAC_W:0] a,
  input  logic [EXP_W+FRAC_W:0] b,
  output logic [EXP_W+FRAC_W:0] y
);

  localparam int unsigned M    = FRAC_W + 1;          // significand width
  localparam int unsigned PW   = 2 * M;               // product width
  localparam int unsigned NPP  = M / 2 + 1;
  localparam int unsigned BIAS = (1 << (EXP_W - 1)) - 1;
  localparam int unsigned EMAX = (1 << EXP_W) - 1;    // all-ones exponent

  logic              sa, sb, sy;
  logic [EXP_W-1:0]  ea, eb;
  logic [FRAC_W-1:0] fa, fb;
  logic              za, zb, ia, ib, na, nb;
  logic [M-1:0]      ma, mb;
  logic [PW-1:0]     pp [NPP];
  logic [PW-1:0]     prod;

  assign {sa, ea, fa} = a;
  assign {sb, eb, fb} = b;
  assign sy = sa ^ sb;

  assign za = (ea == '0);
  assign zb = (eb == '0);
  assign ia = (ea == EXP_W'(EMAX)) && (fa == '0);
  assign ib = (eb == EXP_W'(EMAX)) && (fb == '0);
  assign na = (ea == EXP_W'(EMAX)) && (fa != '0);
  assign nb = (eb == EXP_W'(EMAX)) && (fb != '0);
  assign ma = za ? '0 : {1'b1, fa};
  assign mb = zb ? '0 : {1'b1, fb};

  booth_pp_gen #(.N(M), .PW(PW), .NPP(NPP)) u_ppgen (
    .a (ma),
    .b (mb),
    .pp(pp)
  );

  hsd_pp_reduction #(.PW(PW), .NPP(NPP), .SPACING(SPACING)) u_red (
    .pp (pp),
    .sum(prod)
  );

  always_comb begin
    int          e;        // unbiased-plus-bias result exponent, may go out of range
    logic [M:0]  sig;      // rounded significand with one overflow bit
    logic        g, st;
    logic [M-1:0] keep;
    if (prod[PW-1]) begin
      keep = prod[PW-1 -: M];
      g    = prod[PW-1-M];
      st   = |prod[PW-2-M:0];
      e    = int'(ea) + int'(eb) - int'(BIAS) + 1;
    end else begin
      keep = prod[PW-2 -: M];
      g    = prod[PW-2-M];
      st   = (PW >= M + 3) ? |(prod << (M + 2)) : 1'b0;
      e    = int'(ea) + int'(eb) - int'(BIAS);
    end
    sig = {1'b0, keep} + ((g && (st || keep[0])) ? (M+1)'(1) : '0);
    if (sig[M]) begin
      sig = sig >> 1;
      e   = e + 1;
    end

    if (na || nb || (ia && zb) || (ib && za))
      y = {1'b0, {EXP_W{1'b1}}, 1'b1, {(FRAC_W-1){1'b0}}};
    else if (ia || ib)
      y = {sy, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    else if (za || zb || e <= 0)
      y = {sy, {(EXP_W+FRAC_W){1'b0}}};
    else if (e >= int'(EMAX))
      y = {sy, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    else
      y = {sy, EXP_W'(e), sig[FRAC_W-1:0]};
  end

endmodule
