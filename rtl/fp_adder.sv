// IEEE-754 floating-point adder/subtractor with a signed-digit significand
// adder and no sign logic.
//
// A conventional floating-point adder compares the operand magnitudes to
// decide which one to subtract from which, and so which sign the result
// gets. Here the significands are added as signed-digit numbers instead, so
// each operand simply carries its own sign into its digits and the sign of
// the result falls out of the sum. The datapath, all combinational:
//   1. exponent subtractor: d = ea - eb; a multiplexer routes the operand
//      with the larger exponent to the "big" side (no magnitude compare);
//   2. barrel shifter: the other significand is shifted right by |d| in one
//      pass, three extra low bits (guard, round, sticky) keep what falls off;
//   3. BSD stage: each aligned significand becomes a binary signed-digit word
//      whose digits are +1 or -1 according to that operand's sign, and the
//      two are added by the carry-free rbsd_adder;
//   4. HSD stage: the BSD sum P - N is folded into hybrid signed-digit form
//      by one hsd_adder (P plus the two's complement of N), whose carries
//      ripple over at most SPACING digits; this HSD word is the adder's sum;
//   5. the HSD sum is converted to binary (hsd_to_bin), its sign taken from
//      the top bit and its magnitude normalised with a leading-zero count;
//   6. round to nearest, ties to even, and pack.
// The exponent subtractor, multiplexer, barrel shifter, BSD + HSD addition
// and the absence of sign logic follow the adder this design is built
// around. How the BSD sum is folded into HSD form, the guard/round/sticky
// width and the special-value rules are this design's own choices:
//   * zero and subnormal inputs count as zero; a result below the normal
//     range is flushed to a zero of the result's sign;
//   * an exact zero sum is +0, except (-0) + (-0) = -0;
//   * overflow gives infinity; NaN in, or inf - inf, gives the quiet NaN.
//
// Interface: a, b the operands, sub = 1 for a - b, y the result, all
// {sign, exponent, fraction} of EXP_W + FRAC_W + 1 bits.
module fp_adder
  import hsd_pkg::*;
#(
  parameter int unsigned EXP_W   = EXP_W_DEF,
  parameter int unsigned FRAC_W  = FRAC_W_DEF,
  parameter int unsigned SPACING = SD_SPACING_DEF
) (
  input  logic [EXP_W+FRAC_W:0] a,
  input  logic [EXP_W+FRAC_W:0] b,
  input  logic                  sub,
  output logic [EXP_W+FRAC_W:0] y
);

  localparam int unsigned M    = FRAC_W + 1;          // significand width
  localparam int unsigned WA   = M + 3;               // aligned width (G, R, S)
  localparam int unsigned SHW  = $clog2(WA + 1);      // shift amount width
  localparam int unsigned WD   = WA + 2;              // BSD operand digits
  localparam int unsigned WS   = WD + 1;              // BSD / HSD sum digits
  localparam int unsigned WM   = WA + 1;              // sum magnitude width
  localparam int unsigned EMAX = (1 << EXP_W) - 1;

  // ---- unpack -------------------------------------------------------------
  logic              sa, sb;
  logic [EXP_W-1:0]  ea, eb;
  logic [FRAC_W-1:0] fa, fb;
  logic              za, zb, ia, ib, na, nb;
  logic [M-1:0]      ma, mb;

  assign {sa, ea, fa} = a;
  assign sb = b[EXP_W+FRAC_W] ^ sub;
  assign eb = b[EXP_W+FRAC_W-1 -: EXP_W];
  assign fb = b[FRAC_W-1:0];

  assign za = (ea == '0);
  assign zb = (eb == '0);
  assign ia = (ea == EXP_W'(EMAX)) && (fa == '0);
  assign ib = (eb == EXP_W'(EMAX)) && (fb == '0);
  assign na = (ea == EXP_W'(EMAX)) && (fa != '0);
  assign nb = (eb == EXP_W'(EMAX)) && (fb != '0);
  assign ma = za ? '0 : {1'b1, fa};
  assign mb = zb ? '0 : {1'b1, fb};

  // ---- exponent subtractor and swap multiplexer ---------------------------
  logic [EXP_W:0]   diff;      // ea - eb, two's complement
  logic             swap;
  logic [EXP_W:0]   dmag;
  logic [SHW-1:0]   shamt;
  logic [EXP_W-1:0] e_big;
  logic [M-1:0]     m_big, m_small;
  logic             s_big, s_small;

  assign diff  = {1'b0, ea} - {1'b0, eb};
  assign swap  = diff[EXP_W];
  assign dmag  = swap ? (~diff + 1'b1) : diff;
  assign shamt = (dmag > (EXP_W+1)'((1 << SHW) - 1)) ? '1 : dmag[SHW-1:0];
  assign e_big   = swap ? eb : ea;
  assign m_big   = swap ? mb : ma;
  assign m_small = swap ? ma : mb;
  assign s_big   = swap ? sb : sa;
  assign s_small = swap ? sa : sb;

  // ---- barrel shifter alignment -------------------------------------------
  logic [WA-1:0] al_raw, al_small, al_big;
  logic          al_sticky;

  barrel_shifter #(.W(WA), .SHW(SHW)) u_align (
    .in    ({m_small, 3'b000}),
    .shamt (shamt),
    .out   (al_raw),
    .sticky(al_sticky)
  );

  assign al_small = al_raw | WA'(al_sticky);
  assign al_big   = {m_big, 3'b000};

  // ---- BSD stage: sign goes into the digits, carry-free addition ----------
  logic [WD-1:0] x_p, x_n, y_p, y_n;
  logic [WS-1:0] z_p, z_n;

  assign x_p = s_big   ? '0 : WD'(al_big);
  assign x_n = s_big   ? WD'(al_big) : '0;
  assign y_p = s_small ? '0 : WD'(al_small);
  assign y_n = s_small ? WD'(al_small) : '0;

  rbsd_adder #(.N(WD)) u_bsd (
    .a_p(x_p), .a_n(x_n),
    .b_p(y_p), .b_n(y_n),
    .s_p(z_p), .s_n(z_n)
  );

  // ---- HSD stage: P + (-N) with bounded carry chains ----------------------
  logic [WS-1:0] nn;
  logic [WS-1:0] h_p, h_n;
  logic          h_co_p, h_co_n;   // weight 2^WS, dropped: the sum fits in WS bits

  assign nn = ~z_n;

  hsd_adder #(.W(WS), .SPACING(SPACING)) u_hsd (
    .a_p   (z_p),
    .a_n   ('0),
    .b_p   ({1'b0, nn[WS-2:0]}),
    .b_n   ({nn[WS-1], {(WS-1){1'b0}}}),
    .cin   (1'b1),
    .s_p   (h_p),
    .s_n   (h_n),
    .cout_p(h_co_p),
    .cout_n(h_co_n)
  );

  // ---- HSD -> binary, normalise, round, pack ------------------------------
  logic [WS-1:0] sum_bin;

  hsd_to_bin #(.W(WS)) u_conv (
    .in_p(h_p),
    .in_n(h_n),
    .out (sum_bin)
  );

  always_comb begin
    logic          neg;
    logic [WM-1:0] mag, norm;
    int unsigned   lz;
    int            e;
    logic [M-1:0]  keep;
    logic          g, st;
    logic [M:0]    sig;

    neg     = sum_bin[WS-1];
    mag     = neg ? WM'(~sum_bin + 1'b1) : WM'(sum_bin);
    lz      = lzc(64'(mag), WM);
    norm    = mag << lz;
    keep    = norm[WM-1 -: M];
    g       = norm[WM-1-M];
    st      = |norm[WM-2-M:0];
    e       = int'(e_big) + 1 - int'(lz);
    sig     = {1'b0, keep} + ((g && (st || keep[0])) ? (M+1)'(1) : '0);
    if (sig[M]) begin
      sig = sig >> 1;
      e   = e + 1;
    end

    if (na || nb || (ia && ib && (sa != sb)))
      y = {1'b0, {EXP_W{1'b1}}, 1'b1, {(FRAC_W-1){1'b0}}};
    else if (ia)
      y = {sa, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    else if (ib)
      y = {sb, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    else if (mag == '0)
      y = {za && zb && sa && sb, {(EXP_W+FRAC_W){1'b0}}};
    else if (e <= 0)
      y = {neg, {(EXP_W+FRAC_W){1'b0}}};
    else if (e >= int'(EMAX))
      y = {neg, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    else
      y = {neg, EXP_W'(e), sig[FRAC_W-1:0]};
  end

endmodule
