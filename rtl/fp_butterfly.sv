// Radix-2 decimation-in-time floating-point FFT butterfly.
//
// Computes, for complex inputs A, B and twiddle factor W,
//     X = A + W*B,     Y = A - W*B.
// The complex product W*B takes four floating-point multipliers
// (fp_multiplier, with HSD partial product reduction) and two floating-point
// adders; the butterfly sums take four more (fp_adder, with BSD + HSD
// significand addition and no sign logic):
//     t_re = B_re*W_re - B_im*W_im      t_im = B_re*W_im + B_im*W_re
//     X_re = A_re + t_re   X_im = A_im + t_im
//     Y_re = A_re - t_re   Y_im = A_im - t_im
// Each multiplier feeds an adder directly, as in the butterfly this design
// is built around. The arithmetic is combinational; the four results are
// registered once, so a butterfly is accepted every cycle and its result
// appears one cycle after in_valid (out_valid marks it). The output register
// and the valid flag are this design's own choice.
//
// Interface: clk, rst_n (active-low, asynchronous, clears out_valid only);
// in_valid with a_*, b_*, w_* the operands; out_valid with x_*, y_* the
// results. All values are IEEE-754 words of EXP_W + FRAC_W + 1 bits.
module fp_butterfly
  import hsd_pkg::*;
#(
  parameter int unsigned EXP_W   = EXP_W_DEF,
  parameter int unsigned FRAC_W  = FRAC_W_DEF,
  parameter int unsigned SPACING = SD_SPACING_DEF,
  localparam int unsigned FW     = EXP_W + FRAC_W + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [FW-1:0] a_re,
  input  logic [FW-1:0] a_im,
  input  logic [FW-1:0] b_re,
  input  logic [FW-1:0] b_im,
  input  logic [FW-1:0] w_re,
  input  logic [FW-1:0] w_im,
  output logic          out_valid,
  output logic [FW-1:0] x_re,
  output logic [FW-1:0] x_im,
  output logic [FW-1:0] y_re,
  output logic [FW-1:0] y_im
);

  logic [FW-1:0] p_rr, p_ii, p_ri, p_ir;   // B_re*W_re, B_im*W_im, B_re*W_im, B_im*W_re
  logic [FW-1:0] t_re, t_im;
  logic [FW-1:0] x_re_d, x_im_d, y_re_d, y_im_d;

  fp_multiplier #(.EXP_W(EXP_W), .FRAC_W(FRAC_W), .SPACING(SPACING))
    u_mul_rr (.a(b_re), .b(w_re), .y(p_rr));
  fp_multiplier #(.EXP_W(EXP_W), .FRAC_W(FRAC_W), .SPACING(SPACING))
    u_mul_ii (.a(b_im), .b(w_im), .y(p_ii));
  fp_multiplier #(.EXP_W(EXP_W), .FRAC_W(FRAC_W), .SPACING(SPACING))
    u_mul_ri (.a(b_re), .b(w_im), .y(p_ri));
  fp_multiplier #(.EXP_W(EXP_W), .FRAC_W(FRAC_W), .SPACING(SPACING))
    u_mul_ir (.a(b_im), .b(w_re), .y(p_ir));

  fp_adder #(.EXP_W(EXP_W), .FRAC_W(FRAC_W), .SPACING(SPACING))
    u_add_tre (.a(p_rr), .b(p_ii), .sub(1'b1), .y(t_re));
  fp_adder #(.EXP_W(EXP_W), .FRAC_W(FRAC_W), .SPACING(SPACING))
    u_add_tim (.a(p_ri), .b(p_ir), .sub(1'b0), .y(t_im));

  fp_adder #(.EXP_W(EXP_W), .FRAC_W(FRAC_W), .SPACING(SPACING))
    u_add_xre (.a(a_re), .b(t_re), .sub(1'b0), .y(x_re_d));
  fp_adder #(.EXP_W(EXP_W), .FRAC_W(FRAC_W), .SPACING(SPACING))
    u_add_xim (.a(a_im), .b(t_im), .sub(1'b0), .y(x_im_d));
  fp_adder #(.EXP_W(EXP_W), .FRAC_W(FRAC_W), .SPACING(SPACING))
    u_add_yre (.a(a_re), .b(t_re), .sub(1'b1), .y(y_re_d));
  fp_adder #(.EXP_W(EXP_W), .FRAC_W(FRAC_W), .SPACING(SPACING))
    u_add_yim (.a(a_im), .b(t_im), .sub(1'b1), .y(y_im_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      x_re <= x_re_d;
      x_im <= x_im_d;
      y_re <= y_re_d;
      y_im <= y_im_d;
    end
  end

endmodule
