// Top level of the hybrid signed-digit floating-point FFT arithmetic.
//
// Holds the two pieces of hardware of the design side by side:
//   * the radix-2 floating-point butterfly (fp_butterfly), built from
//     Booth/HSD floating-point multipliers and BSD+HSD floating-point adders
//     with barrel-shifter alignment, one butterfly per clock, one cycle of
//     latency;
//   * the sequential shift-and-add multiplier (shift_add_multiplier), the
//     one-digit-per-clock significand multiplier, with its own start/done
//     handshake, N cycles per product.
// The two share only the clock and reset; their ports are brought out
// unchanged. Defaults: IEEE-754 single precision, a signed digit every
// fourth position, 24-bit (single-precision significand) shift-and-add
// multiplier.
module hsd_fft_top
  import hsd_pkg::*;
#(
  parameter int unsigned EXP_W   = EXP_W_DEF,
  parameter int unsigned FRAC_W  = FRAC_W_DEF,
  parameter int unsigned SPACING = SD_SPACING_DEF,
  parameter int unsigned MUL_N   = FRAC_W_DEF + 1,
  localparam int unsigned FW     = EXP_W + FRAC_W + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // butterfly
  input  logic               bf_in_valid,
  input  logic [FW-1:0]      bf_a_re,
  input  logic [FW-1:0]      bf_a_im,
  input  logic [FW-1:0]      bf_b_re,
  input  logic [FW-1:0]      bf_b_im,
  input  logic [FW-1:0]      bf_w_re,
  input  logic [FW-1:0]      bf_w_im,
  output logic               bf_out_valid,
  output logic [FW-1:0]      bf_x_re,
  output logic [FW-1:0]      bf_x_im,
  output logic [FW-1:0]      bf_y_re,
  output logic [FW-1:0]      bf_y_im,
  // shift-and-add multiplier
  input  logic               sam_start,
  input  logic [MUL_N-1:0]   sam_a,
  input  logic [MUL_N-1:0]   sam_b,
  output logic               sam_busy,
  output logic               sam_done,
  output logic [2*MUL_N-1:0] sam_p
);

  fp_butterfly #(.EXP_W(EXP_W), .FRAC_W(FRAC_W), .SPACING(SPACING)) u_bf (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (bf_in_valid),
    .a_re     (bf_a_re),
    .a_im     (bf_a_im),
    .b_re     (bf_b_re),
    .b_im     (bf_b_im),
    .w_re     (bf_w_re),
    .w_im     (bf_w_im),
    .out_valid(bf_out_valid),
    .x_re     (bf_x_re),
    .x_im     (bf_x_im),
    .y_re     (bf_y_re),
    .y_im     (bf_y_im)
  );

  shift_add_multiplier #(.N(MUL_N)) u_sam (
    .clk  (clk),
    .rst_n(rst_n),
    .start(sam_start),
    .a    (sam_a),
    .b    (sam_b),
    .busy (sam_busy),
    .done (sam_done),
    .p    (sam_p)
  );

endmodule
