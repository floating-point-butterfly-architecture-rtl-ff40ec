// Partial product reduction with a cascade of HSD adders.
//
// Sums NPP two's complement partial products (PW bits each, modulo 2^PW).
// Each partial product enters as an HSD number: a two's complement word is
// already an HSD word whose top digit is signed (plus bit 0, minus bit = the
// sign bit) and whose other signed positions hold plain 0/1 digits, so no
// conversion logic is needed. The partial products are then accumulated one
// after another by NPP-1 HSD adders connected in a chain; since an HSD adder
// ripples carries over at most SPACING digits, the chain's delay grows with
// NPP but not with PW. The final HSD sum is converted to binary once, by
// hsd_to_bin.
//
// Interface: pp[k] the partial products, sum their total modulo 2^PW.
// Purely combinational.
module hsd_pp_reduction
  import hsd_pkg::*;
#(
  parameter int unsigned PW      = 48,
  parameter int unsigned NPP     = 13,
  parameter int unsigned SPACING = SD_SPACING_DEF
) (
  input  logic [PW-1:0] pp [NPP],
  output logic [PW-1:0] sum
);

  logic [PW-1:0] op_p  [NPP];
  logic [PW-1:0] op_n  [NPP];
  logic [PW-1:0] acc_p [NPP];
  logic [PW-1:0] acc_n [NPP];

  // two's complement -> HSD: top bit becomes a minus digit
  for (genvar k = 0; k < int'(NPP); k++) begin : g_conv
    assign op_p[k] = {1'b0, pp[k][PW-2:0]};
    assign op_n[k] = {pp[k][PW-1], {(PW-1){1'b0}}};
  end

  assign acc_p[0] = op_p[0];
  assign acc_n[0] = op_n[0];

  for (genvar k = 1; k < int'(NPP); k++) begin : g_chain
    logic co_p, co_n;   // carry-out of weight 2^PW, dropped (modulo 2^PW)
    hsd_adder #(.W(PW), .SPACING(SPACING)) u_add (
      .a_p(acc_p[k-1]), .a_n(acc_n[k-1]),
      .b_p(op_p[k]),    .b_n(op_n[k]),
      .cin(1'b0),
      .s_p(acc_p[k]),   .s_n(acc_n[k]),
      .cout_p(co_p),    .cout_n(co_n)
    );
  end

  hsd_to_bin #(.W(PW)) u_conv (
    .in_p(acc_p[NPP-1]),
    .in_n(acc_n[NPP-1]),
    .out (sum)
  );

endmodule
