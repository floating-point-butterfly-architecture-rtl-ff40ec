// HSD to two's complement binary converter.
//
// An HSD number is first read as an RBSD number: its plus vector P and minus
// vector N (nonzero only at the signed positions) are the RBSD form. The
// binary value is then P - N, formed as P + ~N + 1 by one carry-propagate
// adder. Converting this direction costs a full-width carry chain, whereas
// binary to HSD is free (a two's complement word is an HSD word whose top
// digit is signed).
//
// Interface: in_p/in_n the W-digit HSD (or RBSD) number, out its value
// modulo 2^W as a W-bit two's complement word. Purely combinational.
module hsd_to_bin #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] in_p,
  input  logic [W-1:0] in_n,
  output logic [W-1:0] out
);

  always_comb out = in_p + ~in_n + W'(1);

endmodule
