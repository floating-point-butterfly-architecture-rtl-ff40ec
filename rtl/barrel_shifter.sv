// Logarithmic barrel shifter (right shift) with sticky bit.
//
// Shifts a W-bit word right by any amount 0 .. 2^SHW-1 in one pass through
// SHW multiplexer stages; stage k shifts by 2^k when bit k of the amount is
// set. Every bit pushed out past position 0 is ORed into a sticky flag, which
// the floating-point adder needs for correct rounding. Using one such shifter
// instead of a one-place-per-clock shift register is what lets significand
// alignment finish in a single cycle.
//
// Interface: in the word, shamt the shift amount, out the shifted word and
// sticky the OR of all bits shifted out. Purely combinational.
module barrel_shifter #(
  parameter int unsigned W   = 27,
  parameter int unsigned SHW = 5
) (
  input  logic [W-1:0]   in,
  input  logic [SHW-1:0] shamt,
  output logic [W-1:0]   out,
  output logic           sticky
);

  always_comb begin
    logic [W-1:0] v;
    logic [W-1:0] lost_mask;
    logic         st;
    v  = in;
    st = 1'b0;
    for (int k = 0; k < int'(SHW); k++) begin
      // stage k: shift by 2^k when shamt[k] is set
      lost_mask = '0;
      for (int j = 0; j < int'(W); j++)
        if (j < (1 << k)) lost_mask[j] = 1'b1;
      if (shamt[k]) begin
        st = st | (|(v & lost_mask));
        v  = v >> (1 << k);
      end
    end
    out    = v;
    sticky = st;
  end

endmodule
