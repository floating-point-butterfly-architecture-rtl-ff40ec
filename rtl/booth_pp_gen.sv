// Radix-4 (modified Booth) partial product generator.
//
// Produces the partial products of the unsigned product A*B, where A and B
// are N-bit significands. B is extended with a zero below its LSB and two
// zeros above its MSB and read in overlapping 3-bit groups; group k gives a
// Booth digit d_k = -2*b(2k+1) + b(2k) + b(2k-1) in {-2,-1,0,1,2}, so that
// B = sum_k d_k * 4^k. Partial product k is d_k * A * 4^k, formed from A by a
// shift (for |d_k| = 2), a shift by 2k and an optional negation, and given as
// a PW-bit two's complement word (everything modulo 2^PW). Booth recoding
// halves the number of partial products that the adders have to sum.
//
// Interface: a, b the operands, pp[k] the NPP = N/2+1 partial products
// (the low 2k bits of pp[k] are always 0, from the shift by 4^k).
// Purely combinational.
module booth_pp_gen #(
  parameter int unsigned N   = 24,
  parameter int unsigned PW  = 2 * N,
  parameter int unsigned NPP = N / 2 + 1
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [PW-1:0] pp [NPP]
);

  logic [2*NPP:0] bx;   // {zeros, b, 0}

  always_comb begin
    bx = '0;
    bx[N:1] = b;
  end

  for (genvar k = 0; k < int'(NPP); k++) begin : g_pp
    logic [2:0]    grp;
    logic [PW-1:0] mag;
    assign grp = bx[2*k+2 : 2*k];
    always_comb begin
      unique case (grp)
        3'b001, 3'b010, 3'b101, 3'b110: mag = PW'(a);        // |d| = 1
        3'b011, 3'b100:                 mag = PW'(a) << 1;   // |d| = 2
        default:                        mag = '0;            // d = 0
      endcase
      // negative digits: 100, 101, 110
      if (grp[2] && !(grp[1] && grp[0]))
        pp[k] = (~mag + PW'(1)) << (2 * k);
      else
        pp[k] = mag << (2 * k);
    end
  end

endmodule
