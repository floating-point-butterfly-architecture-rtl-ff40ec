// Hybrid signed-digit (HSD) adder.
//
// Adds two W-digit HSD numbers and a carry-in, giving a W-digit HSD sum and a
// carry-out digit. Signed positions (see hsd_pkg::sd_signed) hold digits in
// {-1,0,1}; the positions between them hold plain bits {0,1}.
//
// How it works. At an unsigned position the two bits and the incoming carry
// (in {-1,0,1}) are added like a full adder that also accepts a negative
// carry: the sum bit is the value mod 2 and the carry-out is in {-1,0,1}.
// At a signed position the carry-out (transfer digit t) is chosen from the
// two operand digits and from the two digits one position lower only, never
// from the incoming carry, so a carry chain stops at every signed digit:
//   * if the lower position will send a carry in {0,1} (lower unsigned bits
//     not both 0, or lower signed digits both non-negative), the interim sum
//     w is kept in {-1,0};
//   * otherwise the lower carry is in {-1,0} and w is kept in {0,1};
// so the final digit s = w + carry-in always stays in {-1,0,1}. The longest
// ripple is therefore SPACING positions, whatever W is. With every position
// signed (SPACING = 1) this reduces to the carry-free BSD addition.
//
// The signed/unsigned layout and the two-step signed-digit rule follow the
// hybrid signed-digit scheme; the look-at-the-lower-position rule that makes
// the transfer independent of the carry-in is this design's own choice.
//
// Interface: a_p/a_n and b_p/b_n are the plus/minus vectors of the operands
// (minus bits at unsigned positions must be 0), cin is a carry of +1 into
// digit 0, s_p/s_n the sum, cout_p/cout_n the carry-out digit of weight 2^W.
// Dropping the carry-out gives the sum modulo 2^W. s_n is constant 0 at the
// unsigned positions, as the HSD format requires. Purely combinational.
module hsd_adder
  import hsd_pkg::*;
#(
  parameter int unsigned W       = 32,
  parameter int unsigned SPACING = SD_SPACING_DEF
) (
  input  logic [W-1:0] a_p,
  input  logic [W-1:0] a_n,
  input  logic [W-1:0] b_p,
  input  logic [W-1:0] b_n,
  input  logic         cin,
  output logic [W-1:0] s_p,
  output logic [W-1:0] s_n,
  output logic         cout_p,
  output logic         cout_n
);

  always_comb begin
    int c;        // carry into the current position, in {-1,0,1}
    int u;        // operand digit sum at the current position
    int v;
    int t;
    int w;
    bit low_pos;  // lower position will send a carry in {0,1}
    c = cin ? 1 : 0;
    s_p = '0;
    s_n = '0;
    for (int i = 0; i < int'(W); i++) begin
      if (sd_signed(i, W, SPACING)) begin
        u = int'(a_p[i]) - int'(a_n[i]) + int'(b_p[i]) - int'(b_n[i]);
        if (i == 0)
          low_pos = 1'b1;                              // carry-in is 0 or +1
        else if (sd_signed(i - 1, W, SPACING))
          low_pos = !(a_n[i-1] || b_n[i-1]);
        else
          low_pos = a_p[i-1] || b_p[i-1];
        if (low_pos) begin
          // keep w in {-1,0}
          if (u >= 1)       begin t = 1;  w = u - 2; end
          else if (u == -2) begin t = -1; w = 0;     end
          else              begin t = 0;  w = u;     end
        end else begin
          // keep w in {0,1}
          if (u == 2)       begin t = 1;  w = 0;     end
          else if (u <= -1) begin t = -1; w = u + 2; end
          else              begin t = 0;  w = u;     end
        end
        v = w + c;
        s_p[i] = (v == 1);
        s_n[i] = (v == -1);
        c = t;
      end else begin
        v = int'(a_p[i]) + int'(b_p[i]) + c;         // -1 .. 3
        s_p[i] = v[0];
        c = (v - int'(v[0])) / 2;
      end
    end
    cout_p = (c == 1);
    cout_n = (c == -1);
  end

  // Minus bits are only allowed at signed positions.
  always_comb begin
    for (int i = 0; i < int'(W); i++)
      if (!sd_signed(i, W, SPACING))
        assert (!a_n[i] && !b_n[i])
          else $error("hsd_adder: negative digit at unsigned position %0d", i);
  end

endmodule
