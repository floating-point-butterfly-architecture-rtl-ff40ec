// Carry-free redundant binary signed-digit (RBSD/BSD) adder.
//
// Every digit of both operands is in {-1,0,1}. The addition takes two steps
// and no carry travels further than one position:
//   1. at each position i the operand digits are split as
//      A_i + B_i = 2*t_(i+1) + w_i  (transfer digit t, interim sum w);
//   2. the final digit is s_i = w_i + t_i.
// Whether w is kept in {-1,0} or in {0,1} (the two choices for a digit sum of
// +1 or -1) depends on the digits one position lower: if neither of them is
// negative the transfer arriving from below is in {0,1} and w is kept in
// {-1,0}, otherwise the transfer is in {-1,0} and w is kept in {0,1}. This
// guarantees s_i in {-1,0,1}. The two-step split and the digit table follow
// the classic carry-free signed-digit addition; the result has N+1 digits.
//
// Interface: a_p/a_n, b_p/b_n plus/minus vectors of the operands, each digit
// with at most one of its two bits set; s_p/s_n the (N+1)-digit sum.
// Purely combinational.
module rbsd_adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a_p,
  input  logic [N-1:0] a_n,
  input  logic [N-1:0] b_p,
  input  logic [N-1:0] b_n,
  output logic [N:0]   s_p,
  output logic [N:0]   s_n
);

  // t_q[i] is the transfer digit into position i (t_q[0] = 0).
  logic signed [1:0] t_q [N+1];
  logic signed [1:0] w_q [N];

  always_comb begin
    int  u;
    bit  low_nonneg;
    t_q[0] = 2'sd0;
    for (int i = 0; i < int'(N); i++) begin
      u = int'(a_p[i]) - int'(a_n[i]) + int'(b_p[i]) - int'(b_n[i]);
      low_nonneg = (i == 0) ? 1'b1 : !(a_n[i-1] || b_n[i-1]);
      unique case (u)
        2:  begin t_q[i+1] = 2'sd1;  w_q[i] = 2'sd0; end
        -2: begin t_q[i+1] = -2'sd1; w_q[i] = 2'sd0; end
        1:  if (low_nonneg) begin t_q[i+1] = 2'sd1; w_q[i] = -2'sd1; end
            else            begin t_q[i+1] = 2'sd0; w_q[i] = 2'sd1;  end
        -1: if (low_nonneg) begin t_q[i+1] = 2'sd0;  w_q[i] = -2'sd1; end
            else            begin t_q[i+1] = -2'sd1; w_q[i] = 2'sd1;  end
        default: begin t_q[i+1] = 2'sd0; w_q[i] = 2'sd0; end
      endcase
    end
  end

  always_comb begin
    int s;
    for (int i = 0; i < int'(N); i++) begin
      s = int'(w_q[i]) + int'(t_q[i]);
      s_p[i] = (s == 1);
      s_n[i] = (s == -1);
    end
    s_p[N] = (t_q[N] == 2'sd1);
    s_n[N] = (t_q[N] == -2'sd1);
  end

  // Each input digit must use at most one of its two bits.
  always_comb begin
    assert (((a_p & a_n) == '0) && ((b_p & b_n) == '0))
      else $error("rbsd_adder: non-canonical input digit");
  end

endmodule
