// Half-precision configuration test (EXP_W = 5, FRAC_W = 10).
// The floating-point adder, the multiplier and the butterfly are built for
// the 16-bit IEEE-754 format and checked bit for bit against the
// half-precision reference model: exhaustive-style sweeps over random
// operand pairs for the adder and multiplier (all exponents, so overflow and
// flush to zero occur), and a stream of butterflies with one-cycle latency.
module tb_fp_half_precision;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] a, b, y_add, y_mul;
  logic        sub;

  fp_adder      #(.EXP_W(5), .FRAC_W(10)) u_add (.a(a), .b(b), .sub(sub), .y(y_add));
  fp_multiplier #(.EXP_W(5), .FRAC_W(10)) u_mul (.a(a), .b(b), .y(y_mul));

  logic        rst_n, in_valid, out_valid;
  logic [15:0] a_re, a_im, b_re, b_im, w_re, w_im, x_re, x_im, y_re, y_im;

  fp_butterfly #(.EXP_W(5), .FRAC_W(10)) u_bf (.*);

  function automatic logic [15:0] rnd_h(int elo, int ehi);
    return {1'($urandom), 5'(elo + int'($urandom_range(ehi - elo))), 10'($urandom)};
  endfunction

  initial begin
    logic [15:0] e_add, e_mul;
    logic [15:0] exp_q [4];
    logic        exp_v;
    rst_n = 1'b0; in_valid = 1'b0; exp_v = 1'b0;
    {a_re, a_im, b_re, b_im, w_re, w_im} = '0;
    for (int i = 0; i < 40000; i++) begin
      a = rnd_h(1, 30);
      b = (i % 2) ? rnd_h(1, 30) : {1'($urandom), a[14:10] ^ 5'($urandom_range(1)), 10'($urandom)};
      if (i < 64) begin
        a = (i % 8 == 0) ? 16'h7C00 : (i % 8 == 1) ? 16'h0000 : (i % 8 == 2) ? 16'h7E01 : a;
        b = (i / 8 == 0) ? 16'hFC00 : (i / 8 == 1) ? 16'h8000 : (i / 8 == 2) ? 16'h0001 : b;
      end
      sub = 1'($urandom);
      #1;
      e_add = sub ? hsub(a, b) : hadd(a, b);
      e_mul = hmul(a, b);
      checks += 2;
      if (y_add != e_add) begin
        failures++;
        if (failures < 10) $display("FAIL %h %s %h = %h exp %h", a, sub ? "-" : "+", b, y_add, e_add);
      end
      if (y_mul != e_mul) begin
        failures++;
        if (failures < 10) $display("FAIL %h * %h = %h exp %h", a, b, y_mul, e_mul);
      end
    end
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (out_valid != exp_v ||
          (exp_v && {x_re, x_im, y_re, y_im} != {exp_q[0], exp_q[1], exp_q[2], exp_q[3]})) begin
        failures++;
        if (failures < 10) $display("FAIL butterfly %h %h %h %h", x_re, x_im, y_re, y_im);
      end
      in_valid = (i % 5 != 4);
      a_re = rnd_h(8, 20); a_im = rnd_h(8, 20); b_re = rnd_h(8, 20); b_im = rnd_h(8, 20);
      w_re = rnd_h(10, 15); w_im = rnd_h(10, 15);
      begin
        logic [15:0] tr, ti;
        tr = hsub(hmul(b_re, w_re), hmul(b_im, w_im));
        ti = hadd(hmul(b_re, w_im), hmul(b_im, w_re));
        exp_q[0] = hadd(a_re, tr); exp_q[1] = hadd(a_im, ti);
        exp_q[2] = hsub(a_re, tr); exp_q[3] = hsub(a_im, ti);
      end
      exp_v = in_valid;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
