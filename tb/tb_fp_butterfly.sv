// Self-checking testbench for fp_butterfly (single precision).
// A stream of random butterflies is fed one per clock. Each result must
// appear exactly one cycle after its inputs and equal, bit for bit, the
// reference model evaluated in the same order of operations:
//   t = (B_re*W_re - B_im*W_im, B_re*W_im + B_im*W_re),  X = A + t, Y = A - t.
// Gaps in in_valid check that out_valid follows in_valid.
module tb_fp_butterfly;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, in_valid, out_valid;
  logic [31:0] a_re, a_im, b_re, b_im, w_re, w_im, x_re, x_im, y_re, y_im;
  int checks = 0, failures = 0;

  fp_butterfly dut (.*);

  logic [31:0] exp_q [4];
  logic        exp_v;

  task automatic ref_bf(input logic [31:0] ar, ai, br, bi, wr, wi, output logic [31:0] r [4]);
    logic [31:0] tr, ti;
    tr = fsub(fmul(br, wr), fmul(bi, wi));
    ti = fadd(fmul(br, wi), fmul(bi, wr));
    r[0] = fadd(ar, tr);
    r[1] = fadd(ai, ti);
    r[2] = fsub(ar, tr);
    r[3] = fsub(ai, ti);
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0;
    {a_re, a_im, b_re, b_im, w_re, w_im} = '0;
    exp_v = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // check what the previous cycle launched
      checks++;
      if (out_valid != exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL out_valid=%b exp %b", out_valid, exp_v);
      end
      if (exp_v) begin
        checks++;
        if ({x_re, x_im, y_re, y_im} != {exp_q[0], exp_q[1], exp_q[2], exp_q[3]}) begin
          failures++;
          if (failures < 10) $display("FAIL got %h %h %h %h exp %h %h %h %h",
                                      x_re, x_im, y_re, y_im, exp_q[0], exp_q[1], exp_q[2], exp_q[3]);
        end
      end
      in_valid = (i % 9 != 8);
      a_re = rnd_f(100, 150); a_im = rnd_f(100, 150);
      b_re = rnd_f(100, 150); b_im = rnd_f(100, 150);
      w_re = rnd_f(110, 127); w_im = rnd_f(110, 127);
      ref_bf(a_re, a_im, b_re, b_im, w_re, w_im, exp_q);
      exp_v = in_valid;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
