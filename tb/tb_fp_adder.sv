// Self-checking testbench for fp_adder (single precision).
// Additions and subtractions of random operands with equal, close and
// distant exponents (massive cancellation, swapped operands, alignment
// shifts beyond the significand, rounding carries), operands near the top
// and bottom of the range, and special values. Each result is compared bit
// for bit with the reference model. The test also counts how often the
// mechanisms of the adder were exercised: operand swap, a negative
// signed-digit sum (result sign taken from the sum), a sticky bit, a
// normalisation left shift of more than one place.
module tb_fp_adder;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;
  int n_swap = 0, n_neg = 0, n_sticky = 0, n_cancel = 0, n_ovf = 0;

  fp_adder dut (.*);

  task automatic run(logic [31:0] x, logic [31:0] z, logic s);
    logic [31:0] e;
    a = x; b = z; sub = s;
    #1;
    e = s ? fsub(x, z) : fadd(x, z);
    checks++;
    if (y != e) begin
      failures++;
      if (failures < 10) $display("FAIL %h %s %h = %h exp %h", x, s ? "-" : "+", z, y, e);
    end
    if (dut.swap) n_swap++;
    if (dut.sum_bin[29]) n_neg++;
    if (dut.al_sticky) n_sticky++;
    if (x[30:23] > 2 && e[30:23] != 0 && int'(e[30:23]) < int'(x[30:23]) - 2) n_cancel++;
    if (is_inf(e) && !is_inf(x) && !is_inf(z)) n_ovf++;
  endtask

  localparam logic [31:0] SPECIAL [9] = '{32'h0000_0000, 32'h8000_0000, 32'h0000_0001,
                                          32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000,
                                          32'h3F80_0000, 32'hBF80_0000, 32'h7F7F_FFFF};

  initial begin
    foreach (SPECIAL[i]) foreach (SPECIAL[j]) begin
      run(SPECIAL[i], SPECIAL[j], 1'b0);
      run(SPECIAL[i], SPECIAL[j], 1'b1);
    end
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x, z;
      int e;
      e = 2 + $urandom_range(250);
      x = {1'($urandom), 8'(e), 23'($urandom)};
      case (i % 4)
        0: z = {1'($urandom), 8'(e), 23'($urandom)};                          // equal exponents
        1: z = {1'($urandom), 8'(e - 1 + $urandom_range(2)), 23'($urandom)};  // close
        2: z = {1'($urandom), 8'(e - 1 + $urandom_range(2)), x[22:0] ^ 23'(1 << $urandom_range(22))};
        default: z = rnd_f(1, 254);                                          // anywhere
      endcase
      run(x, z, 1'($urandom));
    end
    for (int i = 0; i < 5000; i++) run(rnd_f(240, 254), rnd_f(240, 254), 1'($urandom));
    for (int i = 0; i < 5000; i++) run(rnd_f(1, 30), rnd_f(1, 30), 1'($urandom));
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] x;
      x = rnd_f(10, 240);
      run(x, {1'($urandom), 8'(int'(x[30:23]) - 20 - $urandom_range(10)), 23'($urandom)}, 1'($urandom));
    end
    checks++;
    if (n_swap == 0 || n_neg == 0 || n_sticky == 0 || n_cancel == 0 || n_ovf == 0) begin
      failures++;
      $display("FAIL coverage swap=%0d neg=%0d sticky=%0d cancel=%0d ovf=%0d",
               n_swap, n_neg, n_sticky, n_cancel, n_ovf);
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
