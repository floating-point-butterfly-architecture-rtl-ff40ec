// Self-checking testbench for fp_multiplier (single precision).
// Random normal operands over the whole exponent range (so overflow to
// infinity and flush to zero both occur), operands whose product lands near
// the rounding boundary, and special values (zero, subnormal, infinity, NaN)
// are multiplied; each result is compared bit for bit with the reference
// model, which rounds the exact double-precision product once.
module tb_fp_multiplier;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_norm_shift = 0;

  fp_multiplier dut (.*);

  task automatic run(logic [31:0] x, logic [31:0] z);
    logic [31:0] e;
    a = x; b = z;
    #1;
    e = fmul(x, z);
    checks++;
    if (y != e) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h exp %h", x, z, y, e);
    end
    if (is_inf(e) && !is_inf(x) && !is_inf(z)) n_ovf++;
    if (e[30:0] == 0 && x[30:23] != 0 && z[30:23] != 0) n_unf++;
    if (dut.prod[47]) n_norm_shift++;
  endtask

  localparam logic [31:0] SPECIAL [8] = '{32'h0000_0000, 32'h8000_0000, 32'h0000_0001,
                                          32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000,
                                          32'h3F80_0000, 32'hC040_0000};

  initial begin
    foreach (SPECIAL[i]) foreach (SPECIAL[j]) run(SPECIAL[i], SPECIAL[j]);
    for (int i = 0; i < 20000; i++) run(rnd_f(1, 254), rnd_f(1, 254));
    for (int i = 0; i < 20000; i++) run(rnd_f(100, 154), rnd_f(100, 154));
    // significands with few bits set: products with ties and exact results
    for (int i = 0; i < 5000; i++)
      run({1'($urandom), 8'(120 + $urandom_range(15)), 23'(1 << $urandom_range(22)) | 23'h400000},
          {1'($urandom), 8'(120 + $urandom_range(15)), 23'($urandom) & 23'h7C0001});
    checks++;
    if (n_ovf == 0 || n_unf == 0 || n_norm_shift == 0) begin
      failures++;
      $display("FAIL coverage ovf=%0d unf=%0d shift=%0d", n_ovf, n_unf, n_norm_shift);
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
