// Self-checking testbench for hsd_adder.
// Two instances: the default 32-digit word with a signed digit every fourth
// position, and a 48-digit word with a signed digit every third position.
// Random legal HSD operands and carry-ins are added; the value of sum plus
// carry-out must equal the operand sum, no unsigned position may hold a
// negative digit, and no digit may use both of its bits.
module tb_hsd_adder;
  import hsd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int W1 = 32, S1 = 4;
  localparam int W2 = 48, S2 = 3;

  logic [W1-1:0] a1_p, a1_n, b1_p, b1_n, s1_p, s1_n;
  logic          c1, co1_p, co1_n;
  logic [W2-1:0] a2_p, a2_n, b2_p, b2_n, s2_p, s2_n;
  logic          c2, co2_p, co2_n;

  hsd_adder dut1 (
    .a_p(a1_p), .a_n(a1_n), .b_p(b1_p), .b_n(b1_n), .cin(c1),
    .s_p(s1_p), .s_n(s1_n), .cout_p(co1_p), .cout_n(co1_n));

  hsd_adder #(.W(W2), .SPACING(S2)) dut2 (
    .a_p(a2_p), .a_n(a2_n), .b_p(b2_p), .b_n(b2_n), .cin(c2),
    .s_p(s2_p), .s_n(s2_n), .cout_p(co2_p), .cout_n(co2_n));

  function automatic logic [63:0] smask(int w, int sp);
    logic [63:0] m = '0;
    for (int i = 0; i < w; i++) m[i] = sd_signed(i, w, sp);
    return m;
  endfunction

  function automatic longint val(logic [63:0] p, logic [63:0] n);
    return longint'(p) - longint'(n);
  endfunction

  // random legal HSD word; mode 0 random, 1 all plus, 2 all minus where allowed
  task automatic rnd_hsd(int w, int sp, int mode, output logic [63:0] p, output logic [63:0] n);
    logic [63:0] m, r1, r2, wm;
    m  = smask(w, sp);
    wm = (w == 64) ? '1 : ((64'd1 << w) - 1);
    r1 = {$urandom, $urandom};
    r2 = {$urandom, $urandom} & m;
    if (mode == 1) begin r1 = '1; r2 = '0; end
    if (mode == 2) begin r1 = ~m; r2 = m; end
    p = r1 & ~r2 & wm;
    n = r2 & ~r1 & wm;
  endtask

  task automatic check(int w, int sp, logic [63:0] ap, an, bp, bn, logic cin,
                       logic [63:0] sp_, sn_, logic cop, con);
    longint e, g;
    logic [63:0] m;
    m = smask(w, sp);
    e = val(ap, an) + val(bp, bn) + longint'(cin);
    g = val(sp_, sn_) + ((longint'(cop) - longint'(con)) <<< w);
    checks++;
    if (e != g || (sn_ & ~m) != '0 || (sp_ & sn_) != '0) begin
      failures++;
      if (failures < 10) $display("FAIL w=%0d exp=%0d got=%0d", w, e, g);
    end
  endtask

  initial begin
    logic [63:0] ap, an, bp, bn;
    for (int i = 0; i < 20000; i++) begin
      int mode_a, mode_b;
      mode_a = (i < 9) ? i % 3 : 0;
      mode_b = (i < 9) ? i / 3 : 0;
      rnd_hsd(W1, S1, mode_a, ap, an); a1_p = W1'(ap); a1_n = W1'(an);
      rnd_hsd(W1, S1, mode_b, bp, bn); b1_p = W1'(bp); b1_n = W1'(bn);
      c1 = 1'($urandom);
      rnd_hsd(W2, S2, mode_a, ap, an); a2_p = W2'(ap); a2_n = W2'(an);
      rnd_hsd(W2, S2, mode_b, bp, bn); b2_p = W2'(bp); b2_n = W2'(bn);
      c2 = 1'($urandom);
      #1;
      check(W1, S1, 64'(a1_p), 64'(a1_n), 64'(b1_p), 64'(b1_n), c1, 64'(s1_p), 64'(s1_n), co1_p, co1_n);
      check(W2, S2, 64'(a2_p), 64'(a2_n), 64'(b2_p), 64'(b2_n), c2, 64'(s2_p), 64'(s2_n), co2_p, co2_n);
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
