// Self-checking testbench for rbsd_adder.
// Drives random canonical binary signed-digit operands (and the digit pairs
// of the transfer table in every lower-digit context) and checks that the
// sum has the right value and that every output digit is a legal digit.
module tb_rbsd_adder;
  localparam int N = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] a_p, a_n, b_p, b_n;
  logic [N:0]   s_p, s_n;
  int checks = 0, failures = 0;

  rbsd_adder dut (.*);

  function automatic longint sdval(logic [63:0] p, logic [63:0] n);
    return longint'(p) - longint'(n);
  endfunction

  task automatic rnd_sd(output logic [N-1:0] p, output logic [N-1:0] n);
    logic [N-1:0] r1, r2;
    r1 = N'({$urandom, $urandom});
    r2 = N'({$urandom, $urandom});
    p = r1 & ~r2;
    n = r2 & ~r1;
  endtask

  task automatic check_sum();
    longint exp_v, got_v;
    #1;
    exp_v = sdval(64'(a_p), 64'(a_n)) + sdval(64'(b_p), 64'(b_n));
    got_v = sdval(64'(s_p), 64'(s_n));
    checks++;
    if (got_v != exp_v || (s_p & s_n) != '0) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h/%h b=%h/%h sum=%0d got=%0d", a_p, a_n, b_p, b_n, exp_v, got_v);
    end
  endtask

  initial begin
    // every digit pair at position 1 with every lower-digit pair at position 0
    for (int x = -1; x <= 1; x++)
      for (int y = -1; y <= 1; y++)
        for (int lx = -1; lx <= 1; lx++)
          for (int ly = -1; ly <= 1; ly++) begin
            a_p = '0; a_n = '0; b_p = '0; b_n = '0;
            a_p[1] = (x == 1);  a_n[1] = (x == -1);
            b_p[1] = (y == 1);  b_n[1] = (y == -1);
            a_p[0] = (lx == 1); a_n[0] = (lx == -1);
            b_p[0] = (ly == 1); b_n[0] = (ly == -1);
            check_sum();
          end
    // all ones and all minus ones: longest transfer patterns
    a_p = '1; a_n = '0; b_p = '1; b_n = '0; check_sum();
    a_p = '0; a_n = '1; b_p = '0; b_n = '1; check_sum();
    a_p = '1; a_n = '0; b_p = '0; b_n = '1; check_sum();
    for (int i = 0; i < 20000; i++) begin
      rnd_sd(a_p, a_n);
      rnd_sd(b_p, b_n);
      check_sum();
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
