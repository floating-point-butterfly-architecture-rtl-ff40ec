// Self-checking testbench for booth_pp_gen.
// For random 24-bit operands (and the extreme values) each partial product
// must be d_k * A * 4^k for the radix-4 Booth digit d_k of B, worked out here
// from B's bits, and the partial products must add up to A*B modulo 2^48.
module tb_booth_pp_gen;
  localparam int N = 24, PW = 48, NPP = 13;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]  a, b;
  logic [PW-1:0] pp [NPP];
  int checks = 0, failures = 0;

  booth_pp_gen dut (.*);

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [PW-1:0] acc;
      logic [N+2:0]  bx;
      a = N'($urandom);
      b = N'($urandom);
      if (i == 0) begin a = '1; b = '1; end
      if (i == 1) begin a = '1; b = 24'h555555; end
      if (i == 2) begin a = 24'h800000; b = 24'hAAAAAA; end
      #1;
      acc = '0;
      bx  = {2'b00, b, 1'b0};
      for (int k = 0; k < NPP; k++) begin
        int d;
        longint e;
        d = -2 * int'(bx[2*k+2]) + int'(bx[2*k+1]) + int'(bx[2*k]);
        e = longint'(d) * longint'(a) * (longint'(1) <<< (2 * k));
        checks++;
        if (pp[k] != PW'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d a=%h b=%h pp=%h exp=%h", k, a, b, pp[k], PW'(e));
        end
        acc = acc + pp[k];
      end
      checks++;
      if (acc != PW'(longint'(a) * longint'(b))) begin
        failures++;
        if (failures < 10) $display("FAIL sum a=%h b=%h", a, b);
      end
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
