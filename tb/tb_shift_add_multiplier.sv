// Self-checking testbench for shift_add_multiplier (24-bit default).
// Random and extreme operand pairs are multiplied one after another; the
// product must equal A*B and done must rise exactly N cycles after the cycle
// in which start was sampled. A start pulse while busy must be ignored.
module tb_shift_add_multiplier;
  localparam int N = 24;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           rst_n, start, busy, done;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  shift_add_multiplier dut (.*);

  initial begin
    rst_n = 1'b0; start = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      logic [N-1:0] ea, eb;
      int cyc;
      @(negedge clk);
      ea = N'($urandom); eb = N'($urandom);
      if (i == 0) begin ea = '1; eb = '1; end
      if (i == 1) begin ea = '0; eb = '1; end
      if (i == 2) begin ea = 1;  eb = 24'h800000; end
      a = ea; b = eb; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      // a start while busy, with other operands, must not disturb the product
      a = N'($urandom); b = N'($urandom); start = (i % 3 == 0);
      cyc = 1;
      @(negedge clk); start = 1'b0;
      while (!done) begin
        cyc++;
        @(negedge clk);
      end
      checks++;
      if (p != (2*N)'(ea) * (2*N)'(eb) || cyc != N) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h p=%h cycles=%0d", ea, eb, p, cyc);
      end
      checks++;
      if (busy) begin
        failures++;
        $display("FAIL busy after done");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
