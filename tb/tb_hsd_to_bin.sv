// Self-checking testbench for hsd_to_bin.
// Random signed-digit words (every digit in {-1,0,1}) are converted; the
// binary output must equal P - N modulo 2^W, worked out with 64-bit integers.
module tb_hsd_to_bin;
  localparam int W = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] in_p, in_n, out;
  int checks = 0, failures = 0;

  hsd_to_bin dut (.*);

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [W-1:0] r1, r2;
      longint       e;
      r1 = $urandom;
      r2 = $urandom;
      if (i == 0) begin r1 = '0; r2 = '1; end
      if (i == 1) begin r1 = '1; r2 = '0; end
      in_p = r1 & ~r2;
      in_n = r2 & ~r1;
      #1;
      e = longint'(in_p) - longint'(in_n);
      checks++;
      if (out != W'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL p=%h n=%h exp=%h got=%h", in_p, in_n, W'(e), out);
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
