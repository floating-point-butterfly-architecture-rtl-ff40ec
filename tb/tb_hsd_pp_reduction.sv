// Self-checking testbench for hsd_pp_reduction.
// Random 48-bit two's complement partial products (13 of them, as for a
// single-precision significand product) must be summed modulo 2^48; the
// extreme cases of all-ones and alternating-sign words are included.
module tb_hsd_pp_reduction;
  localparam int PW = 48, NPP = 13;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [PW-1:0] pp [NPP];
  logic [PW-1:0] sum;
  int checks = 0, failures = 0;

  hsd_pp_reduction dut (.*);

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [PW-1:0] e;
      e = '0;
      for (int k = 0; k < NPP; k++) begin
        pp[k] = PW'({$urandom, $urandom});
        if (i == 0) pp[k] = '1;
        if (i == 1) pp[k] = (k % 2) ? {1'b1, {(PW-1){1'b0}}} : {1'b0, {(PW-1){1'b1}}};
        if (i == 2) pp[k] = 48'h0000_0000_0001;
        e = e + pp[k];
      end
      #1;
      checks++;
      if (sum != e) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d sum=%h exp=%h", i, sum, e);
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
