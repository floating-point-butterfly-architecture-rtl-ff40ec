// Self-checking testbench for barrel_shifter.
// Every shift amount 0..31 with random 27-bit words: the output must equal
// the word shifted right and sticky the OR of the bits shifted out.
module tb_barrel_shifter;
  localparam int W = 27, SHW = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]   in, out;
  logic [SHW-1:0] shamt;
  logic           sticky;
  int checks = 0, failures = 0;

  barrel_shifter dut (.*);

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [W-1:0] e_out;
      logic         e_st;
      in    = W'($urandom);
      if (i % 7 == 0) in = W'(1) << $urandom_range(W - 1);
      shamt = SHW'(i % (1 << SHW));
      #1;
      e_out = in >> shamt;
      e_st  = 1'b0;
      for (int j = 0; j < W; j++)
        if (j < int'(shamt) && in[j]) e_st = 1'b1;
      checks++;
      if (out != e_out || sticky != e_st) begin
        failures++;
        if (failures < 10) $display("FAIL in=%h sh=%0d out=%h/%h st=%b/%b", in, shamt, out, e_out, sticky, e_st);
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
