// End-to-end testbench for hsd_fft_top at its default parameters (single
// precision, signed digit every fourth position, 24-bit shift-and-add
// multiplier).
//
// The butterfly is used to compute complete 16-point radix-2
// decimation-in-time FFTs: the testbench keeps the data in bit-reversed
// order and, stage by stage, streams every butterfly of a stage into the
// unit one per clock with its twiddle factor W_16^k = cos(2*pi*k/16) -
// j*sin(2*pi*k/16) (rounded to single precision). Every butterfly result is
// compared bit for bit with the reference model, evaluated in the same order
// of operations; each finished FFT is also compared with a double-precision
// DFT of the same input (relative error below 1e-5 of the largest bin).
// A last frame of very large inputs makes the arithmetic overflow to
// infinity, which that frame's bit-exact comparison checks.
//
// Alongside, the shift-and-add multiplier multiplies the significands of
// the operands of one of the butterfly's multipliers, and its product must
// equal the significand product that the Booth/HSD multiplier formed.
//
// Mechanisms counted, each must occur at least once: exponent swap in an
// adder, negative signed-digit sum, sticky bit from the barrel shifter,
// normalisation after cancellation, overflow to infinity,
// negative Booth digit, back-to-back butterflies, shift-and-add product.
module tb_hsd_fft_top;
  import fp_ref_pkg::*;

  localparam int NFFT = 16, LOGN = 4, FRAMES = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n;
  logic        bf_in_valid, bf_out_valid;
  logic [31:0] bf_a_re, bf_a_im, bf_b_re, bf_b_im, bf_w_re, bf_w_im;
  logic [31:0] bf_x_re, bf_x_im, bf_y_re, bf_y_im;
  logic        sam_start, sam_busy, sam_done;
  logic [23:0] sam_a, sam_b;
  logic [47:0] sam_p;

  hsd_fft_top dut (.*);

  int checks = 0, failures = 0;
  int n_swap = 0, n_neg = 0, n_sticky = 0, n_cancel = 0;
  int n_ovf = 0, n_booth_neg = 0, n_b2b = 0, n_sam = 0;

  logic [31:0] xr [NFFT], xi [NFFT];
  logic [31:0] tw_re [NFFT/2], tw_im [NFFT/2];
  real         in_re [NFFT], in_im [NFFT];

  function automatic int bitrev(int v);
    int r = 0;
    for (int i = 0; i < LOGN; i++) if (v & (1 << i)) r |= 1 << (LOGN - 1 - i);
    return r;
  endfunction

  // mechanisms inside the six adders and the multipliers
  always @(posedge clk) if (bf_in_valid) begin
    if (dut.u_bf.u_add_yre.swap || dut.u_bf.u_add_tre.swap) n_swap++;
    if (dut.u_bf.u_add_yre.sum_bin[29] || dut.u_bf.u_add_tre.sum_bin[29]) n_neg++;
    if (dut.u_bf.u_add_xre.al_sticky || dut.u_bf.u_add_tim.al_sticky) n_sticky++;
    if (dut.u_bf.u_add_yre.y[30:23] != 0 &&
        int'(dut.u_bf.u_add_yre.y[30:23]) + 2 < int'(dut.u_bf.u_add_yre.e_big)) n_cancel++;
    if (dut.u_bf.u_mul_rr.u_ppgen.pp[0][47]) n_booth_neg++;
  end

  task automatic run_stage(int s);
    int m, half;
    logic [31:0] exp_r [NFFT][4];
    int idx_a [NFFT/2], idx_b [NFFT/2], tw [NFFT/2];
    int nb, got;
    m = 1 << s;
    half = m / 2;
    nb = 0;
    for (int k = 0; k < NFFT; k += m)
      for (int j = 0; j < half; j++) begin
        idx_a[nb] = k + j;
        idx_b[nb] = k + j + half;
        tw[nb]    = j * (NFFT / m);
        nb++;
      end
    // stream the stage's butterflies one per clock; collect results one later
    got = 0;
    for (int i = 0; i <= nb; i++) begin
      @(negedge clk);
      if (i > 0) begin
        int q = i - 1;
        checks++;
        if (!bf_out_valid ||
            {bf_x_re, bf_x_im, bf_y_re, bf_y_im} != {exp_r[q][0], exp_r[q][1], exp_r[q][2], exp_r[q][3]}) begin
          failures++;
          if (failures < 10) $display("FAIL stage %0d bf %0d: %h %h %h %h exp %h %h %h %h", s, q,
                                      bf_x_re, bf_x_im, bf_y_re, bf_y_im,
                                      exp_r[q][0], exp_r[q][1], exp_r[q][2], exp_r[q][3]);
        end
        if (bf_in_valid && i < nb) n_b2b++;
      end
      if (i < nb) begin
        logic [31:0] ar, ai, br, bi, wr, wi, tr, ti;
        ar = xr[idx_a[i]]; ai = xi[idx_a[i]];
        br = xr[idx_b[i]]; bi = xi[idx_b[i]];
        wr = tw_re[tw[i]]; wi = tw_im[tw[i]];
        bf_in_valid = 1'b1;
        bf_a_re = ar; bf_a_im = ai; bf_b_re = br; bf_b_im = bi; bf_w_re = wr; bf_w_im = wi;
        tr = fsub(fmul(br, wr), fmul(bi, wi));
        ti = fadd(fmul(br, wi), fmul(bi, wr));
        exp_r[i][0] = fadd(ar, tr); exp_r[i][1] = fadd(ai, ti);
        exp_r[i][2] = fsub(ar, tr); exp_r[i][3] = fsub(ai, ti);
        for (int q = 0; q < 4; q++) begin
          if (is_inf(exp_r[i][q]) && !is_inf(ar) && !is_inf(br)) n_ovf++;
        end
      end else begin
        bf_in_valid = 1'b0;
      end
    end
    for (int i = 0; i < nb; i++) begin
      xr[idx_a[i]] = exp_r[i][0]; xi[idx_a[i]] = exp_r[i][1];
      xr[idx_b[i]] = exp_r[i][2]; xi[idx_b[i]] = exp_r[i][3];
    end
  endtask

  task automatic check_dft();
    real maxmag, err;
    maxmag = 0.0;
    err = 0.0;
    for (int k = 0; k < NFFT; k++) begin
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < NFFT; n++) begin
        real ang;
        ang = -2.0 * 3.14159265358979323846 * real'(n * k) / real'(NFFT);
        sr += in_re[n] * $cos(ang) - in_im[n] * $sin(ang);
        si += in_re[n] * $sin(ang) + in_im[n] * $cos(ang);
      end
      if ($sqrt(sr * sr + si * si) > maxmag) maxmag = $sqrt(sr * sr + si * si);
      if ((f2r(xr[k]) - sr) ** 2 + (f2r(xi[k]) - si) ** 2 > err) err = (f2r(xr[k]) - sr) ** 2 + (f2r(xi[k]) - si) ** 2;
    end
    checks++;
    if ($sqrt(err) > 1e-5 * maxmag) begin
      failures++;
      $display("FAIL FFT error %g against largest bin %g", $sqrt(err), maxmag);
    end
  endtask

  // shift-and-add multiplier: significands of the first multiplier's operands
  task automatic sam_check(logic [31:0] x, logic [31:0] z);
    logic [47:0] e;
    int cyc;
    @(negedge clk);
    bf_b_re = x; bf_w_re = z;
    sam_a = {1'b1, x[22:0]}; sam_b = {1'b1, z[22:0]}; sam_start = 1'b1;
    @(negedge clk);
    sam_start = 1'b0;
    e = dut.u_bf.u_mul_rr.prod;
    cyc = 0;   // cycles after the clock edge that sampled start
    while (!sam_done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (sam_p != e || cyc != 24) begin
      failures++;
      $display("FAIL shift-add %h vs Booth/HSD %h after %0d cycles", sam_p, e, cyc);
    end
    n_sam++;
  endtask

  initial begin
    rst_n = 1'b0; bf_in_valid = 1'b0; sam_start = 1'b0; sam_a = '0; sam_b = '0;
    {bf_a_re, bf_a_im, bf_b_re, bf_b_im, bf_w_re, bf_w_im} = '0;
    for (int k = 0; k < NFFT / 2; k++) begin
      tw_re[k] = r2f($cos(2.0 * 3.14159265358979323846 * k / NFFT));
      tw_im[k] = r2f(-$sin(2.0 * 3.14159265358979323846 * k / NFFT));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int n = 0; n < NFFT; n++) begin
        logic [31:0] vr, vi;
        if (f == FRAMES - 1) begin
          vr = {1'b0, 8'd253 + 8'($urandom_range(1)), 23'($urandom)};   // overflow frame
          vi = {1'($urandom), 8'd253, 23'($urandom)};
        end else if (f == 0) begin
          vr = (n == 1) ? 32'h3F80_0000 : 32'h0;                        // impulse at n = 1
          vi = 32'h0;
        end else begin
          vr = rnd_f(120, 130);
          vi = rnd_f(120, 130);
        end
        xr[bitrev(n)] = vr; xi[bitrev(n)] = vi;
        in_re[n] = f2r(vr); in_im[n] = f2r(vi);
      end
      for (int s = 1; s <= LOGN; s++) run_stage(s);
      if (f != FRAMES - 1) check_dft();
      sam_check(rnd_f(100, 150), rnd_f(100, 150));
    end
    sam_check(32'h3FFF_FFFF, 32'h3FFF_FFFF);
    checks++;
    if (n_swap == 0 || n_neg == 0 || n_sticky == 0 || n_cancel == 0 || n_ovf == 0 ||
        n_booth_neg == 0 || n_b2b == 0 || n_sam == 0) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    $display("mechanisms: swap=%0d negative_sum=%0d sticky=%0d cancellation=%0d overflow=%0d booth_negative=%0d back_to_back=%0d shift_add=%0d",
             n_swap, n_neg, n_sticky, n_cancel, n_ovf, n_booth_neg, n_b2b, n_sam);
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
