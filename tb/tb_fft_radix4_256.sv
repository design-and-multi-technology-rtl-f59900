// tb_fft_radix4_256 -- self-checking test of the 256-point radix-4 FFT.
// Several blocks are transformed: a single impulse, one pure tone (all
// energy in one bin), and random blocks with input magnitudes below 2^15.
// Each result is compared with a direct DFT computed here in real
// arithmetic and divided by 256.  The tolerance is 6 LSB per component: four
// truncated stages of scaling and rotation.  Also checked: the block takes
// 256 + 256 + 256 cycles from the first input to the last output at full rate
// (load, four stages of 64 butterflies, unload), out_last on the 256th result
// only, and random input gaps and output back-pressure.
`timescale 1ns/1ps
module tb_fft_radix4_256;
  localparam int N = 256, TOL = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, out_last;
  logic signed [15:0] in_re, in_im, out_re, out_im;

  fft_radix4_256 dut (.*);

  int checks = 0, failures = 0;
  function automatic void chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int xr [N], xi [N];
  real er [N], ei [N];

  function automatic void ref_dft();
    for (int k = 0; k < N; k++) begin
      real sr, si, a;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        a = -6.283185307179586 * ((n * k) % N) / N;
        sr += xr[n] * $cos(a) - xi[n] * $sin(a);
        si += xr[n] * $sin(a) + xi[n] * $cos(a);
      end
      er[k] = sr / N; ei[k] = si / N;
    end
  endfunction

  function automatic bit close(int got, real want);
    real d;
    d = got - want;
    return d <= TOL && d >= -TOL;
  endfunction

  task automatic run_block(int gaps, int bp, output int cycles);
    int k, t0, worst;
    ref_dft();
    t0 = -1; cycles = 0; worst = 0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      while (gaps && $urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_re = 16'(xr[n]); in_im = 16'(xi[n]);
      #1;
      if (t0 < 0) t0 = $time;
      while (!in_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk); in_valid = 0;
    k = 0;
    while (k < N) begin
      out_ready = !bp || ($urandom_range(0, 2) != 0);
      #1;
      if (out_valid && out_ready) begin
        chk(close(out_re, er[k]) && close(out_im, ei[k]),
            $sformatf("bin %0d: %0d,%0d expected %0.1f,%0.1f", k, out_re, out_im, er[k], ei[k]));
        chk(out_last == (k == N - 1), $sformatf("out_last at bin %0d", k));
        if (k == N - 1) cycles = ($time - t0) / 10 + 1;
        k++;
      end
      @(negedge clk);
    end
    out_ready = 0;
  endtask

  initial begin
    int cyc;
    in_valid = 0; in_re = 0; in_im = 0; out_ready = 0;
    #22 rst_n = 1;
    // impulse at n = 0: every bin 8192 / 256 = 32
    for (int n = 0; n < N; n++) begin xr[n] = (n == 0) ? 8192 : 0; xi[n] = 0; end
    run_block(0, 0, cyc);
    chk(cyc == 3 * N, $sformatf("full-rate block took %0d cycles, expected %0d", cyc, 3 * N));
    // a tone in bin 37
    for (int n = 0; n < N; n++) begin
      xr[n] = $rtoi(20000.0 * $cos(6.283185307179586 * 37 * n / N));
      xi[n] = $rtoi(20000.0 * $sin(6.283185307179586 * 37 * n / N));
    end
    run_block(0, 1, cyc);
    // random blocks
    for (int b = 0; b < 3; b++) begin
      for (int n = 0; n < N; n++) begin
        xr[n] = $signed($urandom_range(0, 46000)) - 23000;
        xi[n] = $signed($urandom_range(0, 46000)) - 23000;
      end
      run_block(b != 1, b != 0, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
