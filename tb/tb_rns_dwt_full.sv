// tb_rns_dwt_full: round trip through the default RNS-DA DWT octave.
//
// A 512-sample test signal (two sines and a step, 14-bit) runs through the
// analysis bank; its residues are checked exactly against the integer
// convolution, and the scaled approximation/detail outputs are collected.
// They are then fed back as a^, d^ to the synthesis bank, whose scaled
// output must reproduce the input signal up to a constant gain and a delay
// of N-1 = 7 samples (the filters are an orthogonal wavelet pair).  The gain
// is fixed by the integer coefficient scale 2^11 (applied twice) and the two
// epsilon-CRT scalings 2^16/M; the reconstruction must match the scaled
// input within 1 % RMS.  The top runs with all its default parameters.
`timescale 1ns/1ps
module tb_rns_dwt_full;
  import rns_dwt_pkg::*;
  localparam int NS = 512;        // input samples, NS/2 pairs
  localparam int NP = NS / 2;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic sclk, ad_valid, ad_res_valid, xr_valid, xr_res_valid;
  logic [13:0] x_even = '0, x_odd = '0;
  logic [15:0] a_out, d_out, a_hat = '0, d_hat = '0, xr_even, xr_odd;
  logic [5:0][4:0] a_res, d_res, xr_even_res, xr_odd_res;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rns_dwt_top dut (.clk(clk), .rst_n(rst_n), .en(en), .sclk(sclk),
    .x_even(x_even), .x_odd(x_odd), .a_out(a_out), .d_out(d_out), .ad_valid(ad_valid),
    .a_res(a_res), .d_res(d_res), .ad_res_valid(ad_res_valid),
    .a_hat(a_hat), .d_hat(d_hat), .xr_even(xr_even), .xr_odd(xr_odd), .xr_valid(xr_valid),
    .xr_even_res(xr_even_res), .xr_odd_res(xr_odd_res), .xr_res_valid(xr_res_valid));

  longint xs [NS];
  longint aref [NP], dref [NP];
  longint acol [NP], dcol [NP];
  longint rec [NS];
  int na = 0, nr = 0, nres = 0;
  logic pass2 = 1'b0;

  always @(negedge clk) begin
    if (ad_res_valid && nres < NP) begin
      checks++;
      for (int j = 0; j < NMOD; j++)
        if (longint'(a_res[j]) != mod_pos(aref[nres], MODULI_DEF[j]) ||
            longint'(d_res[j]) != mod_pos(dref[nres], MODULI_DEF[j])) begin
          failures++;
          if (failures < 10) $display("FAIL residues of pair %0d, modulus %0d: %0d %0d ref %0d %0d", nres, MODULI_DEF[j], a_res[j], d_res[j], aref[nres], dref[nres]);
          break;
        end
      nres++;
    end
    if (ad_valid && na < NP) begin
      acol[na] = longint'($signed(a_out));
      dcol[na] = longint'($signed(d_out));
      na++;
    end
    if (xr_valid && pass2 && nr < NP) begin
      rec[2*nr]     = longint'($signed(xr_even));
      rec[2*nr + 1] = longint'($signed(xr_odd));
      nr++;
    end
  end

  initial begin
    real mtot, gain, se, sx, best;
    int bestd;
    mtot = 1.0;
    for (int j = 0; j < NMOD; j++) mtot *= real'(MODULI_DEF[j]);
    for (int n = 0; n < NS; n++)
      xs[n] = longint'($rtoi(4000.0 * $sin(2.0 * 3.14159265 * n / 64.0) +
                             2500.0 * $sin(2.0 * 3.14159265 * n / 9.0) + ((n % 128 < 64) ? 1500.0 : -1500.0)));
    // reference analysis: a_n = sum g_k x_{2n-k}, with x_{2n} the even sample
    for (int n = 0; n < NP; n++) begin
      aref[n] = 0; dref[n] = 0;
      for (int k = 0; k < NTAPS; k++)
        if (2 * n - k >= 0) begin
          aref[n] += longint'(G_DEF[k]) * xs[2 * n - k];
          dref[n] += longint'(H_DEF[k]) * xs[2 * n - k];
        end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // pass 1: analysis.  Pair n is (x_{2n}, x_{2n-1}); x_{-1} = 0.
    en = 1'b1;
    for (int n = 0; n < NP; ) begin
      #1;
      if (sclk) begin
        x_even = 14'(xs[2 * n]);
        x_odd  = 14'((n > 0) ? xs[2 * n - 1] : 0);
        n++;
      end
      @(negedge clk);
    end
    en = 1'b0;
    wait (na == NP);
    // pass 2: synthesis from the collected scaled outputs
    repeat (20) @(negedge clk);
    pass2 = 1'b1;
    en = 1'b1;
    for (int n = 0; n < NP; ) begin
      #1;
      if (sclk) begin
        a_hat = 16'(acol[n]);
        d_hat = 16'(dcol[n]);
        n++;
      end
      @(negedge clk);
    end
    en = 1'b0;
    wait (nr == NP);
    // reconstruction = gain * x delayed; gain = 2^22 * (2^16/M)^2
    gain = 4194304.0 * (65536.0 / mtot) * (65536.0 / mtot);
    best = 1.0e30; bestd = -1;
    for (int dly = 0; dly < 16; dly++) begin
      se = 0.0; sx = 0.0;
      for (int n = 32; n < NS - 32; n++) begin
        real e;
        e = real'(rec[n]) - gain * real'(xs[n - dly]);
        se += e * e;
        sx += (gain * real'(xs[n - dly])) * (gain * real'(xs[n - dly]));
      end
      if (se / sx < best) begin best = se / sx; bestd = dly; end
    end
    $display("reconstruction: delay %0d samples, relative RMS error %f", bestd, $sqrt(best));
    checks++;
    if (bestd != NTAPS - 1 || $sqrt(best) > 0.01) begin
      failures++;
      $display("FAIL: reconstruction does not match the input");
    end
    checks++;
    if (nres != NP) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
