// tb_rns_dwt_mod6: end-to-end testbench of the RNS-DA DWT octave built on
// 6-bit residue channels, moduli {64, 63, 61, 59, 55} (M = 798,114,240,
// about 29.6 bits), in the bit-serial (6 cycles per sample pair) and the
// parallel (one pair per cycle) architectures.  Each instance is driven and
// checked by tb_top_harness.  Ends with the TB_RESULT line.
`timescale 1ns/1ps
module tb_rns_dwt_mod6;
  import rns_dwt_pkg::*;
  localparam int L = 5, RW = 6;
  localparam int unsigned MODS [L] = '{64, 63, 61, 59, 55};
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int c [2], f [2];
  logic [1:0] d;

  for (genvar a = 0; a < 2; a++) begin : g_arch
    localparam arch_e AR = (a == 0) ? ARCH_SERIAL : ARCH_PARALLEL;
    logic en, sclk, ad_valid, ad_res_valid, xr_valid, xr_res_valid;
    logic [13:0] x_even, x_odd;
    logic [15:0] a_out, d_out, a_hat, d_hat, xr_even, xr_odd;
    logic [L-1:0][RW-1:0] a_res, d_res, xr_even_res, xr_odd_res;

    rns_dwt_top #(.ARCH(AR), .L(L), .MODULI(MODS), .RW(RW)) dut (.clk(clk), .rst_n(rst_n), .en(en), .sclk(sclk),
      .x_even(x_even), .x_odd(x_odd), .a_out(a_out), .d_out(d_out), .ad_valid(ad_valid),
      .a_res(a_res), .d_res(d_res), .ad_res_valid(ad_res_valid),
      .a_hat(a_hat), .d_hat(d_hat), .xr_even(xr_even), .xr_odd(xr_odd), .xr_valid(xr_valid),
      .xr_even_res(xr_even_res), .xr_odd_res(xr_odd_res), .xr_res_valid(xr_res_valid));

    tb_top_harness #(.ARCH(AR), .NSAMP(300), .L(L), .RW(RW), .MODS(MODS)) h (.clk(clk), .rst_n(rst_n), .en(en), .sclk(sclk),
      .x_even(x_even), .x_odd(x_odd), .a_out(a_out), .d_out(d_out), .ad_valid(ad_valid),
      .a_res(a_res), .d_res(d_res), .ad_res_valid(ad_res_valid),
      .a_hat(a_hat), .d_hat(d_hat), .xr_even(xr_even), .xr_odd(xr_odd), .xr_valid(xr_valid),
      .xr_even_res(xr_even_res), .xr_odd_res(xr_odd_res), .xr_res_valid(xr_res_valid),
      .checks(c[a]), .failures(f[a]), .done(d[a]));
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&d);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1], f[0] + f[1]);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1], f[0] + f[1] + 1);
    $finish;
  end
endmodule
