// tb_rns_dwt_top: end-to-end testbench of the RNS-DA DWT octave.  Three
// instances of the top, one per channel architecture (bit-serial,
// polyphase, parallel), are each driven and checked by tb_top_harness: exact
// residues, scaled binary outputs, latencies, and the occurrence of strobes,
// stalls, back-to-back frames and negative data.  The serial instance is the
// default configuration.  Ends with the TB_RESULT line.
`timescale 1ns/1ps
module tb_rns_dwt_top;
  import rns_dwt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int c [3], f [3];
  logic [2:0] d;

  for (genvar a = 0; a < 3; a++) begin : g_arch
    localparam arch_e AR = arch_e'(a);
    logic en, sclk, ad_valid, ad_res_valid, xr_valid, xr_res_valid;
    logic [13:0] x_even, x_odd;
    logic [15:0] a_out, d_out, a_hat, d_hat, xr_even, xr_odd;
    logic [5:0][4:0] a_res, d_res, xr_even_res, xr_odd_res;

    rns_dwt_top #(.ARCH(AR)) dut (.clk(clk), .rst_n(rst_n), .en(en), .sclk(sclk),
      .x_even(x_even), .x_odd(x_odd), .a_out(a_out), .d_out(d_out), .ad_valid(ad_valid),
      .a_res(a_res), .d_res(d_res), .ad_res_valid(ad_res_valid),
      .a_hat(a_hat), .d_hat(d_hat), .xr_even(xr_even), .xr_odd(xr_odd), .xr_valid(xr_valid),
      .xr_even_res(xr_even_res), .xr_odd_res(xr_odd_res), .xr_res_valid(xr_res_valid));

    tb_top_harness #(.ARCH(AR), .NSAMP(300)) h (.clk(clk), .rst_n(rst_n), .en(en), .sclk(sclk),
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
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2]);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end
endmodule
