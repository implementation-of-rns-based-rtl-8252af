// rns_da_dwt: one residue channel (modulus M) of the bit-serial RNS-DA
// analysis filter bank of one DWT octave.
//
// Computes |a_n|_m = |sum_k g_k x_{2n-k}|_m and |d_n|_m = |sum_k h_k x_{2n-k}|_m
// for N-tap filters, with inputs and outputs as n_j-bit residues.  On 'load'
// (the sample strobe sCLK) the pair x_even = x_{2n}, x_odd = x_{2n-1} enters an
// N-deep sample buffer, which decimates by two.  A working copy of the buffer
// is then left-shifted one bit per cycle, MSB first; the N most significant
// bits address two 2^N x n_j tables (Phi_g, Phi_h) whose words feed two
// scaled modulo accumulators y <- |2y + Phi|_m.  After n_j = ceil(log2 M)
// cycles a_res/d_res hold the outputs and 'out_valid' pulses for one cycle.
//
// Timing: 'load' may come every n_j cycles (back to back) or later; a load
// while a frame is still running is a protocol error (asserted).  With the
// load sampled at clock edge t, a_res/d_res are valid (out_valid high) in the
// cycle that follows edge t + n_j.
// Structure (buffer, two tables, two accumulators) follows the reference
// architecture; the single-clock strobe scheme is this design's own.
module rns_da_dwt
  import rns_dwt_pkg::*;
#(
  parameter int unsigned M = 32,
  parameter int          N = NTAPS,
  parameter int          G [N] = G_DEF,
  parameter int          H [N] = H_DEF,
  localparam int NJ = $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [NJ-1:0] x_even,
  input  logic [NJ-1:0] x_odd,
  output logic [NJ-1:0] a_res,
  output logic [NJ-1:0] d_res,
  output logic          out_valid
);
  logic [NJ-1:0] hist [N];     // hist[k] = x_{2n-k}
  logic [NJ-1:0] sh   [N];     // bit-plane shift copy
  logic [N-1:0]  addr;
  logic          active, first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        hist[k] <= '0;
        sh[k]   <= '0;
      end
    end else if (load) begin
      hist[0] <= x_even;
      hist[1] <= x_odd;
      sh[0]   <= x_even;
      sh[1]   <= x_odd;
      for (int k = 2; k < N; k++) begin
        hist[k] <= hist[k-2];
        sh[k]   <= hist[k-2];
      end
    end else if (active) begin
      for (int k = 0; k < N; k++) sh[k] <= sh[k] << 1;
    end
  end

  always_comb
    for (int k = 0; k < N; k++) addr[k] = sh[k][NJ-1];

  da_bit_ctrl #(.NJ(NJ)) u_ctrl (.clk(clk), .rst_n(rst_n), .load(load),
    .active(active), .first(first), .last(), .done(out_valid));

  logic [NJ-1:0] phi_g, phi_h;
  da_rom #(.M(M), .N(N), .COEF_A(G)) u_lut_g (.addr(addr), .data(phi_g));
  da_rom #(.M(M), .N(N), .COEF_A(H)) u_lut_h (.addr(addr), .data(phi_h));

  scaled_mod_acc #(.M(M)) u_acc_g (.clk(clk), .rst_n(rst_n), .en(active), .first(first), .x(phi_g), .y(a_res));
  scaled_mod_acc #(.M(M)) u_acc_h (.clk(clk), .rst_n(rst_n), .en(active), .first(first), .x(phi_h), .y(d_res));

endmodule
