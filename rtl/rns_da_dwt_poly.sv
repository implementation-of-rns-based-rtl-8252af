// rns_da_dwt_poly: one residue channel (modulus M) of the polyphase
// bit-serial RNS-DA analysis filter bank of one DWT octave.
//
// Each N-tap filter is split into K sub-filters of N/K taps: sub-filter s
// takes the taps k = s, s+K, s+2K, ...  With the default K = 2 these are
// the even and odd polyphase components g0(k) = g_2k, g1(k) = g_2k+1
// (likewise h), which see only the even samples x_{2n-2k} and only the odd
// samples x_{2n-2k-1} respectively.  The bit planes (MSB first) of each
// sub-filter's samples address its own 2^(N/K) x n_j table, followed by a
// scaled modulo accumulator; when the n_j-cycle frame ends, a registered
// modulo adder tree sums the K accumulators of each filter:
//   |a_n|_m = | |sum 2^l Phi_g0|_m + |sum 2^l Phi_g1|_m |_m   (K = 2, same for d_n).
// Compared with rns_da_dwt the tables shrink from 2^N to 2^(N/K) words, at
// the price of 2K accumulators and 2(K-1) output adders.  Larger K lets
// long filters (16 taps and more) keep small tables.
//
// Interface as rns_da_dwt (load = sample strobe with the pair
// x_even = x_{2n}, x_odd = x_{2n-1}); the output adders add ceil(log2 K)
// cycles (at least one): with K = 2, out_valid is high in the cycle after
// edge t + n_j + 1 for a load sampled at edge t.
module rns_da_dwt_poly
  import rns_dwt_pkg::*;
#(
  parameter int unsigned M = 32,
  parameter int          N = NTAPS,
  parameter int          K = 2,
  parameter int          G [N] = G_DEF,
  parameter int          H [N] = H_DEF,
  localparam int NJ = $clog2(M),
  localparam int NS = N / K
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
  if (N % K != 0) begin : g_bad
    $error("N must be a multiple of K");
  end

  logic [NJ-1:0] hist [N];     // hist[k] = x_{2n-k}
  logic [NJ-1:0] sh   [N];     // bit-plane shift copy
  logic          active, first, done;

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

  da_bit_ctrl #(.NJ(NJ)) u_ctrl (.clk(clk), .rst_n(rst_n), .load(load),
    .active(active), .first(first), .last(), .done(done));

  logic [K-1:0][NJ-1:0] yg, yh;
  for (genvar s = 0; s < K; s++) begin : g_sub
    logic [NS-1:0] addr;
    logic [NJ-1:0] phi_g, phi_h;
    always_comb
      for (int i = 0; i < NS; i++) addr[i] = sh[s + K * i][NJ-1];
    da_rom #(.M(M), .N(N), .COEF_A(G), .COEF_B(H), .KA(NS), .OFF(s), .STRIDE(K)) u_lut_g (.addr(addr), .data(phi_g));
    da_rom #(.M(M), .N(N), .COEF_A(H), .COEF_B(G), .KA(NS), .OFF(s), .STRIDE(K)) u_lut_h (.addr(addr), .data(phi_h));
    scaled_mod_acc #(.M(M)) u_acc_g (.clk(clk), .rst_n(rst_n), .en(active), .first(first), .x(phi_g), .y(yg[s]));
    scaled_mod_acc #(.M(M)) u_acc_h (.clk(clk), .rst_n(rst_n), .en(active), .first(first), .x(phi_h), .y(yh[s]));
  end

  logic vd;
  mod_adder_tree #(.M(M), .K(K), .PIPE(1'b1)) u_add_a (.clk(clk), .rst_n(rst_n),
    .in_valid(done), .din(yg), .sum(a_res), .out_valid(out_valid));
  mod_adder_tree #(.M(M), .K(K), .PIPE(1'b1)) u_add_d (.clk(clk), .rst_n(rst_n),
    .in_valid(done), .din(yh), .sum(d_res), .out_valid(vd));
  a_trees_lockstep: assert property (@(posedge clk) disable iff (!rst_n) vd == out_valid);
endmodule
