// rns_pda_dwt: one residue channel (modulus M) of the parallel RNS-DA
// analysis filter bank of one octave.
//
// Instead of scanning the n_j bit planes one per cycle, every bit plane l has
// its own pair of 2^N x n_j tables holding |2^l Phi_g|_m and |2^l Phi_h|_m
// (the scaling by 2^l is folded into the table), addressed by bit l of the N
// buffered samples.  Two pipelined modulo adder trees sum the n_j words of
// each filter, so one approximation/detail pair is produced per clock and no
// bit clock or accumulator is needed.  With K > 1 each filter is further
// split into K sub-filters (taps s, s+K, ...), giving 2K n_j tables of
// 2^(N/K) words and trees of K n_j inputs; the default is K = 1.
//
// Interface: on 'load' the pair x_even = x_{2n}, x_odd = x_{2n-1} enters the
// N-deep buffer (load may be high every cycle).  The buffer is registered and
// the tree has ceil(log2 K n_j) register levels, so a_res/d_res for a load
// at edge t are valid (out_valid) after edge t + ceil(log2 K n_j).
module rns_pda_dwt
  import rns_dwt_pkg::*;
#(
  parameter int unsigned M = 32,
  parameter int          N = NTAPS,
  parameter int          K = 1,
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
  logic [NJ-1:0] hist [N];
  logic          hv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) hist[k] <= '0;
      hv <= 1'b0;
    end else begin
      hv <= load;
      if (load) begin
        hist[0] <= x_even;
        hist[1] <= x_odd;
        for (int k = 2; k < N; k++) hist[k] <= hist[k-2];
      end
    end
  end

  if (N % K != 0) begin : g_bad
    $error("N must be a multiple of K");
  end

  // word s*NJ + l: bit plane l of sub-filter s
  logic [K*NJ-1:0][NJ-1:0] wg, wh;
  for (genvar l = 0; l < NJ; l++) begin : g_plane
    for (genvar sf = 0; sf < K; sf++) begin : g_sub
      logic [NS-1:0] addr;
      always_comb
        for (int i = 0; i < NS; i++) addr[i] = hist[sf + K * i][l];
      da_rom #(.M(M), .N(N), .COEF_A(G), .COEF_B(H), .KA(NS), .OFF(sf), .STRIDE(K), .SHIFT(l))
        u_lut_g (.addr(addr), .data(wg[sf * NJ + l]));
      da_rom #(.M(M), .N(N), .COEF_A(H), .COEF_B(G), .KA(NS), .OFF(sf), .STRIDE(K), .SHIFT(l))
        u_lut_h (.addr(addr), .data(wh[sf * NJ + l]));
    end
  end

  logic vd;
  mod_adder_tree #(.M(M), .K(K * NJ), .PIPE(1'b1)) u_tree_g (.clk(clk), .rst_n(rst_n),
    .in_valid(hv), .din(wg), .sum(a_res), .out_valid(out_valid));
  mod_adder_tree #(.M(M), .K(K * NJ), .PIPE(1'b1)) u_tree_h (.clk(clk), .rst_n(rst_n),
    .in_valid(hv), .din(wh), .sum(d_res), .out_valid(vd));
  a_trees_lockstep: assert property (@(posedge clk) disable iff (!rst_n) vd == out_valid);
endmodule
