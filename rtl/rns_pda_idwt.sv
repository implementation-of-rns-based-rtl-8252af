// rns_pda_idwt: one residue channel (modulus M) of the parallel RNS-DA
// synthesis filter bank of one octave.
//
// Every bit plane l of the buffered a^ and d^ samples addresses four
// 2^(N/2) x n_j tables holding |2^l Phi_gbar^e|_m, |2^l Phi_gbar^o|_m,
// |2^l Phi_hbar^e|_m and |2^l Phi_hbar^o|_m.  The 2 n_j words of the even
// output and the 2 n_j words of the odd output are each summed by a
// pipelined modulo adder tree, so a reconstructed pair x_m, x_{m+1} leaves
// every clock.  With K > 1 each of the four N/2-tap filters is split into K
// sub-filters, giving 4K n_j tables of 2^(N/2K) words and trees of 2K n_j
// inputs; the default is K = 1.
//
// Interface: 'load' shifts a_in, d_in into the N/2-deep buffers (every cycle
// if wanted); results for a load at edge t are valid after edge
// t + ceil(log2 2K n_j).
module rns_pda_idwt
  import rns_dwt_pkg::*;
#(
  parameter int unsigned M = 32,
  parameter int          N = NTAPS,
  parameter int          K = 1,
  parameter int          GB [N] = GB_DEF,
  parameter int          HB [N] = HB_DEF,
  localparam int NJ = $clog2(M),
  localparam int NH = N / 2,
  localparam int NS = NH / K
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [NJ-1:0] a_in,
  input  logic [NJ-1:0] d_in,
  output logic [NJ-1:0] x_even_res,
  output logic [NJ-1:0] x_odd_res,
  output logic          out_valid
);
  logic [NJ-1:0] ha [NH], hd [NH];
  logic          hv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NH; k++) begin
        ha[k] <= '0; hd[k] <= '0;
      end
      hv <= 1'b0;
    end else begin
      hv <= load;
      if (load) begin
        ha[0] <= a_in;
        hd[0] <= d_in;
        for (int k = 1; k < NH; k++) begin
          ha[k] <= ha[k-1];
          hd[k] <= hd[k-1];
        end
      end
    end
  end

  if (NH % K != 0) begin : g_bad
    $error("N/2 must be a multiple of K");
  end

  // words [0..K*NJ-1] from the low-pass tables, [K*NJ..2K*NJ-1] from the
  // high-pass tables; word s*NJ + l is bit plane l of sub-filter s
  logic [2*K*NJ-1:0][NJ-1:0] we, wo;
  for (genvar l = 0; l < NJ; l++) begin : g_plane
    for (genvar sf = 0; sf < K; sf++) begin : g_sub
      logic [NS-1:0] addr_a, addr_d;
      always_comb
        for (int i = 0; i < NS; i++) begin
          addr_a[i] = ha[sf + K * i][l];
          addr_d[i] = hd[sf + K * i][l];
        end
      da_rom #(.M(M), .N(N), .COEF_A(GB), .COEF_B(HB), .KA(NS), .OFF(2 * sf),     .STRIDE(2 * K), .SHIFT(l))
        u_ge (.addr(addr_a), .data(we[sf * NJ + l]));
      da_rom #(.M(M), .N(N), .COEF_A(GB), .COEF_B(HB), .KA(NS), .OFF(2 * sf + 1), .STRIDE(2 * K), .SHIFT(l))
        u_go (.addr(addr_a), .data(wo[sf * NJ + l]));
      da_rom #(.M(M), .N(N), .COEF_A(HB), .COEF_B(GB), .KA(NS), .OFF(2 * sf),     .STRIDE(2 * K), .SHIFT(l))
        u_he (.addr(addr_d), .data(we[K * NJ + sf * NJ + l]));
      da_rom #(.M(M), .N(N), .COEF_A(HB), .COEF_B(GB), .KA(NS), .OFF(2 * sf + 1), .STRIDE(2 * K), .SHIFT(l))
        u_ho (.addr(addr_d), .data(wo[K * NJ + sf * NJ + l]));
    end
  end

  logic vo;
  mod_adder_tree #(.M(M), .K(2 * K * NJ), .PIPE(1'b1)) u_tree_e (.clk(clk), .rst_n(rst_n),
    .in_valid(hv), .din(we), .sum(x_even_res), .out_valid(out_valid));
  mod_adder_tree #(.M(M), .K(2 * K * NJ), .PIPE(1'b1)) u_tree_o (.clk(clk), .rst_n(rst_n),
    .in_valid(hv), .din(wo), .sum(x_odd_res), .out_valid(vo));
  a_trees_lockstep: assert property (@(posedge clk) disable iff (!rst_n) vo == out_valid);
endmodule
