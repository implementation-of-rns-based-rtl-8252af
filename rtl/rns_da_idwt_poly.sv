// rns_da_idwt_poly: one residue channel (modulus M) of the multi-table
// bit-serial RNS-DA synthesis filter bank of one octave.
//
// Same function as rns_da_idwt (two reconstructed samples x_m, x_{m+1} per
// pair a^, d^), but the low-pass and the high-pass contributions have
// separate tables, and each of the four N/2-tap filters (gbar even/odd taps
// on a^, hbar even/odd taps on d^) is further split into K sub-filters.
// With the default K = 1 there are four 2^(N/2) x n_j tables Phi_gbar^e,
// Phi_gbar^o (addressed by the a^ bit plane) and Phi_hbar^e, Phi_hbar^o
// (addressed by the d^ bit plane), four scaled modulo accumulators and two
// registered modulo adders forming x_even = |acc_ge + acc_he|_m and
// x_odd = |acc_go + acc_ho|_m once per sample period.  In general there are
// 4K tables of 2^(N/2K) words, 4K accumulators and 2 + 4(K-1) adders.
//
// Interface as rns_da_idwt; the output adder tree adds ceil(log2 2K) cycles:
// with K = 1, out_valid is high in the cycle after edge t + n_j + 1.
module rns_da_idwt_poly
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
  if (NH % K != 0) begin : g_bad
    $error("N/2 must be a multiple of K");
  end

  logic [NJ-1:0] ha [NH], hd [NH];   // ha[k] = a^_{m/2-k}, hd[k] = d^_{m/2-k}
  logic [NJ-1:0] sa [NH], sd [NH];
  logic          active, first, done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NH; k++) begin
        ha[k] <= '0; hd[k] <= '0; sa[k] <= '0; sd[k] <= '0;
      end
    end else if (load) begin
      ha[0] <= a_in; sa[0] <= a_in;
      hd[0] <= d_in; sd[0] <= d_in;
      for (int k = 1; k < NH; k++) begin
        ha[k] <= ha[k-1]; sa[k] <= ha[k-1];
        hd[k] <= hd[k-1]; sd[k] <= hd[k-1];
      end
    end else if (active) begin
      for (int k = 0; k < NH; k++) begin
        sa[k] <= sa[k] << 1;
        sd[k] <= sd[k] << 1;
      end
    end
  end

  da_bit_ctrl #(.NJ(NJ)) u_ctrl (.clk(clk), .rst_n(rst_n), .load(load),
    .active(active), .first(first), .last(), .done(done));

  // accumulators [0..K-1] low-pass, [K..2K-1] high-pass
  logic [2*K-1:0][NJ-1:0] ye, yo;
  for (genvar s = 0; s < K; s++) begin : g_sub
    logic [NS-1:0] addr_a, addr_d;
    logic [NJ-1:0] phi_ge, phi_go, phi_he, phi_ho;
    always_comb
      for (int i = 0; i < NS; i++) begin
        addr_a[i] = sa[s + K * i][NJ-1];
        addr_d[i] = sd[s + K * i][NJ-1];
      end
    da_rom #(.M(M), .N(N), .COEF_A(GB), .COEF_B(HB), .KA(NS), .OFF(2 * s),     .STRIDE(2 * K)) u_lut_ge (.addr(addr_a), .data(phi_ge));
    da_rom #(.M(M), .N(N), .COEF_A(GB), .COEF_B(HB), .KA(NS), .OFF(2 * s + 1), .STRIDE(2 * K)) u_lut_go (.addr(addr_a), .data(phi_go));
    da_rom #(.M(M), .N(N), .COEF_A(HB), .COEF_B(GB), .KA(NS), .OFF(2 * s),     .STRIDE(2 * K)) u_lut_he (.addr(addr_d), .data(phi_he));
    da_rom #(.M(M), .N(N), .COEF_A(HB), .COEF_B(GB), .KA(NS), .OFF(2 * s + 1), .STRIDE(2 * K)) u_lut_ho (.addr(addr_d), .data(phi_ho));
    scaled_mod_acc #(.M(M)) u_acc_ge (.clk(clk), .rst_n(rst_n), .en(active), .first(first), .x(phi_ge), .y(ye[s]));
    scaled_mod_acc #(.M(M)) u_acc_go (.clk(clk), .rst_n(rst_n), .en(active), .first(first), .x(phi_go), .y(yo[s]));
    scaled_mod_acc #(.M(M)) u_acc_he (.clk(clk), .rst_n(rst_n), .en(active), .first(first), .x(phi_he), .y(ye[K + s]));
    scaled_mod_acc #(.M(M)) u_acc_ho (.clk(clk), .rst_n(rst_n), .en(active), .first(first), .x(phi_ho), .y(yo[K + s]));
  end

  logic vo;
  mod_adder_tree #(.M(M), .K(2 * K), .PIPE(1'b1)) u_add_e (.clk(clk), .rst_n(rst_n),
    .in_valid(done), .din(ye), .sum(x_even_res), .out_valid(out_valid));
  mod_adder_tree #(.M(M), .K(2 * K), .PIPE(1'b1)) u_add_o (.clk(clk), .rst_n(rst_n),
    .in_valid(done), .din(yo), .sum(x_odd_res), .out_valid(vo));
  a_trees_lockstep: assert property (@(posedge clk) disable iff (!rst_n) vo == out_valid);
endmodule
