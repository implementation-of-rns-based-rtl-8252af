// rns_da_idwt: one residue channel (modulus M) of the two-accumulator
// bit-serial RNS-DA synthesis (inverse DWT) filter bank of one octave.
//
// Reconstructs two consecutive samples per sample period from one
// approximation sample a^ and one detail sample d^:
//   |x_m|_m     = | sum_k gbar_2k   a^_{m/2-k} + hbar_2k   d^_{m/2-k} |_m  (m even)
//   |x_{m+1}|_m = | sum_k gbar_2k+1 a^_{m/2-k} + hbar_2k+1 d^_{m/2-k} |_m
// with k = 0..N/2-1.  Two N/2-deep buffers hold the last a^ and d^ samples;
// their bit planes (MSB first) form one N-bit address (a^ bits low, d^ bits
// high) shared by two 2^N x n_j tables, the even table (even synthesis
// coefficients of both filters) and the odd table.  Two scaled modulo
// accumulators turn the table words into x_even_res and x_odd_res in n_j
// cycles; no output adder is needed because each table already merges the
// low-pass and high-pass contributions.
//
// Interface/timing as rns_da_dwt: 'load' is the sample strobe carrying a_in,
// d_in; outputs are valid (out_valid) in the cycle after edge t + n_j.
module rns_da_idwt
  import rns_dwt_pkg::*;
#(
  parameter int unsigned M = 32,
  parameter int          N = NTAPS,
  parameter int          GB [N] = GB_DEF,
  parameter int          HB [N] = HB_DEF,
  localparam int NJ = $clog2(M),
  localparam int NH = N / 2
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
  logic [NJ-1:0] ha [NH], hd [NH];   // ha[k] = a^_{m/2-k}, hd[k] = d^_{m/2-k}
  logic [NJ-1:0] sa [NH], sd [NH];
  logic [N-1:0]  addr;
  logic          active, first;

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

  always_comb
    for (int k = 0; k < NH; k++) begin
      addr[k]      = sa[k][NJ-1];
      addr[NH + k] = sd[k][NJ-1];
    end

  da_bit_ctrl #(.NJ(NJ)) u_ctrl (.clk(clk), .rst_n(rst_n), .load(load),
    .active(active), .first(first), .last(), .done(out_valid));

  logic [NJ-1:0] phi_e, phi_o;
  da_rom #(.M(M), .N(N), .COEF_A(GB), .COEF_B(HB), .KA(NH), .KB(NH), .OFF(0), .STRIDE(2)) u_lut_e (.addr(addr), .data(phi_e));
  da_rom #(.M(M), .N(N), .COEF_A(GB), .COEF_B(HB), .KA(NH), .KB(NH), .OFF(1), .STRIDE(2)) u_lut_o (.addr(addr), .data(phi_o));

  scaled_mod_acc #(.M(M)) u_acc_e (.clk(clk), .rst_n(rst_n), .en(active), .first(first), .x(phi_e), .y(x_even_res));
  scaled_mod_acc #(.M(M)) u_acc_o (.clk(clk), .rst_n(rst_n), .en(active), .first(first), .x(phi_o), .y(x_odd_res));
endmodule
