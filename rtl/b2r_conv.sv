// b2r_conv: two's-complement to residue converter for one modulus M.
//
// A B-bit two's-complement word x = -2^(B-1) x_{B-1} + sum_l 2^l x_l is
// reduced modulo m by cutting its B-1 magnitude bits into 4-bit words
// xbar_i (i = 0..P-1, P = ceil((B-1)/4)); each word addresses a 2^4 x n_j
// table returning |xbar_i * 2^(4i)|_m, the sign bit selects the constant
// |-2^(B-1)|_m, and the P+1 residues are summed by a pipelined modulo adder
// tree.  Every cycle may carry a new word: 'res' is valid (out_valid) after
// ceil(log2(P+1)) cycles.  Nibble decomposition and table sizes follow the
// reference converter; the pipelining is this design's choice.
module b2r_conv #(
  parameter int unsigned M = 32,
  parameter int          B = 14,
  localparam int NJ = $clog2(M),
  localparam int P  = (B - 1 + 3) / 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [B-1:0]  x,
  output logic [NJ-1:0] res,
  output logic          out_valid
);
  localparam int W4 [4] = '{1, 2, 4, 8};
  localparam int Z4 [4] = '{0, 0, 0, 0};
  // |-2^(B-1)|_m
  localparam logic [NJ-1:0] SIGN_RES =
    NJ'(rns_dwt_pkg::mod_pos(-longint'(rns_dwt_pkg::pow2_mod(B - 1, longint'(M))), longint'(M)));

  logic [P:0][NJ-1:0] terms;
  logic [4*P-1:0]     mag;

  assign mag = (4*P)'(x[B-2:0]);

  for (genvar i = 0; i < P; i++) begin : g_nib
    da_rom #(.M(M), .N(4), .COEF_A(W4), .COEF_B(Z4), .KA(4), .SHIFT(4 * i))
      u_lut (.addr(mag[4*i +: 4]), .data(terms[i]));
  end
  assign terms[P] = x[B-1] ? SIGN_RES : '0;

  mod_adder_tree #(.M(M), .K(P + 1), .PIPE(1'b1)) u_tree (.clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .din(terms), .sum(res), .out_valid(out_valid));
endmodule
