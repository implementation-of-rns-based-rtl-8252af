// da_rom: RNS distributed-arithmetic look-up table.
//
// The address holds one bit of each buffered sample: bits 0..KA-1 belong to
// samples weighted by coefficient set A, bits KA..KA+KB-1 to samples weighted
// by set B (used by the two-input synthesis tables).  Address bit k < KA is
// weighted by COEF_A[OFF + STRIDE*k], bit KA+k by COEF_B[OFF + STRIDE*k], so
// STRIDE = 2 and OFF = 0/1 pick the even/odd polyphase components of an
// N-tap filter.  The word is
//     |2^SHIFT * sum_k coef_k * addr_k|_M .
// SHIFT = 0 gives the DA functions Phi of the bit-serial filter banks; SHIFT =
// l gives the pre-scaled tables |2^l Phi|_m of the parallel banks and the
// nibble tables of the binary-to-RNS converter.  All 2^(KA+KB) entries are
// computed at elaboration from the signed coefficients.  Combinational.
module da_rom
  import rns_dwt_pkg::*;
#(
  parameter int unsigned M      = 32,
  parameter int          N      = NTAPS,
  parameter int          COEF_A [N] = G_DEF,
  parameter int          COEF_B [N] = H_DEF,
  parameter int          KA     = N,
  parameter int          KB     = 0,
  parameter int          OFF    = 0,
  parameter int          STRIDE = 1,
  parameter int          SHIFT  = 0,
  localparam int NJ = $clog2(M),
  localparam int K  = KA + KB
) (
  input  logic [K-1:0]  addr,
  output logic [NJ-1:0] data
);
  function automatic logic [NJ-1:0] entry(int a);
    longint acc;
    acc = 0;
    for (int k = 0; k < KA; k++)
      if (a[k]) acc = acc + longint'(COEF_A[OFF + STRIDE * k]);
    for (int k = 0; k < KB; k++)
      if (a[KA + k]) acc = acc + longint'(COEF_B[OFF + STRIDE * k]);
    acc = mod_pos(acc, longint'(M));
    acc = (acc * pow2_mod(SHIFT, longint'(M))) % longint'(M);
    return NJ'(acc);
  endfunction

  logic [NJ-1:0] table_q [2**K];
  for (genvar a = 0; a < 2**K; a++) begin : g_tab
    localparam logic [NJ-1:0] E = entry(a);
    assign table_q[a] = E;
  end

  assign data = table_q[addr];
endmodule
