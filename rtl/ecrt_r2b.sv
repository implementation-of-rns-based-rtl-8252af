// ecrt_r2b: auto-scaling residue-to-binary converter (epsilon-CRT).
//
// By the Chinese remainder theorem X = | sum_j M_j |r_j M_j^-1|_{m_j} |_M with
// M_j = M / m_j.  Dividing by M and scaling by 2^OUT_W gives
//   X * 2^OUT_W / M  =  | sum_j 2^OUT_W |r_j M_j^-1|_{m_j} / m_j |_(2^OUT_W),
// so a table per modulus (2^n_j words of OUT_W bits, entry r holding the
// rounded term) and a plain OUT_W-bit adder tree, which wraps modulo
// 2^OUT_W by itself, yield the scaled value without any modulo-M arithmetic.
// Read as two's complement, the output is X * 2^OUT_W / M for X in
// [-M/2, M/2), with an error of at most L/2 units from the rounding of the L
// table entries.  The adder tree result is registered: 'y' is valid
// (out_valid) one cycle after the residues.
module ecrt_r2b #(
  parameter int          L      = 6,
  parameter int unsigned MODULI [L] = '{32, 31, 29, 27, 25, 23},
  parameter int          RW     = 5,      // residue field width
  parameter int          OUT_W  = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [L-1:0][RW-1:0] res,
  output logic [OUT_W-1:0]     y,
  output logic                 out_valid
);
  function automatic longint dyn_range();
    longint p;
    p = 1;
    for (int j = 0; j < L; j++) p = p * longint'(MODULI[j]);
    return p;
  endfunction

  function automatic logic [OUT_W-1:0] entry(int j, int r);
    longint mj, mi, inv, t, num;
    mj  = longint'(MODULI[j]);
    mi  = dyn_range() / mj;
    inv = rns_dwt_pkg::mod_inv(mi % mj, mj);
    t   = (longint'(r) * inv) % mj;
    num = (t << OUT_W) + mj / 2;          // round to nearest
    return OUT_W'(num / mj);
  endfunction

  logic [OUT_W-1:0] term [L];
  for (genvar j = 0; j < L; j++) begin : g_mod
    logic [OUT_W-1:0] tab [2**RW];
    for (genvar r = 0; r < 2**RW; r++) begin : g_e
      localparam logic [OUT_W-1:0] E = (r < MODULI[j]) ? entry(j, r) : '0;
      assign tab[r] = E;
    end
    assign term[j] = tab[res[j]];
  end

  logic [OUT_W-1:0] total;
  always_comb begin
    total = '0;
    for (int j = 0; j < L; j++) total = total + term[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      y         <= total;
      out_valid <= in_valid;
    end
  end
endmodule
