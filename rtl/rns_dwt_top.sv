// rns_dwt_top: one octave of a discrete wavelet transform (analysis and
// synthesis filter banks) computed in the residue number system with
// distributed arithmetic.
//
// Data path, per direction:
//   binary in -> b2r_conv (one per modulus) -> L independent residue channels
//   -> ecrt_r2b -> scaled binary out.
// Analysis: the sample pair x_even = x_{2n}, x_odd = x_{2n-1} yields the
// approximation a_n = sum g_k x_{2n-k} and detail d_n = sum h_k x_{2n-k}.
// Synthesis: the pair a^, d^ yields two reconstructed samples
// x_m (m even) and x_{m+1}.  Each residue channel is n_j = RW bits wide and
// never communicates with the others; the moduli must be pairwise coprime and
// all need RW bits (both rules are checked at elaboration).  The outputs
// leave through epsilon-CRT converters, which
// return value * 2^OUT_W / M (M = product of the moduli) as a signed OUT_W-bit
// number, with an error of a few units; the exact residues are also brought
// out.
//
// ARCH selects the channel architecture:
//   ARCH_SERIAL   rns_da_dwt + rns_da_idwt (2^N tables, 2 accumulators each)
//   ARCH_POLY     rns_da_dwt_poly + rns_da_idwt_poly (2^(N/2) tables, 4 accs)
//   ARCH_PARALLEL rns_pda_dwt + rns_pda_idwt (one table per bit plane)
// The bit-serial ones take a sample pair every RW clock cycles, the parallel
// ones every cycle.  'sclk' is the sample strobe: while 'en' is high it pulses
// once per sample period and the inputs (x_even, x_odd, a_hat, d_hat) are
// sampled in that cycle.  Results appear with their own valid strobes.
//
// The synthesis bank has its own binary inputs rather than being fed by the
// analysis outputs: reconstruction of unscaled analysis outputs would exceed
// the dynamic range M, and the rescaling between octaves is left to the user.
// Only one octave is built.
module rns_dwt_top
  import rns_dwt_pkg::*;
#(
  parameter arch_e       ARCH   = ARCH_SERIAL,
  parameter int          L      = NMOD,
  parameter int unsigned MODULI [L] = MODULI_DEF,
  parameter int          RW     = 5,
  parameter int          IN_W   = 14,
  parameter int          SYN_W  = 16,
  parameter int          OUT_W  = 16,
  parameter int          N      = NTAPS,
  parameter int          G  [N] = G_DEF,
  parameter int          H  [N] = H_DEF,
  parameter int          GB [N] = GB_DEF,
  parameter int          HB [N] = HB_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  output logic                 sclk,
  // analysis bank
  input  logic [IN_W-1:0]      x_even,
  input  logic [IN_W-1:0]      x_odd,
  output logic [OUT_W-1:0]     a_out,
  output logic [OUT_W-1:0]     d_out,
  output logic                 ad_valid,
  output logic [L-1:0][RW-1:0] a_res,
  output logic [L-1:0][RW-1:0] d_res,
  output logic                 ad_res_valid,
  // synthesis bank
  input  logic [SYN_W-1:0]     a_hat,
  input  logic [SYN_W-1:0]     d_hat,
  output logic [OUT_W-1:0]     xr_even,
  output logic [OUT_W-1:0]     xr_odd,
  output logic                 xr_valid,
  output logic [L-1:0][RW-1:0] xr_even_res,
  output logic [L-1:0][RW-1:0] xr_odd_res,
  output logic                 xr_res_valid
);
  localparam int DIV = (ARCH == ARCH_PARALLEL) ? 1 : RW;

  sclk_gen #(.DIV(DIV)) u_sclk (.clk(clk), .rst_n(rst_n), .en(en), .sclk(sclk));

  logic [L-1:0] ana_v, syn_v;

  for (genvar j = 0; j < L; j++) begin : g_ch
    localparam int unsigned MJ = MODULI[j];
    localparam int NJ = $clog2(MJ);
    if (NJ != RW) begin : g_bad
      $error("every modulus must need exactly RW bits");
    end
    for (genvar k = j + 1; k < L; k++) begin : g_cop
      if (gcd(longint'(MJ), longint'(MODULI[k])) != 1) begin : g_bad
        $error("the moduli must be pairwise coprime");
      end
    end

    // binary -> residue
    logic [NJ-1:0] xe_r, xo_r, ah_r, dh_r;
    logic          xv, xv2, sv, sv2;
    b2r_conv #(.M(MJ), .B(IN_W))  u_b2r_xe (.clk(clk), .rst_n(rst_n), .in_valid(sclk), .x(x_even), .res(xe_r), .out_valid(xv));
    b2r_conv #(.M(MJ), .B(IN_W))  u_b2r_xo (.clk(clk), .rst_n(rst_n), .in_valid(sclk), .x(x_odd),  .res(xo_r), .out_valid(xv2));
    b2r_conv #(.M(MJ), .B(SYN_W)) u_b2r_ah (.clk(clk), .rst_n(rst_n), .in_valid(sclk), .x(a_hat),  .res(ah_r), .out_valid(sv));
    b2r_conv #(.M(MJ), .B(SYN_W)) u_b2r_dh (.clk(clk), .rst_n(rst_n), .in_valid(sclk), .x(d_hat),  .res(dh_r), .out_valid(sv2));

    a_pair_lockstep: assert property (@(posedge clk) disable iff (!rst_n) (xv == xv2) && (sv == sv2));

    logic [NJ-1:0] a_r, d_r, xre_r, xro_r;
    if (ARCH == ARCH_SERIAL) begin : g_serial
      rns_da_dwt #(.M(MJ), .N(N), .G(G), .H(H)) u_ana (.clk(clk), .rst_n(rst_n), .load(xv),
        .x_even(xe_r), .x_odd(xo_r), .a_res(a_r), .d_res(d_r), .out_valid(ana_v[j]));
      rns_da_idwt #(.M(MJ), .N(N), .GB(GB), .HB(HB)) u_syn (.clk(clk), .rst_n(rst_n), .load(sv),
        .a_in(ah_r), .d_in(dh_r), .x_even_res(xre_r), .x_odd_res(xro_r), .out_valid(syn_v[j]));
    end else if (ARCH == ARCH_POLY) begin : g_poly
      rns_da_dwt_poly #(.M(MJ), .N(N), .G(G), .H(H)) u_ana (.clk(clk), .rst_n(rst_n), .load(xv),
        .x_even(xe_r), .x_odd(xo_r), .a_res(a_r), .d_res(d_r), .out_valid(ana_v[j]));
      rns_da_idwt_poly #(.M(MJ), .N(N), .GB(GB), .HB(HB)) u_syn (.clk(clk), .rst_n(rst_n), .load(sv),
        .a_in(ah_r), .d_in(dh_r), .x_even_res(xre_r), .x_odd_res(xro_r), .out_valid(syn_v[j]));
    end else begin : g_par
      rns_pda_dwt #(.M(MJ), .N(N), .G(G), .H(H)) u_ana (.clk(clk), .rst_n(rst_n), .load(xv),
        .x_even(xe_r), .x_odd(xo_r), .a_res(a_r), .d_res(d_r), .out_valid(ana_v[j]));
      rns_pda_idwt #(.M(MJ), .N(N), .GB(GB), .HB(HB)) u_syn (.clk(clk), .rst_n(rst_n), .load(sv),
        .a_in(ah_r), .d_in(dh_r), .x_even_res(xre_r), .x_odd_res(xro_r), .out_valid(syn_v[j]));
    end

    assign a_res[j]       = RW'(a_r);
    assign d_res[j]       = RW'(d_r);
    assign xr_even_res[j] = RW'(xre_r);
    assign xr_odd_res[j]  = RW'(xro_r);
  end

  // all channels run in lock step; channel 0 stands for all of them
  assign ad_res_valid = ana_v[0];
  assign xr_res_valid = syn_v[0];

  logic v_d, v_xo;
  ecrt_r2b #(.L(L), .MODULI(MODULI), .RW(RW), .OUT_W(OUT_W)) u_crt_a (.clk(clk), .rst_n(rst_n),
    .in_valid(ad_res_valid), .res(a_res), .y(a_out), .out_valid(ad_valid));
  ecrt_r2b #(.L(L), .MODULI(MODULI), .RW(RW), .OUT_W(OUT_W)) u_crt_d (.clk(clk), .rst_n(rst_n),
    .in_valid(ad_res_valid), .res(d_res), .y(d_out), .out_valid(v_d));
  ecrt_r2b #(.L(L), .MODULI(MODULI), .RW(RW), .OUT_W(OUT_W)) u_crt_xe (.clk(clk), .rst_n(rst_n),
    .in_valid(xr_res_valid), .res(xr_even_res), .y(xr_even), .out_valid(xr_valid));
  ecrt_r2b #(.L(L), .MODULI(MODULI), .RW(RW), .OUT_W(OUT_W)) u_crt_xo (.clk(clk), .rst_n(rst_n),
    .in_valid(xr_res_valid), .res(xr_odd_res), .y(xr_odd), .out_valid(v_xo));

  a_conv_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (v_d == ad_valid) && (v_xo == xr_valid));
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (ana_v == '0 || ana_v == '1) && (syn_v == '0 || syn_v == '1));
endmodule
