// tb_top_harness: stimulus and checker for one rns_dwt_top instance.
//
// Drives the top through its sample strobe: random 14-bit sample pairs and
// 16-bit a^/d^ pairs (with the extremes mixed in), and periods with 'en'
// low, when the strobe must stop.  A reference model here convolves the
// binary samples with the integer filters and checks (1) every residue
// output exactly, modulo each modulus, (2) the scaled epsilon-CRT outputs
// against value * 2^16 / M within 4 units, and (3) the latency from the
// strobe to each result.  It counts how often each mechanism occurred
// (strobes, stalls, back-to-back frames, negative inputs, negative outputs)
// and fails if one never did.  The moduli set is a parameter.  'done' rises when NSAMP pairs have been
// checked on both banks.
`timescale 1ns/1ps
module tb_top_harness
  import rns_dwt_pkg::*;
#(
  parameter arch_e       ARCH  = ARCH_SERIAL,
  parameter int          NSAMP = 200,
  parameter int          L     = NMOD,
  parameter int          RW    = 5,
  parameter int unsigned MODS [L] = MODULI_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              en,
  input  logic              sclk,
  output logic [13:0]       x_even,
  output logic [13:0]       x_odd,
  input  logic [15:0]       a_out,
  input  logic [15:0]       d_out,
  input  logic              ad_valid,
  input  logic [L-1:0][RW-1:0]   a_res,
  input  logic [L-1:0][RW-1:0]   d_res,
  input  logic              ad_res_valid,
  output logic [15:0]       a_hat,
  output logic [15:0]       d_hat,
  input  logic [15:0]       xr_even,
  input  logic [15:0]       xr_odd,
  input  logic              xr_valid,
  input  logic [L-1:0][RW-1:0]   xr_even_res,
  input  logic [L-1:0][RW-1:0]   xr_odd_res,
  input  logic              xr_res_valid,
  output int                checks,
  output int                failures,
  output logic              done
);
  localparam int NJ = RW;
  // strobe-to-residue latency: 4 cycles of binary-to-RNS conversion and
  // load, then the channel
  localparam int LAT_ANA = 4 + ((ARCH == ARCH_SERIAL) ? NJ : (ARCH == ARCH_POLY) ? NJ + 1 : 3);
  localparam int LAT_SYN = 4 + ((ARCH == ARCH_SERIAL) ? NJ : (ARCH == ARCH_POLY) ? NJ + 1 : 4);

  longint mtot;
  longint cyc = 0;
  longint hx [NTAPS];
  longint ha [NTAPS/2], hd [NTAPS/2];
  longint qa [$], qd [$], qca [$], qa2 [$], qd2 [$];
  longint qe [$], qo [$], qce [$], qe2 [$], qo2 [$];
  int n_strobe = 0, n_stall = 0, n_b2b = 0, n_neg_in = 0, n_neg_out = 0, n_ana = 0, n_syn = 0;
  logic prev_strobe = 1'b0;
  int since = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint scaled(longint v);
    return (v * 65536 + ((v >= 0) ? mtot / 2 : -(mtot / 2))) / mtot;
  endfunction

  task automatic chk_scaled(string what, logic [15:0] got, longint v);
    int err;
    err = int'($signed(16'(longint'(got) - scaled(v))));
    if (err < 0) err = -err;
    checks++;
    if (err > 4) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected about %0d", what, $signed(got), scaled(v));
    end
  endtask

  task automatic chk_res(string what, logic [L-1:0][RW-1:0] got, longint v);
    checks++;
    for (int j = 0; j < L; j++)
      if (longint'(got[j]) != mod_pos(v, MODS[j])) begin
        failures++;
        if (failures < 10) $display("FAIL %s residue %0d: got %0d for value %0d", what, j, got[j], v);
        break;
      end
  endtask

  function automatic longint rnd(int bits, int i);
    longint h;
    h = longint'(1) << (bits - 1);
    case (i % 11)
      0: return -h;
      1: return h - 1;
      default: return longint'($urandom_range(32'(2 * h - 1))) - h;
    endcase
  endfunction

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    en = 1'b0; x_even = '0; x_odd = '0; a_hat = '0; d_hat = '0;
    mtot = 1;
    for (int j = 0; j < L; j++) mtot *= MODS[j];
    for (int k = 0; k < NTAPS; k++) hx[k] = 0;
    for (int k = 0; k < NTAPS/2; k++) begin ha[k] = 0; hd[k] = 0; end
    wait (rst_n);
    for (int i = 0; n_ana < NSAMP || n_syn < NSAMP; i++) begin
      @(negedge clk);
      // ---- check outputs of the cycle just ended ----
      if (ad_res_valid) begin
        if (qa.size() == 0) begin failures++; $display("FAIL: unexpected analysis result"); end
        else begin
          longint c;
          c = qca.pop_front();
          checks++;
          if (c != cyc) begin
            failures++;
            if (failures < 10) $display("FAIL analysis latency: cycle %0d expected %0d", cyc, c);
          end
          chk_res("a", a_res, qa.pop_front());
          chk_res("d", d_res, qd.pop_front());
        end
      end
      if (ad_valid) begin
        longint av, dv;
        av = qa2.pop_front(); dv = qd2.pop_front();
        chk_scaled("a_out", a_out, av);
        chk_scaled("d_out", d_out, dv);
        if (av < 0 && $signed(a_out) < 0) n_neg_out++;
        n_ana++;
      end
      if (xr_res_valid) begin
        if (qe.size() == 0) begin failures++; $display("FAIL: unexpected synthesis result"); end
        else begin
          longint c;
          c = qce.pop_front();
          checks++;
          if (c != cyc) begin
            failures++;
            if (failures < 10) $display("FAIL synthesis latency: cycle %0d expected %0d", cyc, c);
          end
          chk_res("x_even", xr_even_res, qe.pop_front());
          chk_res("x_odd", xr_odd_res, qo.pop_front());
        end
      end
      if (xr_valid) begin
        chk_scaled("xr_even", xr_even, qe2.pop_front());
        chk_scaled("xr_odd", xr_odd, qo2.pop_front());
        n_syn++;
      end
      // ---- drive the next cycle ----
      // stall now and then: en low for a few cycles
      if (i > 40 && (i % 97) < 6) begin
        en = 1'b0;
        if ((i % 97) == 0) n_stall++;
      end else en = 1'b1;
      #1;
      if (sclk && rst_n) begin
        longint xe, xo, ah, dh, s0, s1;
        xe = rnd(14, i); xo = rnd(14, i + 5); ah = rnd(16, i + 3); dh = rnd(16, i + 7);
        if (xe < 0) n_neg_in++;
        x_even = 14'(xe); x_odd = 14'(xo); a_hat = 16'(ah); d_hat = 16'(dh);
        n_strobe++;
        if (prev_strobe || since == ((ARCH == ARCH_PARALLEL) ? 1 : NJ)) n_b2b++;
        since = 0;
        // analysis model
        for (int k = NTAPS - 1; k >= 2; k--) hx[k] = hx[k-2];
        hx[0] = xe; hx[1] = xo;
        s0 = 0; s1 = 0;
        for (int k = 0; k < NTAPS; k++) begin
          s0 += longint'(G_DEF[k]) * hx[k];
          s1 += longint'(H_DEF[k]) * hx[k];
        end
        qa.push_back(s0); qd.push_back(s1); qa2.push_back(s0); qd2.push_back(s1);
        qca.push_back(cyc + LAT_ANA);
        // synthesis model
        for (int k = NTAPS/2 - 1; k >= 1; k--) begin ha[k] = ha[k-1]; hd[k] = hd[k-1]; end
        ha[0] = ah; hd[0] = dh;
        s0 = 0; s1 = 0;
        for (int k = 0; k < NTAPS/2; k++) begin
          s0 += longint'(GB_DEF[2*k]) * ha[k] + longint'(HB_DEF[2*k]) * hd[k];
          s1 += longint'(GB_DEF[2*k+1]) * ha[k] + longint'(HB_DEF[2*k+1]) * hd[k];
        end
        qe.push_back(s0); qo.push_back(s1); qe2.push_back(s0); qo2.push_back(s1);
        qce.push_back(cyc + LAT_SYN);
      end
      if (en) since++;
      prev_strobe = sclk && (ARCH == ARCH_PARALLEL);
    end
    $display("arch %0d: %0d strobes, %0d stalls, %0d back-to-back, %0d negative inputs, %0d negative outputs, %0d analysis and %0d synthesis results",
             ARCH, n_strobe, n_stall, n_b2b, n_neg_in, n_neg_out, n_ana, n_syn);
    if (n_strobe == 0 || n_stall == 0 || n_b2b == 0 || n_neg_in == 0 || n_neg_out == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    done = 1'b1;
  end
endmodule
