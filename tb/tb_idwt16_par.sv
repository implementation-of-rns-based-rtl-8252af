// tb_idwt16_par: self-checking testbench of rns_pda_idwt (16-tap parallel synthesis channel).
//
// Drives a random stream of residue pairs modulo M = 61 into the channel
// (16-tap Daubechies-8 filters quantised to 12 bits, split into K = 2 sub-filters, modulus 61 (6-bit channel)),
// with back-to-back and gapped sample strobes, and compares each output pair
// with a direct modular convolution of the same residues computed here.  It
// also checks the latency: a pair loaded at clock edge t must be reported
// valid right after edge t + ceil(log2 2K n_j).  Ends with the TB_RESULT line.
`timescale 1ns/1ps
module tb_idwt16_par;
  import rns_dwt_pkg::*;
  localparam int unsigned M = 61;
  localparam int NJ = $clog2(M);
  localparam int N = 16;
  localparam int K = 2;
  localparam int NH = N / 2;
  localparam int CG  [N] = '{0, 1, -1, -10, 18, 29, -90, -36, 264, 1, -582, -32, 1199, 1384, 641, 111};
  localparam int CH  [N] = '{-111, 641, -1384, 1199, 32, -582, -1, 264, 36, -90, -29, 18, 10, -1, -1, 0};
  localparam int CGB [N] = '{111, 641, 1384, 1199, -32, -582, 1, 264, -36, -90, 29, 18, -10, -1, 1, 0};
  localparam int CHB [N] = '{0, -1, -1, 10, 18, -29, -90, 36, 264, -1, -582, 32, 1199, -1384, 641, -111};
  localparam int LAT = $clog2(2 * K * NJ);
  localparam int MINGAP = 1;
  localparam int NFRAMES = 300;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [NJ-1:0] in0 = '0, in1 = '0, out0, out1;
  logic out_valid;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  rns_pda_idwt #(.M(M), .N(N), .K(K), .GB(CGB), .HB(CHB)) dut (.clk(clk), .rst_n(rst_n), .load(load),
    .a_in(in0), .d_in(in1), .x_even_res(out0), .x_odd_res(out1), .out_valid(out_valid));

  // reference model state
  longint hx [N];        // analysis: hx[k] = x_(2n-k)
  longint ha [NH], hd [NH];
  longint exp0 [$], exp1 [$], expc [$];

  function automatic longint md(longint v);
    return mod_pos(v, longint'(M));
  endfunction

  task automatic model(longint v0, longint v1);
    longint s0, s1;
    s0 = 0; s1 = 0;
    for (int k = NH - 1; k >= 1; k--) begin ha[k] = ha[k-1]; hd[k] = hd[k-1]; end
    ha[0] = v0; hd[0] = v1;
    for (int k = 0; k < NH; k++) begin
      s0 += longint'(CGB[2*k]) * ha[k] + longint'(CHB[2*k]) * hd[k];
      s1 += longint'(CGB[2*k+1]) * ha[k] + longint'(CHB[2*k+1]) * hd[k];
    end
    exp0.push_back(md(s0));
    exp1.push_back(md(s1));
  endtask

  task automatic check_out();
    if (out_valid) begin
      checks++;
      if (expc.size() == 0) begin
        failures++;
        $display("FAIL: unexpected out_valid at cycle %0d", cyc);
      end else begin
        longint e0, e1, ec;
        e0 = exp0.pop_front(); e1 = exp1.pop_front(); ec = expc.pop_front();
        if (longint'(out0) != e0 || longint'(out1) != e1 || cyc != ec) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d (expected %0d): got %0d %0d expected %0d %0d", cyc, ec, out0, out1, e0, e1);
        end
      end
    end
  endtask

  initial begin
    int gap;
    for (int k = 0; k < N; k++) hx[k] = 0;
    for (int k = 0; k < NH; k++) begin ha[k] = 0; hd[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    gap = 0;
    for (int f = 0; f < NFRAMES; ) begin
      @(negedge clk);
      check_out();
      load = 1'b0;
      if (gap > 0) gap--;
      else begin
        longint v0, v1;
        v0 = longint'($urandom_range(M - 1));
        v1 = longint'($urandom_range(M - 1));
        // extremes now and then
        if (f % 17 == 3) begin v0 = M - 1; v1 = M - 1; end
        in0 = NJ'(v0); in1 = NJ'(v1); load = 1'b1;
        model(v0, v1);
        expc.push_back(cyc + 1 + LAT);
        f++;
        gap = MINGAP - 1 + (($urandom_range(3) == 0) ? int'($urandom_range(3)) : 0);
      end
    end
    repeat (LAT + 4) begin
      @(negedge clk);
      check_out();
      load = 1'b0;
    end
    if (expc.size() != 0) begin
      failures++;
      $display("FAIL: %0d results never appeared", expc.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
