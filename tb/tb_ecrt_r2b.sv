// tb_ecrt_r2b: self-checking testbench of the epsilon-CRT residue-to-binary
// converter with the default moduli {32,31,29,27,25,23} (M = 446,623,200)
// and a 16-bit output.  Random integers X in [-M/2, M/2) plus the extremes
// are converted to residues here and applied; the registered output, one
// cycle later, must equal X * 2^16 / M within L/2 + 1 units (the rounding of
// the L table entries plus that of the ideal value).
`timescale 1ns/1ps
module tb_ecrt_r2b;
  import rns_dwt_pkg::*;
  localparam int L = 6, OUT_W = 16;
  localparam int unsigned MOD [L] = '{32, 31, 29, 27, 25, 23};
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [L-1:0][4:0] res = '0;
  logic [OUT_W-1:0] y;
  int checks = 0, failures = 0, maxerr = 0;
  longint mtot;

  always #5 clk = ~clk;

  ecrt_r2b #(.L(L), .MODULI(MOD), .RW(5), .OUT_W(OUT_W)) dut (.clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .res(res), .y(y), .out_valid(out_valid));

  initial begin
    mtot = 1;
    for (int j = 0; j < L; j++) mtot *= MOD[j];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      longint xv, ideal;
      int err;
      case (i % 7)
        0: xv = -(mtot / 2);
        1: xv = mtot / 2 - 1;
        2: xv = 0;
        3: xv = longint'($urandom_range(20000)) - 10000;
        default: xv = (longint'($urandom()) * 7) % mtot - mtot / 2;
      endcase
      for (int j = 0; j < L; j++) res[j] = 5'(mod_pos(xv, MOD[j]));
      in_valid = 1'b1;
      @(negedge clk);
      // ideal scaled value, rounded to nearest
      ideal = (xv * 65536 + ((xv >= 0) ? mtot / 2 : -(mtot / 2))) / mtot;
      err = int'($signed(16'(longint'(y) - ideal)));
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > L / 2 + 1 || !out_valid) begin
        failures++;
        if (failures < 10) $display("FAIL X=%0d: got %0d ideal %0d", xv, $signed(y), ideal);
      end
    end
    $display("largest error: %0d units", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
