// tb_da_rom: exhaustive self-checking testbench of the DA look-up table.
// Three configurations are read at every address and compared with sums of
// the coefficients computed here: a full 8-input low-pass table (M = 29), an
// odd-polyphase high-pass table scaled by 2^3 (M = 23), and a two-input
// synthesis table with 4 a-bits and 4 d-bits (M = 31).
`timescale 1ns/1ps
module tb_da_rom;
  import rns_dwt_pkg::*;
  logic [7:0] a8 = '0;
  logic [3:0] a4 = '0;
  logic [4:0] d_full, d_poly, d_two;
  int checks = 0, failures = 0;

  da_rom #(.M(29), .N(8), .COEF_A(G_DEF), .COEF_B(H_DEF)) u_full (.addr(a8), .data(d_full));
  da_rom #(.M(23), .N(8), .COEF_A(H_DEF), .COEF_B(G_DEF), .KA(4), .OFF(1), .STRIDE(2), .SHIFT(3))
    u_poly (.addr(a4), .data(d_poly));
  da_rom #(.M(31), .N(8), .COEF_A(GB_DEF), .COEF_B(HB_DEF), .KA(4), .KB(4), .OFF(0), .STRIDE(2))
    u_two (.addr(a8), .data(d_two));

  initial begin
    for (int a = 0; a < 256; a++) begin
      longint s1, s3;
      a8 = 8'(a); a4 = 4'(a);
      #1;
      s1 = 0; s3 = 0;
      for (int k = 0; k < 8; k++) if (a[k]) s1 += G_DEF[k];
      for (int k = 0; k < 4; k++) begin
        if (a[k])   s3 += GB_DEF[2*k];
        if (a[4+k]) s3 += HB_DEF[2*k];
      end
      checks += 2;
      if (longint'(d_full) != mod_pos(s1, 29)) begin failures++; $display("FAIL full %0d", a); end
      if (longint'(d_two)  != mod_pos(s3, 31)) begin failures++; $display("FAIL two %0d", a); end
      if (a < 16) begin
        longint s2;
        s2 = 0;
        for (int k = 0; k < 4; k++) if (a[k]) s2 += H_DEF[2*k+1];
        checks++;
        if (longint'(d_poly) != mod_pos(8 * s2, 23)) begin failures++; $display("FAIL poly %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
