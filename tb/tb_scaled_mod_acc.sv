// tb_scaled_mod_acc: self-checking testbench of the CSA-based scaled modulo
// accumulator.  Two instances (M = 29 and M = 32) first go through every
// (y, x) pair: a 'first' step loads y, the next step adds x, and the result
// is checked.  Then they receive random residues, with frame restarts
// ('first') and idle cycles, and every registered result is compared with
// (2*y + x) mod m computed here.  Ends with TB_RESULT.
`timescale 1ns/1ps
module tb_scaled_mod_acc;
  localparam int unsigned MA = 29, MB = 32;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, first = 1'b0;
  logic [4:0] xa = '0, xb = '0, ya, yb;
  int checks = 0, failures = 0;
  longint ra = 0, rb = 0;

  always #5 clk = ~clk;

  scaled_mod_acc #(.M(MA)) dut_a (.clk(clk), .rst_n(rst_n), .en(en), .first(first), .x(xa), .y(ya));
  scaled_mod_acc #(.M(MB)) dut_b (.clk(clk), .rst_n(rst_n), .en(en), .first(first), .x(xb), .y(yb));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // exhaustive sweep of the state y and the input x
    for (int y0 = 0; y0 < int'(MB); y0++) begin
      for (int x0 = 0; x0 < int'(MB); x0++) begin
        en = 1'b1; first = 1'b1;
        xa = 5'(y0 % MA); xb = 5'(y0);
        @(negedge clk);
        first = 1'b0;
        xa = 5'(x0 % MA); xb = 5'(x0);
        ra = (2 * longint'(y0 % MA) + longint'(x0 % MA)) % MA;
        rb = (2 * longint'(y0) + longint'(x0)) % MB;
        @(negedge clk);
        checks++;
        if (longint'(ya) != ra || longint'(yb) != rb) begin
          failures++;
          if (failures < 10) $display("FAIL y=%0d x=%0d: got %0d %0d expected %0d %0d", y0, x0, ya, yb, ra, rb);
        end
      end
    end
    for (int i = 0; i < 4000; i++) begin
      en    = ($urandom_range(7) != 0);
      first = ($urandom_range(4) == 0);
      xa = 5'($urandom_range(MA - 1));
      xb = 5'($urandom_range(MB - 1));
      if (i % 50 == 7) begin xa = 5'(MA - 1); xb = 5'(MB - 1); end
      if (en) begin
        ra = ((first ? 0 : 2 * ra) + longint'(xa)) % MA;
        rb = ((first ? 0 : 2 * rb) + longint'(xb)) % MB;
      end
      @(negedge clk);
      checks++;
      if (longint'(ya) != ra || longint'(yb) != rb) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: got %0d %0d expected %0d %0d", i, ya, yb, ra, rb);
      end
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
