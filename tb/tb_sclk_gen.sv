// tb_sclk_gen: self-checking testbench of the sample-strobe generator with
// DIV = 5 and DIV = 1.  With 'en' toggled randomly, the strobe must appear
// exactly in every 5th enabled cycle (every enabled cycle for DIV = 1), the
// first one in the first enabled cycle after reset.
`timescale 1ns/1ps
module tb_sclk_gen;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, s5, s1;
  int checks = 0, failures = 0, nen = 0;

  always #5 clk = ~clk;

  sclk_gen #(.DIV(5)) dut5 (.clk(clk), .rst_n(rst_n), .en(en), .sclk(s5));
  sclk_gen #(.DIV(1)) dut1 (.clk(clk), .rst_n(rst_n), .en(en), .sclk(s1));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      en = (i < 50) || ($urandom_range(3) != 0);
      #1;
      checks++;
      if (s5 != (en && (nen % 5 == 0)) || s1 != en) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: s5=%0b s1=%0b en=%0b n=%0d", i, s5, s1, en, nen);
      end
      if (en) nen++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
