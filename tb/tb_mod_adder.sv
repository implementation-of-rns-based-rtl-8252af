// tb_mod_adder: exhaustive self-checking testbench of the modulo adder, a
// combinational instance (M = 31) and a registered one (M = 25, one cycle
// latency).  Every residue pair is applied and |a+b|_m checked.
`timescale 1ns/1ps
module tb_mod_adder;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] a = '0, b = '0, s_c, s_r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mod_adder #(.M(31), .PIPE(1'b0)) dut_c (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .s(s_c));
  mod_adder #(.M(25), .PIPE(1'b1)) dut_r (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .s(s_r));

  initial begin
    int pa, pb;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pa = -1; pb = -1;
    for (int i = 0; i < 31; i++)
      for (int j = 0; j < 31; j++) begin
        a = 5'(i); b = 5'(j);
        #1;
        checks++;
        if (int'(s_c) != (i + j) % 31) begin
          failures++;
          $display("FAIL comb %0d+%0d: %0d", i, j, s_c);
        end
        @(negedge clk);
        // registered instance: result of the pair applied in this cycle
        if (i < 25 && j < 25) begin
          checks++;
          if (int'(s_r) != (i + j) % 25) begin
            failures++;
            $display("FAIL reg %0d+%0d: %0d", i, j, s_r);
          end
        end
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
