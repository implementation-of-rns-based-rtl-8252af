// tb_mod_adder_tree: self-checking testbench of the pipelined modulo adder
// tree (M = 27, K = 5 inputs, 3 register levels).  A new random input set
// enters on most cycles; each sum is checked against the modular sum of its
// inputs, and its arrival exactly 3 cycles after the inputs.
`timescale 1ns/1ps
module tb_mod_adder_tree;
  localparam int unsigned M = 27;
  localparam int K = 5, LAT = 3;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [K-1:0][4:0] din = '0;
  logic [4:0] sum;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint exps [$], expc [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mod_adder_tree #(.M(M), .K(K), .PIPE(1'b1)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .din(din), .sum(sum), .out_valid(out_valid));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (out_valid) begin
        checks++;
        if (expc.size() == 0) begin failures++; $display("FAIL: unexpected output at %0d", cyc); end
        else begin
          longint e, c;
          e = exps.pop_front(); c = expc.pop_front();
          if (longint'(sum) != e || c != cyc) begin
            failures++;
            if (failures < 10) $display("FAIL: got %0d expected %0d (cycle %0d vs %0d)", sum, e, cyc, c);
          end
        end
      end
      in_valid = (i < 590) && ($urandom_range(3) != 0);
      if (in_valid) begin
        longint s;
        s = 0;
        for (int k = 0; k < K; k++) begin
          din[k] = 5'($urandom_range(M - 1));
          if (i % 13 == 0) din[k] = 5'(M - 1);
          s += longint'(din[k]);
        end
        exps.push_back(s % M);
        expc.push_back(cyc + LAT);
      end
    end
    if (expc.size() != 0) failures++;
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
