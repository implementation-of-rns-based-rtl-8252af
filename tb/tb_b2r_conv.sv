// tb_b2r_conv: self-checking testbench of the two's-complement to residue
// converter, 14-bit input, moduli 29 and 32.  Random words (and the extremes
// -8192, -1, 0, 8191) enter on most cycles; each residue is compared with
// x mod m computed here and must appear 3 cycles after its input
// (4 nibble tables + sign term = 5 terms, 3 adder levels).
`timescale 1ns/1ps
module tb_b2r_conv;
  import rns_dwt_pkg::*;
  localparam int B = 14, LAT = 3;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, va, vb;
  logic [B-1:0] x = '0;
  logic [4:0] ra, rb;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint ea [$], eb [$], ec [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  b2r_conv #(.M(29), .B(B)) dut_a (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .res(ra), .out_valid(va));
  b2r_conv #(.M(32), .B(B)) dut_b (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .res(rb), .out_valid(vb));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (va) begin
        checks++;
        if (ec.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
        else begin
          longint a, b, c;
          a = ea.pop_front(); b = eb.pop_front(); c = ec.pop_front();
          if (longint'(ra) != a || longint'(rb) != b || c != cyc || !vb) begin
            failures++;
            if (failures < 10) $display("FAIL: got %0d %0d expected %0d %0d (cycle %0d/%0d)", ra, rb, a, b, cyc, c);
          end
        end
      end
      in_valid = (i < 2990) && ($urandom_range(4) != 0);
      if (in_valid) begin
        longint v;
        case (i % 9)
          0: v = -8192;
          1: v = 8191;
          2: v = -1;
          3: v = 0;
          default: v = longint'($urandom_range(16383)) - 8192;
        endcase
        x = B'(v);
        ea.push_back(mod_pos(v, 29));
        eb.push_back(mod_pos(v, 32));
        ec.push_back(cyc + LAT);
      end
    end
    if (ec.size() != 0) failures++;
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
