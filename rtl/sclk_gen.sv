// sclk_gen: sample-clock generator.
//
// Divides the bit clock by DIV: 'sclk' is a one-cycle strobe every DIV
// cycles while 'en' is high (the counter holds while en is low), used as the
// sample strobe of the bit-serial filter banks, whose frames last
// n_j = DIV bit-clock cycles.  DIV = 1 gives a strobe every cycle (parallel
// banks).  The first strobe comes in the first enabled cycle after reset.
module sclk_gen #(
  parameter int DIV = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic sclk
);
  localparam int CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         cnt <= '0;
    else if (en && cnt == CW'(DIV - 1)) cnt <= '0;
    else if (en)                        cnt <= cnt + 1'b1;
  end

  assign sclk = en && (cnt == '0);
endmodule
