// mod_adder: modulo-m adder s = |a + b|_m for residues a, b < M.
//
// a + b and a + b - m are formed side by side; the borrow of the second picks
// the result.  With PIPE = 1 the sum is registered (one cycle latency, used in
// the pipelined adder trees); with PIPE = 0 it is combinational and clk/rst_n
// are unused.  The two-candidate structure is this design's own choice: the
// reference design only names modulo adders.
module mod_adder #(
  parameter int unsigned M    = 32,
  parameter bit          PIPE = 1'b1,
  localparam int NJ = $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NJ-1:0] a,
  input  logic [NJ-1:0] b,
  output logic [NJ-1:0] s
);
  logic [NJ:0]   sum;
  logic [NJ+1:0] dif;
  logic [NJ-1:0] s_c;

  always_comb begin
    sum = {1'b0, a} + {1'b0, b};
    dif = {1'b0, sum} - (NJ+2)'(M);
    s_c = dif[NJ+1] ? sum[NJ-1:0] : dif[NJ-1:0];
  end

  if (PIPE) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) s <= '0;
      else        s <= s_c;
    end
  end else begin : g_comb
    assign s = s_c;
  end
endmodule
