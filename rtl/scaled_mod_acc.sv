// scaled_mod_acc: CSA-based scaled modulo-m accumulator of RNS-DA.
//
// Computes, once per enabled bit-clock cycle, y(n) = |2*y(n-1) + x(n)|_m, the
// shift-accumulate step of distributed arithmetic carried out inside one
// residue channel (MSB-first bit planes, so after n_j steps y holds
// |sum_l 2^l x_l|_m).  Because 0 <= 2y + x < 3m, the result is one of
//   s1 = 2y + x,  s2 = 2y + x - m,  s3 = 2y + x - 2m.
// s1 is formed by one carry-propagate adder; s2 and s3 each reduce the three
// operands {2y, x, -m} resp. {2y, x, -2m} with a carry-save adder row and a
// final carry-propagate adder.  All three run side by side, so the critical
// path holds a single carry chain, and the output multiplexer chooses by the
// sign bits (carries) of s2 and s3: s3 if s3 >= 0, else s2 if s2 >= 0, else
// s1.  This selection is equivalent to the three-way rule of the reference
// design; the exact carry encoding of its decision table is this design's own.
//
// Interface: 'en' performs one step; 'first' marks the first step of a frame,
// in which the previous value is taken as zero (the accumulator restarts for
// each sample).  x must be a residue (< M).  y is registered: the result of a
// step is visible the cycle after it.
module scaled_mod_acc #(
  parameter int unsigned M = 32,
  localparam int NJ = $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          first,
  input  logic [NJ-1:0] x,
  output logic [NJ-1:0] y
);
  localparam int W = NJ + 2;   // two's-complement width holding -2m .. 3m-3
  localparam logic [W-1:0] NEG_M  = W'((1 << W) - M);
  localparam logic [W-1:0] NEG_2M = W'((1 << W) - 2 * M);

  logic [W-1:0] two_y, xw;
  logic [W-1:0] s1, s2, s3;
  logic [W-1:0] cs2_s, cs2_c, cs3_s, cs3_c;

  always_comb begin
    two_y = first ? '0 : {1'b0, y, 1'b0};
    xw    = W'(x);
    // CPA for 2y + x
    s1    = two_y + xw;
    // CSA rows (3:2 compressors), then one CPA each
    cs2_s = two_y ^ xw ^ NEG_M;
    cs2_c = ((two_y & xw) | (two_y & NEG_M) | (xw & NEG_M)) << 1;
    s2    = cs2_s + cs2_c;
    cs3_s = two_y ^ xw ^ NEG_2M;
    cs3_c = ((two_y & xw) | (two_y & NEG_2M) | (xw & NEG_2M)) << 1;
    s3    = cs3_s + cs3_c;
  end

  logic [NJ-1:0] y_next;
  always_comb begin
    if (!s3[W-1])      y_next = s3[NJ-1:0];
    else if (!s2[W-1]) y_next = s2[NJ-1:0];
    else               y_next = s1[NJ-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= y_next;
  end

  // operand must be a residue
  a_x_residue: assert property (@(posedge clk) disable iff (!rst_n) en |-> ({1'b0, x} < (NJ+1)'(M)));
endmodule
