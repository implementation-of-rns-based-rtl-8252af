// da_bit_ctrl: bit-serial frame sequencer of the RNS-DA filter banks.
//
// A 'load' pulse (the sample strobe) starts a frame of NJ accumulation
// cycles: 'active' is high for those NJ cycles, 'first' marks the first one
// (the accumulators restart) and 'last' the final one.  'done' is high in the
// cycle after the last step, when the accumulators hold the frame result.  A
// new load is accepted in the last cycle of a frame, so frames can run back
// to back at one sample pair per NJ cycles.
module da_bit_ctrl #(
  parameter int NJ = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  output logic active,
  output logic first,
  output logic last,
  output logic done
);
  localparam int CW = $clog2(NJ + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
      done   <= 1'b0;
    end else begin
      done <= last;
      if (load) begin
        active <= 1'b1;
        cnt    <= '0;
      end else if (active) begin
        if (last) active <= 1'b0;
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign first = active && (cnt == '0);
  assign last  = active && (cnt == CW'(NJ - 1));

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> (!active || last));
endmodule
