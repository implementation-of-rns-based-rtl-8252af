// mod_adder_tree: sums K residues modulo m with a binary tree of mod_adder.
//
// The K inputs are padded with zeros to the next power of two and reduced
// pairwise over LV = ceil(log2 K) levels.  With PIPE = 1 every level is
// registered, so 'sum' follows 'din' after LV cycles and 'out_valid' is
// 'in_valid' delayed by the same amount; a new set of inputs may enter every
// cycle.  With PIPE = 0 the tree is combinational (latency 0).  This is the
// pipelined modulo adder tree of the parallel RNS-DA filter banks and of the
// binary-to-RNS converter.
module mod_adder_tree #(
  parameter int unsigned M    = 32,
  parameter int          K    = 5,
  parameter bit          PIPE = 1'b1,
  localparam int NJ = $clog2(M),
  localparam int LV = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [K-1:0][NJ-1:0] din,
  output logic [NJ-1:0]        sum,
  output logic                 out_valid
);
  localparam int KP = 1 << LV;

  logic [NJ-1:0] node [LV+1][KP];

  for (genvar i = 0; i < KP; i++) begin : g_in
    if (i < K) begin : g_d
      assign node[0][i] = din[i];
    end else begin : g_z
      assign node[0][i] = '0;
    end
  end

  for (genvar l = 0; l < LV; l++) begin : g_lvl
    for (genvar i = 0; i < (KP >> (l + 1)); i++) begin : g_add
      mod_adder #(.M(M), .PIPE(PIPE)) u_add (
        .clk(clk), .rst_n(rst_n),
        .a(node[l][2*i]), .b(node[l][2*i+1]), .s(node[l+1][i]));
    end
    for (genvar i = (KP >> (l + 1)); i < KP; i++) begin : g_unused
      assign node[l+1][i] = '0;
    end
  end

  assign sum = node[LV][0];

  if (PIPE) begin : g_vpipe
    logic [LV-1:0] vsh;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vsh <= '0;
      else        vsh <= LV'({vsh, in_valid});
    end
    assign out_valid = vsh[LV-1];
  end else begin : g_vcomb
    assign out_valid = in_valid;
  end
endmodule
