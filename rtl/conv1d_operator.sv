// conv1d_operator: the 1-D Gaussian convolution operator of the separable
// architecture.
//
// N fixed-point words in Q(INT_W).F are multiplied by the 1-D Gaussian
// coefficients (unsigned Q0.F, from gaussian_pkg); each product is truncated
// back to F fractional bits and registered, and a pipelined adder tree sums
// them, with registers after every adder level but the last. The same module
// serves the horizontal pass (taps = one image row) and the vertical pass
// (taps = one image column). Tap k is multiplied by coefficient k; the
// kernel is symmetric, so the tap order does not matter.
// Latency: ceil(log2(N)) cycles (2 for N = 3) from in_valid to out_valid.
// The low F bits of each full product are dropped on purpose (truncation).
module conv1d_operator
  import gaussian_pkg::*;
#(
  parameter int unsigned N     = 3,
  parameter int unsigned F     = 8,
  parameter int unsigned INT_W = 9
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [INT_W+F-1:0]   taps [N],
  output logic                 out_valid,
  output logic [INT_W+F-1:0]   result
);
  localparam int unsigned DW  = INT_W + F;
  localparam int unsigned LAT = tree_levels(N);

  logic [DW-1:0] prod_q [N];

  for (genvar k = 0; k < N; k++) begin : g_tap
    localparam logic [F-1:0] WEIGHT = F'(coef1d(N, F, k));
    logic [DW+F-1:0] prod;
    assign prod = taps[k] * WEIGHT;
    always_ff @(posedge clk) prod_q[k] <= prod[F +: DW];
  end

  adder_tree #(.N_IN(N), .W(DW), .REG_LAST(1'b0)) u_tree (
    .clk(clk), .in_data(prod_q), .sum(result)
  );

  logic [LAT-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= LAT'({vld, in_valid});
  end
  assign out_valid = vld[LAT-1];
endmodule
