// conv2d_operator: the 2-D Gaussian convolution operator.
//
// Every pixel of the N x N window is turned into a fixed-point word of INT_W
// integer and F fractional bits and multiplied by its own coefficient w[i][j]
// (unsigned Q0.F, from gaussian_pkg). Each product is cut back to F
// fractional bits (truncation) and registered; a pipelined adder tree then
// sums the N*N products. Registers sit after the multipliers and after every
// adder level but the last, whose adder drives the result.
// Interface: win/in_valid in, result/out_valid out, one window per cycle.
// Latency: ceil(log2(N*N)) cycles (4 for 3x3) from in_valid to out_valid.
// result is the filtered pixel in Q(INT_W).F. The low F bits of each full
// product are dropped on purpose (the truncation above).
module conv2d_operator
  import gaussian_pkg::*;
#(
  parameter int unsigned N     = 3,
  parameter int unsigned F     = 8,
  parameter int unsigned INT_W = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [PIX_W-1:0]     win [N][N],
  output logic                 out_valid,
  output logic [INT_W+F-1:0]   result
);
  localparam int unsigned DW  = INT_W + F;
  localparam int unsigned NN  = N * N;
  localparam int unsigned LAT = tree_levels(NN);

  logic [DW-1:0] prod_q [NN];

  for (genvar i = 0; i < N; i++) begin : g_r
    for (genvar j = 0; j < N; j++) begin : g_c
      localparam logic [F-1:0] WEIGHT = F'(coef2d(N, F, i, j));
      logic [DW-1:0]   word;
      logic [DW+F-1:0] prod;
      assign word = DW'(win[i][j]) << F;
      assign prod = word * WEIGHT;
      always_ff @(posedge clk) prod_q[i*N+j] <= prod[F +: DW];
    end
  end

  adder_tree #(.N_IN(NN), .W(DW), .REG_LAST(1'b0)) u_tree (
    .clk(clk), .in_data(prod_q), .sum(result)
  );

  logic [LAT-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= LAT'({vld, in_valid});
  end
  assign out_valid = vld[LAT-1];
endmodule
