// lut_operator: the LUT-based (memoization) Gaussian convolution operator.
//
// Same structure as the 2-D operator, but each of the N*N multipliers is
// replaced by a 256-entry constant table (coef_lut) indexed by the 8-bit
// pixel and holding pixel*w[i][j] in Q(INT_W).F. Table outputs are
// registered and summed by the pipelined adder tree, with registers after
// every adder level but the last.
// Latency: ceil(log2(N*N)) cycles (4 for 3x3); one window per cycle. Results
// are bit-identical to conv2d_operator.
module lut_operator
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

  logic [DW-1:0] lut_q [NN];

  for (genvar i = 0; i < N; i++) begin : g_r
    for (genvar j = 0; j < N; j++) begin : g_c
      logic [DW-1:0] lut_out;
      coef_lut #(.F(F), .INT_W(INT_W), .WEIGHT(coef2d(N, F, i, j))) u_lut (
        .addr(win[i][j]), .data(lut_out)
      );
      always_ff @(posedge clk) lut_q[i*N+j] <= lut_out;
    end
  end

  adder_tree #(.N_IN(NN), .W(DW), .REG_LAST(1'b0)) u_tree (
    .clk(clk), .in_data(lut_q), .sum(result)
  );

  logic [LAT-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= LAT'({vld, in_valid});
  end
  assign out_valid = vld[LAT-1];
endmodule
