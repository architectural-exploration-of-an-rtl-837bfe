// modified_operator: the Modified Gaussian convolution operator.
//
// The Gaussian kernel repeats coefficients: in a 3x3 window the four corners
// share w_c, the four edge neighbours of the centre share w_n, and only the
// centre has its own weight. The operator therefore first adds the pixels
// that share a coefficient (one pipelined pre-adder tree per coefficient
// class, every level registered, shorter trees padded with registers so all
// classes arrive together), then multiplies each class sum by its
// coefficient once (one multiplier per class: 3 for 3x3, 6 for 5x5, 10 for
// 7x7), truncates the products to F fractional bits, registers them, and
// sums them in a final adder tree whose last level drives the result. The
// pre-added sums need more integer bits than a pixel (INT_W = 10 for 3x3, 11
// for 5x5 and 7x7). Classes are the window positions with the same pair of
// distances {|i-R|,|j-R|} from the centre (see gaussian_pkg).
// Latency: ceil(log2(largest class)) + ceil(log2(classes)) cycles (4 for
// 3x3); one window per cycle. Results equal the 2-D operator's. The low F
// bits of each full product are dropped on purpose (truncation); the
// single-member centre class uses a tree of one word, which has no clock.
module modified_operator
  import gaussian_pkg::*;
#(
  parameter int unsigned N     = 3,
  parameter int unsigned F     = 8,
  parameter int unsigned INT_W = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [PIX_W-1:0]     win [N][N],
  output logic                 out_valid,
  output logic [INT_W+F-1:0]   result
);
  localparam int unsigned DW    = INT_W + F;
  localparam int unsigned NC    = num_classes(N);
  localparam int unsigned PRE_L = tree_levels(max_class_size(N));
  localparam int unsigned LAT   = PRE_L + tree_levels(NC);

  logic [DW-1:0] prod_q [NC];

  for (genvar c = 0; c < NC; c++) begin : g_cls
    localparam int unsigned M      = class_size(N, c);
    localparam int unsigned PAD    = PRE_L - tree_levels(M);
    localparam int unsigned MI     = class_member(N, c, 0);
    localparam logic [F-1:0] WEIGHT = F'(coef2d(N, F, MI / N, MI % N));

    logic [DW-1:0]   members [M];
    logic [DW-1:0]   tree_sum;
    logic [DW-1:0]   class_sum;
    logic [DW+F-1:0] prod;

    for (genvar k = 0; k < M; k++) begin : g_mem
      localparam int unsigned IDX = class_member(N, c, k);
      assign members[k] = DW'(win[IDX/N][IDX%N]) << F;
    end

    adder_tree #(.N_IN(M), .W(DW), .REG_LAST(1'b1)) u_pre (
      .clk(clk), .in_data(members), .sum(tree_sum)
    );

    if (PAD == 0) begin : g_nopad
      assign class_sum = tree_sum;
    end else begin : g_pad
      logic [DW-1:0] dly [PAD];
      always_ff @(posedge clk) begin
        dly[0] <= tree_sum;
        for (int unsigned d = 1; d < PAD; d++) dly[d] <= dly[d-1];
      end
      assign class_sum = dly[PAD-1];
    end

    assign prod = class_sum * WEIGHT;
    // Outer classes first, as the corner and neighbour products meet first.
    always_ff @(posedge clk) prod_q[NC-1-c] <= prod[F +: DW];
  end

  adder_tree #(.N_IN(NC), .W(DW), .REG_LAST(1'b0)) u_tree (
    .clk(clk), .in_data(prod_q), .sum(result)
  );

  logic [LAT-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= LAT'({vld, in_valid});
  end
  assign out_valid = vld[LAT-1];
endmodule
