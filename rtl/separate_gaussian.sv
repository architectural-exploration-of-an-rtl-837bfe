// separate_gaussian: the Separate Gaussian filter (separable convolution).
//
// The N x N Gaussian is the product of two 1-D Gaussians, so the filter is
// built as two complete 1-D filters in series, each with its own control
// block, delay line and conv1d_operator:
//   horizontal: a 1 x N delay line (N registers) over the input rows; the
//     control block reports a window once a row has supplied N samples, so
//     each row of IMG_W pixels gives IMG_W-N+1 intermediate samples;
//   vertical: an N x 1 delay line whose N-1 row buffers are IMG_W-N+1
//     samples long; it reports a window from row N-1 on.
// The intermediate samples are kept as Q(INT_W).F words (INT_W = 9), not
// rounded to pixels, and the vertical products are truncated to F
// fractional bits. The output is Q(INT_W).F; out_last marks the last output
// of a frame.
// Latency: 1 + ceil(log2 N) cycles per pass (3 + 3 for N = 3), plus the
// vertical delay line's wait for N-1 rows.
module separate_gaussian
  import gaussian_pkg::*;
#(
  parameter int unsigned N     = 3,
  parameter int unsigned F     = 8,
  parameter int unsigned INT_W = 9,
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [PIX_W-1:0]     in_pixel,
  output logic                 out_valid,
  output logic                 out_last,
  output logic [INT_W+F-1:0]   result
);
  localparam int unsigned DW    = INT_W + F;
  localparam int unsigned MID_W = IMG_W - N + 1;
  localparam int unsigned LAT   = tree_levels(N);

  // ---- horizontal 1 x N filter --------------------------------------------
  logic          h_win_valid, h_win_last;
  logic [DW-1:0] h_window [1][N];
  logic [DW-1:0] h_taps [N];
  logic          h_valid;
  logic [DW-1:0] h_result;

  conv_control #(.IMG_W(IMG_W), .IMG_H(IMG_H), .WIN_W(N), .WIN_H(1)) u_h_ctrl (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .win_valid(h_win_valid), .win_last(h_win_last)
  );

  delay_line_buffer #(.DATA_W(DW), .IMG_W(IMG_W), .WIN_W(N), .WIN_H(1)) u_h_dlb (
    .clk(clk), .in_valid(in_valid), .in_data(DW'(in_pixel) << F), .window(h_window)
  );

  assign h_taps = h_window[0];

  conv1d_operator #(.N(N), .F(F), .INT_W(INT_W)) u_h_op (
    .clk(clk), .rst_n(rst_n), .in_valid(h_win_valid), .taps(h_taps),
    .out_valid(h_valid), .result(h_result)
  );

  // ---- vertical N x 1 filter ----------------------------------------------
  logic          v_win_valid, v_win_last;
  logic [DW-1:0] v_window [N][1];
  logic [DW-1:0] v_taps [N];
  logic [LAT-1:0] v_last_dly;

  conv_control #(.IMG_W(MID_W), .IMG_H(IMG_H), .WIN_W(1), .WIN_H(N)) u_v_ctrl (
    .clk(clk), .rst_n(rst_n), .in_valid(h_valid),
    .win_valid(v_win_valid), .win_last(v_win_last)
  );

  delay_line_buffer #(.DATA_W(DW), .IMG_W(MID_W), .WIN_W(1), .WIN_H(N)) u_v_dlb (
    .clk(clk), .in_valid(h_valid), .in_data(h_result), .window(v_window)
  );

  for (genvar k = 0; k < N; k++) begin : g_vtap
    assign v_taps[k] = v_window[k][0];
  end

  conv1d_operator #(.N(N), .F(F), .INT_W(INT_W)) u_v_op (
    .clk(clk), .rst_n(rst_n), .in_valid(v_win_valid), .taps(v_taps),
    .out_valid(out_valid), .result(result)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_last_dly <= '0;
    else        v_last_dly <= LAT'({v_last_dly, v_win_last});
  end
  assign out_last = v_last_dly[LAT-1];

  // h_win_last is not needed: the vertical control block finds the end of
  // the frame from its own counters.
  logic unused_h_last;
  assign unused_h_last = h_win_last;
endmodule
