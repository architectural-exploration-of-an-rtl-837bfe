// gaussian_filter: one Gaussian filter accelerator core (convolution
// datapath).
//
// A stream of 8-bit pixels, one per cycle with in_valid, raster order,
// IMG_W x IMG_H per frame, goes through a delay-line buffer that keeps the
// current N x N window; a control block of counters and comparators says
// when that window lies inside the image; the convolution operator selected
// by ARCH turns each complete window into one filtered pixel:
//   ARCH_2D       conv2d_operator   (N*N multipliers + adder tree)
//   ARCH_MODIFIED modified_operator (pre-adders, one multiplier per class)
//   ARCH_LUT      lut_operator      (constant tables instead of multipliers)
//   ARCH_SEPARATE separate_gaussian (horizontal then vertical 1-D filters,
//                                    each with its own buffer and control)
// Arithmetic is fixed point with INT_W integer and F fractional bits (the
// precision-scaling knob: F = 8 or 4). The output pixel is the integer part
// of the operator result, saturated at 255 (truncation, not rounding).
// Only complete windows produce output: (IMG_W-N+1) x (IMG_H-N+1) pixels per
// frame, out_last on the last one. Latency from the pixel that completes a
// window to its output: 1 cycle for the buffer plus the operator latency.
module gaussian_filter
  import gaussian_pkg::*;
#(
  parameter arch_e       ARCH  = ARCH_2D,
  parameter int unsigned N     = 3,
  parameter int unsigned F     = 8,
  parameter int unsigned INT_W = default_int_w(ARCH, N),
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_pixel,
  output logic             out_valid,
  output logic             out_last,
  output logic [PIX_W-1:0] out_pixel
);
  localparam int unsigned DW = INT_W + F;

  logic [DW-1:0] result;

  if (ARCH == ARCH_SEPARATE) begin : g_sep
    separate_gaussian #(.N(N), .F(F), .INT_W(INT_W), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_sep (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_pixel(in_pixel),
      .out_valid(out_valid), .out_last(out_last), .result(result)
    );
  end else begin : g_win
    localparam int unsigned LAT = (ARCH == ARCH_MODIFIED)
                                ? tree_levels(max_class_size(N)) + tree_levels(num_classes(N))
                                : tree_levels(N * N);
    logic             win_valid, win_last;
    logic [PIX_W-1:0] window [N][N];
    logic [LAT-1:0]   last_dly;

    conv_control #(.IMG_W(IMG_W), .IMG_H(IMG_H), .WIN_W(N), .WIN_H(N)) u_ctrl (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
      .win_valid(win_valid), .win_last(win_last)
    );

    delay_line_buffer #(.DATA_W(PIX_W), .IMG_W(IMG_W), .WIN_W(N), .WIN_H(N)) u_dlb (
      .clk(clk), .in_valid(in_valid), .in_data(in_pixel), .window(window)
    );

    if (ARCH == ARCH_MODIFIED) begin : g_mod
      modified_operator #(.N(N), .F(F), .INT_W(INT_W)) u_op (
        .clk(clk), .rst_n(rst_n), .in_valid(win_valid), .win(window),
        .out_valid(out_valid), .result(result)
      );
    end else if (ARCH == ARCH_LUT) begin : g_lut
      lut_operator #(.N(N), .F(F), .INT_W(INT_W)) u_op (
        .clk(clk), .rst_n(rst_n), .in_valid(win_valid), .win(window),
        .out_valid(out_valid), .result(result)
      );
    end else begin : g_2d
      conv2d_operator #(.N(N), .F(F), .INT_W(INT_W)) u_op (
        .clk(clk), .rst_n(rst_n), .in_valid(win_valid), .win(window),
        .out_valid(out_valid), .result(result)
      );
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) last_dly <= '0;
      else        last_dly <= LAT'({last_dly, win_last});
    end
    assign out_last = last_dly[LAT-1];
  end

  // Integer part of the result, saturated to the pixel range.
  if (INT_W > PIX_W) begin : g_sat
    assign out_pixel = (|result[DW-1:F+PIX_W]) ? '1 : result[F +: PIX_W];
  end else begin : g_nosat
    assign out_pixel = result[F +: PIX_W];
  end
  logic [F-1:0] unused_frac;
  assign unused_frac = result[F-1:0];
endmodule
