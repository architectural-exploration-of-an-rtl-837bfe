// conv_control: control block of a sliding-window filter stage.
//
// Two counters follow the raster position (column, row) of every accepted
// input sample; comparators on them decide whether the window that the delay
// line holds after this sample is complete, i.e. lies wholly inside the
// image (row >= WIN_H-1 and column >= WIN_W-1). Windows that straddle the
// left edge or the rows above the image are not reported, so a frame of
// IMG_W x IMG_H samples yields (IMG_W-WIN_W+1) x (IMG_H-WIN_H+1) windows.
// win_valid and win_last are registered, so they line up with the delay-line
// buffer, which also captures the sample at the same clock edge. win_last
// marks the window of the last sample of a frame; the counters then restart
// for the next frame. Image borders are not padded: that is this design's
// choice.
module conv_control #(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512,
  parameter int unsigned WIN_W = 3,
  parameter int unsigned WIN_H = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic win_valid,
  output logic win_last
);
  localparam int unsigned CW = (IMG_W > 1) ? $clog2(IMG_W) : 1;
  localparam int unsigned RW = (IMG_H > 1) ? $clog2(IMG_H) : 1;

  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic          end_of_row, end_of_frame;
  logic          row_ok, col_ok;  // enough rows / columns seen for a window

  assign end_of_row   = (col == CW'(IMG_W - 1));
  assign end_of_frame = end_of_row && (row == RW'(IMG_H - 1));

  if (WIN_H > 1) begin : g_row_cmp
    assign row_ok = (row >= RW'(WIN_H - 1));
  end else begin : g_row_any
    assign row_ok = 1'b1;
  end
  if (WIN_W > 1) begin : g_col_cmp
    assign col_ok = (col >= CW'(WIN_W - 1));
  end else begin : g_col_any
    assign col_ok = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      win_valid <= 1'b0;
      win_last  <= 1'b0;
    end else begin
      win_valid <= in_valid && row_ok && col_ok;
      win_last  <= in_valid && end_of_frame;
      if (in_valid) begin
        if (end_of_row) begin
          col <= '0;
          row <= end_of_frame ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end
endmodule
