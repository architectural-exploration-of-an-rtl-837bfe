// delay_line_buffer: holds the WIN_H x WIN_W window of a raster-scanned image.
//
// Samples arrive one per accepted cycle (in_valid), left to right and top to
// bottom. The buffer is one long shift chain: the newest sample enters window
// register P[WIN_H-1][WIN_W-1], moves left to P[WIN_H-1][0], then through a
// row buffer of IMG_W-WIN_W samples into the right end of the row above, and
// so on up to P[0][0], the oldest sample. After each shift the window
// registers hold the WIN_H x WIN_W neighbourhood whose bottom-right corner is
// the newest sample; P[i][j] is row i (0 = top) and column j (0 = left).
// The row buffers are shift registers that advance only with in_valid, so
// the stream may pause. No reset: contents are only used once the control
// block reports a complete window.
module delay_line_buffer #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned IMG_W  = 512,
  parameter int unsigned WIN_W  = 3,
  parameter int unsigned WIN_H  = 3
) (
  input  logic              clk,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  output logic [DATA_W-1:0] window [WIN_H][WIN_W]
);
  localparam int unsigned RB_LEN = IMG_W - WIN_W;

  logic [DATA_W-1:0] p [WIN_H][WIN_W];
  logic [DATA_W-1:0] row_in [WIN_H];  // sample entering the right end of each row

  assign row_in[WIN_H-1] = in_data;

  for (genvar i = 0; i < WIN_H; i++) begin : g_row
    always_ff @(posedge clk) begin
      if (in_valid) begin
        p[i][WIN_W-1] <= row_in[i];
        for (int unsigned j = 0; j + 1 < WIN_W; j++) p[i][j] <= p[i][j+1];
      end
    end

    // Row buffer between the left end of row i+1 and the right end of row i.
    if (i < WIN_H - 1) begin : g_rowbuf
      if (RB_LEN == 0) begin : g_direct
        assign row_in[i] = p[i+1][0];
      end else begin : g_shift
        logic [DATA_W-1:0] rb [RB_LEN];
        always_ff @(posedge clk) begin
          if (in_valid) begin
            rb[RB_LEN-1] <= p[i+1][0];
            for (int unsigned k = 0; k + 1 < RB_LEN; k++) rb[k] <= rb[k+1];
          end
        end
        assign row_in[i] = rb[0];
      end
    end
  end

  assign window = p;
endmodule
