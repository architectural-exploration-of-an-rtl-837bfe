// gaussian_accel_top: FPGA side of the Gaussian-filter co-processor.
//
// The host's DMA engine writes a grey-scale image into the input frame
// buffer (in_we/in_waddr/in_wdata, raster order, address = row*IMG_W+col).
// A pulse on start makes the pixel streamer read the whole image, one pixel
// per cycle, and feed it to the filter cores; each core writes its filtered
// image into its own output frame buffer, from which the host's DMA engine
// reads it back (out_raddr/out_rdata, one cycle read latency, address =
// row*(IMG_W-N+1)+col of the valid-window image). done rises when every
// core has written the last pixel of the frame and stays high until the next
// start; busy is high in between.
//
// The four convolution architectures (2-D, Modified, Separate, LUT-based)
// are alternative implementations of the same filter. This top carries all
// four side by side on the same input stream, index ARCH_2D..ARCH_LUT of the
// out_* arrays, so they can be compared on one frame; a product would keep
// only one. Each uses its architecture's data word (Q8.F, Q10.F or Q11.F,
// Q9.F, Q8.F). The DMA controllers and the processor bridges are outside
// this module.
// Timing: a frame of IMG_W*IMG_H pixels takes IMG_W*IMG_H cycles to stream
// plus a few cycles of pipeline latency (about 262.2 k cycles at 512x512).
module gaussian_accel_top
  import gaussian_pkg::*;
#(
  parameter int unsigned N     = 3,
  parameter int unsigned F     = 8,
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512,
  localparam int unsigned IN_DEPTH  = IMG_W * IMG_H,
  localparam int unsigned OUT_DEPTH = (IMG_W - N + 1) * (IMG_H - N + 1),
  localparam int unsigned IAW = $clog2(IN_DEPTH),
  localparam int unsigned OAW = $clog2(OUT_DEPTH),
  localparam int unsigned NARCH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // input image, written by the host-side DMA
  input  logic             in_we,
  input  logic [IAW-1:0]   in_waddr,
  input  logic [PIX_W-1:0] in_wdata,
  // control
  input  logic             start,
  output logic             busy,
  output logic             done,
  // filtered images, read by the host-side DMA, one per architecture
  input  logic [OAW-1:0]   out_raddr [NARCH],
  output logic [PIX_W-1:0] out_rdata [NARCH]
);
  // ---- pixel streamer ---------------------------------------------------------
  logic [IAW-1:0]   rd_addr;
  logic             rd_active;
  logic             pix_valid;
  logic [PIX_W-1:0] pix;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_addr   <= '0;
      rd_active <= 1'b0;
      pix_valid <= 1'b0;
    end else begin
      pix_valid <= rd_active;
      if (start && !busy) begin
        rd_addr   <= '0;
        rd_active <= 1'b1;
      end else if (rd_active) begin
        if (rd_addr == IAW'(IN_DEPTH - 1)) rd_active <= 1'b0;
        else                               rd_addr   <= rd_addr + 1'b1;
      end
    end
  end

  frame_buffer #(.DATA_W(PIX_W), .DEPTH(IN_DEPTH)) u_in_fb (
    .clk(clk), .we(in_we), .waddr(in_waddr), .wdata(in_wdata),
    .raddr(rd_addr), .rdata(pix)
  );

  // ---- filter cores and output buffers ---------------------------------------
  logic [NARCH-1:0] core_done;

  for (genvar a = 0; a < NARCH; a++) begin : g_core
    localparam arch_e ARCH = arch_e'(a);
    logic             o_valid, o_last;
    logic [PIX_W-1:0] o_pixel;
    logic [OAW-1:0]   wr_addr;

    gaussian_filter #(.ARCH(ARCH), .N(N), .F(F), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_filter (
      .clk(clk), .rst_n(rst_n), .in_valid(pix_valid), .in_pixel(pix),
      .out_valid(o_valid), .out_last(o_last), .out_pixel(o_pixel)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wr_addr      <= '0;
        core_done[a] <= 1'b0;
      end else if (start && !busy) begin
        wr_addr      <= '0;
        core_done[a] <= 1'b0;
      end else if (o_valid) begin
        wr_addr <= o_last ? '0 : wr_addr + 1'b1;
        if (o_last) core_done[a] <= 1'b1;
      end
    end

    frame_buffer #(.DATA_W(PIX_W), .DEPTH(OUT_DEPTH)) u_out_fb (
      .clk(clk), .we(o_valid), .waddr(wr_addr), .wdata(o_pixel),
      .raddr(out_raddr[a]), .rdata(out_rdata[a])
    );
  end

  // ---- status -------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else if (start && !busy) begin
      busy <= 1'b1;
      done <= 1'b0;
    end else if (busy && (&core_done)) begin
      busy <= 1'b0;
      done <= 1'b1;
    end
  end
endmodule
