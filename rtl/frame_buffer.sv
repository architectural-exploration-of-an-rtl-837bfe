// frame_buffer: on-chip RAM that holds one image (DEPTH pixels).
//
// Simple dual-port memory: one side writes (we, waddr, wdata), the other
// reads (raddr, rdata), each in its own clock-edge time. The read is
// synchronous: rdata shows the word at raddr one cycle after raddr is
// presented, as an FPGA block RAM does. Writing and reading the same address
// in the same cycle returns the old word. Used both as the input image
// buffer (filled from the host side, read by the filter) and as the output
// image buffer (filled by the filter, read from the host side). Contents are
// not reset.
module frame_buffer #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 512 * 512,
  parameter int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
