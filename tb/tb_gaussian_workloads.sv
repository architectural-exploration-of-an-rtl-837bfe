// tb_gaussian_workloads: runs the evaluated configurations other than the
// default one through the whole accelerator, each on a synthetic test image:
//   3x3 window, 4 fractional bits, 512x512 frame
//   5x5 window, 8 fractional bits, 512x512 frame
//   7x7 window, 8 fractional bits, 512x512 frame
//   7x7 window, 4 fractional bits, 100x100 frame (host-link test size)
//   3x3 window, 6 fractional bits, 512x512 frame (intermediate precision)
// Each configuration has its own workload_runner, which plays the host and
// checks the frame time and all four output images.
module tb_gaussian_workloads;
  logic clk = 1'b0, rst_n = 1'b0;
  int c0, c1, c2, c3, c4, f0, f1, f2, f3, f4;
  bit d0, d1, d2, d3, d4;

  always #5 clk = ~clk;

  workload_runner #(.N(3), .F(4), .W(512), .H(512)) u_q4_3x3 (
    .clk(clk), .rst_n(rst_n), .checks(c0), .failures(f0), .finished(d0));
  workload_runner #(.N(5), .F(8), .W(512), .H(512)) u_q8_5x5 (
    .clk(clk), .rst_n(rst_n), .checks(c1), .failures(f1), .finished(d1));
  workload_runner #(.N(7), .F(8), .W(512), .H(512)) u_q8_7x7 (
    .clk(clk), .rst_n(rst_n), .checks(c2), .failures(f2), .finished(d2));
  workload_runner #(.N(7), .F(4), .W(100), .H(100)) u_q4_7x7_link (
    .clk(clk), .rst_n(rst_n), .checks(c3), .failures(f3), .finished(d3));
  workload_runner #(.N(3), .F(6), .W(512), .H(512)) u_q6_3x3 (
    .clk(clk), .rst_n(rst_n), .checks(c4), .failures(f4), .finished(d4));

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3 + c4, f0 + f1 + f2 + f3 + f4 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2 && d3 && d4);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3 + c4, f0 + f1 + f2 + f3 + f4);
    $finish;
  end
endmodule
