// workload_runner: host-side driver and checker for one configuration of
// the accelerator, used by tb_gaussian_workloads. It writes a synthetic test
// image (random pixels, a white band on the left quarter, a black band in the
// bottom quarter) into the input frame buffer, pulses start, waits for done,
// checks that the frame took W*H cycles plus at most 16, and compares all
// four output images with the reference model. checks/failures count its
// comparisons; finished rises at the end.
module workload_runner
  import gaussian_pkg::*;
  import gauss_ref_pkg::*;
#(
  parameter int N = 3,
  parameter int F = 8,
  parameter int W = 16,
  parameter int H = 16
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   finished
);
  localparam int OW = W - N + 1, OH = H - N + 1;
  localparam int IAW = $clog2(W * H), OAW = $clog2(OW * OH);
  logic in_we = 1'b0, start = 1'b0, busy, done;
  logic [IAW-1:0] in_waddr = '0;
  logic [7:0] in_wdata = '0;
  logic [OAW-1:0] out_raddr [4];
  logic [7:0] out_rdata [4];
  byte unsigned img [];
  int k2 [], k1 [];
  int cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  gaussian_accel_top #(.N(N), .F(F), .IMG_W(W), .IMG_H(H)) dut (
    .clk(clk), .rst_n(rst_n), .in_we(in_we), .in_waddr(in_waddr), .in_wdata(in_wdata),
    .start(start), .busy(busy), .done(done), .out_raddr(out_raddr), .out_rdata(out_rdata)
  );

  initial begin
    int t0, t_frame, errs;
    checks = 0; failures = 0; finished = 1'b0;
    k2 = new[N * N]; k1 = new[N];
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) k2[i*N+j] = ref_w2(N, F, i, j);
    for (int k = 0; k < N; k++) k1[k] = ref_w1(N, F, k);
    img = new[W * H];
    for (int p = 0; p < W * H; p++)
      img[p] = ((p % W) < W / 4) ? 8'hff : (((p / W) > 3 * H / 4) ? 8'h00 : 8'($urandom));
    for (int a = 0; a < 4; a++) out_raddr[a] = '0;
    wait (rst_n);
    for (int p = 0; p < W * H; p++) begin
      @(negedge clk);
      in_we = 1'b1; in_waddr = IAW'(p); in_wdata = img[p];
    end
    @(negedge clk);
    in_we = 1'b0;
    start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    t_frame = cycle - t0;
    checks++;
    if (cycle - t0 < W * H || cycle - t0 > W * H + 16) begin
      failures++;
      $display("FAIL %0dx%0d Q.%0d: frame took %0d cycles", N, N, F, cycle - t0);
    end
    errs = 0;
    for (int r = 0; r < OH; r++)
      for (int c = 0; c < OW; c++) begin
        int e2, es;
        for (int a = 0; a < 4; a++) out_raddr[a] = OAW'(r * OW + c);
        @(posedge clk);
        #1;
        e2 = ref_pixel_2d(img, k2, W, N, F, r, c);
        es = ref_pixel_sep(img, k1, W, N, F, 9 + F, r, c);
        for (int a = 0; a < 4; a++) begin
          checks++;
          if (out_rdata[a] != 8'((a == int'(ARCH_SEPARATE)) ? es : e2)) begin
            failures++;
            if (errs++ < 5)
              $display("FAIL %0dx%0d Q.%0d arch %0d (%0d,%0d): got %0d expected %0d",
                       N, N, F, a, r, c, out_rdata[a], (a == int'(ARCH_SEPARATE)) ? es : e2);
          end
        end
      end
    $display("%0dx%0d Q.%0d %0dx%0d: frame in %0d cycles, %0d output pixels per architecture",
             N, N, F, W, H, t_frame, OW * OH);
    finished = 1'b1;
  end
endmodule
