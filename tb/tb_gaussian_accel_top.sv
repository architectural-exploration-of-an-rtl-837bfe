// tb_gaussian_accel_top: end-to-end test of the accelerator on a 20x12
// image. The testbench plays the host: it writes each frame into the input
// frame buffer, pulses start, waits for done, then reads back the four
// output frame buffers (one per architecture) and compares every pixel with
// the reference model. Three frames are run back to back: random pixels; a
// frame with saturated white and black blocks; a flat grey frame that every
// filter must leave unchanged. It also pulses start while busy (must be
// ignored), and checks that done rises exactly W*H + 9 cycles after start:
// W*H cycles of streaming, 1 to start the streamer, 1 of RAM read, 6 through
// the slowest core (Separate: two delay-line stages and two 2-cycle 1-D
// operators) and 1 to register done. Counted mechanisms: frames completed,
// border windows dropped, start pulses ignored while busy.
module tb_gaussian_accel_top;
  import gaussian_pkg::*;
  import gauss_ref_pkg::*;
  localparam int W = 20, H = 12, N = 3, F = 8, NA = 4, FRAMES = 3;
  localparam int OW = W - N + 1, OH = H - N + 1;
  localparam int IAW = $clog2(W * H), OAW = $clog2(OW * OH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_we = 1'b0, start = 1'b0, busy, done;
  logic [IAW-1:0] in_waddr = '0;
  logic [7:0] in_wdata = '0;
  logic [OAW-1:0] out_raddr [NA];
  logic [7:0] out_rdata [NA];
  int checks = 0, failures = 0, cycle = 0;
  int frames_done = 0, border_dropped = 0, starts_ignored = 0;
  byte unsigned img [];
  int k2 [], k1 [];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  gaussian_accel_top #(.N(N), .F(F), .IMG_W(W), .IMG_H(H)) dut (
    .clk(clk), .rst_n(rst_n), .in_we(in_we), .in_waddr(in_waddr), .in_wdata(in_wdata),
    .start(start), .busy(busy), .done(done), .out_raddr(out_raddr), .out_rdata(out_rdata)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int t_start, t_done;
    k2 = new[N * N]; k1 = new[N];
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) k2[i*N+j] = ref_w2(N, F, i, j);
    for (int k = 0; k < N; k++) k1[k] = ref_w1(N, F, k);
    img = new[W * H];
    foreach (out_raddr[a]) out_raddr[a] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < FRAMES; fr++) begin
      for (int p = 0; p < W * H; p++) begin
        case (fr)
          0: img[p] = 8'($urandom);
          1: img[p] = ((p % W) < 8) ? 8'hff : (((p / W) > 6) ? 8'h00 : 8'($urandom));
          default: img[p] = 8'd137;
        endcase
      end
      // host writes the frame
      for (int p = 0; p < W * H; p++) begin
        @(negedge clk);
        in_we = 1'b1; in_waddr = IAW'(p); in_wdata = img[p];
      end
      @(negedge clk);
      in_we = 1'b0;
      start = 1'b1;
      t_start = cycle;
      @(negedge clk);
      start = 1'b0;
      check(busy && !done, "busy after start");
      repeat (20) @(negedge clk);
      start = 1'b1;          // must be ignored: a frame is in progress
      starts_ignored++;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      t_done = cycle;
      frames_done++;
      check(!busy, "busy cleared at done");
      $display("frame %0d: done %0d cycles after start", fr, t_done - t_start);
      check(t_done - t_start == W * H + 9,
            $sformatf("frame took %0d cycles", t_done - t_start));
      // host reads the four output frames
      for (int r = 0; r < OH; r++)
        for (int c = 0; c < OW; c++) begin
          int e2, es;
          foreach (out_raddr[a]) out_raddr[a] = OAW'(r * OW + c);
          @(posedge clk);
          #1;
          e2 = ref_pixel_2d(img, k2, W, N, F, r, c);
          es = ref_pixel_sep(img, k1, W, N, F, 17, r, c);
          if (fr == 2) check(e2 == 137 && es == 137, "reference keeps flat grey");
          for (int a = 0; a < NA; a++) begin
            int e;
            e = (a == int'(ARCH_SEPARATE)) ? es : e2;
            check(out_rdata[a] == 8'(e),
                  $sformatf("frame %0d arch %0d (%0d,%0d): got %0d expected %0d",
                            fr, a, r, c, out_rdata[a], e));
          end
        end
      border_dropped += W * H - OW * OH;
    end
    check(frames_done == FRAMES, "all frames completed");
    check(border_dropped > 0 && starts_ignored > 0, "mechanisms exercised");
    $display("frames=%0d border_windows_dropped=%0d starts_ignored=%0d",
             frames_done, border_dropped, starts_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
