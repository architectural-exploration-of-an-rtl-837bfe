// tb_gaussian_filter: runs the four architectures (2-D, Modified, Separate,
// LUT) side by side on the same pixel stream: two 14x10 frames with random
// gaps, the second holding a white block and a black block, for 3x3 Q.8
// cores and for 5x5 Q.4 cores. Every output pixel is compared, in raster
// order, with the reference model; out_last must mark the last output of each
// frame; and out_last must come a fixed number of cycles after the frame's
// last input pixel: 1 + 4 for the 3x3 2-D, Modified and LUT cores (delay
// line + operator) and 2 * (1 + 2) = 6 for the 3x3 Separate core.
module tb_gaussian_filter;
  import gaussian_pkg::*;
  import gauss_ref_pkg::*;
  localparam int W = 14, H = 10, FRAMES = 2, NA = 4;
  localparam int LAT3 [NA] = '{5, 5, 6, 5};

  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0;
  logic [7:0] pix = '0;
  int checks = 0, failures = 0, cycle = 0, gaps = 0, last_in_cycle = 0;
  byte unsigned img [];
  int ka3 [], ka5 [], k13 [], k15 [];
  int exp_q [2][NA][$];
  int lasts [2][NA];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar g = 0; g < 2; g++) begin : g_size
    localparam int NN = (g == 0) ? 3 : 5;
    localparam int FF = (g == 0) ? 8 : 4;
    for (genvar a = 0; a < NA; a++) begin : g_arch
      logic ov, ol;
      logic [7:0] op;
      gaussian_filter #(.ARCH(arch_e'(a)), .N(NN), .F(FF), .IMG_W(W), .IMG_H(H)) dut (
        .clk(clk), .rst_n(rst_n), .in_valid(vin), .in_pixel(pix),
        .out_valid(ov), .out_last(ol), .out_pixel(op)
      );
      always @(posedge clk) begin
        #1;
        if (ov) begin
          int e;
          checks++;
          if (exp_q[g][a].size() == 0) begin
            failures++;
            $display("FAIL N=%0d arch %0d: unexpected output", NN, a);
          end else begin
            e = exp_q[g][a].pop_front();
            if (op !== 8'(e) || ol !== (exp_q[g][a].size() % ((W-NN+1)*(H-NN+1)) == 0)) begin
              failures++;
              $display("FAIL N=%0d arch %0d: got %0d last %0b, expected %0d", NN, a, op, ol, e);
            end
          end
          if (ol) begin
            lasts[g][a]++;
            if (g == 0) begin
              checks++;
              if (cycle - last_in_cycle != LAT3[a]) begin
                failures++;
                $display("FAIL arch %0d: last output %0d cycles after last input, expected %0d",
                         a, cycle - last_in_cycle, LAT3[a]);
              end
            end
          end
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ka3 = new[9]; ka5 = new[25]; k13 = new[3]; k15 = new[5];
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) ka3[i*3+j] = ref_w2(3, 8, i, j);
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) ka5[i*5+j] = ref_w2(5, 4, i, j);
    for (int k = 0; k < 3; k++) k13[k] = ref_w1(3, 8, k);
    for (int k = 0; k < 5; k++) k15[k] = ref_w1(5, 4, k);
    img = new[W * H];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < FRAMES; fr++) begin
      for (int p = 0; p < W * H; p++) begin
        img[p] = 8'($urandom);
        if (fr == 1 && (p % W) < 7 && (p / W) < 6) img[p] = 8'hff;
        if (fr == 1 && (p % W) >= 9 && (p / W) >= 6) img[p] = 8'h00;
      end
      for (int g = 0; g < 2; g++) begin
        int n;
        n = (g == 0) ? 3 : 5;
        for (int r = 0; r + n <= H; r++)
          for (int c = 0; c + n <= W; c++) begin
            int e2, es;
            e2 = (g == 0) ? ref_pixel_2d(img, ka3, W, 3, 8, r, c) : ref_pixel_2d(img, ka5, W, 5, 4, r, c);
            es = (g == 0) ? ref_pixel_sep(img, k13, W, 3, 8, 17, r, c)
                          : ref_pixel_sep(img, k15, W, 5, 4, 13, r, c);
            exp_q[g][ARCH_2D].push_back(e2);
            exp_q[g][ARCH_MODIFIED].push_back(e2);
            exp_q[g][ARCH_LUT].push_back(e2);
            exp_q[g][ARCH_SEPARATE].push_back(es);
          end
      end
      for (int p = 0; p < W * H; p++) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) begin
          vin = 1'b0; gaps++;
          @(negedge clk);
        end
        vin = 1'b1;
        pix = img[p];
        last_in_cycle = cycle;
      end
      @(negedge clk);
      vin = 1'b0;
      repeat (15) @(posedge clk);
    end
    #2;
    for (int g = 0; g < 2; g++)
      for (int a = 0; a < NA; a++) begin
        checks++;
        if (exp_q[g][a].size() != 0 || lasts[g][a] != FRAMES) begin
          failures++;
          $display("FAIL size %0d arch %0d: %0d outputs missing, %0d lasts", g, a,
                   exp_q[g][a].size(), lasts[g][a]);
        end
      end
    checks++;
    if (gaps == 0) begin failures++; $display("FAIL no gaps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
