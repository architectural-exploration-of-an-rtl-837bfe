// tb_separate_gaussian: streams two random 11x7 frames (the second with a
// white block) through the Separate filter with N=3, Q9.8, with random gaps
// in the input, and compares every Q9.8 output word, in raster order, with
// the reference two-pass model (exact horizontal sums, vertical products
// truncated to 8 fractional bits). Checks the number of outputs per frame
// ((11-2)*(7-2) = 45), that out_last marks only the last one, and a second
// instance with N=5, Q9.4 on the same stream.
module tb_separate_gaussian;
  import gauss_ref_pkg::*;
  localparam int W = 11, H = 7, FRAMES = 2;
  localparam int N0 = 3, F0 = 8, I0 = 9;
  localparam int N1 = 5, F1 = 4, I1 = 9;
  localparam int D0 = I0 + F0, D1 = I1 + F1;

  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0;
  logic [7:0] pix = '0;
  logic v0, l0, v1, l1;
  logic [D0-1:0] r0;
  logic [D1-1:0] r1;
  int checks = 0, failures = 0, gaps = 0;
  longint exp0 [$], exp1 [$];
  bit last0 [$], last1 [$];
  int k0 [], k1 [];
  byte unsigned img [];

  always #5 clk = ~clk;

  separate_gaussian #(.N(N0), .F(F0), .INT_W(I0), .IMG_W(W), .IMG_H(H)) dut0 (
    .clk(clk), .rst_n(rst_n), .in_valid(vin), .in_pixel(pix),
    .out_valid(v0), .out_last(l0), .result(r0)
  );
  separate_gaussian #(.N(N1), .F(F1), .INT_W(I1), .IMG_W(W), .IMG_H(H)) dut1 (
    .clk(clk), .rst_n(rst_n), .in_valid(vin), .in_pixel(pix),
    .out_valid(v1), .out_last(l1), .result(r1)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (v0) begin
      longint e; bit el;
      checks++;
      e = exp0.pop_front(); el = last0.pop_front();
      if (r0 !== D0'(e) || l0 !== el) begin
        failures++;
        $display("FAIL N=3: got %0d last %0b, expected %0d last %0b", r0, l0, e, el);
      end
    end
    if (v1) begin
      longint e; bit el;
      checks++;
      e = exp1.pop_front(); el = last1.pop_front();
      if (r1 !== D1'(e) || l1 !== el) begin
        failures++;
        $display("FAIL N=5: got %0d last %0b, expected %0d last %0b", r1, l1, e, el);
      end
    end
  end

  // Q word of the two-pass reference (before taking the integer part).
  function automatic longint sep_word(int n, int f, int dw, ref int w1[], input int r, input int c);
    longint acc, h, mask;
    mask = (longint'(1) << dw) - 1;
    acc = 0;
    for (int i = 0; i < n; i++) begin
      h = 0;
      for (int k = 0; k < n; k++) h += longint'(img[(r + i) * W + c + k]) * w1[k];
      acc += ((h & mask) * w1[i]) >>> f;
    end
    return acc & mask;
  endfunction

  initial begin
    k0 = new[N0]; k1 = new[N1];
    for (int k = 0; k < N0; k++) k0[k] = ref_w1(N0, F0, k);
    for (int k = 0; k < N1; k++) k1[k] = ref_w1(N1, F1, k);
    img = new[W * H];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < FRAMES; fr++) begin
      for (int p = 0; p < W * H; p++)
        img[p] = (fr == 1 && (p % W) < 6 && (p / W) < 5) ? 8'hff : 8'($urandom);
      for (int r = 0; r + N0 <= H; r++)
        for (int c = 0; c + N0 <= W; c++) begin
          exp0.push_back(sep_word(N0, F0, D0, k0, r, c));
          last0.push_back(r + N0 == H && c + N0 == W);
        end
      for (int r = 0; r + N1 <= H; r++)
        for (int c = 0; c + N1 <= W; c++) begin
          exp1.push_back(sep_word(N1, F1, D1, k1, r, c));
          last1.push_back(r + N1 == H && c + N1 == W);
        end
      for (int p = 0; p < W * H; p++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin
          vin = 1'b0; gaps++;
          @(negedge clk);
        end
        vin = 1'b1;
        pix = img[p];
      end
      @(negedge clk);
      vin = 1'b0;
      repeat (12) @(posedge clk);
    end
    #2;
    checks++;
    if (exp0.size() != 0 || exp1.size() != 0 || gaps == 0) begin
      failures++;
      $display("FAIL %0d/%0d outputs missing or no gaps", exp0.size(), exp1.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
