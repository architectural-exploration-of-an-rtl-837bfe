// tb_conv_control: checks the window-valid and end-of-frame flags of the
// control block on an 8x6 image with a 3x3 window and on a 1x3 (row) window,
// with random gaps in the input stream, over two frames. The expected flags
// come from a position counter kept by the testbench. Checks: flag values
// every cycle, one-cycle alignment with in_valid, number of windows
// ((8-3+1)*(6-3+1) = 24 and 6*6 = 36 per frame) and one last flag per frame.
module tb_conv_control;
  localparam int W = 8, H = 6;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic v33, l33, v13, l13;
  int checks = 0, failures = 0;
  int n33 = 0, n13 = 0, nl = 0, gaps = 0;

  always #5 clk = ~clk;

  conv_control #(.IMG_W(W), .IMG_H(H), .WIN_W(3), .WIN_H(3)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .win_valid(v33), .win_last(l33)
  );
  conv_control #(.IMG_W(W), .IMG_H(H), .WIN_W(3), .WIN_H(1)) dut_row (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .win_valid(v13), .win_last(l13)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit got, bit exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    int pos;
    bit e33, e13, el;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    pos = 0;
    while (pos < 2 * W * H) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      if (!in_valid) gaps++;
      @(posedge clk);
      e33 = 0; e13 = 0; el = 0;
      if (in_valid) begin
        int r, c;
        r = (pos % (W * H)) / W;
        c = pos % W;
        e33 = (r >= 2) && (c >= 2);
        e13 = (c >= 2);
        el  = (r == H - 1) && (c == W - 1);
        pos++;
      end
      #1;
      check(v33, e33, "3x3 win_valid");
      check(v13, e13, "1x3 win_valid");
      check(l33, el, "3x3 win_last");
      check(l13, el, "1x3 win_last");
      n33 += v33;
      n13 += v13;
      nl  += l33;
    end
    @(negedge clk);
    in_valid = 1'b0;
    @(posedge clk);
    #1;
    check(v33, 1'b0, "idle win_valid");
    checks++;
    if (n33 != 2 * 24 || n13 != 2 * 36 || nl != 2) begin
      failures++;
      $display("FAIL counts: %0d 3x3 windows, %0d 1x3 windows, %0d lasts", n33, n13, nl);
    end
    checks++;
    if (gaps == 0) begin failures++; $display("FAIL no input gaps exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
