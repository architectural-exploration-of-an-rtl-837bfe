// tb_delay_line_buffer: streams random samples, with random gaps, into a 3x3
// delay line over 7-sample rows and into a 3x1 (column) delay line, and
// checks after every accepted sample that window[i][j] holds the sample that
// arrived (2-i) rows and (2-j) columns before the newest one. Also checks
// that the window holds still while in_valid is low.
module tb_delay_line_buffer;
  localparam int W = 7;
  logic clk = 1'b0, in_valid = 1'b0;
  logic [7:0] in_data = '0;
  logic [7:0] win [3][3];
  logic [7:0] col [3][1];
  int checks = 0, failures = 0, gaps = 0;
  logic [7:0] hist [$];

  always #5 clk = ~clk;

  delay_line_buffer #(.DATA_W(8), .IMG_W(W), .WIN_W(3), .WIN_H(3)) dut (
    .clk(clk), .in_valid(in_valid), .in_data(in_data), .window(win)
  );
  delay_line_buffer #(.DATA_W(8), .IMG_W(W), .WIN_W(1), .WIN_H(3)) dut_col (
    .clk(clk), .in_valid(in_valid), .in_data(in_data), .window(col)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] held;
    repeat (2) @(posedge clk);
    while (hist.size() < 120) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_data  = 8'($urandom);
      if (in_valid) hist.push_back(in_data);
      else gaps++;
      held = win[0][0];
      @(posedge clk);
      #1;
      if (!in_valid) begin
        checks++;
        if (win[0][0] !== held) begin failures++; $display("FAIL window moved without in_valid"); end
      end else if (hist.size() >= 2 * W + 3) begin
        int s;
        s = hist.size() - 1;
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) begin
            checks++;
            if (win[i][j] !== hist[s - (2 - i) * W - (2 - j)]) begin
              failures++;
              $display("FAIL sample %0d P[%0d][%0d]=%0h expected %0h", s, i, j,
                       win[i][j], hist[s - (2 - i) * W - (2 - j)]);
            end
          end
        for (int i = 0; i < 3; i++) begin
          checks++;
          if (col[i][0] !== hist[s - (2 - i) * W]) begin
            failures++;
            $display("FAIL column P[%0d]=%0h expected %0h", i, col[i][0], hist[s - (2 - i) * W]);
          end
        end
      end
    end
    checks++;
    if (gaps == 0) begin failures++; $display("FAIL no gaps exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
