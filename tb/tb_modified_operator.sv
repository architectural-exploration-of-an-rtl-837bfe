// tb_modified_operator: drives random 3x3 windows (Q10.8, default
// parameters) and random 7x7 windows (Q11.4) into the Modified operator,
// with random idle cycles and some all-white windows (largest pre-added
// sums), and compares every result with the exact sum of pixel*weight from
// the reference model. Latency must be 4 cycles for 3x3 (two pre-adder
// levels, multiplier register, one adder level) and 7 for 7x7 (three
// pre-adder levels, multiplier register, three adder levels).
module tb_modified_operator;
  import gauss_ref_pkg::*;
  localparam int N0 = 3, F0 = 8, I0 = 10, LAT0 = 4;
  localparam int N1 = 7, F1 = 4, I1 = 11, LAT1 = 7;

  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0;
  logic [7:0] w0 [N0][N0];
  logic [7:0] w1 [N1][N1];
  logic v0, v1;
  logic [I0+F0-1:0] r0;
  logic [I1+F1-1:0] r1;
  int checks = 0, failures = 0, cycle = 0, nwhite = 0;
  longint exp0 [$], exp1 [$];
  int t0 [$], t1 [$];
  int k0 [], k1 [];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  modified_operator dut0 (
    .clk(clk), .rst_n(rst_n), .in_valid(vin), .win(w0), .out_valid(v0), .result(r0)
  );
  modified_operator #(.N(N1), .F(F1), .INT_W(I1)) dut1 (
    .clk(clk), .rst_n(rst_n), .in_valid(vin), .win(w1), .out_valid(v1), .result(r1)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    #1;
    if (v0) begin
      checks++;
      if (exp0.size() == 0) begin failures++; $display("FAIL 3x3: unexpected output"); end
      else begin
        longint e; int t;
        e = exp0.pop_front(); t = t0.pop_front();
        if (r0 !== (I0+F0)'(e) || cycle - t != LAT0) begin
          failures++;
          $display("FAIL 3x3: got %0d after %0d cycles, expected %0d after %0d", r0, cycle - t, e, LAT0);
        end
      end
    end
    if (v1) begin
      checks++;
      if (exp1.size() == 0) begin failures++; $display("FAIL 7x7: unexpected output"); end
      else begin
        longint e; int t;
        e = exp1.pop_front(); t = t1.pop_front();
        if (r1 !== (I1+F1)'(e) || cycle - t != LAT1) begin
          failures++;
          $display("FAIL 7x7: got %0d after %0d cycles, expected %0d after %0d", r1, cycle - t, e, LAT1);
        end
      end
    end
  end

  initial begin
    k0 = new[N0*N0];
    k1 = new[N1*N1];
    for (int i = 0; i < N0; i++) for (int j = 0; j < N0; j++) k0[i*N0+j] = ref_w2(N0, F0, i, j);
    for (int i = 0; i < N1; i++) for (int j = 0; j < N1; j++) k1[i*N1+j] = ref_w2(N1, F1, i, j);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      bit white;
      longint s0, s1;
      @(negedge clk);
      vin   = ($urandom_range(0, 3) != 0);
      white = ($urandom_range(0, 9) == 0);
      nwhite += white;
      s0 = 0; s1 = 0;
      for (int i = 0; i < N0; i++) for (int j = 0; j < N0; j++) begin
        w0[i][j] = white ? 8'hff : 8'($urandom);
        s0 += longint'(w0[i][j]) * k0[i*N0+j];
      end
      for (int i = 0; i < N1; i++) for (int j = 0; j < N1; j++) begin
        w1[i][j] = white ? 8'hff : 8'($urandom);
        s1 += longint'(w1[i][j]) * k1[i*N1+j];
      end
      if (vin) begin
        exp0.push_back(s0); t0.push_back(cycle);
        exp1.push_back(s1); t1.push_back(cycle);
      end
    end
    @(negedge clk);
    vin = 1'b0;
    repeat (10) @(posedge clk);
    #2;
    checks++;
    if (exp0.size() != 0 || exp1.size() != 0 || nwhite == 0) begin
      failures++;
      $display("FAIL %0d/%0d results missing", exp0.size(), exp1.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
