// tb_conv1d_operator: drives random Q9.8 tap triples (default parameters)
// and random Q9.4 5-tap sets into the 1-D operator, with idle cycles, and
// compares each result with the sum of the per-tap products truncated to F
// fractional bits, modulo the word size, from the reference weights.
// Latency must be 2 cycles for 3 taps (product register, one adder level)
// and 3 for 5 taps.
module tb_conv1d_operator;
  import gauss_ref_pkg::*;
  localparam int N0 = 3, F0 = 8, I0 = 9, LAT0 = 2;
  localparam int N1 = 5, F1 = 4, I1 = 9, LAT1 = 3;
  localparam int D0 = I0 + F0, D1 = I1 + F1;

  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0;
  logic [D0-1:0] a0 [N0];
  logic [D1-1:0] a1 [N1];
  logic v0, v1;
  logic [D0-1:0] r0;
  logic [D1-1:0] r1;
  int checks = 0, failures = 0, cycle = 0;
  longint exp0 [$], exp1 [$];
  int t0 [$], t1 [$];
  int k0 [N0], k1 [N1];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  conv1d_operator dut0 (
    .clk(clk), .rst_n(rst_n), .in_valid(vin), .taps(a0), .out_valid(v0), .result(r0)
  );
  conv1d_operator #(.N(N1), .F(F1), .INT_W(I1)) dut1 (
    .clk(clk), .rst_n(rst_n), .in_valid(vin), .taps(a1), .out_valid(v1), .result(r1)
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
      longint e; int t;
      checks++;
      e = exp0.pop_front(); t = t0.pop_front();
      if (r0 !== D0'(e) || cycle - t != LAT0) begin
        failures++;
        $display("FAIL N=3: got %0d after %0d, expected %0d after %0d", r0, cycle - t, D0'(e), LAT0);
      end
    end
    if (v1) begin
      longint e; int t;
      checks++;
      e = exp1.pop_front(); t = t1.pop_front();
      if (r1 !== D1'(e) || cycle - t != LAT1) begin
        failures++;
        $display("FAIL N=5: got %0d after %0d, expected %0d after %0d", r1, cycle - t, D1'(e), LAT1);
      end
    end
  end

  initial begin
    for (int k = 0; k < N0; k++) k0[k] = ref_w1(N0, F0, k);
    for (int k = 0; k < N1; k++) k1[k] = ref_w1(N1, F1, k);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      longint s0, s1;
      @(negedge clk);
      vin = ($urandom_range(0, 3) != 0);
      s0 = 0; s1 = 0;
      for (int k = 0; k < N0; k++) begin
        a0[k] = D0'($urandom);
        s0 += (longint'(a0[k]) * k0[k]) >>> F0;
      end
      for (int k = 0; k < N1; k++) begin
        a1[k] = D1'($urandom);
        s1 += (longint'(a1[k]) * k1[k]) >>> F1;
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
    if (exp0.size() != 0 || exp1.size() != 0) begin
      failures++;
      $display("FAIL results missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
