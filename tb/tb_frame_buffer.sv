// tb_frame_buffer: writes random words to random addresses of a 64-word
// buffer, keeps a shadow copy, and checks every read one cycle after its
// address, including a read of the address being written in the same cycle
// (returns the old word).
module tb_frame_buffer;
  localparam int D = 64;
  logic clk = 1'b0, we = 1'b0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] shadow [D];
  int checks = 0, failures = 0, collisions = 0;

  always #5 clk = ~clk;

  frame_buffer #(.DATA_W(8), .DEPTH(D)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_q;
    // fill
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 6'(a); wdata = 8'($urandom); shadow[a] = wdata;
    end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      we    = $urandom_range(0, 1);
      waddr = 6'($urandom);
      wdata = 8'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 6'($urandom);
      if (we && raddr == waddr) collisions++;
      exp_q = shadow[raddr];
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        $display("FAIL read %0d got %0h expected %0h", raddr, rdata, exp_q);
      end
    end
    checks++;
    if (collisions == 0) begin failures++; $display("FAIL no read/write collision exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
