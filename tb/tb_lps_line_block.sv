// tb_lps_line_block: writes a random wall map and reads it back through both
// read ports, checking the one-clock latency and that both copies agree.
module tb_lps_line_block;
  localparam int W = 16, H = 8, N = W * H, AW = $clog2(N);
  logic clk = 0, we = 0, wdata = 0, re_a = 0, re_v = 0, rdata_a, rdata_v;
  logic [AW-1:0] waddr = '0, raddr_a = '0, raddr_v = '0;
  bit model [N];
  int checks = 0, failures = 0;

  lps_line_block #(.GRID_W(W), .GRID_H(H)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) model[i] = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = ($urandom_range(0, 2) == 0); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 300; i++) begin
      automatic int a = $urandom_range(0, N - 1);
      automatic int b = $urandom_range(0, N - 1);
      re_a = 1; raddr_a = AW'(a); re_v = 1; raddr_v = AW'(b);
      @(negedge clk);
      checks += 2;
      if (rdata_a != model[a]) begin failures++; $display("FAIL port a %0d", a); end
      if (rdata_v != model[b]) begin failures++; $display("FAIL port v %0d", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
