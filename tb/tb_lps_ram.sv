// tb_lps_ram: write/read checks of the block RAM template against an array
// model: one-cycle read latency, read enable holding the output, read of the
// address being written returning the old word.
module tb_lps_ram;
  localparam int DEPTH = 64;
  localparam int WIDTH = 20;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  lps_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [WIDTH-1:0] exp, string what);
    checks++;
    if (rdata !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, rdata, exp); end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    // initial contents are zero
    @(negedge clk); re = 1; raddr = 6'd17;
    @(negedge clk); check('0, "init");
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = 6'(i); wdata = WIDTH'($urandom); model[i] = wdata; re = 0;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 200; i++) begin
      int a = $urandom_range(0, DEPTH - 1);
      re = 1; raddr = 6'(a);
      @(negedge clk);
      check(model[a], "read");
    end
    // read during write: old data
    re = 1; raddr = 6'd9; we = 1; waddr = 6'd9; wdata = ~model[9];
    @(negedge clk);
    check(model[9], "read-during-write");
    model[9] = wdata; we = 0;
    @(negedge clk);
    check(model[9], "after-write");
    re = 0; raddr = 6'd1;
    @(negedge clk);
    check(model[9], "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
