// tb_lps_global_ctrl: the bus slave and tick FSM against a stand-in particle
// engine (a fixed-length busy window per sweep) and a GRID_MEM array.
// Checks register reset values and read-back, the STATUS debug counter, the GRID_MEM address mapping,
// the evaluate-then-commit order of a tick, DONE/ack, TICK_COUNT, MAP_READY,
// the waitrequest stall, the brush command (and that tool 00 does nothing),
// soft reset, the service order of pulses queued during a sweep, auto-run,
// and frame lock with STEPS_PER_FRAME ticks per vertical blank.
module tb_lps_global_ctrl;
  import lps_pkg::*;
  localparam int W = 16, H = 8, N = W * H, AW = $clog2(N);
  localparam int LEN = 12;

  logic clk = 0, rst = 1;
  logic avs_chipselect = 0, avs_rw = 0, avs_waitrequest;
  logic [15:0] avs_address = '0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic host_re, host_we;
  logic [AW-1:0] host_raddr, host_waddr;
  cell_t host_rdata, host_wdata;
  logic sweep_start, sweep_busy = 0, sweep_done = 0;
  sweep_op_e sweep_op;
  brush_t brush;
  logic vblank = 0, video_en, hide_liquid, debug_mode;

  lps_global_ctrl #(.GRID_W(W), .GRID_H(H)) dut (.*);
  always #5 clk = ~clk;

  // stand-in engine and memory
  cell_t mem [N];
  int    busy_left = 0;
  sweep_op_e ops [$];
  always_ff @(posedge clk) begin
    if (host_we) mem[host_waddr] <= host_wdata;
    if (host_re) host_rdata <= mem[host_raddr];
  end
  always @(posedge clk) begin
    sweep_done <= 1'b0;
    if (rst) begin
      busy_left = 0;
      sweep_busy <= 1'b0;
    end else if (sweep_start) begin
      ops.push_back(sweep_op);
      busy_left = LEN;
      sweep_busy <= 1'b1;
    end else if (busy_left > 0) begin
      busy_left--;
      if (busy_left == 0) begin sweep_busy <= 1'b0; sweep_done <= 1'b1; end
    end
  end

  int checks = 0, failures = 0, stalls = 0;
  always @(posedge clk) if (avs_chipselect && avs_waitrequest) stalls++;
  task automatic fail(string s); failures++; $display("FAIL %s", s); endtask
  task automatic expect_eq(longint got, longint exp, string what);
    checks++;
    if (got != exp) fail($sformatf("%s = %h, expected %h", what, got, exp));
  endtask

  task automatic bus_write(logic [15:0] a, logic [31:0] d);
    @(negedge clk);
    avs_chipselect = 1; avs_rw = 1; avs_address = a; avs_writedata = d;
    #1; while (avs_waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
    avs_chipselect = 0; avs_rw = 0;
  endtask

  task automatic bus_read(logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_chipselect = 1; avs_rw = 0; avs_address = a;
    #1; while (avs_waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
    avs_chipselect = 0;
    d = avs_readdata;
  endtask

  task automatic wait_idle();
    logic [31:0] s;
    int n = 0;
    do begin bus_read(REG_STATUS, s); n++; end while (s[0] && n < 1000);
  endtask

  task automatic expect_ops(sweep_op_e e [$], string what);
    checks++;
    if (ops != e) begin
      fail($sformatf("%s: %0d sweeps seen", what, ops.size()));
      foreach (ops[i]) $display("  seen %s", ops[i].name());
    end
    ops.delete();
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int auto_ticks;
    foreach (mem[i]) mem[i] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // reset values
    bus_read(REG_STATUS, d);     expect_eq(d[15:0], 0, "STATUS after reset");
    // the debug counter in STATUS[31:16] advances one per clock; back-to-back
    // register reads are accepted two clocks apart
    begin
      logic [31:0] d2;
      bus_read(REG_STATUS, d2);
      expect_eq(16'(d2[31:16] - d[31:16]), 2, "STATUS debug counter step");
    end
    bus_read(REG_GRID_SIZE, d);  expect_eq(d, {16'(H), 16'(W)}, "GRID_SIZE");
    bus_read(REG_VGA_CTRL, d);   expect_eq(d, 1, "VGA_CTRL after reset");
    bus_read(REG_TICK_COUNT, d); expect_eq(d, 0, "TICK_COUNT after reset");
    // register read-back and outputs
    bus_write(REG_MOUSE_POS, {16'd5, 16'd9});
    bus_write(REG_BRUSH_CFG, {16'h4000, 8'd3, 6'd0, 2'b01});
    bus_write(REG_VGA_CTRL, 32'h6);
    bus_read(REG_MOUSE_POS, d);  expect_eq(d, {16'd5, 16'd9}, "MOUSE_POS");
    bus_read(REG_BRUSH_CFG, d);  expect_eq(d, {16'h4000, 8'd3, 8'd1}, "BRUSH_CFG");
    bus_read(REG_VGA_CTRL, d);   expect_eq(d, 6, "VGA_CTRL");
    expect_eq({video_en, hide_liquid, debug_mode}, 3'b011, "VGA outputs");
    expect_eq(brush.x, 9, "brush x"); expect_eq(brush.y, 5, "brush y");
    expect_eq(brush.radius, 3, "brush radius"); expect_eq(brush.amount, 16'h4000, "brush amount");
    expect_eq(brush.tool, TOOL_ADD, "brush tool");
    bus_write(REG_VGA_CTRL, 32'h1);
    // GRID_MEM mapping: cell (x, y) at 0x1000 + 4*(y*W + x)
    bus_write(16'h1000 + 16'(4 * (2 * W + 3)), 32'hA5A5_0003);
    expect_eq(mem[2 * W + 3], 32'hA5A5_0003, "GRID_MEM write address");
    bus_read(16'h1000 + 16'(4 * (2 * W + 3)), d); expect_eq(d, 32'hA5A5_0003, "GRID_MEM read");
    bus_read(16'h1000 + 16'(4 * N), d);  expect_eq(d, 0, "read past GRID_MEM");
    // one tick
    bus_write(REG_CTRL, 32'h1);
    bus_read(REG_STATUS, d); expect_eq({d[4:3], d[0]}, {PH_EVAL, 1'b1}, "phase during evaluate");
    repeat (LEN) @(negedge clk);
    bus_read(REG_STATUS, d); expect_eq({d[4:3], d[0]}, {PH_COMMIT, 1'b1}, "phase during commit");
    wait_idle();
    expect_ops('{OP_EVAL, OP_COMMIT}, "single step");
    bus_read(REG_STATUS, d);     expect_eq(d[1], 1, "DONE after tick");
    bus_read(REG_TICK_COUNT, d); expect_eq(d, 1, "TICK_COUNT after tick");
    bus_write(REG_CTRL, 32'h8);
    bus_read(REG_STATUS, d);     expect_eq(d[1], 0, "DONE after ack");
    // waitrequest: a GRID_MEM access during a sweep stalls and then completes
    stalls = 0;
    bus_write(REG_CTRL, 32'h1);
    bus_read(16'h1000 + 16'(4 * (2 * W + 3)), d);
    expect_eq(d, 32'hA5A5_0003, "stalled GRID_MEM read");
    checks++; if (stalls == 0) fail("no waitrequest stall");
    wait_idle(); ops.delete();
    // map load
    bus_write(REG_CTRL, 32'h4);
    bus_read(REG_STATUS, d); expect_eq({d[2], d[0]}, 2'b01, "MAP_READY low while loading");
    wait_idle();
    bus_read(REG_STATUS, d); expect_eq(d[2], 1, "MAP_READY after load");
    expect_ops('{OP_LOADMAP}, "map load");
    // brush: tool 00 does nothing, tool 01 sweeps
    bus_write(REG_BRUSH_CFG, 32'h0);
    bus_write(REG_CTRL, 32'h10);
    repeat (5) @(negedge clk);
    expect_ops('{}, "brush with no tool");
    bus_write(REG_BRUSH_CFG, {16'h4000, 8'd3, 8'd1});
    bus_write(REG_CTRL, 32'h10);
    wait_idle();
    expect_ops('{OP_BRUSH}, "brush");
    // soft reset
    bus_write(REG_CTRL, 32'h2);
    wait_idle();
    expect_ops('{OP_CLEAR}, "soft reset");
    bus_read(REG_TICK_COUNT, d); expect_eq(d, 0, "TICK_COUNT after soft reset");
    bus_read(REG_STATUS, d);     expect_eq(d[2:0], 3'b100, "STATUS after soft reset");
    // pulses queued during a sweep: reset, load, brush, step in that order
    bus_write(REG_CTRL, 32'h1);
    bus_write(REG_CTRL, 32'h17);
    wait_idle();
    expect_ops('{OP_EVAL, OP_COMMIT, OP_CLEAR, OP_LOADMAP, OP_BRUSH}, "queued pulses");
    // auto-run, free running
    bus_write(REG_STEP_CFG, 32'h1);
    repeat (10 * LEN) @(negedge clk);
    bus_write(REG_STEP_CFG, 32'h0);
    wait_idle();
    checks++; if (ops.size() < 6 || ops.size() % 2 != 0) fail($sformatf("auto-run %0d sweeps", ops.size()));
    auto_ticks = ops.size() / 2;
    ops.delete();
    // frame lock: waits for vblank, then STEPS_PER_FRAME ticks
    bus_write(REG_STEP_CFG, {16'd0, 8'd3, 8'h03});
    repeat (20 * LEN) @(negedge clk);
    bus_read(REG_STATUS, d); expect_eq({d[4:3], d[0]}, {PH_VBLANK, 1'b1}, "waiting for vblank");
    expect_ops('{}, "no sweep before vblank");
    @(negedge clk); vblank = 1;
    repeat (20 * LEN) @(negedge clk);
    expect_ops('{OP_EVAL, OP_COMMIT, OP_EVAL, OP_COMMIT, OP_EVAL, OP_COMMIT}, "three ticks in one vblank");
    bus_read(REG_STATUS, d); expect_eq(d[4:3], PH_VBLANK, "waiting for next vblank");
    vblank = 0;
    bus_write(REG_STEP_CFG, 32'h0);
    @(negedge clk); vblank = 1; @(negedge clk); vblank = 0;
    wait_idle(); ops.delete();
    // a single step under frame lock also waits for vblank
    bus_write(REG_STEP_CFG, 32'h2);
    bus_write(REG_CTRL, 32'h1);
    repeat (5 * LEN) @(negedge clk);
    expect_ops('{}, "step before vblank");
    @(negedge clk); vblank = 1;
    wait_idle();
    expect_ops('{OP_EVAL, OP_COMMIT}, "frame-locked step");
    bus_read(REG_TICK_COUNT, d); expect_eq(d, auto_ticks + 4, "TICK_COUNT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
