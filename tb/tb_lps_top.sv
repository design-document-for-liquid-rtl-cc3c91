// tb_lps_top: end-to-end run of the whole simulator at its default size
// (64x64 grid, 640x480 video), driven only through the host bus the way the
// host software would: write the map into GRID_MEM, pulse LOAD_MAP, step
// ticks, apply brushes, read the grid back. Every tick is compared cell by
// cell with the reference model started from the read-back grid. Counts each
// mechanism and fails if one never happened: evaluate/commit ticks, flows in
// all four directions, compression, MinLiquid clamping, settling, falling
// streams, the three brush tools, the waitrequest stall, DONE acknowledge,
// auto-run under frame lock with STEPS_PER_FRAME, soft reset, and the walls
// and water and debug colours appearing on the VGA output.
module tb_lps_top;
  import lps_pkg::*;
  import lps_ref_pkg::*;

  localparam int W = 64, H = 64, N = W * H;
  localparam longint TOL = 12;

  logic clk = 0, rst = 1;
  logic avs_chipselect = 0, avs_rw = 0, avs_waitrequest;
  logic [15:0] avs_address = '0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic vga_hsync, vga_vsync;
  logic [7:0] vga_r, vga_g, vga_b;

  lps_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic fail(string s); failures++; if (failures < 30) $display("FAIL %s", s); endtask

  // mechanism counters
  int m_flow[4] = '{0, 0, 0, 0};
  int m_clamp = 0, m_settle = 0, m_down = 0, m_compress = 0, m_stall = 0;
  int m_grey = 0, m_blue = 0, m_debug = 0, m_ticks = 0;
  logic debug_view = 0;
  always @(posedge clk) begin
    if (avs_chipselect && avs_waitrequest) m_stall++;
    if ({vga_r, vga_g, vga_b} == 24'h808080) m_grey++;
    if (vga_r == 0 && vga_g == 0 && vga_b != 0) m_blue++;
    if (debug_view && (vga_r == 8'hFF || vga_g == 8'hFF) && vga_b != 0 && vga_r != 8'h80) m_debug++;
  end

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

  function automatic logic [15:0] cell_addr(int a);
    return 16'h1000 + 16'(4 * a);
  endfunction

  cell_t grid [N];
  bit    wall [N];

  task automatic read_all();
    logic [31:0] d;
    for (int a = 0; a < N; a++) begin bus_read(cell_addr(a), d); grid[a] = cell_t'(d); end
  endtask

  task automatic wait_status(int bit_i, logic val);
    logic [31:0] s;
    int n = 0;
    do begin bus_read(REG_STATUS, s); n++; end while (s[bit_i] != val && n < 100000);
    checks++;
    if (s[bit_i] != val) fail($sformatf("STATUS[%0d] never became %0d", bit_i, val));
  endtask

  // cells whose outcome sits on a rounding threshold of the model
  bit amb [N];

  function automatic rcell_t rc(int x, int y);
    rcell_t c;
    if (x < 0 || x >= W || y < 0 || y >= H) begin c.solid = 1; c.settled = 1; c.liq = 0; end
    else begin
      c.solid = wall[y * W + x]; c.settled = grid[y * W + x].settled;
      c.liq = longint'(grid[y * W + x].liquid);
    end
    return c;
  endfunction

  task automatic model_tick(output cell_t nxt [N]);
    longint diff [N];
    longint fl[4];
    bit act;
    bit has [N];
    foreach (diff[i]) diff[i] = 0;
    foreach (amb[i]) amb[i] = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        ref_eval(rc(x, y), rc(x, y - 1), rc(x, y + 1), rc(x - 1, y), rc(x + 1, y), 4, 3, fl, act);
        for (int k = 0; k < 4; k++) if (fl[k] != 0) m_flow[k]++;
        if (amb_flag) begin
          amb[y * W + x] = 1;
          if (y + 1 < H) amb[(y + 1) * W + x] = 1;
          if (x > 0)     amb[y * W + x - 1] = 1;
          if (x + 1 < W) amb[y * W + x + 1] = 1;
          if (y > 0)     amb[(y - 1) * W + x] = 1;
        end
        diff[y * W + x] -= fl[0] + fl[1] + fl[2] + fl[3];
        if (fl[0] != 0) diff[(y + 1) * W + x] += fl[0];
        if (fl[1] != 0) diff[y * W + x - 1] += fl[1];
        if (fl[2] != 0) diff[y * W + x + 1] += fl[2];
        if (fl[3] != 0) diff[(y - 1) * W + x] += fl[3];
      end
    for (int a = 0; a < N; a++) begin
      longint s = longint'(grid[a].liquid) + diff[a];
      cell_t o = grid[a];
      cell_t n = o;
      if (s > MINL - TOL && s < MINL + TOL) amb[a] = 1;
      if (wall[a]) s = 0;
      else if (s < MINL) begin if (s > 0) m_clamp++; s = 0; end
      else if (s > LMAX) s = LMAX;
      n.liquid = liq_t'(s);
      if (n.liquid != o.liquid) begin n.settle_count = 0; n.settled = 0; end
      else begin
        n.settle_count = (o.settle_count == 4'hF) ? 4'hF : o.settle_count + 1;
        n.settled = o.settled || (int'(n.settle_count) >= SETTLE);
      end
      has[a] = (s != 0);
      n.down_flowing = has[a] && (a >= W) && has[a - W];
      nxt[a] = n;
    end
  endtask

  task automatic compare(cell_t exp [N], string what);
    for (int a = 0; a < N; a++) begin
      longint d = longint'(grid[a].liquid) - longint'(exp[a].liquid);
      longint tol = amb[a] ? MINL + TOL : TOL;
      checks++;
      if (d > tol || d < -tol)
        fail($sformatf("%s cell (%0d,%0d) liquid %0d expected %0d", what, a % W, a / W, grid[a].liquid, exp[a].liquid));
      else if (d == 0 && !amb[a]) begin
        checks++;
        if (grid[a] != exp[a]) fail($sformatf("%s cell (%0d,%0d) word %h expected %h", what, a % W, a / W, grid[a], exp[a]));
      end
      if (grid[a].settled && grid[a].liquid != 0) m_settle++;
      if (grid[a].down_flowing) m_down++;
      if (grid[a].liquid > liq_t'(ML)) m_compress++;
    end
  endtask

  // one tick through the bus, checked against the model
  int busy_cycles;
  task automatic tick_and_check(string what);
    cell_t exp [N];
    logic [31:0] d;
    model_tick(exp);
    busy_cycles = 0;
    fork
      begin
        @(posedge dut.sweep_busy);
        while (dut.u_gctrl.state != dut.u_gctrl.S_IDLE) begin
          @(posedge clk);
          if (dut.sweep_busy) busy_cycles++;
        end
      end
    join_none
    bus_write(REG_CTRL, 32'h1);
    wait_status(1, 1'b1);
    bus_write(REG_CTRL, 32'h8);
    bus_read(REG_STATUS, d);
    checks++; if (d[1]) fail("DONE not cleared by acknowledge");
    checks++;
    // evaluate: one cell per clock plus the window fill; commit: one per clock
    if (busy_cycles != (N + 2 * W + 2) + (N + 1)) fail($sformatf("tick took %0d busy clocks", busy_cycles));
    m_ticks++;
    read_all();
    compare(exp, what);
  endtask

  task automatic brush_and_check(tool_e tool, int bx, int by, int rad, int amount);
    cell_t exp [N];
    for (int a = 0; a < N; a++) begin
      automatic int dx = a % W - bx, dy = a / W - by;
      exp[a] = grid[a];
      if (dx * dx + dy * dy <= rad * rad) begin
        exp[a].settled = 0; exp[a].settle_count = 0;
        if (tool == TOOL_ADD && !wall[a])
          exp[a].liquid = liq_t'((longint'(grid[a].liquid) + amount > LMAX) ? LMAX : longint'(grid[a].liquid) + amount);
        if (tool == TOOL_ERASE) exp[a].liquid = '0;
        if (tool == TOOL_WALL) begin exp[a].liquid = '0; exp[a].solid = 1; exp[a].down_flowing = 0; wall[a] = 1; end
      end
    end
    bus_write(REG_MOUSE_POS, {16'(by), 16'(bx)});
    bus_write(REG_BRUSH_CFG, {16'(amount), 8'(rad), 6'd0, 2'(tool)});
    bus_write(REG_CTRL, 32'h10);
    wait_status(0, 1'b0);
    read_all();
    for (int a = 0; a < N; a++) begin
      checks++;
      if (grid[a] != exp[a]) fail($sformatf("brush %s cell %0d got %h exp %h", tool.name(), a, grid[a], exp[a]));
    end
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int t0, t1;
    bit cup_settled;
    repeat (3) @(negedge clk);
    rst = 0;
    bus_read(REG_GRID_SIZE, d);
    checks++; if (d != {16'd64, 16'd64}) fail("GRID_SIZE");
    // map: floor, side walls, a shelf; a water column and a blob on the shelf
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic cell_t c = '0;
        automatic int a = y * W + x;
        c.solid = (y == H - 1) || (x == 0) || (x == W - 1) || (y == 40 && x >= 20 && x <= 44) ||
                  (y == 10 && (x == 60 || x == 62)) || (y == 11 && x == 61);
        if (!c.solid) begin
          if (x >= 4 && x <= 6 && y >= 30) c.liquid = liq_t'(65536 + 20000);
          if (x >= 28 && x <= 34 && y >= 34 && y < 40) c.liquid = liq_t'($urandom_range(30000, 70000));
          if (x == 50 && y == 5) c.liquid = liq_t'(200);
          if (x == 61 && y == 10) c.liquid = liq_t'(32768);   // trapped in a cup: settles
        end
        wall[a] = c.solid;
        grid[a] = c;
        bus_write(cell_addr(a), 32'(c));
      end
    bus_write(REG_CTRL, 32'h4);
    wait_status(2, 1'b1);
    for (int t = 0; t < 12; t++) tick_and_check($sformatf("tick %0d", t));
    brush_and_check(TOOL_ADD, 40, 10, 3, 16'hC000);
    for (int t = 0; t < 4; t++) tick_and_check($sformatf("after add %0d", t));
    brush_and_check(TOOL_ERASE, 5, 50, 2, 0);
    brush_and_check(TOOL_WALL, 12, 60, 1, 0);
    for (int t = 0; t < 14; t++) tick_and_check($sformatf("after edits %0d", t));
    cup_settled = grid[10 * W + 61].settled && grid[10 * W + 61].liquid == liq_t'(32768);
    // a GRID_MEM read during a tick is stalled, then returns the word
    m_stall = 0;
    bus_write(REG_CTRL, 32'h1);
    bus_read(cell_addr(W + 5), d);
    checks++; if (m_stall == 0) fail("GRID_MEM read during a tick did not stall");
    wait_status(0, 1'b0);
    bus_write(REG_CTRL, 32'h8);
    // auto-run locked to the frame, two ticks per vertical blank
    bus_read(REG_TICK_COUNT, d); t0 = int'(d);
    bus_write(REG_STEP_CFG, {16'd0, 8'd2, 8'h03});
    // a batch starts when blanking begins and ends before the sync pulse does
    @(posedge vga_vsync); @(posedge vga_vsync);
    bus_read(REG_TICK_COUNT, d); t1 = int'(d);
    bus_write(REG_STEP_CFG, 32'h0);
    checks++; if (t1 - t0 < 2 || t1 - t0 > 6 || (t1 - t0) % 2 != 0)
      fail($sformatf("frame-locked auto-run made %0d ticks in two frames", t1 - t0));
    wait_status(0, 1'b0);
    // debug view for one frame
    bus_write(REG_VGA_CTRL, 32'h5);
    @(negedge vga_vsync); debug_view = 1; @(negedge vga_vsync); debug_view = 0;
    bus_write(REG_VGA_CTRL, 32'h1);
    // soft reset: liquid gone, walls kept, TICK_COUNT back to zero
    bus_write(REG_CTRL, 32'h2);
    wait_status(0, 1'b0);
    read_all();
    for (int a = 0; a < N; a++) begin
      checks++;
      if (grid[a].liquid != 0 || grid[a].settled || grid[a].solid != wall[a])
        fail($sformatf("soft reset cell %0d %h", a, grid[a]));
    end
    bus_read(REG_TICK_COUNT, d);
    checks++; if (d != 0) fail("TICK_COUNT after soft reset");
    $display("ticks=%0d flows d/l/r/u=%0d/%0d/%0d/%0d clamp=%0d settled=%0d down=%0d compress=%0d grey=%0d blue=%0d debug=%0d",
             m_ticks, m_flow[0], m_flow[1], m_flow[2], m_flow[3], m_clamp, m_settle, m_down, m_compress, m_grey, m_blue, m_debug);
    foreach (m_flow[k]) begin checks++; if (m_flow[k] == 0) fail($sformatf("no flow in direction %0d", k)); end
    checks++; if (m_clamp == 0)    fail("MinLiquid clamp never happened");
    checks++; if (m_settle == 0)   fail("no wet cell settled");
    checks++; if (!cup_settled)    fail("water in the cup did not settle");
    checks++; if (m_down == 0)     fail("no falling stream");
    checks++; if (m_compress == 0) fail("no compression above 1.0");
    checks++; if (m_grey == 0)     fail("no wall on screen");
    checks++; if (m_blue == 0)     fail("no water on screen");
    checks++; if (m_debug == 0)    fail("debug view showed no flags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
