// tb_lps_particle_block: sweeps of the particle block on a small grid.
//
// Loads a map through the host port, copies it into the Line Memory, then runs
// evaluate+commit ticks and compares every cell with the reference model run
// on the same starting grid (liquid within a small tolerance, flags exactly
// where the liquid matches). Also checks the sweep lengths (evaluate
// N + 2W + 2 clocks, commit N + 1), the three brush tools and the liquid
// clear, and counts the mechanisms seen: flows in all four directions,
// MinLiquid clamping, settling, falling streams, compression beyond 1.0.
// After the clear, half a cell of water in a walled pit must settle. Cells
// whose result sits on a MinFlow or MinLiquid rounding threshold get a wider
// liquid tolerance and no flag check.
module tb_lps_particle_block;
  import lps_pkg::*;
  import lps_ref_pkg::*;

  localparam int W = 8, H = 6, N = W * H, AW = $clog2(N);
  localparam longint TOL = 12;

  logic clk = 0, rst = 1;
  logic start = 0;
  sweep_op_e op = OP_EVAL;
  brush_t brush = '0;
  logic busy, done, cell_active;
  logic host_re = 0, host_we = 0;
  logic [AW-1:0] host_raddr = '0, host_waddr = '0;
  cell_t host_rdata, host_wdata = '0;
  logic vga_re = 0;
  logic [AW-1:0] vga_raddr = '0;
  cell_t vga_rdata;
  logic lm_re, lm_we, lm_rdata, lm_wdata, lv_rdata;
  logic [AW-1:0] lm_raddr, lm_waddr;

  lps_particle_block #(.GRID_W(W), .GRID_H(H)) dut (.*);
  lps_line_block #(.GRID_W(W), .GRID_H(H)) u_line (
    .clk, .we(lm_we), .waddr(lm_waddr), .wdata(lm_wdata),
    .re_a(lm_re), .raddr_a(lm_raddr), .rdata_a(lm_rdata),
    .re_v(1'b1), .raddr_v(vga_raddr), .rdata_v(lv_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_active = 0;
  int m_flow[4] = '{0, 0, 0, 0};
  int m_clamp = 0, m_settle = 0, m_down = 0, m_compress = 0;

  always @(posedge clk) if (cell_active) n_active++;

  cell_t grid [N];        // last state read back
  bit    amb [N];         // cells whose outcome sits on a rounding threshold
  bit    wall [N];        // walls as loaded

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  task automatic host_write(int a, cell_t v);
    @(negedge clk);
    host_we = 1; host_waddr = AW'(a); host_wdata = v;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic read_all();
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      host_re = 1; host_raddr = AW'(a);
      @(negedge clk);
      host_re = 0;
      grid[a] = host_rdata;
    end
  endtask

  task automatic sweep(sweep_op_e o, int exp_cycles);
    int n = 0;
    @(negedge clk);
    op = o; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      n++;
      if (n > 10 * N + 100) break;
    end
    checks++;
    if (exp_cycles >= 0 && n != exp_cycles) fail($sformatf("sweep %s took %0d clocks, expected %0d", o.name(), n, exp_cycles));
  endtask

  function automatic rcell_t rc(int x, int y);
    rcell_t c;
    if (x < 0 || x >= W || y < 0 || y >= H) begin
      c.solid = 1; c.settled = 1; c.liq = 0;
    end else begin
      c.solid = wall[y * W + x]; c.settled = grid[y * W + x].settled;
      c.liq = longint'(grid[y * W + x].liquid);
    end
    return c;
  endfunction

  // One tick of the reference model from grid[] into nxt[].
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
      else if (s < MINL) begin
        if (s > 0) m_clamp++;
        s = 0;
      end else if (s > LMAX) s = LMAX;
      n.liquid = liq_t'(s);
      if (n.liquid != o.liquid) begin
        n.settle_count = 0; n.settled = 0;
      end else begin
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
        fail($sformatf("%s cell %0d liquid %0d expected %0d", what, a, grid[a].liquid, exp[a].liquid));
      else if (d == 0 && !amb[a]) begin
        checks++;
        if (grid[a].settled != exp[a].settled || grid[a].settle_count != exp[a].settle_count ||
            grid[a].down_flowing != exp[a].down_flowing || grid[a].solid != exp[a].solid)
          fail($sformatf("%s cell %0d flags %h expected %h", what, a, grid[a], exp[a]));
      end
      if (grid[a].settled && grid[a].liquid != 0) m_settle++;
      if (grid[a].down_flowing) m_down++;
      if (grid[a].liquid > liq_t'(ML)) m_compress++;
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_t exp [N];
    repeat (3) @(negedge clk);
    rst = 0;
    // Map: bottom row and a ledge are walls; a full column and random water.
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic cell_t c = '0;
        automatic int a = y * W + x;
        c.solid = (y == H - 1) || (y == 3 && x >= 2 && x <= 4) || (x == 6 && y >= 2);
        if (!c.solid) begin
          if (x == 1) c.liquid = liq_t'(65536);
          else if ($urandom_range(0, 2) == 0) c.liquid = liq_t'($urandom_range(0, 80000));
          if (x == 7 && y >= 2) c.liquid = '0;
          if (x == 7 && y == 4) c.liquid = liq_t'(200);   // below MinLiquid
        end
        c.reserved = 7'h55;
        wall[a] = c.solid;
        host_write(a, c);
      end
    sweep(OP_LOADMAP, N + 1);
    for (int a = 0; a < N; a++) begin
      checks++;
      if (u_line.u_line_mem_a.mem[a] != wall[a]) fail($sformatf("line memory %0d", a));
    end
    read_all();
    // Ticks.
    for (int t = 0; t < 60; t++) begin
      model_tick(exp);
      sweep(OP_EVAL, N + 2 * W + 2);
      sweep(OP_COMMIT, N + 1);
      read_all();
      compare(exp, $sformatf("tick %0d", t));
      if (t == 3) begin
        // top up the column so it presses deeper cells above 1.0
        for (int y = 0; y < 3; y++) begin
          automatic cell_t c = grid[y * W + 1];
          c.liquid = liq_t'(100000);
          host_write(y * W + 1, c);
        end
        read_all();
      end
    end
    // Brush: add water, erase, draw wall.
    begin
      brush_t bset [3];
      bset[0] = '{tool: TOOL_ADD,   radius: 8'd1, amount: 16'h8000, x: 16'd5, y: 16'd1};
      bset[1] = '{tool: TOOL_ERASE, radius: 8'd1, amount: 16'h0,    x: 16'd1, y: 16'd2};
      bset[2] = '{tool: TOOL_WALL,  radius: 8'd0, amount: 16'h0,    x: 16'd5, y: 16'd4};
      foreach (bset[i]) begin
        for (int a = 0; a < N; a++) begin
          automatic int dx = a % W - int'(bset[i].x), dy = a / W - int'(bset[i].y);
          exp[a] = grid[a];
          if (dx * dx + dy * dy <= int'(bset[i].radius) * int'(bset[i].radius)) begin
            exp[a].settled = 0; exp[a].settle_count = 0;
            if (bset[i].tool == TOOL_ADD && !wall[a])
              exp[a].liquid = liq_t'((longint'(grid[a].liquid) + longint'(bset[i].amount) > LMAX) ? LMAX
                                     : longint'(grid[a].liquid) + longint'(bset[i].amount));
            if (bset[i].tool == TOOL_ERASE) exp[a].liquid = '0;
            if (bset[i].tool == TOOL_WALL) begin
              exp[a].liquid = '0; exp[a].solid = 1; exp[a].down_flowing = 0; wall[a] = 1;
            end
          end
        end
        brush = bset[i];
        sweep(OP_BRUSH, N + 1);
        read_all();
        for (int a = 0; a < N; a++) begin
          checks++;
          if (grid[a] != exp[a]) fail($sformatf("brush %0d cell %0d got %h exp %h", i, a, grid[a], exp[a]));
        end
      end
      checks++;
      if (u_line.u_line_mem_a.mem[4 * W + 5] != 1'b1) fail("wall brush did not reach line memory");
    end
    // A tick after the edits.
    model_tick(exp);
    sweep(OP_EVAL, N + 2 * W + 2);
    sweep(OP_COMMIT, N + 1);
    read_all();
    compare(exp, "post-brush");
    // Clear.
    sweep(OP_CLEAR, N + 1);
    read_all();
    for (int a = 0; a < N; a++) begin
      automatic cell_t e = '0;
      e.solid = grid[a].solid;
      checks++;
      if (grid[a] != e || grid[a].solid != wall[a]) fail($sformatf("clear cell %0d %h", a, grid[a]));
    end
    // Half a cell of water in the walled pit at (7,4) cannot move, so it must
    // count up and settle after SETTLE ticks.
    begin
      automatic cell_t c = grid[4 * W + 7];
      c.liquid = liq_t'(32768);
      host_write(4 * W + 7, c);
      read_all();
      for (int t = 0; t < SETTLE + 2; t++) begin
        model_tick(exp);
        sweep(OP_EVAL, N + 2 * W + 2);
        sweep(OP_COMMIT, N + 1);
        read_all();
        compare(exp, $sformatf("pit tick %0d", t));
      end
      checks++;
      if (!grid[4 * W + 7].settled || grid[4 * W + 7].liquid != liq_t'(32768))
        fail($sformatf("pit cell did not settle: %h", grid[4 * W + 7]));
    end
    // Mechanism coverage.
    $display("flows d/l/r/u=%0d/%0d/%0d/%0d active=%0d clamp=%0d settled=%0d down=%0d compress=%0d",
             m_flow[0], m_flow[1], m_flow[2], m_flow[3], n_active, m_clamp, m_settle, m_down, m_compress);
    foreach (m_flow[k]) begin checks++; if (m_flow[k] == 0) fail($sformatf("no flow in direction %0d", k)); end
    checks++; if (n_active == 0) fail("no active cell");
    checks++; if (m_clamp == 0)  fail("MinLiquid clamp never happened");
    checks++; if (m_settle == 0) fail("no wet cell settled");
    checks++; if (m_down == 0)   fail("no falling stream");
    checks++; if (m_compress == 0) fail("no compression");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
