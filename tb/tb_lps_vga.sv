// tb_lps_vga: renderer at its default 640x480 timing against a small
// behavioural cell memory. Measures the sync periods and pulse widths and the
// blanking interval, then reconstructs pixel positions from the syncs alone
// and checks the colour of chosen cells in the normal view, the debug view,
// with the liquid hidden and with video disabled.
module tb_lps_vga;
  import lps_pkg::*;
  localparam int W = 64, H = 64, N = W * H, AW = $clog2(N), PX = 7, DIV = 2;
  localparam int HT = 800, VT = 525;

  logic clk = 0, rst = 1;
  logic video_en = 1, hide_liquid = 0, debug_mode = 0;
  logic re, wall, hsync, vsync, vblank;
  logic [AW-1:0] raddr;
  cell_t cell_in;
  logic [7:0] r, g, b;

  lps_vga #(.GRID_W(W), .GRID_H(H), .CELL_PX(PX), .CLK_DIV(DIV)) dut (.*);

  cell_t cmem [N];
  bit    wmem [N];
  always_ff @(posedge clk) if (re) begin cell_in <= cmem[raddr]; wall <= wmem[raddr]; end
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic fail(string s); failures++; $display("FAIL %s", s); endtask

  // sync measurements
  longint cyc = 0, h_fall = -1, v_fall = -1, h_rise = -1, v_rise = -1, vb_start = -1;
  int  k = 0;            // hsync falls since vsync fall
  logic hs_q = 1, vs_q = 1, vb_q = 0;
  int  h_period = 0, h_width = 0, v_period = 0, v_width = 0, vb_len = 0;
  int  frames = 0;

  // probe pixels: (h, v) and the colour expected there
  typedef struct { int h; int v; logic [23:0] rgb; } probe_t;
  probe_t probes [$];
  int probe_hits = 0;

  always @(posedge clk) begin
    cyc++;
    if (hs_q && !hsync) begin
      if (h_fall >= 0) h_period = int'(cyc - h_fall);
      h_fall = cyc; k++;
    end
    if (!hs_q && hsync) h_width = int'(cyc - h_fall);
    if (vs_q && !vsync) begin
      if (v_fall >= 0) v_period = int'(cyc - v_fall);
      v_fall = cyc; k = 0; frames++;
    end
    if (!vs_q && vsync) v_width = int'(cyc - v_fall);
    if (!vb_q && vblank) vb_start = cyc;
    if (vb_q && !vblank && vb_start >= 0) vb_len = int'(cyc - vb_start);
    hs_q = hsync; vs_q = vsync; vb_q = vblank;
    // pixel (h, v) sits (h + 144) pixels after the fall of hsync number v + 35
    if (v_fall >= 0 && h_fall >= 0) begin
      foreach (probes[i]) begin
        if (k == probes[i].v + 35 && cyc - h_fall == longint'((probes[i].h + HT - 656) * DIV + 1)) begin
          checks++; probe_hits++;
          if ({r, g, b} != probes[i].rgb)
            fail($sformatf("pixel (%0d,%0d) = %h expected %h", probes[i].h, probes[i].v, {r, g, b}, probes[i].rgb));
        end
      end
    end
  end

  function automatic probe_t at(int cx, int cy, logic [23:0] rgb);
    probe_t p; p.h = cx * PX + 3; p.v = cy * PX + 3; p.rgb = rgb; return p;
  endfunction

  task automatic wait_frame();
    int f = frames;
    while (frames == f) @(posedge clk);
  endtask

  initial begin
    repeat (10 * HT * VT * DIV) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (cmem[i]) begin cmem[i] = '0; wmem[i] = 0; end
    wmem[0] = 1; cmem[0].solid = 1;                                  // (0,0) wall
    cmem[1].liquid = liq_t'(32768);                                  // (1,0) 0.5
    cmem[2].liquid = liq_t'(65536); cmem[2].down_flowing = 1;        // (2,0) stream
    cmem[3].liquid = liq_t'(65536); cmem[3].down_flowing = 1; cmem[3].settled = 1;
    cmem[10 * W + 5].liquid = liq_t'(200000);                        // (5,10) 3.05
    cmem[N - 1].liquid = liq_t'(16384);                              // (63,63) 0.25
    repeat (3) @(negedge clk);
    rst = 0;
    wait_frame();
    // normal view
    probes.push_back(at(0, 0, 24'h808080));
    probes.push_back(at(1, 0, {16'h0, 8'd160}));
    probes.push_back(at(2, 0, {16'h0, 8'hFF}));
    probes.push_back(at(3, 0, {16'h0, 8'd224}));
    probes.push_back(at(5, 10, {16'h0, 8'hFF}));
    probes.push_back(at(63, 63, {16'h0, 8'd128}));
    probes.push_back(at(4, 0, 24'h0));
    probes.push_back('{h: 500, v: 100, rgb: 24'h0});
    probes.push_back('{h: 100, v: 470, rgb: 24'h0});
    wait_frame();
    // debug view
    probes.delete();
    @(negedge clk); debug_mode = 1;
    wait_frame();
    probes.push_back(at(0, 0, 24'h808080));
    probes.push_back(at(1, 0, {16'h0, 8'd160}));
    probes.push_back(at(2, 0, {8'h00, 8'hFF, 8'd224}));
    probes.push_back(at(3, 0, {8'hFF, 8'hFF, 8'd224}));
    wait_frame();
    // liquid hidden
    probes.delete();
    @(negedge clk); debug_mode = 0; hide_liquid = 1;
    wait_frame();
    probes.push_back(at(0, 0, 24'h808080));
    probes.push_back(at(1, 0, 24'h0));
    wait_frame();
    // video off
    probes.delete();
    @(negedge clk); hide_liquid = 0; video_en = 0;
    wait_frame();
    probes.push_back(at(0, 0, 24'h0));
    probes.push_back(at(2, 0, 24'h0));
    wait_frame();
    checks += 6;
    if (h_period != HT * DIV)        fail($sformatf("hsync period %0d", h_period));
    if (h_width != 96 * DIV)         fail($sformatf("hsync width %0d", h_width));
    if (v_period != HT * VT * DIV)   fail($sformatf("vsync period %0d", v_period));
    if (v_width != 2 * HT * DIV)     fail($sformatf("vsync width %0d", v_width));
    if (vb_len != 45 * HT * DIV)     fail($sformatf("vblank length %0d", vb_len));
    if (probe_hits != 17)            fail($sformatf("only %0d probe pixels seen", probe_hits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
