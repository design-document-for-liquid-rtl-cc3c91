// lps_vga: renders the cell grid on a 640x480 VGA monitor.
//
// A pixel counter runs the standard 640x480 at 60 Hz raster (800x525 total,
// negative syncs) at the system clock divided by CLK_DIV. The grid is drawn in
// the top-left corner with each cell a CELL_PX x CELL_PX square (64 cells x 7
// pixels = 448 lines); a sub-cell counter avoids any division. For each pixel
// the cell word and its Line Memory wall bit are read; the read enable follows
// the pixel enable, so colour and syncs leave together two pixels after the
// counter. Colours:
//   wall                         grey 0x808080
//   liquid, normal view          blue 96 + Liquid/512, saturating at 255
//                                full blue for a falling stream, i.e.
//                                isDownFlowing set and the cell not Settled
//   liquid, debug view           red = Settled, green = isDownFlowing,
//                                blue as above
//   empty, outside the grid      black
// video_en low blanks the colour (syncs keep running); hide_liquid draws only
// walls. vblank is high during the vertical blanking interval and lets the
// global controller lock simulation ticks to the refresh.
// The renderer's role and its use of Settled and isDownFlowing follow the
// design; the timing, scale and colours are this implementation's choices.
module lps_vga
  import lps_pkg::*;
#(
  parameter int unsigned GRID_W  = 64,
  parameter int unsigned GRID_H  = 64,
  parameter int unsigned CELL_PX = 7,
  parameter int unsigned CLK_DIV = 2,
  parameter int unsigned H_VIS   = 640,
  parameter int unsigned H_FP    = 16,
  parameter int unsigned H_SYNC  = 96,
  parameter int unsigned H_BP    = 48,
  parameter int unsigned V_VIS   = 480,
  parameter int unsigned V_FP    = 10,
  parameter int unsigned V_SYNC  = 2,
  parameter int unsigned V_BP    = 33,
  localparam int unsigned N      = GRID_W * GRID_H,
  localparam int unsigned AW     = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          video_en,
  input  logic          hide_liquid,
  input  logic          debug_mode,
  // cell memory and Line Memory read
  output logic          re,
  output logic [AW-1:0] raddr,
  input  cell_t         cell_in,
  input  logic          wall,
  // monitor
  output logic          hsync,
  output logic          vsync,
  output logic [7:0]    r,
  output logic [7:0]    g,
  output logic [7:0]    b,
  output logic          vblank
);

  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW    = $clog2(H_TOT);
  localparam int unsigned VW    = $clog2(V_TOT);
  localparam int unsigned DVW   = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  localparam int unsigned SPW   = (CELL_PX > 1) ? $clog2(CELL_PX) : 1;
  localparam int unsigned XW    = (GRID_W > 1) ? $clog2(GRID_W + 1) : 1;
  localparam int unsigned YW    = (GRID_H > 1) ? $clog2(GRID_H + 1) : 1;

  logic [DVW-1:0] div;
  logic           pix_en;
  logic [HW-1:0]  hc;
  logic [VW-1:0]  vc;
  logic [SPW-1:0] sx, sy;     // pixel within the cell
  logic [XW-1:0]  cx;         // cell column, GRID_W when past the grid
  logic [YW-1:0]  cy;
  logic           in_grid;
  logic [AW-1:0]  row_base;   // cy * GRID_W

  assign pix_en = (div == DVW'(CLK_DIV - 1));

  always_ff @(posedge clk) begin
    if (rst) div <= '0;
    else     div <= pix_en ? '0 : div + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hc <= '0; vc <= '0; sx <= '0; sy <= '0; cx <= '0; cy <= '0; row_base <= '0;
    end else if (pix_en) begin
      if (hc == HW'(H_TOT - 1)) begin
        hc <= '0;
        sx <= '0;
        cx <= '0;
        if (vc == VW'(V_TOT - 1)) begin
          vc <= '0; sy <= '0; cy <= '0; row_base <= '0;
        end else begin
          vc <= vc + 1'b1;
          if (cy != YW'(GRID_H)) begin
            if (sy == SPW'(CELL_PX - 1)) begin
              sy <= '0;
              cy <= cy + 1'b1;
              row_base <= row_base + AW'(GRID_W);
            end else begin
              sy <= sy + 1'b1;
            end
          end
        end
      end else begin
        hc <= hc + 1'b1;
        if (cx != XW'(GRID_W)) begin
          if (sx == SPW'(CELL_PX - 1)) begin
            sx <= '0;
            cx <= cx + 1'b1;
          end else begin
            sx <= sx + 1'b1;
          end
        end
      end
    end
  end

  assign in_grid = (cx != XW'(GRID_W)) && (cy != YW'(GRID_H));
  assign re      = pix_en;
  assign raddr   = row_base + AW'(cx);

  // Stage 1: counters -> memory read, timing signals delayed alongside.
  logic hs1, vs1, de1, grid1;
  always_ff @(posedge clk) begin
    if (rst) begin
      hs1 <= 1'b0; vs1 <= 1'b0; de1 <= 1'b0; grid1 <= 1'b0;
    end else if (pix_en) begin
      hs1   <= (hc >= HW'(H_VIS + H_FP)) && (hc < HW'(H_VIS + H_FP + H_SYNC));
      vs1   <= (vc >= VW'(V_VIS + V_FP)) && (vc < VW'(V_VIS + V_FP + V_SYNC));
      de1   <= (hc < HW'(H_VIS)) && (vc < VW'(V_VIS));
      grid1 <= in_grid;
    end
  end

  // Stage 2: colour.
  logic [7:0] shade, rr, gg, bb;
  logic [9:0] level;
  always_comb begin
    level = 10'd96 + 10'(cell_in.liquid >> 9);
    shade = (level > 10'd255) ? 8'hFF : level[7:0];
    rr = '0; gg = '0; bb = '0;
    if (!de1 || !video_en || !grid1) begin
      rr = '0; gg = '0; bb = '0;
    end else if (wall) begin
      rr = 8'h80; gg = 8'h80; bb = 8'h80;
    end else if (!hide_liquid && cell_in.liquid != '0) begin
      if (debug_mode) begin
        rr = cell_in.settled      ? 8'hFF : 8'h00;
        gg = cell_in.down_flowing ? 8'hFF : 8'h00;
        bb = shade;
      end else begin
        bb = (cell_in.down_flowing && !cell_in.settled) ? 8'hFF : shade;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hsync <= 1'b1; vsync <= 1'b1; r <= '0; g <= '0; b <= '0;
    end else if (pix_en) begin
      hsync <= !hs1;
      vsync <= !vs1;
      r <= rr; g <= gg; b <= bb;
    end
  end

  assign vblank = (vc >= VW'(V_VIS));

endmodule
