// lps_top: FPGA side of the interactive liquid simulator.
//
// A 2-D cellular-automaton water model runs on a GRID_W x GRID_H grid held in
// on-chip RAM. The host processor loads a wall map and drives the simulation
// through a 32-bit memory-mapped slave (see lps_global_ctrl for the register
// map); the FPGA does all of the physics and draws the grid on a VGA monitor.
//
//   lps_global_ctrl     bus slave, registers, tick FSM (evaluate, commit,
//                       vblank wait), arbitration of GRID_MEM accesses
//   lps_particle_block  cell memory, Diffs buffer, sweep engine, physics
//                       accelerator
//   lps_line_block      Line Memory, the wall geometry
//   lps_vga             640x480 renderer
//
// One clock domain; the pixel clock is clk / CLK_DIV. A tick of the default
// 64x64 grid takes about 2*4096 + 2*64 + 10 clocks. The bus follows the
// signal set of an Avalon-MM slave with a single read/write line; readdata is
// valid on the clock after an accepted read and GRID_MEM accesses may stall.
module lps_top
  import lps_pkg::*;
#(
  parameter int unsigned GRID_W  = 64,
  parameter int unsigned GRID_H  = 64,
  parameter int unsigned DIV_L   = 4,
  parameter int unsigned DIV_R   = 3,
  parameter int unsigned CELL_PX = 7,
  parameter int unsigned CLK_DIV = 2,
  localparam int unsigned N      = GRID_W * GRID_H,
  localparam int unsigned AW     = $clog2(N)
) (
  input  logic        clk,
  input  logic        rst,
  // host bus
  input  logic        avs_chipselect,
  input  logic        avs_rw,
  input  logic [15:0] avs_address,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  output logic        avs_waitrequest,
  // monitor
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b
);

  logic          host_re, host_we;
  logic [AW-1:0] host_raddr, host_waddr;
  cell_t         host_rdata, host_wdata;
  logic          sweep_start, sweep_busy, sweep_done, cell_active;
  sweep_op_e     sweep_op;
  brush_t        brush;
  logic          vblank, video_en, hide_liquid, debug_mode;
  logic          vga_re;
  logic [AW-1:0] vga_raddr;
  cell_t         vga_cell;
  logic          vga_wall;
  logic          lm_re, lm_we, lm_rdata, lm_wdata;
  logic [AW-1:0] lm_raddr, lm_waddr;

  lps_global_ctrl #(.GRID_W(GRID_W), .GRID_H(GRID_H)) u_gctrl (
    .clk, .rst,
    .avs_chipselect, .avs_rw, .avs_address, .avs_writedata, .avs_readdata, .avs_waitrequest,
    .host_re, .host_raddr, .host_rdata, .host_we, .host_waddr, .host_wdata,
    .sweep_start, .sweep_op, .brush, .sweep_busy, .sweep_done,
    .vblank, .video_en, .hide_liquid, .debug_mode
  );

  lps_particle_block #(
    .GRID_W(GRID_W), .GRID_H(GRID_H), .DIV_L(DIV_L), .DIV_R(DIV_R)
  ) u_particle (
    .clk, .rst,
    .start(sweep_start), .op(sweep_op), .brush, .busy(sweep_busy), .done(sweep_done),
    .cell_active,
    .host_re, .host_raddr, .host_rdata, .host_we, .host_waddr, .host_wdata,
    .vga_re, .vga_raddr, .vga_rdata(vga_cell),
    .lm_re, .lm_raddr, .lm_rdata, .lm_we, .lm_waddr, .lm_wdata
  );

  lps_line_block #(.GRID_W(GRID_W), .GRID_H(GRID_H)) u_line (
    .clk, .we(lm_we), .waddr(lm_waddr), .wdata(lm_wdata),
    .re_a(lm_re), .raddr_a(lm_raddr), .rdata_a(lm_rdata),
    .re_v(vga_re), .raddr_v(vga_raddr), .rdata_v(vga_wall)
  );

  lps_vga #(
    .GRID_W(GRID_W), .GRID_H(GRID_H), .CELL_PX(CELL_PX), .CLK_DIV(CLK_DIV)
  ) u_vga (
    .clk, .rst, .video_en, .hide_liquid, .debug_mode,
    .re(vga_re), .raddr(vga_raddr), .cell_in(vga_cell), .wall(vga_wall),
    .hsync(vga_hsync), .vsync(vga_vsync), .r(vga_r), .g(vga_g), .b(vga_b),
    .vblank
  );

endmodule
