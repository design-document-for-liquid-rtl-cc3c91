// lps_particle_block: the physics engine with its memories.
//
// Holds the Particle Mem (one 32-bit cell word per grid cell, lps_pkg::cell_t),
// the Diffs scratch buffer of the same depth (signed Q.16 partial flows), the
// sweep engine (lps_particle_ctrl) and, inside it, the physics accelerator.
// While no sweep runs, the host port reaches the cell memory directly, which
// is how the GRID_MEM window is read and written; during a sweep the engine
// owns the memory and the host must wait (the global controller stalls it).
// The renderer has a read port of its own: the cell memory has one write port
// and two read ports, built as two RAM copies sharing the write, the way an
// FPGA tool replicates a one-write two-read memory. The Line Memory lives in
// the line block; its physics-side ports pass through here.
//
// Host and renderer reads return data one clock after the address.
module lps_particle_block
  import lps_pkg::*;
#(
  parameter int unsigned GRID_W = 64,
  parameter int unsigned GRID_H = 64,
  parameter int unsigned DIV_L  = 4,
  parameter int unsigned DIV_R  = 3,
  localparam int unsigned N     = GRID_W * GRID_H,
  localparam int unsigned AW    = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  // sweep command from the global controller
  input  logic          start,
  input  sweep_op_e     op,
  input  brush_t        brush,
  output logic          busy,
  output logic          done,
  output logic          cell_active,
  // host (GRID_MEM) port, used while busy is low
  input  logic          host_re,
  input  logic [AW-1:0] host_raddr,
  output cell_t         host_rdata,
  input  logic          host_we,
  input  logic [AW-1:0] host_waddr,
  input  cell_t         host_wdata,
  // renderer read port
  input  logic          vga_re,
  input  logic [AW-1:0] vga_raddr,
  output cell_t         vga_rdata,
  // Line Memory, physics side
  output logic          lm_re,
  output logic [AW-1:0] lm_raddr,
  input  logic          lm_rdata,
  output logic          lm_we,
  output logic [AW-1:0] lm_waddr,
  output logic          lm_wdata
);

  logic          cm_re, cm_we, e_cm_re, e_cm_we;
  logic [AW-1:0] cm_raddr, cm_waddr, e_cm_raddr, e_cm_waddr;
  cell_t         cm_rdata, cm_wdata, e_cm_wdata;
  logic          dm_re, dm_we;
  logic [AW-1:0] dm_raddr, dm_waddr;
  fx_t           dm_rdata, dm_wdata;
  logic [31:0]   cm_rdata_raw, vga_rdata_raw;

  lps_particle_ctrl #(
    .GRID_W(GRID_W), .GRID_H(GRID_H), .DIV_L(DIV_L), .DIV_R(DIV_R)
  ) u_ctrl (
    .clk, .rst, .start, .op, .brush, .busy, .done, .cell_active,
    .cm_re(e_cm_re), .cm_raddr(e_cm_raddr), .cm_rdata(cm_rdata),
    .cm_we(e_cm_we), .cm_waddr(e_cm_waddr), .cm_wdata(e_cm_wdata),
    .dm_re, .dm_raddr, .dm_rdata, .dm_we, .dm_waddr, .dm_wdata,
    .lm_re, .lm_raddr, .lm_rdata, .lm_we, .lm_waddr, .lm_wdata
  );

  // Port ownership: the engine while it runs, the host otherwise.
  always_comb begin
    if (busy) begin
      cm_re = e_cm_re;  cm_raddr = e_cm_raddr;
      cm_we = e_cm_we;  cm_waddr = e_cm_waddr;  cm_wdata = e_cm_wdata;
    end else begin
      cm_re = host_re;  cm_raddr = host_raddr;
      cm_we = host_we;  cm_waddr = host_waddr;  cm_wdata = host_wdata;
    end
  end

  // Particle Mem, physics/host read copy.
  lps_ram #(.DEPTH(N), .WIDTH(32)) u_cell_mem (
    .clk, .we(cm_we), .waddr(cm_waddr), .wdata(cm_wdata),
    .re(cm_re), .raddr(cm_raddr), .rdata(cm_rdata_raw)
  );

  // Particle Mem, renderer read copy.
  lps_ram #(.DEPTH(N), .WIDTH(32)) u_cell_mem_vga (
    .clk, .we(cm_we), .waddr(cm_waddr), .wdata(cm_wdata),
    .re(vga_re), .raddr(vga_raddr), .rdata(vga_rdata_raw)
  );

  // Diffs scratch buffer.
  lps_ram #(.DEPTH(N), .WIDTH(DW)) u_diffs (
    .clk, .we(dm_we), .waddr(dm_waddr), .wdata(dm_wdata),
    .re(dm_re), .raddr(dm_raddr), .rdata(dm_rdata)
  );

  assign cm_rdata   = cell_t'(cm_rdata_raw);
  assign host_rdata = cm_rdata;
  assign vga_rdata  = cell_t'(vga_rdata_raw);

endmodule
