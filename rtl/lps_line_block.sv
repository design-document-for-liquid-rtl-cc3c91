// lps_line_block: the Line Memory, one wall bit per grid cell.
//
// The wall geometry that water cannot pass is kept apart from the cell words
// so the physics and the renderer read one authoritative copy. It is written
// when the host issues LOAD_MAP (each cell's CellType is copied in) and by the
// draw-wall brush. The physics sweep and the renderer each have a read port;
// the memory is one write port with two RAM copies behind it. Reads return
// data one clock after the address; the memory starts empty (no walls).
// The one-bit-per-cell organisation is this implementation's choice.
module lps_line_block #(
  parameter int unsigned GRID_W = 64,
  parameter int unsigned GRID_H = 64,
  localparam int unsigned N     = GRID_W * GRID_H,
  localparam int unsigned AW    = $clog2(N)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wdata,
  input  logic          re_a,       // physics side
  input  logic [AW-1:0] raddr_a,
  output logic          rdata_a,
  input  logic          re_v,       // renderer side
  input  logic [AW-1:0] raddr_v,
  output logic          rdata_v
);

  lps_ram #(.DEPTH(N), .WIDTH(1)) u_line_mem_a (
    .clk, .we, .waddr, .wdata, .re(re_a), .raddr(raddr_a), .rdata(rdata_a)
  );

  lps_ram #(.DEPTH(N), .WIDTH(1)) u_line_mem_v (
    .clk, .we, .waddr, .wdata, .re(re_v), .raddr(raddr_v), .rdata(rdata_v)
  );

endmodule
