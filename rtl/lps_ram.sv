// lps_ram: inferred block RAM, one write port and one registered read port.
//
// The simulator's cell memory, its Diffs scratch buffer and the Line Memory are
// all on-chip block RAM. This module is the plain template an FPGA tool maps to
// M10K blocks: a synchronous write and a read whose data appears one clock
// after the address (read-enable gated, so the output holds when re is low).
// Reading the address being written returns the old word. Contents start at
// zero, which FPGA block RAM supports at configuration; reset does not touch
// them. A memory that needs two read ports is built from two instances that
// share the write port, as a synthesis tool would replicate it.
module lps_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
