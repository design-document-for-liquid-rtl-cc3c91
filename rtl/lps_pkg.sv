// lps_pkg: types and constants shared by the liquid simulator.
//
// The simulator keeps one 32-bit word per grid cell. The word packs the wall
// flag, an 18-bit Q2.16 liquid volume and the settling/visualisation flags in
// the bit positions of the host-visible GRID_MEM window. The six algorithm
// constants are fixed at compile time, as the design intends; they are held
// here as Q.16 integers. Internal arithmetic uses a wider signed word (DW bits,
// 16 fraction bits) so that MaxFlow = 4.0 and sums of two cells, which do not
// fit 18-bit Q2.16, are represented exactly. The rounding of 0.005 to 328 LSB
// and the settle threshold are choices of this implementation.
package lps_pkg;

  // Fixed-point formats ------------------------------------------------------
  localparam int unsigned LIQ_W  = 18;   // stored Liquid, unsigned Q2.16
  localparam int unsigned FRAC   = 16;   // fraction bits everywhere
  localparam int unsigned DW     = 24;   // internal signed width (Q7.16)

  typedef logic [LIQ_W-1:0]       liq_t;
  typedef logic signed [DW-1:0]   fx_t;

  // Algorithm constants (Q.16) -----------------------------------------------
  localparam fx_t MAX_LIQUID      = fx_t'(65536);   // 1.0
  localparam fx_t MIN_LIQUID      = fx_t'(328);     // 0.005 (327.68 rounded)
  localparam fx_t MAX_COMPRESSION = fx_t'(16384);   // 0.25
  localparam fx_t MIN_FLOW        = fx_t'(328);     // 0.005
  localparam fx_t MAX_FLOW        = fx_t'(262144);  // 4.0
  localparam fx_t FLOW_SPEED      = fx_t'(65536);   // 1.0, range (0, 1]
  localparam fx_t LIQ_MAX_CODE    = fx_t'((1 << LIQ_W) - 1);  // top of Q2.16

  // Ticks without change before a cell is marked Settled (fits SettleCount).
  localparam int unsigned SETTLE_LIMIT = 10;

  // Cell word, GRID_MEM layout: bit 0 CellType ... bit 31 -------------------
  typedef struct packed {
    logic [6:0] reserved;       // [31:25]
    logic       down_flowing;   // [24]
    logic [3:0] settle_count;   // [23:20]
    logic       settled;        // [19]
    liq_t       liquid;         // [18:1]
    logic       solid;          // [0] CellType: 0 blank, 1 solid
  } cell_t;

  // What the physics accelerator needs of one cell.
  typedef struct packed {
    logic solid;
    logic settled;
    liq_t liquid;
  } nbr_t;

  localparam nbr_t NBR_WALL = '{solid: 1'b1, settled: 1'b1, liquid: '0};

  // Sweeps the particle controller can run over the grid.
  typedef enum logic [2:0] {
    OP_EVAL    = 3'd0,   // evaluate flows into Diffs
    OP_COMMIT  = 3'd1,   // Liquid += Diffs, clear Diffs
    OP_BRUSH   = 3'd2,   // apply the brush
    OP_CLEAR   = 3'd3,   // soft reset: zero the liquid state
    OP_LOADMAP = 3'd4    // copy CellType into the Line Memory
  } sweep_op_e;

  // Brush tools, BRUSH_CFG_REG[1:0].
  typedef enum logic [1:0] {
    TOOL_NONE  = 2'b00,
    TOOL_ADD   = 2'b01,
    TOOL_ERASE = 2'b10,
    TOOL_WALL  = 2'b11
  } tool_e;

  typedef struct packed {
    tool_e       tool;
    logic [7:0]  radius;   // cells
    logic [15:0] amount;   // unsigned fraction, Q0.16
    logic [15:0] x;        // centre, cell coordinates
    logic [15:0] y;
  } brush_t;

  // Register map (byte offsets) ---------------------------------------------
  localparam logic [15:0] REG_CTRL       = 16'h0000;
  localparam logic [15:0] REG_STATUS     = 16'h0004;
  localparam logic [15:0] REG_GRID_SIZE  = 16'h0008;
  localparam logic [15:0] REG_MOUSE_POS  = 16'h000C;
  localparam logic [15:0] REG_BRUSH_CFG  = 16'h0010;
  localparam logic [15:0] REG_STEP_CFG   = 16'h0014;
  localparam logic [15:0] REG_TICK_COUNT = 16'h0018;
  localparam logic [15:0] REG_VGA_CTRL   = 16'h0040;
  localparam logic [15:0] GRID_MEM_BASE  = 16'h1000;

  // CTRL_REG write-one pulses.
  localparam int unsigned CTRL_STEP  = 0;
  localparam int unsigned CTRL_RESET = 1;
  localparam int unsigned CTRL_LOAD  = 2;
  localparam int unsigned CTRL_ACK   = 3;
  localparam int unsigned CTRL_BRUSH = 4;

  // STATUS_REG[4:3] phase codes.
  typedef enum logic [1:0] {
    PH_IDLE   = 2'd0,
    PH_EVAL   = 2'd1,
    PH_COMMIT = 2'd2,
    PH_VBLANK = 2'd3
  } phase_e;

endpackage
