// lps_global_ctrl: host interface and tick scheduler of the simulator.
//
// The host processor sees the simulator as a 32-bit memory-mapped slave:
//   0x0000 CTRL       write-one pulses: [0] step, [1] soft reset, [2] LOAD_MAP,
//                     [3] acknowledge DONE, [4] apply brush
//   0x0004 STATUS     [0] BUSY, [1] DONE (sticky), [2] MAP_READY,
//                     [4:3] phase: 0 idle, 1 evaluate, 2 commit, 3 vblank wait,
//                     [31:16] free-running clock counter (debug)
//   0x0008 GRID_SIZE  [15:0] GRID_W, [31:16] GRID_H (read-only)
//   0x000C MOUSE_POS  [15:0] x, [31:16] y, in cells
//   0x0010 BRUSH_CFG  [1:0] tool, [15:8] radius, [31:16] amount (Q0.16)
//   0x0014 STEP_CFG   [0] AUTO_RUN, [1] FRAME_LOCK, [15:8] STEPS_PER_FRAME
//   0x0018 TICK_COUNT completed ticks (read-only)
//   0x0040 VGA_CTRL   [0] video enable, [1] hide liquid, [2] debug view
//   0x1000..         GRID_MEM, one cell word per cell, cell (x,y) at
//                     0x1000 + 4*(y*GRID_W + x)
// The controller FSM sequences one simulation tick as an evaluate sweep then a
// commit sweep. A tick starts on a CTRL step pulse or, with AUTO_RUN, whenever
// the engine is free. With FRAME_LOCK the controller first waits for the start
// of vertical blanking and then runs STEPS_PER_FRAME ticks (0 counts as 1) for
// auto-run, or the one requested tick; clearing AUTO_RUN abandons a wait it
// armed, clearing FRAME_LOCK ends the wait at once. Pulses that arrive while a sweep runs
// are remembered and served when idle, in the order soft reset, LOAD_MAP,
// brush, step. Each finished tick sets DONE and increments TICK_COUNT.
//
// Bus timing: a read returns its data on the clock after it is accepted.
// GRID_MEM accesses are stalled with waitrequest while the particle engine owns
// the memory; register accesses never stall. The register map and its bit
// fields follow the design; the waitrequest stall, the service order, the
// MOUSE_POS packing and reset values are this implementation's choices. Soft
// reset clears DONE, TICK_COUNT and the liquid state and keeps configuration
// and the wall map. BUSY also covers accepted pulses not yet served, so
// polling it after a command cannot miss the work. MAP_READY drops when a map
// load starts and rises when it completes. The GRID_MEM write data goes to the
// cell memory straight from the bus, so those output bits follow an input.
module lps_global_ctrl
  import lps_pkg::*;
#(
  parameter int unsigned GRID_W = 64,
  parameter int unsigned GRID_H = 64,
  localparam int unsigned N     = GRID_W * GRID_H,
  localparam int unsigned AW    = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  // Avalon-MM slave
  input  logic          avs_chipselect,
  input  logic          avs_rw,          // 1 write, 0 read
  input  logic [15:0]   avs_address,     // byte address
  input  logic [31:0]   avs_writedata,
  output logic [31:0]   avs_readdata,
  output logic          avs_waitrequest,
  // GRID_MEM path into the particle block
  output logic          host_re,
  output logic [AW-1:0] host_raddr,
  input  cell_t         host_rdata,
  output logic          host_we,
  output logic [AW-1:0] host_waddr,
  output cell_t         host_wdata,
  // particle engine
  output logic          sweep_start,
  output sweep_op_e     sweep_op,
  output brush_t        brush,
  input  logic          sweep_busy,
  input  logic          sweep_done,
  // renderer
  input  logic          vblank,
  output logic          video_en,
  output logic          hide_liquid,
  output logic          debug_mode
);

  typedef enum logic [2:0] {S_IDLE, S_VWAIT, S_EVAL, S_COMMIT, S_AUX} state_e;

  state_e      state;
  logic [31:0] mouse_pos, brush_cfg, step_cfg, tick_count;
  logic [2:0]  vga_ctrl;
  logic        done_flag, map_ready;
  logic        pend_step, pend_reset, pend_load, pend_brush;
  logic        aux_load;
  logic        wait_auto;      // the vblank wait was armed by auto-run
  logic [7:0]  ticks_left;
  logic        vblank_q;
  logic        rd_grid_q;
  logic [31:0] rd_reg_q;
  logic [15:0] free_cnt;       // debug field of STATUS: counts clocks since reset

  // ------------------------------------------------------------ decode
  logic        is_grid, acc, wr, rd;
  logic [15:0] grid_off;
  logic        auto_run, frame_lock;
  logic [7:0]  steps_per_frame;
  phase_e      phase;
  logic        busy;

  assign grid_off        = avs_address - GRID_MEM_BASE;
  assign is_grid         = (avs_address >= GRID_MEM_BASE) &&
                           (32'(avs_address) < 32'(GRID_MEM_BASE) + 4 * N);
  assign avs_waitrequest = avs_chipselect && is_grid && (sweep_busy || sweep_start);
  assign acc             = avs_chipselect && !avs_waitrequest;
  assign wr              = acc && avs_rw;
  assign rd              = acc && !avs_rw;

  assign host_re    = rd && is_grid;
  assign host_raddr = AW'(grid_off >> 2);
  assign host_we    = wr && is_grid;
  assign host_waddr = AW'(grid_off >> 2);
  assign host_wdata = cell_t'(avs_writedata);

  assign auto_run        = step_cfg[0];
  assign frame_lock      = step_cfg[1];
  assign steps_per_frame = step_cfg[15:8];

  assign video_en    = vga_ctrl[0];
  assign hide_liquid = vga_ctrl[1];
  assign debug_mode  = vga_ctrl[2];

  assign brush = '{tool:   tool_e'(brush_cfg[1:0]),
                   radius: brush_cfg[15:8],
                   amount: brush_cfg[31:16],
                   x:      mouse_pos[15:0],
                   y:      mouse_pos[31:16]};

  always_comb begin
    unique case (state)
      S_EVAL:   phase = PH_EVAL;
      S_COMMIT: phase = PH_COMMIT;
      S_VWAIT:  phase = PH_VBLANK;
      default:  phase = PH_IDLE;
    endcase
  end
  // BUSY also covers commands accepted but not yet started.
  assign busy = (state != S_IDLE) || sweep_busy ||
                pend_step || pend_reset || pend_load || pend_brush;

  // ------------------------------------------------------------ debug counter
  always_ff @(posedge clk) begin
    if (rst) free_cnt <= '0;
    else     free_cnt <= free_cnt + 16'd1;
  end

  // ------------------------------------------------------------ read data
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_grid_q <= 1'b0;
      rd_reg_q  <= '0;
    end else begin
      rd_grid_q <= rd && is_grid;
      if (rd) begin
        unique case (avs_address)
          REG_STATUS:     rd_reg_q <= {free_cnt, 11'd0, phase, map_ready, done_flag, busy};
          REG_GRID_SIZE:  rd_reg_q <= {16'(GRID_H), 16'(GRID_W)};
          REG_MOUSE_POS:  rd_reg_q <= mouse_pos;
          REG_BRUSH_CFG:  rd_reg_q <= brush_cfg;
          REG_STEP_CFG:   rd_reg_q <= step_cfg;
          REG_TICK_COUNT: rd_reg_q <= tick_count;
          REG_VGA_CTRL:   rd_reg_q <= {29'd0, vga_ctrl};
          default:        rd_reg_q <= '0;
        endcase
      end
    end
  end

  assign avs_readdata = rd_grid_q ? 32'(host_rdata) : rd_reg_q;

  // ------------------------------------------------------ registers + FSM
  logic ctrl_wr;
  assign ctrl_wr = wr && (avs_address == REG_CTRL);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      mouse_pos   <= '0;
      brush_cfg   <= '0;
      step_cfg    <= '0;
      vga_ctrl    <= 3'b001;
      tick_count  <= '0;
      done_flag   <= 1'b0;
      map_ready   <= 1'b0;
      pend_step   <= 1'b0;
      pend_reset  <= 1'b0;
      pend_load   <= 1'b0;
      pend_brush  <= 1'b0;
      aux_load    <= 1'b0;
      wait_auto   <= 1'b0;
      ticks_left  <= '0;
      vblank_q    <= 1'b0;
      sweep_start <= 1'b0;
      sweep_op    <= OP_EVAL;
    end else begin
      vblank_q    <= vblank;
      sweep_start <= 1'b0;

      if (wr) begin
        unique case (avs_address)
          REG_MOUSE_POS: mouse_pos <= avs_writedata;
          REG_BRUSH_CFG: brush_cfg <= avs_writedata;
          REG_STEP_CFG:  step_cfg  <= avs_writedata;
          REG_VGA_CTRL:  vga_ctrl  <= avs_writedata[2:0];
          default: ;
        endcase
      end

      unique case (state)
        S_IDLE: begin
          if (pend_reset) begin
            pend_reset  <= 1'b0;
            pend_step   <= 1'b0;
            done_flag   <= 1'b0;
            tick_count  <= '0;
            aux_load    <= 1'b0;
            sweep_op    <= OP_CLEAR;
            sweep_start <= 1'b1;
            state       <= S_AUX;
          end else if (pend_load) begin
            pend_load   <= 1'b0;
            map_ready   <= 1'b0;
            aux_load    <= 1'b1;
            sweep_op    <= OP_LOADMAP;
            sweep_start <= 1'b1;
            state       <= S_AUX;
          end else if (pend_brush) begin
            pend_brush <= 1'b0;
            if (brush.tool != TOOL_NONE) begin
              aux_load    <= 1'b0;
              sweep_op    <= OP_BRUSH;
              sweep_start <= 1'b1;
              state       <= S_AUX;
            end
          end else if (pend_step || auto_run) begin
            pend_step  <= 1'b0;
            wait_auto  <= !pend_step;
            ticks_left <= (pend_step || steps_per_frame == '0 || !frame_lock)
                          ? 8'd1 : steps_per_frame;
            if (frame_lock) begin
              state <= S_VWAIT;
            end else begin
              sweep_op    <= OP_EVAL;
              sweep_start <= 1'b1;
              state       <= S_EVAL;
            end
          end
        end
        S_VWAIT: begin
          if (wait_auto && !auto_run) begin
            state <= S_IDLE;                 // auto-run switched off
          end else if ((vblank && !vblank_q) || !frame_lock) begin
            sweep_op    <= OP_EVAL;
            sweep_start <= 1'b1;
            state       <= S_EVAL;
          end
        end
        S_EVAL: begin
          if (sweep_done) begin
            sweep_op    <= OP_COMMIT;
            sweep_start <= 1'b1;
            state       <= S_COMMIT;
          end
        end
        S_COMMIT: begin
          if (sweep_done) begin
            tick_count <= tick_count + 1'b1;
            done_flag  <= 1'b1;
            if (ticks_left > 8'd1) begin
              ticks_left  <= ticks_left - 1'b1;
              sweep_op    <= OP_EVAL;
              sweep_start <= 1'b1;
              state       <= S_EVAL;
            end else begin
              state <= S_IDLE;
            end
          end
        end
        S_AUX: begin
          if (sweep_done) begin
            if (aux_load) map_ready <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase

      // New pulses win over the FSM's clearing of the same bit.
      if (ctrl_wr) begin
        if (avs_writedata[CTRL_STEP])  pend_step  <= 1'b1;
        if (avs_writedata[CTRL_RESET]) pend_reset <= 1'b1;
        if (avs_writedata[CTRL_LOAD])  pend_load  <= 1'b1;
        if (avs_writedata[CTRL_BRUSH]) pend_brush <= 1'b1;
        if (avs_writedata[CTRL_ACK])   done_flag  <= 1'b0;
      end
    end
  end

  // Bus rules: a stalled request holds still; GRID_MEM is never reached
  // while the engine runs.
  a_hold: assert property (@(posedge clk) disable iff (rst)
    avs_waitrequest |=> (avs_chipselect && $stable(avs_address) && $stable(avs_rw)));
  a_excl: assert property (@(posedge clk) disable iff (rst)
    !((host_we || host_re) && sweep_busy));

endmodule
