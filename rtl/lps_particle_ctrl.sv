// lps_particle_ctrl: sweep engine of the particle block.
//
// Every operation on the grid is one raster-order sweep, one cell per clock:
//
//   OP_EVAL    Reads the cell memory and the Line Memory once per clock into a
//              shift-register window of 2*GRID_W+1 cells, so the centre cell
//              and its top, left, right and bottom neighbours are all present
//              at once. The physics accelerator (lps_cell_eval) turns them into
//              four flows. Each flow is subtracted from the centre's Diffs entry
//              and added to the receiver's. A Diffs entry is touched by five
//              cells, so the partial sums live in a second window of 2*GRID_W+1
//              signed words; when a cell's last contributor (its bottom
//              neighbour) has been evaluated its sum is complete and is written
//              to the Diffs RAM once. The cell memory is only read.
//   OP_COMMIT  Reads Liquid and Diffs per cell, writes Liquid + Diffs back
//              (below MinLiquid becomes 0, above the Q2.16 range saturates,
//              walls hold none) and clears the Diffs entry. It also runs the
//              settling heuristic (SettleCount counts unchanged ticks, Settled
//              is set at SETTLE_LIMIT, any change clears both) and sets
//              isDownFlowing when the cell and the cell above it both hold
//              liquid, using a one-row line buffer of the committed row above.
//   OP_BRUSH   Edits every cell within the brush radius (dx^2+dy^2 <= r^2):
//              add water, erase water, or draw a wall, and un-settles it.
//   OP_CLEAR   Zeroes the liquid state of every cell, keeping CellType.
//   OP_LOADMAP Copies each cell's CellType into the Line Memory.
//
// The two-pass evaluate/commit split, the Diffs buffer, the rules and the
// field meanings follow the design; the window and partial-sum streaming, the
// settle threshold, the brush shape and the treatment of the grid edge (cells
// outside count as walls) are this implementation's choices.
//
// Timing: start is taken when busy is low. An evaluate sweep takes
// GRID_W*GRID_H + 2*GRID_W + 2 clocks, every other sweep GRID_W*GRID_H + 1;
// done pulses in the last one. Both RAMs have one clock of read latency.
module lps_particle_ctrl
  import lps_pkg::*;
#(
  parameter int unsigned GRID_W = 64,
  parameter int unsigned GRID_H = 64,
  parameter int unsigned DIV_L  = 4,
  parameter int unsigned DIV_R  = 3,
  localparam int unsigned N     = GRID_W * GRID_H,
  localparam int unsigned AW    = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst,
  // command
  input  logic            start,
  input  sweep_op_e       op,
  input  brush_t          brush,
  output logic            busy,
  output logic            done,
  output logic            cell_active,   // the evaluated cell ran the rules
  // cell memory
  output logic            cm_re,
  output logic [AW-1:0]   cm_raddr,
  input  cell_t           cm_rdata,
  output logic            cm_we,
  output logic [AW-1:0]   cm_waddr,
  output cell_t           cm_wdata,
  // Diffs memory
  output logic            dm_re,
  output logic [AW-1:0]   dm_raddr,
  input  fx_t             dm_rdata,
  output logic            dm_we,
  output logic [AW-1:0]   dm_waddr,
  output fx_t             dm_wdata,
  // Line Memory
  output logic            lm_re,
  output logic [AW-1:0]   lm_raddr,
  input  logic            lm_rdata,
  output logic            lm_we,
  output logic [AW-1:0]   lm_waddr,
  output logic            lm_wdata
);

  localparam int unsigned W2   = 2 * GRID_W;
  localparam int unsigned CW   = $clog2(N + W2 + 4);
  localparam int unsigned XW   = (GRID_W > 1) ? $clog2(GRID_W) : 1;
  localparam int unsigned YW   = (GRID_H > 1) ? $clog2(GRID_H) : 1;
  localparam logic [CW-1:0] EVAL_LAST = CW'(N + W2 + 1);
  localparam logic [CW-1:0] RMW_LAST  = CW'(N);
  localparam logic [CW-1:0] EV_FIRST  = CW'(GRID_W + 2);   // first centre
  localparam logic [CW-1:0] WR_FIRST  = CW'(W2 + 2);       // first Diffs write

  // ---------------------------------------------------------------- control
  logic            running;
  sweep_op_e       op_q;
  brush_t          brush_q;
  logic [CW-1:0]   c;            // clock index within the sweep
  logic            rv_q;         // read data valid this cycle
  logic [AW-1:0]   ra_q;         // address of that read data
  logic [XW-1:0]   px;           // coordinates of the cell being processed
  logic [YW-1:0]   py;
  logic            pv;           // a cell is processed this cycle
  logic            last;

  assign busy = running;
  assign last = running && (c == ((op_q == OP_EVAL) ? EVAL_LAST : RMW_LAST));

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      done    <= 1'b0;
      op_q    <= OP_EVAL;
      brush_q <= '0;
      c       <= '0;
      rv_q    <= 1'b0;
      ra_q    <= '0;
    end else begin
      done <= 1'b0;
      rv_q <= running && (c < CW'(N));
      ra_q <= AW'(c);
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          op_q    <= op;
          brush_q <= brush;
          c       <= '0;
        end
      end else begin
        c <= c + 1'b1;
        if (last) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  // Reads: one address per clock, all three memories in step.
  always_comb begin
    cm_re    = running && (c < CW'(N));
    cm_raddr = AW'(c);
    lm_re    = cm_re;
    lm_raddr = AW'(c);
    dm_re    = cm_re && (op_q == OP_COMMIT);
    dm_raddr = AW'(c);
  end

  // Coordinates of the processed cell: the window centre during evaluation,
  // the returning read data otherwise.
  assign pv = (op_q == OP_EVAL) ? (running && c >= EV_FIRST && c < EV_FIRST + CW'(N))
                                : rv_q;

  always_ff @(posedge clk) begin
    if (rst || (!running && start)) begin
      px <= '0;
      py <= '0;
    end else if (pv) begin
      if (px == XW'(GRID_W - 1)) begin
        px <= '0;
        py <= py + 1'b1;
      end else begin
        px <= px + 1'b1;
      end
    end
  end

  // ------------------------------------------------------- evaluate stream
  nbr_t  win [W2+1];     // win[k] = cell (centre + GRID_W - k)
  fx_t   acc [W2+1];     // acc[k] = partial Diffs of cell (centre + GRID_W - k)
  nbr_t  incoming;
  nbr_t  n_c, n_t, n_b, n_l, n_r;
  logic  eval_active;
  fx_t   f_d, f_l, f_r, f_u;
  fx_t   f_out;

  always_comb begin
    if (rv_q) incoming = '{solid: lm_rdata, settled: cm_rdata.settled, liquid: cm_rdata.liquid};
    else      incoming = NBR_WALL;
    n_c = (pv && op_q == OP_EVAL)   ? win[GRID_W]   : NBR_WALL;
    n_b = (py == YW'(GRID_H - 1))   ? NBR_WALL      : win[0];
    n_r = (px == XW'(GRID_W - 1))   ? NBR_WALL      : win[GRID_W-1];
    n_l = (px == '0)                ? NBR_WALL      : win[GRID_W+1];
    n_t = (py == '0)                ? NBR_WALL      : win[W2];
  end

  lps_cell_eval #(.DIV_L(DIV_L), .DIV_R(DIV_R)) u_eval (
    .center    (n_c),
    .top       (n_t),
    .bottom    (n_b),
    .left      (n_l),
    .right     (n_r),
    .active    (eval_active),
    .flow_down (f_d),
    .flow_left (f_l),
    .flow_right(f_r),
    .flow_up   (f_u)
  );

  assign f_out       = f_d + f_l + f_r + f_u;
  assign cell_active = eval_active;

  always_ff @(posedge clk) begin
    if (!running && start) begin
      for (int k = 0; k <= int'(W2); k++) begin
        win[k] <= NBR_WALL;
        acc[k] <= '0;
      end
    end else if (running && op_q == OP_EVAL) begin
      win[0] <= incoming;
      acc[0] <= '0;
      for (int k = 1; k <= int'(W2); k++) begin
        win[k] <= win[k-1];
        acc[k] <= acc[k-1]
                + ((k - 1 == int'(GRID_W))     ? -f_out : '0)
                + ((k - 1 == int'(GRID_W) + 1) ?  f_l   : '0)
                + ((k - 1 == int'(GRID_W) - 1) ?  f_r   : '0)
                + ((k - 1 == 0)                ?  f_d   : '0);
      end
    end
  end

  // ---------------------------------------------------- read-modify-write
  cell_t            old_c;
  cell_t            new_c;
  fx_t              sum;
  logic             has_liq;
  logic [GRID_W-1:0] above;         // has-liquid flags of the row above
  logic signed [17:0] dx, dy;
  logic [35:0]      dist2;
  logic             in_brush;
  logic [3:0]       cnt_next;

  always_comb begin
    old_c    = cm_rdata;
    new_c    = old_c;
    sum      = '0;
    has_liq  = 1'b0;
    cnt_next = old_c.settle_count;
    dx       = signed'({2'b00, 16'(px)}) - signed'({2'b00, brush_q.x});
    dy       = signed'({2'b00, 16'(py)}) - signed'({2'b00, brush_q.y});
    dist2    = 36'(dx * dx) + 36'(dy * dy);
    in_brush = dist2 <= 36'(brush_q.radius) * 36'(brush_q.radius);

    unique case (op_q)
      OP_COMMIT: begin
        sum = fx_t'(old_c.liquid) + dm_rdata;
        if (lm_rdata || sum < MIN_LIQUID) new_c.liquid = '0;
        else if (sum > LIQ_MAX_CODE)      new_c.liquid = '1;
        else                              new_c.liquid = liq_t'(sum);
        if (new_c.liquid != old_c.liquid) begin
          new_c.settle_count = '0;
          new_c.settled      = 1'b0;
        end else begin
          if (old_c.settle_count != 4'hF) cnt_next = old_c.settle_count + 1'b1;
          new_c.settle_count = cnt_next;
          new_c.settled      = old_c.settled || (32'(cnt_next) >= SETTLE_LIMIT);
        end
        has_liq            = (new_c.liquid != '0);
        new_c.down_flowing = has_liq && (py != '0) && above[GRID_W-1];
      end
      OP_BRUSH: begin
        if (in_brush && brush_q.tool != TOOL_NONE) begin
          new_c.settled      = 1'b0;
          new_c.settle_count = '0;
          unique case (brush_q.tool)
            TOOL_ADD: if (!lm_rdata) begin
              sum = fx_t'(old_c.liquid) + fx_t'(brush_q.amount);
              new_c.liquid = (sum > LIQ_MAX_CODE) ? '1 : liq_t'(sum);
            end
            TOOL_ERASE: new_c.liquid = '0;
            TOOL_WALL: begin
              new_c.solid        = 1'b1;
              new_c.liquid       = '0;
              new_c.down_flowing = 1'b0;
            end
            default: ;
          endcase
        end
      end
      OP_CLEAR: begin
        new_c       = '0;
        new_c.solid = old_c.solid;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!running && start) above <= '0;
    else if (rv_q && op_q == OP_COMMIT) above <= {above[GRID_W-2:0], has_liq};
  end

  // Writes.
  always_comb begin
    cm_we    = rv_q && (op_q == OP_COMMIT || op_q == OP_BRUSH || op_q == OP_CLEAR);
    cm_waddr = ra_q;
    cm_wdata = new_c;

    if (op_q == OP_EVAL) begin
      dm_we    = running && (c >= WR_FIRST) && (c < WR_FIRST + CW'(N));
      dm_waddr = AW'(c - WR_FIRST);
      dm_wdata = acc[W2] + f_u;
    end else begin
      dm_we    = rv_q && (op_q == OP_COMMIT);
      dm_waddr = ra_q;
      dm_wdata = '0;
    end

    lm_we    = rv_q && ((op_q == OP_LOADMAP) ||
                        (op_q == OP_BRUSH && in_brush && brush_q.tool == TOOL_WALL));
    lm_waddr = ra_q;
    lm_wdata = (op_q == OP_LOADMAP) ? old_c.solid : 1'b1;
  end

  // A new command is only issued between sweeps.
  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> !running);

endmodule
