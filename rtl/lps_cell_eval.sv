// lps_cell_eval: the physics accelerator, flow rules for one cell.
//
// Takes a cell and its four neighbours and returns the four amounts of liquid
// the cell sends out this tick, applying the rules in their fixed order:
//   1. down  : V(r, d_bottom) - d_bottom           (gravity)
//   2. left  : (r - d_left)  / DIV_L                (spreading)
//      right : (r - d_right) / DIV_R
//   3. up    : r - V(r, d_top)                      (pressure)
// where r is the liquid still left in the cell after the rules before. Each raw
// flow below MinFlow is dropped, the rest is clamped to min(MaxFlow, r) and
// scaled by FlowSpeed. A flow is only taken towards a Blank neighbour; walls and
// cells outside the grid arrive as Solid. A cell runs the rules when it is
// Blank, holds more than MinLiquid and is not Settled. As this design's own
// choice, a Settled cell is still evaluated while one of its Blank neighbours
// is not Settled, which wakes a still pool when water next to it moves.
//
// DIV_L = 4 and DIV_R = 3 reproduce the reference model's slight rightward
// drift; set both to 4 for a symmetric spread. Division is a multiplication by
// the reciprocal rounded up (exact for 4, within 1 LSB for 3). V is one module,
// instantiated for Rules 1 and 3 so that one cell completes per clock.
// Purely combinational.
module lps_cell_eval
  import lps_pkg::*;
#(
  parameter int unsigned DIV_L = 4,
  parameter int unsigned DIV_R = 3
) (
  input  nbr_t center,
  input  nbr_t top,
  input  nbr_t bottom,
  input  nbr_t left,
  input  nbr_t right,
  output logic active,
  output fx_t  flow_down,
  output fx_t  flow_left,
  output fx_t  flow_right,
  output fx_t  flow_up
);

  localparam int unsigned RECIP_L = (65536 + DIV_L - 1) / DIV_L;
  localparam int unsigned RECIP_R = (65536 + DIV_R - 1) / DIV_R;

  // Drop flows below MinFlow, clamp to [0, min(MaxFlow, r)], scale.
  function automatic fx_t limit(input fx_t raw, input fx_t r);
    fx_t         cap;
    fx_t         f;
    logic [47:0] scaled;
    cap = (r < MAX_FLOW) ? r : MAX_FLOW;
    if (raw < MIN_FLOW) f = '0;
    else                f = (raw > cap) ? cap : raw;
    scaled = 48'(f) * 48'(FLOW_SPEED);
    return fx_t'(scaled >> 16);
  endfunction

  // (a - b) / divisor for a > b, else 0.
  function automatic fx_t spread(input fx_t a, input fx_t b, input int unsigned recip);
    logic [47:0] prod;
    if (a <= b) return '0;
    prod = 48'(a - b) * 48'(recip);
    return fx_t'(prod >> 16);
  endfunction

  fx_t r0, r1, r2, r3;
  fx_t d_bot, d_top, d_lft, d_rgt;
  fx_t v_down, v_up;
  logic wake;

  assign d_bot = fx_t'(bottom.liquid);
  assign d_top = fx_t'(top.liquid);
  assign d_lft = fx_t'(left.liquid);
  assign d_rgt = fx_t'(right.liquid);

  lps_vfunc u_v_down (.r(r0), .d(d_bot), .v(v_down));
  lps_vfunc u_v_up   (.r(r3), .d(d_top), .v(v_up));

  always_comb begin
    wake   = (!top.solid    && !top.settled)    ||
             (!bottom.solid && !bottom.settled) ||
             (!left.solid   && !left.settled)   ||
             (!right.solid  && !right.settled);
    active = !center.solid && (fx_t'(center.liquid) > MIN_LIQUID) &&
             (!center.settled || wake);

    r0 = active ? fx_t'(center.liquid) : '0;

    // Rule 1: gravity.
    flow_down  = (!bottom.solid) ? limit(v_down - d_bot, r0) : '0;
    r1         = r0 - flow_down;
    // Rule 2: spreading, left then right.
    flow_left  = (!left.solid)  ? limit(spread(r1, d_lft, RECIP_L), r1) : '0;
    r2         = r1 - flow_left;
    flow_right = (!right.solid) ? limit(spread(r2, d_rgt, RECIP_R), r2) : '0;
    r3         = r2 - flow_right;
    // Rule 3: pressure.
    flow_up    = (!top.solid)   ? limit(r3 - v_up, r3) : '0;
  end

endmodule
