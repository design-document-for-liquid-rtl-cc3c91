// lps_vfunc: equilibrium split of liquid between two vertically stacked cells.
//
// Given the liquid r of one cell and d of the cell it shares a vertical face
// with, s = r + d, V returns how much the lower cell should hold:
//   s <= MaxLiquid                         : MaxLiquid
//   s <  2*MaxLiquid + MaxCompression      : (MaxLiquid^2 + s*MaxCompression)
//                                            / (MaxLiquid + MaxCompression)
//   otherwise                              : (s + MaxCompression) / 2
// so that a full column holds MaxCompression more per cell the deeper it goes.
// Rule 1 (gravity) and Rule 3 (pressure) both use it. The middle case divides by
// a constant; this implementation multiplies by its reciprocal, rounded up and
// computed at elaboration, and shifts, which is within 1 LSB of the exact
// quotient. Purely combinational; all values signed Q.16 in lps_pkg::fx_t.
module lps_vfunc
  import lps_pkg::*;
(
  input  fx_t r,
  input  fx_t d,
  output fx_t v
);

  localparam longint unsigned DEN   = longint'(MAX_LIQUID) + longint'(MAX_COMPRESSION);
  localparam longint unsigned RECIP = ((64'd1 << 32) + DEN - 1) / DEN;
  localparam fx_t             CASE3 = 2 * MAX_LIQUID + MAX_COMPRESSION;

  fx_t                   s;
  logic [63:0]           num;
  logic [63:0]           prod;
  fx_t                   half;

  always_comb begin
    s    = r + d;
    num  = 64'(longint'(MAX_LIQUID) * longint'(MAX_LIQUID))
         + 64'(s) * 64'(MAX_COMPRESSION);
    prod = num * RECIP;
    half = (s + MAX_COMPRESSION) >>> 1;
    if (s <= MAX_LIQUID)  v = MAX_LIQUID;
    else if (s < CASE3)   v = fx_t'(prod >> 32);
    else                  v = half;
  end

endmodule
