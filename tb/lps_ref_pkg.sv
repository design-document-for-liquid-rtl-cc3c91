// lps_ref_pkg: reference model of the liquid rules for the testbenches.
//
// Written from the rule statements with plain integer arithmetic and exact
// division (no reciprocal tricks), so the RTL is checked against an
// independent calculation. Values are Q.16 integers. The hardware rounds its
// constant divisions differently, so comparisons use a small tolerance.
package lps_ref_pkg;

  localparam longint ML   = 65536;   // MaxLiquid 1.0
  localparam longint MINL = 328;     // MinLiquid 0.005
  localparam longint MC   = 16384;   // MaxCompression 0.25
  localparam longint MINF = 328;     // MinFlow 0.005
  localparam longint MAXF = 262144;  // MaxFlow 4.0
  localparam longint FS   = 65536;   // FlowSpeed 1.0
  localparam longint LMAX = 262143;  // largest Q2.16 code
  localparam int     SETTLE = 10;

  typedef struct {
    bit     solid;
    bit     settled;
    longint liq;
  } rcell_t;

  function automatic longint ref_v(longint r, longint d);
    longint s = r + d;
    if (s <= ML)               return ML;
    if (s < 2 * ML + MC)       return (ML * ML + s * MC) / (ML + MC);
    return (s + MC) / 2;
  endfunction

  // Set by ref_eval when a raw flow lies within AMB LSB of MinFlow: the
  // hardware's rounding may then fall on the other side of the threshold.
  localparam longint AMB = 4;
  bit amb_flag;

  function automatic longint ref_limit(longint raw, longint r);
    longint cap = (r < MAXF) ? r : MAXF;
    longint f;
    if (raw >= MINF - AMB && raw <= MINF + AMB && r >= MINF) amb_flag = 1;
    if (raw < MINF) return 0;
    f = (raw > cap) ? cap : raw;
    return (f * FS) / 65536;
  endfunction

  // Flows out of c: fl[0] down, fl[1] left, fl[2] right, fl[3] up.
  function automatic void ref_eval(input rcell_t c, t, b, l, r,
                                   input int div_l, input int div_r,
                                   output longint fl[4], output bit active);
    longint rem;
    bit wake;
    for (int i = 0; i < 4; i++) fl[i] = 0;
    amb_flag = 0;
    wake = (!t.solid && !t.settled) || (!b.solid && !b.settled) ||
           (!l.solid && !l.settled) || (!r.solid && !r.settled);
    active = !c.solid && c.liq > MINL && (!c.settled || wake);
    if (!active) return;
    rem = c.liq;
    if (!b.solid) begin
      fl[0] = ref_limit(ref_v(rem, b.liq) - b.liq, rem);
      rem -= fl[0];
    end
    if (!l.solid) begin
      fl[1] = ref_limit((rem > l.liq) ? (rem - l.liq) / longint'(div_l) : 0, rem);
      rem -= fl[1];
    end
    if (!r.solid) begin
      fl[2] = ref_limit((rem > r.liq) ? (rem - r.liq) / longint'(div_r) : 0, rem);
      rem -= fl[2];
    end
    if (!t.solid) begin
      fl[3] = ref_limit(rem - ref_v(rem, t.liq), rem);
    end
  endfunction

endpackage
