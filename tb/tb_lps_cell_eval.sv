// tb_lps_cell_eval: random cell neighbourhoods through the physics
// accelerator, compared with the reference rules, for the default divisors
// (4 left, 3 right) and for the symmetric setting (4 and 4). Counts how often each rule
// produced a flow, the Settled skip and the wake-up by a moving neighbour.
module tb_lps_cell_eval;
  import lps_pkg::*;
  import lps_ref_pkg::*;

  nbr_t c, t, b, l, r;
  logic active;
  fx_t  fd, fl, fr, fu;
  int checks = 0, failures = 0;
  int hit[4] = '{0, 0, 0, 0};
  int n_skip = 0, n_wake = 0;

  // symmetric variant, both divisors 4
  logic sym_active;
  fx_t  sd, sl, sr, su;
  lps_cell_eval #(.DIV_L(4), .DIV_R(4)) dut_sym (
    .center(c), .top(t), .bottom(b), .left(l), .right(r), .active(sym_active),
    .flow_down(sd), .flow_left(sl), .flow_right(sr), .flow_up(su));

  lps_cell_eval #(.DIV_L(4), .DIV_R(3)) dut (
    .center(c), .top(t), .bottom(b), .left(l), .right(r), .active(active),
    .flow_down(fd), .flow_left(fl), .flow_right(fr), .flow_up(fu));

  function automatic rcell_t to_ref(nbr_t n);
    rcell_t x;
    x.solid = n.solid; x.settled = n.settled; x.liq = longint'(n.liquid);
    return x;
  endfunction

  function automatic bit near(fx_t got, longint exp);
    return longint'(got) >= exp - 4 && longint'(got) <= exp + 4;
  endfunction

  function automatic nbr_t rnd_cell(bit allow_solid);
    nbr_t n;
    int k = $urandom_range(0, 9);
    n.solid   = allow_solid && ($urandom_range(0, 5) == 0);
    n.settled = ($urandom_range(0, 3) == 0);
    if (k < 2)      n.liquid = '0;
    else if (k < 6) n.liquid = liq_t'($urandom_range(0, 65536));
    else            n.liquid = liq_t'($urandom_range(0, 150000));
    if (n.solid) n.liquid = '0;
    return n;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp[4];
    bit     exp_active;
    bit     amb_main;
    for (int i = 0; i < 5000; i++) begin
      c = rnd_cell(i % 50 == 0);
      t = rnd_cell(1); b = rnd_cell(1); l = rnd_cell(1); r = rnd_cell(1);
      if (i % 7 == 0) begin   // force a settled centre next to settled cells
        c.settled = 1; t.settled = 1; b.settled = 1; l.settled = 1; r.settled = 1;
      end
      #1;
      ref_eval(to_ref(c), to_ref(t), to_ref(b), to_ref(l), to_ref(r), 4, 3, exp, exp_active);
      amb_main = amb_flag;
      checks++;
      if (active !== exp_active) begin
        failures++; $display("FAIL active %0d exp %0d", active, exp_active);
      end
      if (c.settled && !c.solid && c.liquid > liq_t'(MINL)) begin
        if (exp_active) n_wake++; else n_skip++;
      end
      begin
        longint se[4];
        bit sa;
        ref_eval(to_ref(c), to_ref(t), to_ref(b), to_ref(l), to_ref(r), 4, 4, se, sa);
        checks++;
        if (sym_active != sa || (!amb_flag &&
            (!near(sd, se[0]) || !near(sl, se[1]) || !near(sr, se[2]) || !near(su, se[3])))) begin
          failures++;
          $display("FAIL symmetric i=%0d got %0d/%0d/%0d/%0d exp %0d/%0d/%0d/%0d", i, sd, sl, sr, su, se[0], se[1], se[2], se[3]);
        end
      end
      foreach (exp[k]) begin
        longint got;
        got = (k == 0) ? longint'(fd) : (k == 1) ? longint'(fl) : (k == 2) ? longint'(fr) : longint'(fu);
        if (got != 0) hit[k]++;
        checks++;
        // tolerance: each divide by a constant may be 1 LSB off, and errors chain
        if ((got < exp[k] - 4 || got > exp[k] + 4) &&
            !(amb_main && (got == 0 || exp[k] == 0) && (got + exp[k] <= MINF + 8))) begin
          failures++;
          $display("FAIL i=%0d flow%0d got %0d exp %0d (c=%0d t=%0d b=%0d l=%0d r=%0d)",
                   i, k, got, exp[k], c.liquid, t.liquid, b.liquid, l.liquid, r.liquid);
        end
        if (got < 0) begin failures++; $display("FAIL negative flow"); end
      end
    end
    foreach (hit[k]) begin
      checks++;
      if (hit[k] == 0) begin failures++; $display("FAIL rule %0d never flowed", k); end
    end
    checks++; if (n_skip == 0) begin failures++; $display("FAIL no settled skip"); end
    checks++; if (n_wake == 0) begin failures++; $display("FAIL no wake-up"); end
    $display("flows down=%0d left=%0d right=%0d up=%0d skip=%0d wake=%0d", hit[0], hit[1], hit[2], hit[3], n_skip, n_wake);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
