// tb_lps_vfunc: checks the equilibrium function against exact division.
// Covers each of the three cases and their boundaries plus random sums.
module tb_lps_vfunc;
  import lps_pkg::*;
  import lps_ref_pkg::*;

  fx_t r, d, v;
  int checks = 0, failures = 0;
  int n_case[3] = '{0, 0, 0};

  lps_vfunc dut (.r(r), .d(d), .v(v));

  task automatic try(longint rr, longint dd);
    longint exp, s;
    r = fx_t'(rr); d = fx_t'(dd);
    #1;
    exp = ref_v(rr, dd);
    s = rr + dd;
    n_case[(s <= ML) ? 0 : (s < 2*ML + MC) ? 1 : 2]++;
    checks++;
    if (longint'(v) < exp - 1 || longint'(v) > exp + 1) begin
      failures++;
      $display("FAIL r=%0d d=%0d v=%0d exp=%0d", rr, dd, v, exp);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(0, 0);
    try(ML, 0);              // boundary of case 1
    try(ML, 1);
    try(ML + MC, ML);        // just below case 3
    try(ML + MC, ML + 1);    // case 3 boundary
    try(2 * ML, 2 * ML);
    try(3 * ML, ML / 2);
    for (int i = 0; i < 2000; i++) try(longint'($urandom_range(0, 262143)), longint'($urandom_range(0, 262143)));
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (n_case[i] == 0) begin failures++; $display("FAIL case %0d never hit", i + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
