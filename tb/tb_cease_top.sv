// End-to-end testbench for cease_top at its default parameters.
//
// Runs one 65536-bit stream through every design at once, with independent Bernoulli
// inputs, and compares every output bit with reference models written here:
//  * adder chain: the adder (parity state, majority output), an eight-entry shuffle buffer
//    driven by the same random selects, and the squarer (AND with previous bit);
//  * modulo-16 polynomial: both forms against one modulo-16 model, and against each other;
//  * linear-FSM circuit: saturating 0..3 counter plus modulo-2 counter;
//  * complex multiplier: four modulo-4 counters on the counts of the product bits.
// It then checks stream values: the squarer fed through the shuffle must give X^2 = 0.25
// (within 0.02) for adder inputs of value 0.5, while the same squarer applied directly to the
// adder output (computed here) gives about 3/16 because of the adder's autocorrelation.
// Each mechanism must occur at least once: adder overflow on 01/10, use of every shuffle
// flip-flop, modulo-16 overflow and hold, both saturations of M, the always-overflow jump and
// the half jump of the modulo-2 counter, and the full jump and wrap of the modulo-4 counters.
module tb_cease_top;
  import sc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 65536;

  logic       add_x, add_y, add_z, sq_x, sq_z;
  logic [2:0] deac_r;
  logic       st_x1, st_x2, st_z, maj_z;
  logic       seq_x, seq_z;
  cbit_t      cmm_a, cmm_b, cmm_c, cmm_d, cmm_x1, cmm_x2, cmm_z1, cmm_z2;

  cease_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xn(input logic p, input logic q);
    return int'(!(p ^ q));
  endfunction

  // mechanism counters
  int n_add_ovf, n_st_ovf, n_st_hold, n_sat_lo, n_sat_hi, n_seq_full, n_seq_half, n_cmm_full, n_cmm_wrap;
  int n_deac_sel [8];

  initial begin
    logic       add_st, prev_sq, prev_raw, m_sq_x;
    logic [7:0] deac_m;
    int st16, ms, cs, jmp, sq_ones, raw_ones, j16;
    int cst [4];
    int cnt [4];
    logic [3:0] zr;
    real v_sq, v_raw;

    {add_x, add_y, deac_r, st_x1, st_x2, seq_x} = '0;
    {cmm_a, cmm_b, cmm_c, cmm_d, cmm_x1, cmm_x2} = '0;
    add_st = 0; prev_sq = 0; prev_raw = 0; deac_m = '0;
    st16 = 0; ms = 0; cs = 0; sq_ones = 0; raw_ones = 0;
    foreach (cst[k]) cst[k] = 0;
    foreach (n_deac_sel[k]) n_deac_sel[k] = 0;
    {n_add_ovf, n_st_ovf, n_st_hold, n_sat_lo, n_sat_hi, n_seq_full, n_seq_half, n_cmm_full, n_cmm_wrap} = '0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      add_x  = 1'($urandom);
      add_y  = 1'($urandom);
      deac_r = 3'($urandom);
      st_x1  = ($urandom % 100) < 40;
      st_x2  = ($urandom % 100) < 70;
      seq_x  = ($urandom % 100) < 50;
      cmm_a  = 2'($urandom); cmm_b  = 2'($urandom); cmm_c = 2'($urandom);
      cmm_d  = 2'($urandom); cmm_x1 = 2'($urandom); cmm_x2 = 2'($urandom);
      #1;
      // adder -> shuffle -> squarer
      check(add_z == ((int'(add_x) + int'(add_y) + int'(add_st)) >= 2), "adder output");
      if (add_z && (add_x ^ add_y)) n_add_ovf++;
      m_sq_x = deac_m[deac_r];
      check(sq_x == m_sq_x, "shuffle output");
      check(sq_z == (m_sq_x & prev_sq), "squarer output");
      n_deac_sel[deac_r]++;
      sq_ones  += int'(sq_z);
      raw_ones += int'(add_z & prev_raw);
      // modulo-16 polynomial, two forms
      j16 = (st_x1 && st_x2) ? 7 : (!st_x1 && !st_x2) ? 11 : 0;
      check(st_z == (st16 + j16 >= 16), "modulo-16 counter form");
      check(maj_z == st_z, "majority form equals counter form");
      if (st_z) n_st_ovf++;
      if (j16 == 0) n_st_hold++;
      // linear-FSM circuit
      jmp = (ms == 1) ? 2 : (ms == 3) ? 1 : 0;
      check(seq_z == (cs + jmp >= 2), "linear-FSM output");
      if (jmp == 2) n_seq_full++;
      if (jmp == 1 && seq_z) n_seq_half++;
      if (seq_x && ms == 3) n_sat_hi++;
      if (!seq_x && ms == 0) n_sat_lo++;
      // complex multiplier
      cnt[0] = xn(cmm_a.re, cmm_x1.re) + 1 - xn(cmm_a.im, cmm_x1.im) + xn(cmm_b.re, cmm_x2.re) + 1 - xn(cmm_b.im, cmm_x2.im);
      cnt[1] = xn(cmm_a.re, cmm_x1.im) + xn(cmm_a.im, cmm_x1.re) + xn(cmm_b.re, cmm_x2.im) + xn(cmm_b.im, cmm_x2.re);
      cnt[2] = xn(cmm_c.re, cmm_x1.re) + 1 - xn(cmm_c.im, cmm_x1.im) + xn(cmm_d.re, cmm_x2.re) + 1 - xn(cmm_d.im, cmm_x2.im);
      cnt[3] = xn(cmm_c.re, cmm_x1.im) + xn(cmm_c.im, cmm_x1.re) + xn(cmm_d.re, cmm_x2.im) + xn(cmm_d.im, cmm_x2.re);
      zr = {cmm_z2.im, cmm_z2.re, cmm_z1.im, cmm_z1.re};
      for (int k = 0; k < 4; k++) begin
        check(zr[k] == (cst[k] + cnt[k] >= 4), $sformatf("multiplier output %0d", k));
        if (cnt[k] == 4) n_cmm_full++;
        if (cnt[k] < 4 && zr[k]) n_cmm_wrap++;
        cst[k] = (cst[k] + cnt[k]) % 4;
      end
      // advance the models
      prev_sq  = m_sq_x;
      prev_raw = add_z;
      deac_m[deac_r] = add_z;
      add_st = add_st ^ add_x ^ add_y;
      st16 = (st16 + j16) % 16;
      cs = (cs + jmp) % 2;
      if (seq_x && ms < 3) ms++;
      else if (!seq_x && ms > 0) ms--;
      @(negedge clk);
    end

    v_sq  = real'(sq_ones) / N;
    v_raw = real'(raw_ones) / N;
    $display("squarer value: %f through the shuffle, %f on the raw adder output", v_sq, v_raw);
    check(v_sq > 0.23 && v_sq < 0.27, $sformatf("squarer through shuffle %f, expected 0.25", v_sq));
    check(v_raw > 0.17 && v_raw < 0.205, $sformatf("squarer on raw stream %f, expected 3/16", v_raw));

    $display("mechanisms: adder overflow %0d, modulo-16 overflow %0d / hold %0d, M saturate low %0d high %0d,",
             n_add_ovf, n_st_ovf, n_st_hold, n_sat_lo, n_sat_hi);
    $display("            modulo-2 full jump %0d / half-jump overflow %0d, modulo-4 full jump %0d / wrap %0d",
             n_seq_full, n_seq_half, n_cmm_full, n_cmm_wrap);
    check(n_add_ovf > 0, "adder overflow on 01/10 occurred");
    foreach (n_deac_sel[k]) check(n_deac_sel[k] > 0, $sformatf("shuffle flip-flop %0d used", k));
    check(n_st_ovf > 0 && n_st_hold > 0, "modulo-16 overflow and hold occurred");
    check(n_sat_lo > 0 && n_sat_hi > 0, "both saturations of M occurred");
    check(n_seq_full > 0 && n_seq_half > 0, "modulo-2 full and half jumps occurred");
    check(n_cmm_full > 0 && n_cmm_wrap > 0, "modulo-4 full jump and wrap occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
