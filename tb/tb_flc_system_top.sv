// tb_flc_system_top: end-to-end run of the closed-loop three-phase
// seven-level converter at its default parameters (10 MHz model clock,
// 15 kHz switching, 600 V, 100 uF, 20 mH).
//
// The sine source runs at 150 Hz and full amplitude.  The load resistance
// is 120 ohm, steps to 2 ohm at 25 ms and back to 120 ohm at 75 ms; the run
// lasts 100 ms (one million clocks).  Checked on the way:
//  * every balancer output carries the modulator's level (same number of
//    ones as the modulator word of the previous clock);
//  * every flying capacitor of every phase stays within UC_TOL = 20 V of its
//    reference (500/400/300/200/100 V) after the first switching periods,
//    and in steady state at 2 ohm no capacitor's peak-to-peak ripple exceeds
//    22 V (20 V peak to peak is the ripple quoted for this set-up, plus a
//    10 % margin);
//  * the switching period (sync to sync) is 666 clocks;
//  * with 2 ohm the peak phase current is that of the R-L load driven by
//    the fundamental, 300 V / |2 + j*2*pi*150*0.02| = 15.8 A, within 10 %.
// It also counts the mechanisms of the balancer and fails if one never
// occurs: corrector adding ones, corrector removing ones, prediction
// already right, output differing from the modulator pattern, both current
// signs and both comparator results at a sampling instant, and the load
// steps.
module tb_flc_system_top;
  import flc_pkg::*;

  localparam int  CLK_PER_MS = 10_000;
  localparam real UC_TOL     = 20.0;

  logic clk = 1'b0;
  always #50 clk = ~clk;

  logic        rst_n, en;
  logic [31:0] ftw;
  logic [15:0] amp, r_load;
  ref_t        mod_ref [3];
  logic        sync;
  logic [5:0]  pwm_mod [3];
  logic [5:0]  pwm_bal [3];
  logic [4:0]  uc_low  [3];
  fx_t         u_out   [3];
  fx_t         i_out   [3];
  fx_t         udc     [3];
  fx_t         uc      [3][5];

  flc_system_top dut (
    .clk, .rst_n, .en, .ftw, .amp, .r_load, .mod_ref, .sync,
    .pwm_mod, .pwm_bal, .uc_low, .u_out, .i_out, .udc, .uc
  );

  int checks = 0, failures = 0;

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int popc6(input logic [5:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]) + int'(v[4]) + int'(v[5]);
  endfunction

  initial begin
    #(100 * 1_200_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Predictor outputs inside the three balancers.
  logic [5:0] pred [3];
  assign pred[0] = dut.g_phase[0].u_bal.pred;
  assign pred[1] = dut.g_phase[1].u_bal.pred;
  assign pred[2] = dut.g_phase[2].u_bal.pred;

  // Mechanism counters.
  int n_add, n_remove, n_keep, n_rearranged, n_ipos, n_ineg, n_low, n_high, n_steps;
  int n_samples;
  real uc_dev_max;
  real ipk_2ohm;
  real uc_min [3][5];
  real uc_max [3][5];
  bit  window;
  int  last_sync, cyc;
  logic [5:0] mod_q [3];
  bit running;

  always @(posedge clk) begin
    if (running) begin
      for (int p = 0; p < 3; p++) begin
        // Level kept: output now equals level of modulator word of the last clock.
        expect_true($sformatf("phase %0d level %b vs %b", p, pwm_bal[p], mod_q[p]),
                    popc6(pwm_bal[p]) == popc6(mod_q[p]));
        if (pwm_bal[p] != mod_q[p]) n_rearranged++;
        begin
          int lp, lm;
          lp = popc6(pred[p]);
          lm = popc6(pwm_mod[p]);
          if (lp < lm) n_add++;
          else if (lp > lm) n_remove++;
          else n_keep++;
        end
      end
    end
    for (int p = 0; p < 3; p++) mod_q[p] <= pwm_mod[p];
  end

  always @(posedge clk) if (running) begin
    cyc++;
    if (sync) begin
      if (last_sync > 0)
        expect_true($sformatf("switching period %0d", cyc - last_sync), cyc - last_sync == 666);
      last_sync = cyc;
      n_samples++;
      for (int p = 0; p < 3; p++) begin
        if (i_out[p] > 0) n_ipos++; else n_ineg++;
        for (int k = 0; k < 5; k++) if (uc_low[p][k]) n_low++; else n_high++;
      end
    end
  end

  // Capacitor voltages against their references, checked every 100 clocks.
  always @(negedge clk) if (running && cyc > 2000 && cyc % 100 == 0) begin
    for (int p = 0; p < 3; p++)
      for (int k = 0; k < 5; k++) begin
        real dev;
        dev = fx_to_real(uc[p][k]) - 600.0 * (5 - k) / 6.0;
        if (dev < 0.0) dev = -dev;
        if (dev > uc_dev_max) uc_dev_max = dev;
        if (window) begin
          if (fx_to_real(uc[p][k]) < uc_min[p][k]) uc_min[p][k] = fx_to_real(uc[p][k]);
          if (fx_to_real(uc[p][k]) > uc_max[p][k]) uc_max[p][k] = fx_to_real(uc[p][k]);
        end
        expect_true($sformatf("phase %0d Cx%0d deviation %f V", p, k + 1, dev), dev < UC_TOL);
      end
  end

  task automatic run_ms(input int ms, input bit measure_peak);
    for (int n = 0; n < ms * CLK_PER_MS; n++) begin
      @(negedge clk);
      if (measure_peak)
        for (int p = 0; p < 3; p++) begin
          real a;
          a = fx_to_real(i_out[p]);
          if (a < 0.0) a = -a;
          if (a > ipk_2ohm) ipk_2ohm = a;
        end
    end
  endtask

  initial begin
    real ipk_want;
    n_add = 0; n_remove = 0; n_keep = 0; n_rearranged = 0; n_ipos = 0; n_ineg = 0;
    n_low = 0; n_high = 0; n_steps = 0; n_samples = 0; uc_dev_max = 0.0; ipk_2ohm = 0.0;
    last_sync = 0; cyc = 0; running = 1'b0; window = 1'b0;
    for (int p = 0; p < 3; p++)
      for (int k = 0; k < 5; k++) begin
        uc_min[p][k] = 1.0e9;
        uc_max[p][k] = -1.0e9;
      end
    rst_n = 1'b0; en = 1'b0;
    ftw    = 32'd64425;               // 150 Hz at 10 MHz: 150 * 2**32 / 1e7
    amp    = 16'd32768;               // full amplitude
    r_load = 16'd30720;               // 120 ohm, Q8.8
    repeat (3) @(negedge clk);
    rst_n = 1'b1; en = 1'b1; running = 1'b1;
    run_ms(25, 1'b0);
    r_load = 16'd512;                 // 2 ohm
    n_steps++;
    run_ms(30, 1'b0);                 // let the current settle (L/R = 10 ms)
    window = 1'b1;
    run_ms(20, 1'b1);
    window = 1'b0;
    r_load = 16'd30720;               // back to 120 ohm
    n_steps++;
    run_ms(25, 1'b0);
    running = 1'b0;

    ipk_want = 300.0 / $sqrt(4.0 + (2.0 * 3.14159265358979 * 150.0 * 0.02) ** 2);
    expect_true($sformatf("peak current %f A want %f A", ipk_2ohm, ipk_want),
                ipk_2ohm > 0.9 * ipk_want && ipk_2ohm < 1.1 * ipk_want);
    $display("peak current at 2 ohm %f A (fundamental estimate %f A)", ipk_2ohm, ipk_want);
    $display("largest capacitor deviation %f V", uc_dev_max);
    for (int k = 0; k < 5; k++)
      $display("Cx%0d ripple at 2 ohm, peak to peak: %f %f %f V", k + 1,
               uc_max[0][k] - uc_min[0][k], uc_max[1][k] - uc_min[1][k],
               uc_max[2][k] - uc_min[2][k]);
    $display("samples %0d  add %0d remove %0d keep %0d rearranged %0d", n_samples,
             n_add, n_remove, n_keep, n_rearranged);
    $display("current +%0d -%0d  comparator low %0d high %0d  load steps %0d",
             n_ipos, n_ineg, n_low, n_high, n_steps);
    for (int p = 0; p < 3; p++)
      for (int k = 0; k < 5; k++)
        expect_true($sformatf("phase %0d Cx%0d ripple %f V p-p", p, k + 1,
                              uc_max[p][k] - uc_min[p][k]),
                    uc_max[p][k] - uc_min[p][k] < 22.0);
    expect_true("corrector added ones", n_add > 0);
    expect_true("corrector removed ones", n_remove > 0);
    expect_true("prediction already at level", n_keep > 0);
    expect_true("pattern rearranged", n_rearranged > 0);
    expect_true("positive current sampled", n_ipos > 0);
    expect_true("negative current sampled", n_ineg > 0);
    expect_true("capacitor below reference", n_low > 0);
    expect_true("capacitor above reference", n_high > 0);
    expect_true("load steps", n_steps == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
