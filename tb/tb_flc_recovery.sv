// tb_flc_recovery: recovery of the flying capacitors from an imbalanced
// start.
//
// The converter starts with every flying capacitor at 80 % of its reference
// (400, 320, 240, 160, 80 V instead of 500 .. 100 V) and runs at 150 Hz,
// full amplitude, into 2 ohm + 20 mH.  Only the balancer moves charge to
// correct this.  The test checks that within 20 ms every capacitor of every
// phase is within 20 V of its reference and stays there until 40 ms, and
// that the modulator's level is kept on every clock meanwhile.  It also
// records how long each phase took to bring all five capacitors within
// 20 V for the first time.
module tb_flc_recovery;
  import flc_pkg::*;

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

  flc_system_top #(.UC_INIT_PCT(80)) dut (
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
    #(100 * 500_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit         running;
  int         cyc;
  int         t_ok [3];
  logic [5:0] mod_q [3];

  always @(posedge clk) begin
    if (running) begin
      cyc++;
      for (int p = 0; p < 3; p++)
        expect_true($sformatf("phase %0d level", p), popc6(pwm_bal[p]) == popc6(mod_q[p]));
    end
    for (int p = 0; p < 3; p++) mod_q[p] <= pwm_mod[p];
  end

  always @(negedge clk) if (running && cyc % 100 == 0) begin
    for (int p = 0; p < 3; p++) begin
      bit all_ok;
      all_ok = 1'b1;
      for (int k = 0; k < 5; k++) begin
        real dev;
        dev = fx_to_real(uc[p][k]) - 600.0 * (5 - k) / 6.0;
        if (dev > 20.0 || dev < -20.0) all_ok = 1'b0;
        if (cyc >= 200_000)
          expect_true($sformatf("phase %0d Cx%0d deviation %f V at %0d", p, k + 1, dev, cyc),
                      dev < 20.0 && dev > -20.0);
      end
      if (all_ok && t_ok[p] < 0) t_ok[p] = cyc;
    end
  end

  initial begin
    running = 1'b0; cyc = 0;
    t_ok = '{-1, -1, -1};
    rst_n = 1'b0; en = 1'b0;
    ftw = 32'd64425; amp = 16'd32768; r_load = 16'd512;
    repeat (3) @(negedge clk);
    // Imbalance at the start: Cx1 is 100 V low.
    checks++;
    if (fx_to_real(uc[0][0]) > 401.0 || fx_to_real(uc[0][0]) < 399.0) begin
      failures++;
      $display("FAIL initial Cx1 %f V", fx_to_real(uc[0][0]));
    end
    rst_n = 1'b1; en = 1'b1; running = 1'b1;
    repeat (400_000) @(negedge clk);
    running = 1'b0;
    for (int p = 0; p < 3; p++) begin
      $display("phase %0d balanced within 20 V after %0d clocks (%f ms)", p, t_ok[p],
               real'(t_ok[p]) / 10_000.0);
      expect_true($sformatf("phase %0d recovered", p), t_ok[p] > 0 && t_ok[p] < 200_000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
