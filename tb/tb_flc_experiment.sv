// tb_flc_experiment: the converter at the laboratory operating points.
//
// The top is set to the low-voltage converter (60 V DC link, 40 kHz
// switching, 40 uF flying capacitors) and run at the two operating points
// of the measurements: 5 Hz with modulation amplitude 0.25, and 50 Hz with
// amplitude 1.0.  The induction machine of the laboratory set-up is
// replaced by an R-L stand-in for an unloaded machine, whose rotor branch
// carries no current: R = Rs = 1.86 ohm, L = Lss + Lm = 5.3 mH + 33 mH =
// 38.3 mH.  For each operating point the test runs one full output period
// (5 Hz: 200 ms; 50 Hz: after 40 ms of settling, 20 ms) and checks:
//  * the balancer keeps the modulator's level on every clock;
//  * the switching period is 250 clocks (10 MHz / 40 kHz);
//  * every capacitor stays within 5 V of its reference (50..10 V);
//  * the peak-to-peak ripple of Cx5, the capacitor next to the output,
//    stays below the 10 V measured on the laboratory converter (the model
//    gives about 2.5 V: it has no measurement noise or dead time).
module tb_flc_experiment;
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

  flc_system_top #(
    .FS_HZ(40_000), .UDC_V(60), .C_NF(40_000), .L_UH(38_300)
  ) dut (
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
    #(100 * 3_500_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit         running, window;
  int         cyc, last_sync;
  logic [5:0] mod_q [3];
  real        dev_max, ipk;
  real        c5_min [3];
  real        c5_max [3];

  always @(posedge clk) begin
    if (running) begin
      cyc++;
      for (int p = 0; p < 3; p++)
        expect_true($sformatf("phase %0d level", p), popc6(pwm_bal[p]) == popc6(mod_q[p]));
      if (sync) begin
        if (last_sync > 0)
          expect_true($sformatf("switching period %0d", cyc - last_sync), cyc - last_sync == 250);
        last_sync = cyc;
      end
    end
    for (int p = 0; p < 3; p++) mod_q[p] <= pwm_mod[p];
  end

  always @(negedge clk) if (window && cyc % 50 == 0) begin
    for (int p = 0; p < 3; p++) begin
      real a;
      for (int k = 0; k < 5; k++) begin
        real dev;
        dev = fx_to_real(uc[p][k]) - 60.0 * (5 - k) / 6.0;
        if (dev < 0.0) dev = -dev;
        if (dev > dev_max) dev_max = dev;
        expect_true($sformatf("phase %0d Cx%0d deviation %f V", p, k + 1, dev), dev < 5.0);
      end
      if (fx_to_real(uc[p][4]) < c5_min[p]) c5_min[p] = fx_to_real(uc[p][4]);
      if (fx_to_real(uc[p][4]) > c5_max[p]) c5_max[p] = fx_to_real(uc[p][4]);
      a = fx_to_real(i_out[p]);
      if (a < 0.0) a = -a;
      if (a > ipk) ipk = a;
    end
  end

  task automatic operating_point(input string name, input logic [31:0] f, input logic [15:0] a,
                                 input int settle, input int measure);
    rst_n = 1'b0; en = 1'b0; running = 1'b0; window = 1'b0;
    ftw = f; amp = a;
    cyc = 0; last_sync = 0; dev_max = 0.0; ipk = 0.0;
    for (int p = 0; p < 3; p++) begin
      c5_min[p] = 1.0e9;
      c5_max[p] = -1.0e9;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1; en = 1'b1; running = 1'b1;
    repeat (settle) @(negedge clk);
    window = 1'b1;
    repeat (measure) @(negedge clk);
    window = 1'b0; running = 1'b0;
    $display("%s: peak current %f A, largest capacitor deviation %f V", name, ipk, dev_max);
    $display("%s: Cx5 ripple peak to peak %f %f %f V", name,
             c5_max[0] - c5_min[0], c5_max[1] - c5_min[1], c5_max[2] - c5_min[2]);
    expect_true($sformatf("%s: current flows", name), ipk > 0.1);
    for (int p = 0; p < 3; p++)
      expect_true($sformatf("%s: phase %0d Cx5 ripple below 10 V p-p", name, p),
                  c5_max[p] - c5_min[p] < 10.0);
  endtask

  initial begin
    r_load = 16'd476;             // 1.86 ohm in Q8.8
    operating_point("5 Hz, amplitude 0.25", 32'd2147, 16'd8192, 2000, 2_000_000);
    operating_point("50 Hz, amplitude 1.0", 32'd21475, 16'd32768, 400_000, 200_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
