// tb_pd_pwm_modulator: self-checking test of the seven-level PD-PWM.
//
// Runs the modulator at its default clock and switching frequency with
// constant references on the three phases (one set per few switching
// periods) and checks:
//  * the period between `sync` pulses is 666 clocks (10 MHz / 15 kHz,
//    rounded to an even count);
//  * every output word is a thermometer code (ones only at the bottom);
//  * the level averaged over one switching period equals the reference
//    mapped to 0..6, (ref + 32768) / 65536 * 6, within 0.03 of a level;
//  * the two extremes give the lowest and highest levels.
module tb_pd_pwm_modulator;
  import flc_pkg::*;

  logic clk = 1'b0;
  always #50 clk = ~clk;
  logic       rst_n, en, sync;
  ref_t       ref_in [3];
  logic [5:0] pwm    [3];

  pd_pwm_modulator dut (.clk, .rst_n, .en, .ref_in, .pwm_out(pwm), .sync);

  int checks = 0, failures = 0;

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int popc6(input logic [5:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]) + int'(v[4]) + int'(v[5]);
  endfunction

  initial begin
    #(100 * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Thermometer property on every clock.
  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < 3; p++) begin
      logic [6:0] plus1;
      plus1 = 7'(pwm[p]) + 7'd1;
      expect_true($sformatf("thermometer %b", pwm[p]), (plus1 & 7'(pwm[p])) == 0);
    end
  end

  initial begin
    int refs [10] = '{-32768, 32767, 0, -20000, 12345, -5461, 5461, 30000, -30001, 100};
    rst_n = 1'b0; en = 1'b0;
    foreach (ref_in[p]) ref_in[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1; en = 1'b1;
    @(posedge sync);
    for (int r = 0; r < 10; r++) begin
      int sum [3];
      int cycles;
      for (int p = 0; p < 3; p++) ref_in[p] = ref_t'(refs[(r + p) % 10]);
      // Let the new references settle for one period, then measure one.
      @(posedge sync);
      @(posedge sync);
      @(negedge clk);
      sum = '{0, 0, 0};
      cycles = 0;
      do begin
        @(negedge clk);
        for (int p = 0; p < 3; p++) sum[p] += popc6(pwm[p]);
        cycles++;
      end while (!sync);
      expect_true($sformatf("switching period %0d clocks", cycles), cycles == 666);
      for (int p = 0; p < 3; p++) begin
        real want, got;
        want = (real'(refs[(r + p) % 10]) + 32768.0) / 65536.0 * 6.0;
        got  = real'(sum[p]) / real'(cycles);
        expect_true($sformatf("mean level ref=%0d got %f want %f", refs[(r + p) % 10], got, want),
                    (got - want < 0.03) && (want - got < 0.03));
      end
    end
    // Extremes.
    ref_in[0] = -16'sd32768;
    ref_in[1] = 16'sd32767;
    repeat (700) @(negedge clk);
    expect_true("lowest level", pwm[0] == 6'b000000);
    @(posedge sync);
    repeat (300) @(negedge clk);
    expect_true("highest level", pwm[1] == 6'b111111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
