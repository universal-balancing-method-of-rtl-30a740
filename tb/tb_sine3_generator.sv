// tb_sine3_generator: self-checking test of the three-phase sine source.
//
// Tracks the phase in the test bench and compares each registered output
// with 32767 * amp/32768 * sin(theta - p * 2*pi/3), computed with real
// arithmetic.  The allowed error, 220 LSB, covers the 1024-entry table's
// phase step (2*pi/1024 of a full-scale sine is about 201 LSB).  It also
// counts clocks between rising zero crossings of phase U to check the
// frequency set by `ftw`, at full amplitude and at amplitude 0.25, and
// checks that the outputs hold while `en` is low.
module tb_sine3_generator;
  import flc_pkg::*;

  logic clk = 1'b0;
  always #50 clk = ~clk;
  logic        rst_n, en;
  logic [31:0] ftw;
  logic [15:0] amp;
  ref_t        ref_out [3];

  sine3_generator dut (.clk, .rst_n, .en, .ftw, .amp, .ref_out);

  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #(100 * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ph_tb;

  task automatic run(input int cycles, input int period);
    int   last_cross = -1, n_cross = 0;
    ref_t prev = '0;
    for (int n = 0; n < cycles; n++) begin
      @(posedge clk);
      ph_tb <= ph_tb + ftw;
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        real theta, want, err;
        theta = 2.0 * PI * real'(ph_tb - ftw) / 4294967296.0 - real'(p) * 2.0 * PI / 3.0;
        want  = 32767.0 * real'(amp) / 32768.0 * $sin(theta);
        err   = real'(ref_out[p]) - want;
        if (n % 7 == 0)
          expect_true($sformatf("phase %0d value %0d want %f", p, ref_out[p], want),
                      err < 220.0 && err > -220.0);
      end
      if (prev < 0 && ref_out[0] >= 0) begin
        if (last_cross >= 0) begin
          expect_true($sformatf("period %0d want %0d", n - last_cross, period),
                      (n - last_cross - period) <= 1 && (period - (n - last_cross)) <= 1);
          n_cross++;
        end
        last_cross = n;
      end
      prev = ref_out[0];
    end
    expect_true("zero crossings seen", n_cross >= 2);
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0;
    ftw   = 32'd1073742;          // 2**32 / 4000: period 4000 clocks
    amp   = 16'd32768;
    ph_tb = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1; en = 1'b1;
    run(12500, 4000);
    amp = 16'd8192;               // amplitude 0.25
    @(negedge clk);               // let the amplitude reach the output
    ph_tb = ph_tb + ftw;
    run(13000, 4000);
    // Hold while disabled.
    begin
      ref_t held;
      en = 1'b0;
      repeat (2) @(negedge clk);
      held = ref_out[0];
      repeat (50) @(negedge clk);
      expect_true("hold while disabled", ref_out[0] == held);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
