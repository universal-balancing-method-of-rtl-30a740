// tb_rl_load3: self-checking test of the three-phase R-L load.
//
// Applies different constant voltages to the three phases and steps the
// resistance (120 ohm, 2 ohm, 120 ohm, as in the load-step experiment),
// integrating i += dt*(u - R*i)/L in real arithmetic alongside.  Checks the
// currents every clock against that reference, and at the end of the
// 120 ohm interval (about 12 time constants of 167 us) that each current
// has settled to u/R.
module tb_rl_load3;
  import flc_pkg::*;

  logic clk = 1'b0;
  always #50 clk = ~clk;
  logic        rst_n, en;
  fx_t         u_in  [3];
  fx_t         i_out [3];
  logic [15:0] r_load;

  rl_load3 dut (.clk, .rst_n, .en, .u_in, .r_load, .i_out);

  int checks = 0, failures = 0;
  localparam real DTL = 1.0e-7 / 20.0e-3;

  task automatic close(input string what, input real got, input real want, input real tol);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++;
      $display("FAIL %s: got %f want %f", what, got, want);
    end
  endtask

  initial begin
    #(100 * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ir [3];
  real uv [3] = '{300.0, -100.0, 33.3};

  task automatic run(input int cycles, input real r);
    r_load = 16'($rtoi(r * 256.0));
    for (int n = 0; n < cycles; n++) begin
      for (int p = 0; p < 3; p++) ir[p] += DTL * (uv[p] - r * ir[p]);
      @(negedge clk);
      if (n % 5 == 0)
        for (int p = 0; p < 3; p++)
          close($sformatf("i%0d", p), fx_to_real(i_out[p]), ir[p], 1e-3);
    end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; r_load = '0;
    for (int p = 0; p < 3; p++) begin
      u_in[p] = real_to_fx(uv[p]);
      ir[p]   = 0.0;
    end
    repeat (3) @(negedge clk);
    for (int p = 0; p < 3; p++) close("reset", fx_to_real(i_out[p]), 0.0, 1e-9);
    rst_n = 1'b1; en = 1'b1;
    run(20000, 120.0);
    for (int p = 0; p < 3; p++)
      close($sformatf("steady i%0d = u/R", p), fx_to_real(i_out[p]), uv[p] / 120.0, 1e-3);
    run(20000, 2.0);
    run(20000, 120.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
