// tb_flc_phase_model: self-checking test of the seven-level phase model.
//
// Two instances share the stimulus: the default one (ideal DC link) and one
// whose DC link is itself integrated (DC_STIFF = 0).  Random switch
// patterns and currents are applied; the test bench integrates the same
// circuit in real arithmetic, written in a different form:
//   u  = udc/2 * (2*tx0 - 1) + sum_i (tx[i] - tx[i-1]) * uc[i-1]
//   uc[k] -= (tx[k+1] - tx[k]) * i * dt / C,   udc -= (2*tx0 - 1) * i * dt / C
// and compares phase voltage, capacitor voltages and the comparator bits
// (required voltage udc*(5-k)/6 above the capacitor voltage).
module tb_flc_phase_model;
  import flc_pkg::*;

  logic clk = 1'b0;
  always #50 clk = ~clk;
  logic       rst_n, en;
  logic [5:0] tx;
  fx_t        i_in;
  fx_t        u_a, udc_a, u_b, udc_b;
  fx_t        uc_a [5];
  fx_t        uc_b [5];
  logic [4:0] low_a, low_b;

  flc_phase_model dut_a (
    .clk, .rst_n, .en, .tx, .i_in, .u_out(u_a), .udc_out(udc_a), .uc_out(uc_a), .uc_low(low_a)
  );
  flc_phase_model #(.DC_STIFF(1'b0), .UC_INIT_PCT(90)) dut_b (
    .clk, .rst_n, .en, .tx, .i_in, .u_out(u_b), .udc_out(udc_b), .uc_out(uc_b), .uc_low(low_b)
  );

  int checks = 0, failures = 0;
  localparam real DTC = 1.0e-7 / 100.0e-6;   // dt / C

  task automatic close(input string what, input real got, input real want, input real tol);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++;
      $display("FAIL %s: got %f want %f", what, got, want);
    end
  endtask

  task automatic same(input string what, input logic [4:0] got, input logic [4:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b want %b", what, got, want);
    end
  endtask

  initial begin
    #(100 * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ua, ub, udca, udcb, ia;
  real uca [5];
  real ucb [5];

  function automatic real model_u(input logic [5:0] t, input real udc, input real uc [5]);
    real u = udc / 2.0 * (t[0] ? 1.0 : -1.0);
    for (int i = 1; i < 6; i++) u += (real'(int'(t[i])) - real'(int'(t[i-1]))) * uc[i-1];
    return u;
  endfunction

  initial begin
    rst_n = 1'b0; en = 1'b0; tx = '0; i_in = '0;
    for (int k = 0; k < 5; k++) begin
      uca[k] = 600.0 * (5 - k) / 6.0;
      ucb[k] = 0.9 * 600.0 * (5 - k) / 6.0;
    end
    udca = 600.0; udcb = 600.0;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 5; k++) begin
      close($sformatf("reset uc%0d", k), fx_to_real(uc_a[k]), uca[k], 1e-6);
      close($sformatf("reset uc%0d (90%%)", k), fx_to_real(uc_b[k]), ucb[k], 1e-6);
    end
    rst_n = 1'b1; en = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      logic [4:0] wa, wb;
      logic [5:0] t;
      if (n % 40 == 0) ia = (real'($urandom_range(0, 4000)) - 2000.0) / 100.0;
      t    = 6'($urandom);
      tx   = t;
      i_in = real_to_fx(ia);
      // Expected values after the next clock edge.
      ua = model_u(t, udca, uca);
      ub = model_u(t, udcb, ucb);
      for (int k = 0; k < 5; k++) begin
        real d;
        d = (real'(int'(t[k+1])) - real'(int'(t[k]))) * fx_to_real(i_in) * DTC;
        uca[k] -= d;
        ucb[k] -= d;
      end
      udcb -= (t[0] ? 1.0 : -1.0) * fx_to_real(i_in) * DTC;
      @(negedge clk);
      close("u (ideal link)", fx_to_real(u_a), ua, 1e-3);
      close("u (integrated link)", fx_to_real(u_b), ub, 1e-3);
      close("udc (ideal link)", fx_to_real(udc_a), udca, 1e-6);
      close("udc (integrated link)", fx_to_real(udc_b), udcb, 1e-3);
      for (int k = 0; k < 5; k++) begin
        close($sformatf("uc%0d", k), fx_to_real(uc_a[k]), uca[k], 1e-3);
        close($sformatf("uc%0d b", k), fx_to_real(uc_b[k]), ucb[k], 1e-3);
        wa[k] = uca[k] < udca * (5 - k) / 6.0;
        wb[k] = ucb[k] < udcb * (5 - k) / 6.0;
      end
      if (n > 10) begin
        same("comparators a", low_a, wa);
        same("comparators b", low_b, wb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
