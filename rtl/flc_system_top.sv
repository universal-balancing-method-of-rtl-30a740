// flc_system_top: closed-loop three-phase seven-level flying-capacitor
// converter with predictor/corrector capacitor balancing.
//
// Chain (per phase U, V, W):
//   sine3_generator -> pd_pwm_modulator -> flc_balancer -> flc_phase_model
//                                              ^   ^             |
//                     comparator bits uc_low --+   |             v u_out
//                     phase current  i_out  -------+-------- rl_load3
// The modulator's six-bit thermometer pattern (pwm_mod) fixes the output
// level; the balancer rearranges it (pwm_bal) so that the five flying
// capacitors of the phase stay at 5/6 .. 1/6 of the DC link.  The phase
// models turn pwm_bal into phase voltages and capacitor voltages, and the
// R-L load turns the phase voltages into the currents that the balancers
// and phase models use.  The balancers sample the comparators and the
// current sign once per switching period, on the modulator's `sync`.
//
// Interface: ftw / amp set the output frequency (ftw * CLK_HZ / 2**32) and
// the modulation index (32768 = 1.0); r_load (Q8.8 ohms) sets the load
// resistance at run time.  All analogue quantities leave in flc_pkg::fx_t.
// UC_INIT_PCT sets the capacitor voltages at reset in percent of their
// references (100: balanced start), for tests of recovery from imbalance.
//
// The structure and the default numbers (10 MHz model clock, 15 kHz
// switching, 600 V, 100 uF, 20 mH) follow the published simulation set-up;
// the fixed-point formats and run-time ports are this design's choices.
module flc_system_top
  import flc_pkg::*;
#(
  parameter int unsigned NLEV   = 7,
  parameter int unsigned CLK_HZ = 10_000_000,
  parameter int unsigned FS_HZ  = 15_000,
  parameter int unsigned UDC_V  = 600,
  parameter int unsigned C_NF   = 100_000,
  parameter int unsigned L_UH   = 20_000,
  parameter int unsigned UC_INIT_PCT = 100
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [31:0]     ftw,
  input  logic [15:0]     amp,
  input  logic [15:0]     r_load,
  output ref_t            mod_ref [3],
  output logic            sync,
  output logic [NLEV-2:0] pwm_mod [3],
  output logic [NLEV-2:0] pwm_bal [3],
  output logic [NLEV-3:0] uc_low  [3],
  output fx_t             u_out   [3],
  output fx_t             i_out   [3],
  output fx_t             udc     [3],
  output fx_t             uc      [3][NLEV-2]
);

  sine3_generator #(.ACC_W(32)) u_sine (
    .clk, .rst_n, .en, .ftw, .amp, .ref_out(mod_ref)
  );

  pd_pwm_modulator #(
    .NLEV(NLEV), .NPH(3), .CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ)
  ) u_pwm (
    .clk, .rst_n, .en, .ref_in(mod_ref), .pwm_out(pwm_mod), .sync
  );

  for (genvar p = 0; p < 3; p++) begin : g_phase
    flc_balancer #(.NLEV(NLEV)) u_bal (
      .clk, .rst_n,
      .sample (sync),
      .pwm_in (pwm_mod[p]),
      .uc_low (uc_low[p]),
      .i_in   (i_out[p]),
      .bal_out(pwm_bal[p])
    );

    flc_phase_model #(
      .NLEV(NLEV), .CLK_HZ(CLK_HZ), .UDC_V(UDC_V), .C_NF(C_NF),
      .UC_INIT_PCT(UC_INIT_PCT)
    ) u_model (
      .clk, .rst_n, .en,
      .tx     (pwm_bal[p]),
      .i_in   (i_out[p]),
      .u_out  (u_out[p]),
      .udc_out(udc[p]),
      .uc_out (uc[p]),
      .uc_low (uc_low[p])
    );
  end

  rl_load3 #(.NPH(3), .CLK_HZ(CLK_HZ), .L_UH(L_UH)) u_load (
    .clk, .rst_n, .en, .u_in(u_out), .r_load, .i_out
  );

endmodule
