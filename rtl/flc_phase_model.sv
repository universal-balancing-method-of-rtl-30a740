// flc_phase_model: clocked mathematical model of one phase of an NLEV-level
// flying-capacitor converter (power circuit: NSW = NLEV-1 switch pairs
// Tx0..Tx5 from the DC side to the output, flying capacitor Cx(k+1) between
// cells k and k+1).  It stands in for the power stage so that the balancer
// can be run in closed loop.
//
// Every clock (one time step dt = 1/CLK_HZ) the switch pattern tx is walked
// from the DC side to the output:
//   cell 0:   ux = +udc/2 and ic0 = +ix if tx[0], else ux = -udc/2, ic0 = -ix
//   cell i>0: tx[i-1] == tx[i]  -> capacitor clamped, ic = 0
//             tx[i] = 1         -> ux += uc, ic = +ix
//             tx[i] = 0         -> ux -= uc, ic = -ix
// and each capacitor integrates its current, uc <= uc - ic*dt/C.  A positive
// current (out of the converter) therefore discharges a capacitor whose
// outer switch is on and inner switch off.  The same update is defined for
// the DC link (udc <= udc - ic0*dt/C); with DC_STIFF = 1 the link is held
// at UDC_V instead, as an ideal DC source.
//
// Comparators give uc_low[k] = 1 when the required voltage of capacitor k,
// udc * (NCAP-k) / NSW (500, 400, 300, 200, 100 V at 600 V), exceeds the
// modelled voltage; they are evaluated as NSW*uc < (NCAP-k)*udc, without a
// divider.
//
// Interface: tx from the balancer, i_in = phase current, u_out = phase
// voltage against the DC midpoint, uc_out[k] = voltage of Cx(k+1), udc_out.
// All in flc_pkg::fx_t fixed point.  u_out is registered: it is the voltage
// produced by the pattern of the previous clock.  Capacitors reset to
// UC_INIT_PCT percent of their reference voltage.
//
// The update equations, the comparators and the 10 MHz / 100 uF / 600 V
// defaults follow the published model; the fixed-point arithmetic, the
// stiff DC-link option and the initial-voltage parameter are this design's
// own choices.
module flc_phase_model
  import flc_pkg::*;
#(
  parameter int unsigned NLEV         = 7,
  parameter int unsigned CLK_HZ       = 10_000_000,
  parameter int unsigned UDC_V        = 600,
  parameter int unsigned C_NF         = 100_000,
  parameter bit          DC_STIFF     = 1'b1,
  parameter int unsigned UC_INIT_PCT  = 100
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [NLEV-2:0] tx,
  input  fx_t             i_in,
  output fx_t             u_out,
  output fx_t             udc_out,
  output fx_t             uc_out [NLEV-2],
  output logic [NLEV-3:0] uc_low
);

  localparam int unsigned NSW  = NLEV - 1;
  localparam int unsigned NCAP = NLEV - 2;

  // dt/C scaled by 2**KC_SH.
  localparam int unsigned KC_SH = 32;
  localparam int          KC    = $rtoi(1.0e9 / (real'(CLK_HZ) * real'(C_NF)) * (2.0 ** KC_SH) + 0.5);

  localparam fx_t UDC_FX = real_to_fx(real'(UDC_V));

  // Reset voltages: UC_INIT_PCT percent of udc * (NCAP-k) / NSW.
  typedef fx_t cap_t [NCAP];
  function automatic cap_t uc_init();
    cap_t v;
    for (int k = 0; k < NCAP; k++)
      v[k] = real_to_fx(real'(UC_INIT_PCT) / 100.0 * real'(UDC_V) * (NCAP - k) / NSW);
    return v;
  endfunction
  localparam cap_t UC_INIT = uc_init();

  // Integrates one time step: v - i*dt/C.
  function automatic fx_t step(input fx_t v, input fx_t i);
    logic signed [FX_W+64-1:0] p;
    p = (FX_W+64)'(i) * (FX_W+64)'(KC);
    return v - fx_t'(p >>> KC_SH);
  endfunction

  fx_t udc;
  fx_t uc [NCAP];
  fx_t ux;
  fx_t ic [NSW];

  always_comb begin
    if (tx[0]) begin
      ux    = udc >>> 1;
      ic[0] = i_in;
    end else begin
      ux    = -(udc >>> 1);
      ic[0] = -i_in;
    end
    for (int i = 1; i < NSW; i++) begin
      if (tx[i-1] == tx[i]) begin
        ic[i] = '0;
      end else if (tx[i]) begin
        ux    = ux + uc[i-1];
        ic[i] = i_in;
      end else begin
        ux    = ux - uc[i-1];
        ic[i] = -i_in;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      udc   <= UDC_FX;
      u_out <= '0;
      for (int k = 0; k < NCAP; k++) uc[k] <= UC_INIT[k];
    end else if (en) begin
      u_out <= ux;
      udc   <= DC_STIFF ? UDC_FX : step(udc, ic[0]);
      for (int k = 0; k < NCAP; k++) uc[k] <= step(uc[k], ic[k+1]);
    end
  end

  assign udc_out = udc;
  for (genvar k = 0; k < NCAP; k++) begin : g_cmp
    logic signed [FX_W+8-1:0] lhs, rhs;
    assign lhs       = (FX_W+8)'(uc[k]) * (FX_W+8)'(NSW);
    assign rhs       = (FX_W+8)'(udc) * (FX_W+8)'(NCAP - k);
    assign uc_low[k] = lhs < rhs;
    assign uc_out[k] = uc[k];
  end

endmodule
