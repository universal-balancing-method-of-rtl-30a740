// rl_load3: three-phase series R-L load model.  Each phase integrates
//   i <= i + dt * (u - R*i) / L
// once per clock (dt = 1/CLK_HZ), u being the phase voltage of the
// converter model against the DC midpoint (star point of the load tied to
// it, as in the single-phase model).  R is a run-time input so that load
// steps (120 ohm -> 2 ohm -> 120 ohm) can be applied; L is a parameter.
//
// Interface: u_in[p], i_out[p] in flc_pkg::fx_t; r_load unsigned Q8.8 ohms
// (2 ohm = 512, 120 ohm = 30720).  Currents are registered and reset to 0.
//
// The equation and the 20 mH / 10 MHz defaults follow the published model;
// the fixed-point formats and the midpoint-referenced star are this
// design's own choices.
module rl_load3
  import flc_pkg::*;
#(
  parameter int unsigned NPH    = 3,
  parameter int unsigned CLK_HZ = 10_000_000,
  parameter int unsigned L_UH   = 20_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  fx_t         u_in  [NPH],
  input  logic [15:0] r_load,
  output fx_t         i_out [NPH]
);

  // dt/L scaled by 2**KL_SH.
  localparam int unsigned KL_SH = 40;
  localparam int          KL    = $rtoi(1.0e6 / (real'(CLK_HZ) * real'(L_UH)) * (2.0 ** KL_SH) + 0.5);

  localparam int unsigned PW = FX_W + 64;

  for (genvar p = 0; p < NPH; p++) begin : g_phase
    logic signed [PW-1:0] ri, drive;
    fx_t                  di;
    assign ri    = (PW'(i_out[p]) * PW'($signed({1'b0, r_load}))) >>> 8;
    assign drive = PW'(u_in[p]) - ri;
    assign di    = fx_t'((drive * PW'(KL)) >>> KL_SH);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  i_out[p] <= '0;
      else if (en) i_out[p] <= i_out[p] + di;
    end
  end

endmodule
