// sine3_generator: three-phase sine reference for the multilevel modulator.
//
// A phase accumulator of ACC_W bits advances by `ftw` on every clock while
// `en` is high, so the output frequency is ftw * CLK_HZ / 2**ACC_W.  The top
// LUT_AW bits of the phase address a full-period sine table that is computed
// at elaboration time (entry n = round(32767 * sin(2*pi*n / 2**LUT_AW))).
// Phases V and W read the table at the phase minus 1/3 and 2/3 of a turn.
// Each table value is scaled by `amp` (unsigned, 32768 = amplitude 1.0) and
// registered, so the outputs lag the accumulator by one clock.
//
// Interface: ftw (frequency word), amp (modulation index), ref_out[0..2] =
// D0/D1/D2 (phase U, V, W), signed 16-bit, full scale +/-32767.
//
// The three-phase sine source and its 16-bit outputs follow the simulation
// structure of the balancing study; the accumulator, table size and
// amplitude scaling are this design's own choices.
module sine3_generator
  import flc_pkg::*;
#(
  parameter int unsigned ACC_W  = 32,
  parameter int unsigned LUT_AW = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [ACC_W-1:0] ftw,
  input  logic [15:0]      amp,
  output ref_t             ref_out [3]
);

  localparam int unsigned LUT_N = 2 ** LUT_AW;
  typedef ref_t lut_t [LUT_N];

  function automatic lut_t make_lut();
    lut_t t;
    for (int n = 0; n < LUT_N; n++) begin
      real s;
      s = 32767.0 * $sin(2.0 * 3.14159265358979323846 * n / LUT_N);
      t[n] = ref_t'($rtoi(s + ((s >= 0.0) ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam lut_t SINE_LUT = make_lut();

  // One third of a turn in accumulator units.
  localparam logic [ACC_W-1:0] THIRD = ACC_W'(((65'(1) << ACC_W) + 65'(1)) / 65'(3));

  logic [ACC_W-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  phase <= '0;
    else if (en) phase <= phase + ftw;
  end

  logic [ACC_W-1:0] ph [3];
  assign ph[0] = phase;
  assign ph[1] = phase - THIRD;
  assign ph[2] = phase - THIRD - THIRD;

  for (genvar p = 0; p < 3; p++) begin : g_phase
    logic signed [32:0] prod;
    assign prod = SINE_LUT[ph[p][ACC_W-1 -: LUT_AW]] * $signed({1'b0, amp});
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ref_out[p] <= '0;
      else        ref_out[p] <= ref_t'(prod >>> 15);
    end
  end

endmodule
