// flc_balancer: universal flying-capacitor balancing block, placed between
// the multilevel modulator and the power switches of one phase.
//
// The modulator gives a switch pattern T whose number of ones is the
// required output level.  The balancer replaces it by a pattern TX with the
// same number of ones, chosen so that every flying capacitor is driven
// toward its reference voltage.  It works in two steps:
//
//  * Predictor.  For x = NCAP-1 down to 0, the pair of switches (x, x+1)
//    that encloses capacitor x is set to (1,0) when the capacitor should be
//    charged and to (0,1) when it should be discharged.  Charging is wanted
//    when (current > 0) equals (capacitor below reference): with the pair
//    (1,0) a positive output current charges the capacitor.  As the loop
//    walks downward, each pass overwrites switch x+1 that the previous pass
//    set, exactly as the loop is written; the prediction does not look at T.
//  * Corrector.  Level = sum(T).  For i = 0 .. NSW-1 the prediction is
//    walked from switch 0 upward: if it has too few ones and switch i is 0,
//    switch i is set; if it has too many and switch i is 1, it is cleared.
//    The count of ones is recomputed after each step.  When the count equals
//    Level the corrected pattern is written to the output register.
//
// Nothing in this depends on the modulator type or on the number of levels
// beyond the NLEV parameter.
//
// Timing: the capacitor comparator bits and the current sign are sampled
// only on `sample` (one clock per switching period, from the modulator), so
// the prediction is fixed over a period.  Predictor and corrector are
// combinational; bal_out is registered and follows pwm_in with one clock of
// latency.  Reset clears all registers (all upper switches off, level 0).
//
// Interface: pwm_in = T (from the modulator), uc_low[x] = 1 when the
// required voltage of capacitor x exceeds its measured voltage, i_in = phase
// current (positive out of the converter), bal_out = TX.
//
// The predictor and corrector loops follow the published flowcharts; the
// sampling register, the signed fixed-point current input and the reset
// values are this design's choices.
module flc_balancer
  import flc_pkg::*;
#(
  parameter int unsigned NLEV = 7
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sample,
  input  logic [NLEV-2:0] pwm_in,
  input  logic [NLEV-3:0] uc_low,
  input  fx_t             i_in,
  output logic [NLEV-2:0] bal_out
);

  localparam int unsigned NSW  = NLEV - 1;
  localparam int unsigned NCAP = NLEV - 2;
  localparam int unsigned LW   = $clog2(NSW + 1);

  typedef logic [NSW-1:0] sw_t;

  // Measurements held for one switching period.
  logic [NCAP-1:0] uc_low_q;
  logic            i_pos_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      uc_low_q <= '0;
      i_pos_q  <= 1'b0;
    end else if (sample) begin
      uc_low_q <= uc_low;
      i_pos_q  <= (i_in > 0);
    end
  end

  function automatic logic [LW-1:0] ones(input sw_t v);
    logic [LW-1:0] n;
    n = '0;
    for (int k = 0; k < NSW; k++) n += LW'(v[k]);
    return n;
  endfunction

  // Predictor.
  sw_t pred;
  always_comb begin
    pred = '0;
    for (int x = NCAP - 1; x >= 0; x--) begin
      if (i_pos_q == uc_low_q[x]) begin
        pred[x]   = 1'b1;
        pred[x+1] = 1'b0;
      end else begin
        pred[x]   = 1'b0;
        pred[x+1] = 1'b1;
      end
    end
  end

  // Corrector.
  logic [LW-1:0] level;
  sw_t           corr;
  logic          match;
  always_comb begin
    logic [LW-1:0] levelx;
    level  = ones(pwm_in);
    corr   = pred;
    levelx = ones(corr);
    for (int i = 0; i < NSW; i++) begin
      if (level > levelx && !corr[i])      corr[i] = 1'b1;
      else if (level < levelx && corr[i])  corr[i] = 1'b0;
      levelx = ones(corr);
    end
    match = (levelx == level);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     bal_out <= '0;
    else if (match) bal_out <= corr;
  end

  // The corrector can always reach the level: it visits every switch once.
  a_level_reached : assert property (@(posedge clk) match);

endmodule
