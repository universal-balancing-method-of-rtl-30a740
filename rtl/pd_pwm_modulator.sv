// pd_pwm_modulator: phase-disposition PWM for an NLEV-level converter.
//
// NLEV-1 triangular carriers are stacked in level bands over the full range
// of the reference, all in phase (phase disposition).  One up/down counter
// `tri_cnt` runs 0..HALF..0, so the switching period is 2*HALF clocks, with
// HALF = round(CLK_HZ / (2*FS_HZ)) = 333 for 10 MHz and 15 kHz.  The signed
// reference is mapped to carrier units, scaled = (ref + 32768) * NSW*HALF
// / 65536, and output bit k is 1 while scaled > k*HALF + tri_cnt.  The
// result is a thermometer code whose bit count is the required output level
// (0..NLEV-1), which is the form the balancer expects: pwm_out[k] drives
// upper switch k in the absence of balancing.
//
// Timing: outputs are registered (one clock after the counter); `sync` is a
// one-clock pulse while the carrier is at its minimum, once per switching
// period, and tells the balancer when to sample its measurements.
//
// The PD-PWM type, six outputs per phase and the 15 kHz switching frequency
// come from the balancing study; natural (continuous) sampling of the
// reference and the scaling arithmetic are this design's own choices.
module pd_pwm_modulator
  import flc_pkg::*;
#(
  parameter int unsigned NLEV   = 7,
  parameter int unsigned NPH    = 3,
  parameter int unsigned CLK_HZ = 10_000_000,
  parameter int unsigned FS_HZ  = 15_000
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  ref_t            ref_in  [NPH],
  output logic [NLEV-2:0] pwm_out [NPH],
  output logic            sync
);

  localparam int unsigned NSW   = NLEV - 1;
  localparam int unsigned HALF  = (CLK_HZ + FS_HZ) / (2 * FS_HZ);
  localparam int unsigned CNT_W = $clog2(HALF + 1);
  localparam int unsigned SPAN  = NSW * HALF;

  logic [CNT_W-1:0] tri_cnt;
  logic             up;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tri_cnt <= '0;
      up      <= 1'b1;
    end else if (en) begin
      if (up) begin
        if (tri_cnt == CNT_W'(HALF - 1)) up <= 1'b0;
        tri_cnt <= tri_cnt + 1'b1;
      end else begin
        if (tri_cnt == CNT_W'(1)) up <= 1'b1;
        tri_cnt <= tri_cnt - 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 1'b0;
    else        sync <= en && (tri_cnt == '0);
  end

  for (genvar p = 0; p < NPH; p++) begin : g_phase
    logic [16:0] ref_off;
    logic [47:0] scaled;
    assign ref_off = 17'(32'(ref_in[p]) + 32'sd32768);
    assign scaled  = (48'(ref_off) * 48'(SPAN)) >> 16;

    for (genvar k = 0; k < NSW; k++) begin : g_carrier
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) pwm_out[p][k] <= 1'b0;
        else if (en) pwm_out[p][k] <= scaled > 48'(k * HALF) + 48'(tri_cnt);
      end
    end
  end

endmodule
