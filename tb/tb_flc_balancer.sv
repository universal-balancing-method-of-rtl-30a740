// tb_flc_balancer: self-checking test of the predictor/corrector balancer.
//
// Two instances are tested: the seven-level default and a five-level one,
// to show that the block is not tied to one number of levels.  For every
// combination of current sign and comparator bits (sampled with a `sample`
// pulse) and for random modulator patterns, the registered output is
// compared with a reference written in closed form:
//   prediction: switch x+1 = NOT charge(x) for x = 0..NCAP-1,
//               switch 0   = charge(0),
//               charge(x)  = (current > 0) == (capacitor x below reference)
//   correction: add the lowest-numbered missing ones (or remove the
//               lowest-numbered surplus ones) until the count equals the
//               number of ones in the modulator pattern.
// It also checks that changing the measurements without a `sample` pulse
// has no effect, and that the output appears one clock after the input.
module tb_flc_balancer;
  import flc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #50 clk = ~clk;

  int checks = 0, failures = 0;

  // Seven levels.
  logic       sample;
  logic [5:0] pwm7;
  logic [4:0] low7;
  fx_t        cur;
  logic [5:0] out7;
  // Five levels.
  logic [3:0] pwm5;
  logic [2:0] low5;
  logic [3:0] out5;

  flc_balancer #(.NLEV(7)) dut7 (
    .clk, .rst_n, .sample, .pwm_in(pwm7), .uc_low(low7), .i_in(cur), .bal_out(out7)
  );
  flc_balancer #(.NLEV(5)) dut5 (
    .clk, .rst_n, .sample, .pwm_in(pwm5), .uc_low(low5), .i_in(cur), .bal_out(out5)
  );

  function automatic int popc(input logic [31:0] v);
    int n = 0;
    for (int k = 0; k < 32; k++) n += int'(v[k]);
    return n;
  endfunction

  function automatic logic [31:0] reference(input int nsw, input logic [31:0] t,
                                            input logic [31:0] low, input bit ipos);
    logic [31:0] p = '0;
    int level, cnt, k;
    for (int x = 0; x < nsw - 1; x++) p[x+1] = !(ipos == low[x]);
    p[0]  = (ipos == low[0]);
    level = popc(t & ((32'd1 << nsw) - 1));
    cnt   = popc(p);
    k     = 0;
    while (cnt != level) begin
      if (cnt < level && !p[k]) begin p[k] = 1'b1; cnt++; end
      else if (cnt > level && p[k]) begin p[k] = 1'b0; cnt--; end
      k++;
    end
    return p;
  endfunction

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #(100 * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] l7;
    logic [2:0] l5;
    bit         ip;
    sample = 1'b0; pwm7 = '0; pwm5 = '0; low7 = '0; low5 = '0; cur = '0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    check("reset", 32'(out7), 32'd0);
    rst_n = 1'b1;

    for (int s = 0; s < 2; s++) begin
      for (int c = 0; c < 32; c++) begin
        ip = (s == 1);
        l7 = 5'(c);
        l5 = 3'(c);
        // Load the measurements.
        @(negedge clk);
        low7 = l7; low5 = l5;
        cur = ip ? real_to_fx(3.5) : ((c % 3 == 0) ? fx_t'(0) : real_to_fx(-2.25));
        sample = 1'b1;
        @(negedge clk);
        sample = 1'b0;
        // Disturb the measurements: they must be ignored until the next sample.
        low7 = ~l7; low5 = ~l5; cur = ip ? real_to_fx(-1.0) : real_to_fx(1.0);
        for (int t = 0; t < 12; t++) begin
          logic [5:0] t7;
          logic [3:0] t5;
          t7 = 6'($urandom);
          t5 = 4'($urandom);
          if (t < 7) t7 = 6'((1 << t) - 1);       // every thermometer level
          if (t < 5) t5 = 4'((1 << t) - 1);
          pwm7 = t7; pwm5 = t5;
          @(negedge clk);
          check($sformatf("7L T=%b low=%b ipos=%0d", t7, l7, ip),
                32'(out7), reference(6, 32'(t7), 32'(l7), ip));
          check($sformatf("5L T=%b low=%b ipos=%0d", t5, l5, ip),
                32'(out5), reference(4, 32'(t5), 32'(l5), ip));
          check("7L level", popc(32'(out7)), popc(32'(t7)));
        end
      end
    end

    // Latency: a new pattern shows one clock later, not earlier.
    @(negedge clk);
    pwm7 = 6'b000000;
    @(negedge clk);
    pwm7 = 6'b111111;
    @(posedge clk);
    #1 check("latency 1 clock", 32'(out7), 32'h3f);
    @(negedge clk);
    pwm7 = 6'b000000;
    #1 check("no combinational path", 32'(out7), 32'h3f);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
