// flc_pkg: types and constants shared by the flying-capacitor converter
// design (balancer, modulator and the plant model used to exercise it).
//
// Physical quantities of the plant model (voltages, currents) are carried as
// signed fixed-point numbers, fx_t, with FX_FRAC fractional bits: a voltage
// of 600 V is 600 * 2**24.  48 bits leave ample headroom for the 600 V DC
// link and currents of a few hundred amperes.  The format is this design's
// own choice; the original model only states the equations it evaluates.
package flc_pkg;

  // Fixed-point format of the plant model.
  parameter int unsigned FX_W    = 48;
  parameter int unsigned FX_FRAC = 24;
  typedef logic signed [FX_W-1:0] fx_t;

  // Modulation reference: signed 16-bit, full scale +/-32767.
  parameter int unsigned REF_W = 16;
  typedef logic signed [REF_W-1:0] ref_t;

  // Converts a real number to fx_t, rounding to nearest (for parameters
  // and test benches).
  function automatic fx_t real_to_fx(input real r);
    return fx_t'(longint'(r * (2.0 ** FX_FRAC)));
  endfunction

  // Converts fx_t back to real (test benches).
  function automatic real fx_to_real(input fx_t v);
    return real'(v) / (2.0 ** FX_FRAC);
  endfunction

endpackage
