// tb_pkg: helpers shared by the testbenches: conversion between fp32 bit
// patterns and real numbers, relative comparison, and a real-valued
// reference of the pair force and potential the accelerator computes.
package tb_pkg;

  function automatic real fp2r(input logic [31:0] f);
    real m;
    if (f[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    m = m * $pow(2.0, real'(int'(f[30:23]) - 127));
    return f[31] ? -m : m;
  endfunction

  function automatic logic [31:0] r2fp(input real r);
    logic [63:0] d;
    logic [23:0] m;
    int e;
    if (r == 0.0) return 32'h0;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b0, d[51:29]} + {23'b0, d[28]};
    if (m[23]) begin
      e = e + 1;
      m = 24'h0;
    end
    if (e <= 0) return {d[63], 31'b0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  function automatic real rabs(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  // |got - want| <= rel * max(|want|, floor)
  function automatic bit close(input real got, input real want, input real rel, input real floor);
    real m;
    m = rabs(want) > floor ? rabs(want) : floor;
    return rabs(got - want) <= rel * m;
  endfunction

  // Minimum image of one distance component.
  function automatic real min_image(input real d, input real box);
    if (d > box / 2.0) return d - box;
    if (d < -box / 2.0) return d + box;
    return d;
  endfunction

  // Shifted Lennard-Jones and cutoff Coulomb: the scalar s with f = s * r_ij,
  // and the shifted pair potential v.
  function automatic void pair_sv(input real r2, input real a, input real b, input real fs,
                                  input real ps, input real qq, input real rc, output real s,
                                  output real v);
    real r, ir2, ir6;
    r = $sqrt(r2);
    ir2 = 1.0 / r2;
    ir6 = ir2 * ir2 * ir2;
    s = (12.0 * a * ir6 - 6.0 * b) * ir6 * ir2 - fs / r + qq * (ir2 - 1.0 / (rc * rc)) / r;
    v = a * ir6 * ir6 - b * ir6 + fs * r - ps + qq * (1.0 / r - 2.0 / rc + r / (rc * rc));
  endfunction

  // The shift constants of a type pair for cutoff rc.
  function automatic void lj_shift(input real a, input real b, input real rc, output real fs,
                                   output real ps);
    real v;
    fs = 12.0 * a / $pow(rc, 13.0) - 6.0 * b / $pow(rc, 7.0);
    v  = a / $pow(rc, 12.0) - b / $pow(rc, 6.0);
    ps = v + rc * fs;
  endfunction

endpackage
