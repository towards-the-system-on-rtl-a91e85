// tb_fx_pkg -- testbench helpers: conversion between real numbers and the
// controller's fixed-point format, and a tolerance comparison.
package tb_fx_pkg;
  import vc_pkg::*;

  function automatic real f2r(input fx_t x);
    return real'(x) / (2.0 ** FRAC);
  endfunction

  function automatic fx_t r2f(input real r);
    real s;
    s = r * (2.0 ** FRAC);
    if (s >= 2147483647.0) return FX_MAX;
    if (s <= -2147483648.0) return FX_MIN;
    return fx_t'($rtoi(s));
  endfunction

  function automatic bit near(input real got, input real exp, input real tol);
    real d;
    d = got - exp;
    if (d < 0.0) d = -d;
    return d <= tol;
  endfunction
endpackage
