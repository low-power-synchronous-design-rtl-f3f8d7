// fft_tb_pkg: testbench helpers shared by the FFT testbenches: conversion of
// single precision bit patterns to real numbers, random test values and a
// straightforward O(N^2) DFT used as the independent reference.
package fft_tb_pkg;
  import fft_pkg::*;

  function automatic real fp32_to_real(input fp32_t f);
    real m;
    int  e;
    if (f[30:23] == 8'd0) return 0.0;
    e = int'(f[30:23]) - 127;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    m = m * (2.0 ** e);
    return f[31] ? -m : m;
  endfunction

  // random value in [-range, range] with three decimals, as a float pattern
  function automatic fp32_t rand_fp32(input int unsigned range);
    int v;
    v = int'($urandom_range(2 * range * 1000, 0)) - int'(range * 1000);
    return real_to_fp32(real'(v) / 1000.0);
  endfunction

  // X(k) = sum_n x(n) exp(-j 2 pi k n / N)
  function automatic void dft(input int n_pts, input real xr[], input real xi[],
                              output real yr[], output real yi[]);
    real ang;
    yr = new[n_pts];
    yi = new[n_pts];
    for (int k = 0; k < n_pts; k++) begin
      yr[k] = 0.0;
      yi[k] = 0.0;
      for (int n = 0; n < n_pts; n++) begin
        ang = -2.0 * 3.14159265358979323846 * real'((k * n) % n_pts) / real'(n_pts);
        yr[k] += xr[n] * $cos(ang) - xi[n] * $sin(ang);
        yi[k] += xr[n] * $sin(ang) + xi[n] * $cos(ang);
      end
    end
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
