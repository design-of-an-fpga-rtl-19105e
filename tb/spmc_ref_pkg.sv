// spmc_ref_pkg: reference model functions for the trigger controller
// testbenches. Each function gives, in closed form, what a signal should be
// a given number of clock edges after reset, computed independently of the
// RTL (real-valued sine, modular arithmetic for the counters).
package spmc_ref_pkg;

  // Square wave that starts high and flips every `half` clocks, after m edges.
  function automatic bit sq_wave(int m, int half);
    return ((m / half) % 2) == 0;
  endfunction

  // Triangle 0..peak..0 after `steps` counter steps from 0, counting up first.
  function automatic int tri_wave(int steps, int peak);
    int s;
    if (peak == 0) return 0;
    s = steps % (2 * peak);
    return int'((s <= peak) ? s : 2 * peak - s);
  endfunction

  // Half-cycle sine table entry i, scaled to 2^bits - 1, sampled mid-interval.
  function automatic int sine_sample(int i, int samples, int bits);
    real pi, v;
    pi = 3.14159265358979323846;
    v  = real'((1 << bits) - 1) * $sin(pi * real'(2 * i + 1) / real'(2 * samples));
    return int'($floor(v + 0.5));
  endfunction

  // Carrier value after m clock edges (fixed peak, `div` clocks per step).
  function automatic int carrier_at(int m, int peak, int div);
    return tri_wave(m / div, peak);
  endfunction

  // Registered sine reference after m clock edges: the ROM word addressed
  // during the previous clock (address 0 during and right after reset).
  function automatic int vref_at(int m, int samples, int sdiv, int bits);
    int e;
    e = (m > 0) ? m - 1 : 0;
    return sine_sample(int'((e / sdiv) % samples), samples, bits);
  endfunction

  // Delta modulated pulse after m clock edges: the comparison "reference
  // above carrier" taken at the last carrier step edge (0 before the first).
  function automatic bit dm_at(int m, int peak, int div, int samples, int sdiv, int bits);
    int e;
    e = (m / div) * div;
    if (e == 0) return 1'b0;
    return vref_at(e - 1, samples, sdiv, bits) > carrier_at(e - 1, peak, div);
  endfunction

  // Table I switch-pair triggers {s14a, s23a, s23b, s14b} for one mode.
  // inverter = 1 selects X2 as the output wave, otherwise X3.
  function automatic logic [3:0] table1(bit inverter, bit x1, bit x2, bit x3);
    logic [3:0] r;
    if (inverter) r = {x2 & x1, !x2 & x1, !x1 & x2, !x1 & !x2};
    else          r = {x1 & x3, x1 & !x3, !x1 & x3, !x1 & !x3};
    return r;
  endfunction

endpackage
