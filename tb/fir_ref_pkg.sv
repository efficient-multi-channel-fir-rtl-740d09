// fir_ref_pkg: reference arithmetic for the filter-bank testbenches.
//
// fir_ref() computes a filter output the way the hardware defines it, but
// directly from 32-bit integers: each value is cut into a signed upper half
// (x >>> 16) and an unsigned lower half (x & 0xFFFF); the two xsum products
// are summed over all taps and scaled down by 16 bits, the MSW*MSW products
// are added, and the sum is doubled and saturated to 32 bits.
// fir_ideal() gives the exact value sum(c*s)/2^31 in floating point, used to
// bound the error of the three-product scheme.
package fir_ref_pkg;

  function automatic longint hi16(input int x);
    return longint'(x) >>> 16;
  endfunction

  function automatic longint lo16(input int x);
    return longint'(x) & 64'hFFFF;
  endfunction

  // c[k] meets s[k]; s[0] is the newest sample.
  function automatic int fir_ref(input int c[$], input int s[$], output bit sat);
    longint xsum = 0, mm = 0, acc;
    for (int k = 0; k < c.size(); k++) begin
      xsum += lo16(c[k]) * hi16(s[k]) + hi16(c[k]) * lo16(s[k]);
      mm    += hi16(c[k]) * hi16(s[k]);
    end
    acc = ((xsum >>> 16) + mm) * 2;
    sat = 1'b0;
    if (acc > 64'sh7FFF_FFFF)        begin sat = 1'b1; return 32'h7FFF_FFFF; end
    if (acc < -64'sh8000_0000)       begin sat = 1'b1; return 32'h8000_0000; end
    return int'(acc);
  endfunction

  function automatic real fir_ideal(input int c[$], input int s[$]);
    real r = 0.0;
    for (int k = 0; k < c.size(); k++) r += real'(c[k]) * real'(s[k]);
    return r / 2147483648.0;
  endfunction

endpackage
