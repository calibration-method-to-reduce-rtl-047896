// log_ref_pkg: arithmetic reference for the converter testbenches.
//
// Computes the expected codes directly from the definition, without the
// gate structure of the design: the integer part is the index of the highest
// set bit (0 for inputs 0 and 1), the Mitchell fraction is the input with its
// leading one removed, shifted left so that it fills N-1 bits, and the
// calibrated fraction adds 2^(N-5) (the code 0.0001) when the six leading
// fraction bits, read as a number, lie in 5..56, i.e. between 0.000101 and
// 0.111000.
package log_ref_pkg;
  function automatic int ref_msb(input longint unsigned x, input int n);
    ref_msb = 0;
    for (int i = 0; i < n; i++) if (x[i]) ref_msb = i;
  endfunction

  function automatic longint unsigned ref_frac(input longint unsigned x, input int n);
    int m;
    m = ref_msb(x, n);
    if (x == 0) return 0;
    return (x - (64'd1 << m)) << (n - 1 - m);
  endfunction

  function automatic bit ref_cal_en(input longint unsigned frac, input int n);
    longint unsigned lead;
    lead = frac >> (n - 7);
    return (lead >= 5) && (lead <= 56);
  endfunction

  function automatic longint unsigned ref_cal_frac(input longint unsigned frac, input int n);
    if (ref_cal_en(frac, n)) return frac + (64'd1 << (n - 5));
    return frac;
  endfunction
endpackage
