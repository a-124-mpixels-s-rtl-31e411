// jbf_ref_pkg -- reference arithmetic for the filter testbenches.
//
// Independent integer model of the filter: the range weight of a bin distance
// d is round(exp(-(4d)^2 / (2 sigma^2)) * 1023) for d < 32 and 0 beyond; the
// result of a window is round(Nu / De) saturated to 255, 0 when De is 0.
package jbf_ref_pkg;

  function automatic int unsigned range_weight(int d, real sigma);
    real v;
    if (d < 0) d = -d;
    if (d >= 32) return 0;
    v = $exp(-((4.0 * d) * (4.0 * d)) / (2.0 * sigma * sigma)) * 1023.0;
    return int'($floor(v + 0.5));
  endfunction

  function automatic int unsigned div_round(longint unsigned nu, longint unsigned de);
    longint unsigned q;
    if (de == 0) return 0;
    q = (nu + de / 2) / de;
    return (q > 255) ? 255 : int'(q);
  endfunction

endpackage
