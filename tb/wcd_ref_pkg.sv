// Reference arithmetic of the Wronskian change detector for testbenches.
// Plain integer arithmetic (division and multiplication operators, no
// pipelining), written independently of the RTL datapath.
package wcd_ref_pkg;

  // D(x,y): r = floor(32x/y) saturated at 255; D = (r*(r-32))>>5 saturated
  // at 255, zero when r <= 32.
  function automatic int unsigned d_ref(input int unsigned x, input int unsigned y);
    int unsigned q, p;
    if (y == 0) q = 255;
    else q = (x * 32) / y;
    if (q > 255) q = 255;
    if (q <= 32) return 0;
    p = (q * (q - 32)) >> 5;
    return (p > 255) ? 255 : p;
  endfunction

  function automatic int unsigned sat8(input int unsigned v);
    return (v > 255) ? 255 : v;
  endfunction

endpackage
