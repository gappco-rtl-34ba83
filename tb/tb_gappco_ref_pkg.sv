// tb_gappco_ref_pkg: reference arithmetic for the GAPPCO testbenches.
//
// Models the coprocessor's number format (signed 32-bit fixed point with 16
// fraction bits, saturating) with 64-bit integers, and converts to and from
// real numbers so checks can also be stated in ordinary decimal values.
package tb_gappco_ref_pkg;

  localparam longint MAXV = 64'sd2147483647;
  localparam longint MINV = -64'sd2147483648;

  function automatic longint clamp(input longint v);
    if (v > MAXV) return MAXV;
    if (v < MINV) return MINV;
    return v;
  endfunction

  function automatic int ref_neg(input int v, input bit s);
    return s ? int'(clamp(-longint'(v))) : v;
  endfunction

  // Product rounded toward minus infinity, saturated.
  function automatic int ref_mul(input int a, input bit sa, input int b, input bit sb);
    longint p, q;
    p = longint'(ref_neg(a, sa)) * longint'(ref_neg(b, sb));
    q = p / 65536;
    if (p < 0 && q * 65536 != p) q = q - 1;
    return int'(clamp(q));
  endfunction

  function automatic int ref_add(input int a, input int b);
    return int'(clamp(longint'(a) + longint'(b)));
  endfunction

  function automatic int to_fx(input real r);
    return int'($rtoi(r * 65536.0));
  endfunction

  function automatic real to_real(input int v);
    return real'(v) / 65536.0;
  endfunction

endpackage
