// wola_ref_pkg -- reference arithmetic for the windowing testbenches.
//
// weight() is x*h/2^15 rounded to nearest (ties up) and clamped to the
// 16-bit range, computed with 64-bit integers independently of the RTL.
package wola_ref_pkg;
  function automatic logic [15:0] weight(logic [15:0] x, logic [15:0] h, output bit s);
    longint p, q;
    p = longint'($signed(x)) * longint'($signed(h)) + 16384;
    q = (p >= 0) ? p / 32768 : -((-p + 32767) / 32768);
    s = 0;
    if (q > 32767)  begin q = 32767;  s = 1; end
    if (q < -32768) begin q = -32768; s = 1; end
    return 16'(q);
  endfunction

  function automatic logic [127:0] weight_word(logic [127:0] xw, logic [127:0] hw, output int nsat);
    logic [127:0] r;
    bit s;
    nsat = 0;
    for (int l = 0; l < 8; l++) begin
      r[l*16 +: 16] = weight(xw[l*16 +: 16], hw[l*16 +: 16], s);
      nsat += int'(s);
    end
    return r;
  endfunction
endpackage
