// esn_ref_pkg: reference arithmetic for the echo-state-network testbenches.
//
// Integer models of the fixed-point operations (Q16.16), written from the
// formulas rather than from the RTL: the tanh chord table is rebuilt here
// from $tanh at run time, Y_k = round(tanh(A_k)*2^16) and
// S_k = round((Y_{k+1}-Y_k)/(A_{k+1}-A_k)).
package esn_ref_pkg;
  localparam int NSEG = 11;

  function automatic real brk(int k);
    real b[12] = '{0.0, 0.25, 0.5, 0.75, 1.0, 1.25, 1.5, 1.75, 2.0, 2.5, 3.0, 4.0};
    return b[k];
  endfunction

  function automatic longint yk(int k);
    return longint'($floor($tanh(brk(k)) * 65536.0 + 0.5));
  endfunction

  function automatic longint sk(int k);
    return longint'($floor(real'(yk(k+1) - yk(k)) / (brk(k+1) - brk(k)) + 0.5));
  endfunction

  // tanh of a Q16.16 value, as the chord approximation.
  function automatic longint tanh_q(longint a);
    longint mag, y, ak;
    int seg;
    mag = (a < 0) ? -a : a;
    if (mag >= longint'(brk(NSEG) * 65536.0)) y = yk(NSEG);
    else begin
      seg = 0;
      for (int k = 1; k < NSEG; k++)
        if (mag >= longint'(brk(k) * 65536.0)) seg = k;
      ak = longint'(brk(seg) * 65536.0);
      y  = yk(seg) + ((sk(seg) * (mag - ak)) >>> 16);
    end
    return (a < 0) ? -y : y;
  endfunction

  // (1-delta)*x + delta*s, floor-shifted back to Q16.16.
  function automatic longint leaky_q(longint x_old, longint s, longint leak);
    return ((65536 - leak) * x_old + leak * s) >>> 16;
  endfunction

  function automatic longint prod_q(longint a, longint b);
    return (a * b) >>> 16;
  endfunction

  function automatic longint sat32(longint v);
    if (v > 64'sd2147483647)  return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  function automatic longint sx32(logic [31:0] v);
    return longint'(signed'(v));
  endfunction

  // Ternary code {neg,pos} to -1/0/+1 (11 counts as 0).
  function automatic longint tval(logic [1:0] c);
    return (c == 2'b01) ? 1 : (c == 2'b10) ? -1 : 0;
  endfunction

  function automatic real q2r(longint v);
    return real'(v) / 65536.0;
  endfunction
endpackage
