// Reference model of the Axiline arithmetic for the testbenches, written on
// plain integers (16-bit numbers with 8 fraction bits): saturation,
// fixed-point product, the piecewise-linear sigmoid, the per-algorithm
// prediction and gradient, and the SGD weight update.
package tb_axl_ref_pkg;
  localparam int ONE = 256;

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int fx(int a, int b);
    longint p = longint'(a) * longint'(b);
    return sat16(p >>> 8);
  endfunction

  function automatic int sig(int s);
    int a = (s < 0) ? ((s == -32768) ? 32767 : -s) : s;
    int f;
    if (a >= 5 * ONE)           f = ONE;
    else if (a >= 608)          f = (a >>> 5) + 216;   // 2.375 .. 5
    else if (a >= ONE)          f = (a >>> 3) + 160;   // 1 .. 2.375
    else                        f = (a >>> 2) + 128;   // 0 .. 1
    return (s < 0) ? ONE - f : f;
  endfunction

  // alg: 0 linear regression, 1 logistic regression, 2 SVM
  function automatic void stage2(int alg, longint acc, int y, int lr, output int h, output int g);
    int s = sat16(acc >>> 8);
    case (alg)
      0: begin h = s;      g = fx(lr, sat16(longint'(h) - y)); end
      1: begin h = sig(s); g = fx(lr, sat16(longint'(h) - y)); end
      default: begin h = s; g = (fx(y, s) < ONE) ? -fx(lr, y) : 0; end
    endcase
  endfunction

  function automatic int sgd(int w, int g, int x, int decay);
    return sat16(longint'(fx(decay, w)) - longint'(fx(g, x)));
  endfunction
endpackage
