// tb_fix_pkg: reference fixed-point arithmetic for the testbenches, written
// independently of the design on 64-bit integers: Q15.16 words, products
// shifted right arithmetically by 16, every result saturated to 32 bits.
package tb_fix_pkg;
  localparam longint ONE  = 64'sd65536;
  localparam longint WMAX = 64'sd2147483647;
  localparam longint WMIN = -64'sd2147483648;

  function automatic longint sat(longint x);
    return (x > WMAX) ? WMAX : (x < WMIN) ? WMIN : x;
  endfunction
  function automatic longint mul(longint a, longint b);
    return sat((a * b) >>> 16);
  endfunction
  function automatic longint add(longint a, longint b);
    return sat(a + b);
  endfunction
  function automatic longint coef(int num, int den);
    return (longint'(num) * ONE) / den;
  endfunction
  // F = 2 lambda v (1 - v) (acc + I)
  function automatic longint iso_f(longint acc, longint v, longint bias, longint lam);
    return mul(mul(mul(add(lam, lam), v), add(ONE, -v)), add(acc, bias));
  endfunction
  function automatic longint rnd(int range);
    return longint'($urandom_range(2*range)) - range;
  endfunction
endpackage
