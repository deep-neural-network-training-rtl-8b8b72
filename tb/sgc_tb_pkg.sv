// sgc_tb_pkg: reference arithmetic for the testbenches, written
// independently of the RTL: Q16.16 multiply with truncation, and the xorshift
// sequence that decides which neurons dropout keeps.
package sgc_tb_pkg;

  function automatic int ref_mul(int a, int b);
    longint p;
    p = longint'(a) * longint'(b);
    return int'(p >>> 16);
  endfunction

  function automatic int unsigned ref_xs(int unsigned v);
    v = v ^ (v << 13);
    v = v ^ (v >> 17);
    v = v ^ (v << 5);
    return v;
  endfunction

  // Keep bits of neurons 0..n-1 for a seed and a rate.
  function automatic void ref_keep(int unsigned seed, int unsigned rate, int n,
                                   ref bit keep[]);
    int unsigned r;
    keep = new[n];
    r = (seed == 0) ? 32'h2545_F491 : seed;
    for (int i = 0; i < n; i++) begin
      keep[i] = (r >= rate);
      r = ref_xs(r);
    end
  endfunction

  // Small random Q16.16 value in about [-2, 2).
  function automatic int rnd_fx();
    return int'($urandom_range(262143)) - 131072;
  endfunction

endpackage
