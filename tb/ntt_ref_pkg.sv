// ntt_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL (plain integer arithmetic, Fermat inverse).
package ntt_ref_pkg;
  function automatic longint unsigned modpow(longint unsigned base, longint unsigned e,
                                             longint unsigned q);
    longint unsigned r = 1;
    base = base % q;
    while (e != 0) begin
      if (e[0]) r = (r * base) % q;
      base = (base * base) % q;
      e >>= 1;
    end
    return r;
  endfunction

  // a * b * 2^-rbits mod q, q prime
  function automatic longint unsigned ref_mont(longint unsigned a, longint unsigned b,
                                               longint unsigned q, int unsigned rbits);
    longint unsigned rinv;
    rinv = modpow(modpow(2, rbits, q), q - 2, q);
    return (((a * b) % q) * rinv) % q;
  endfunction

  function automatic longint unsigned ref_neg(longint unsigned x, longint unsigned q);
    return (q - x) % q;
  endfunction

  function automatic longint unsigned ref_add(longint unsigned a, longint unsigned b,
                                              longint unsigned q);
    return (a + b) % q;
  endfunction

  function automatic longint unsigned ref_sub(longint unsigned a, longint unsigned b,
                                              longint unsigned q);
    return (a + q - b) % q;
  endfunction
endpackage
