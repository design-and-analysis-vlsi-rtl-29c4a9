// Reference models shared by the multiplier testbenches.
//
// mm_ref#(K) works at word level with plain integer arithmetic, independent
// of the carry-save datapath:
//   mscs(a, b, n)   : bit-serial Montgomery product over K+2 iterations,
//                     T = (T + A_i*B + q_i*N) / 2 with q_i = (T + A_i*B) mod 2;
//                     returns the exact value the MSCS-MM multiplier must give;
//   scs_new(a, b, n): the same with B^ = B + B_0*N and K+3 iterations
//                     (SCS-MM-New);
//   modmul, to_mont : (a*b) mod n and (x * 2^sh) mod n on double-width values.
package mm_ref_pkg;
  class mm_ref #(int unsigned K = 4);
    typedef logic [K+3:0]   val_t;
    typedef logic [2*K+9:0] wide_t;

    static function val_t mont(val_t a, val_t b, val_t n, int iters);
      val_t t;
      t = '0;
      for (int i = 0; i < iters; i++) begin
        logic ai, qi;
        ai = a[i];
        qi = t[0] ^ (ai & b[0]);
        t = (t + (ai ? b : '0) + (qi ? n : '0)) >> 1;
      end
      return t;
    endfunction

    static function val_t mscs(val_t a, val_t b, val_t n);
      return mont(a, b, n, K + 2);
    endfunction

    static function val_t scs_new(val_t a, val_t b, val_t n);
      return mont(a, b[0] ? b + n : b, n, K + 3);
    endfunction

    static function val_t modmul(val_t a, val_t b, val_t n);
      wide_t p;
      p = wide_t'(a) * wide_t'(b);
      return val_t'(p % wide_t'(n));
    endfunction

    static function val_t to_mont(val_t x, val_t n, int sh);
      wide_t p;
      p = wide_t'(x) << sh;
      return val_t'(p % wide_t'(n));
    endfunction
  endclass
endpackage
