// rsa_ref_pkg -- reference arithmetic for the RSA engine testbenches.
//
// Plain big-integer modular arithmetic (the simulator's wide * and %), used
// to work out expected values independently of the bit-serial hardware:
//   powmod(b, x, n)      = b^x mod n
//   mont_ok(p, a, b, k, n): p < n and p * 2^k == a * b (mod n)
//   tag_ok(c, m, e, k, n):  c < n and c * 2^(k(e-1)) == m^e (mod n)
//   engine_cycles(k, e): cycles from start to stop of the whole engine, not
//                        counting reduction subtractions, worked out from
//                        the two state machines (see the README)
// Numbers up to 1024 bits; products are held in 2048 bits.
package rsa_ref_pkg;
  localparam int unsigned RW = 1024;
  typedef logic [2*RW-1:0] big_t;

  function automatic big_t mulmod(big_t a, big_t b, big_t n);
    return (a * b) % n;
  endfunction

  function automatic big_t powmod(big_t b, big_t x, big_t n);
    big_t r = 1 % n;
    big_t p = b % n;
    int   top = 0;
    for (int i = 0; i < 2*RW; i++) if (x[i]) top = i;
    for (int i = 0; i <= top; i++) begin
      if (x[i]) r = mulmod(r, p, n);
      p = mulmod(p, p, n);
    end
    return r;
  endfunction

  // 2^(k*(e-1)) mod n: the reader's correction constant.
  function automatic big_t reader_x(big_t e, int k, big_t n);
    return powmod(2, big_t'(k) * (e - 1), n);
  endfunction

  function automatic bit mont_ok(big_t p, big_t a, big_t b, int k, big_t n);
    return (p < n) && (mulmod(p, powmod(2, big_t'(k), n), n) == mulmod(a, b, n));
  endfunction

  function automatic bit tag_ok(big_t c, big_t m, big_t e, int k, big_t n);
    return (c < n) && (mulmod(c, reader_x(e, k, n), n) == powmod(m, e, n));
  endfunction
  // Per exponent bit below the top one: a square costs 4k+6 cycles and
  // a multiply 4k+6, plus the test and count states (2 cycles); a bit before
  // the leading one costs 3. Three more for start, seeding and output.
  function automatic longint engine_cycles(int k, big_t e);
    longint c = 3;
    bit primed = e[k-1];
    for (int i = k-2; i >= 0; i--) begin
      if (primed) begin
        c += 4*k + 6 + 2;
        if (e[i]) c += 4*k + 6;
      end else begin
        c += 3;
        if (e[i]) primed = 1;
      end
    end
    return c;
  endfunction
endpackage
