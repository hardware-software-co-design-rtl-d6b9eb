// rsa_ref_pkg: reference arithmetic for the testbenches.
//
// These functions compute expected values by methods unlike the RTL's:
// Montgomery products bit-serially (radix 2, one bit of a per step), the
// inverse n' by Newton iteration, and modular exponentiation by plain
// square-and-multiply on full-width integers with '%'.
package rsa_ref_pkg;

  typedef logic [63:0] u64;

  // a * b * 2^-64 mod n, for odd n and a, b < n.
  function automatic u64 mont_ref(input u64 a, input u64 b, input u64 n);
    logic [65:0] acc;
    acc = '0;
    for (int i = 0; i < 64; i++) begin
      if (a[i]) acc = acc + {2'b00, b};
      if (acc[0]) acc = acc + {2'b00, n};
      acc = acc >> 1;
    end
    if (acc >= {2'b00, n}) acc = acc - {2'b00, n};
    return acc[63:0];
  endfunction

  // -n^-1 mod 2^64 for odd n.
  function automatic u64 neg_inv64(input u64 n);
    u64 x;
    x = n;                       // correct to 3 bits for odd n
    for (int i = 0; i < 6; i++) x = x * (64'd2 - n * x);
    return -x;
  endfunction

  // (a * b) mod n with a full 128-bit product.
  function automatic u64 mulmod(input u64 a, input u64 b, input u64 n);
    logic [127:0] p;
    p = {64'd0, a} * {64'd0, b};
    return 64'(p % {64'd0, n});
  endfunction

  // x^e mod n by left-to-right square-and-multiply.
  function automatic u64 modexp(input u64 x, input u64 e, input u64 n);
    u64 r;
    r = 64'd1 % n;
    for (int i = 63; i >= 0; i--) begin
      r = mulmod(r, r, n);
      if (e[i]) r = mulmod(r, x, n);
    end
    return r;
  endfunction

  // 2^k mod n by doubling.
  function automatic u64 pow2mod(input int k, input u64 n);
    logic [64:0] r;
    r = 65'd1 % {1'b0, n};
    for (int i = 0; i < k; i++) begin
      r = r << 1;
      if (r >= {1'b0, n}) r = r - {1'b0, n};
    end
    return r[63:0];
  endfunction

  // A random odd 64-bit modulus with the top bit set.
  function automatic u64 rand_modulus();
    return {1'b1, 31'($urandom), $urandom} | 64'd1;
  endfunction

  // A random value below n.
  function automatic u64 rand_below(input u64 n);
    return {$urandom, $urandom} % n;
  endfunction

endpackage
