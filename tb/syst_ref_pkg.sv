// syst_ref_pkg: bit-serial reference model of the Montgomery multiplier array, for the
// testbenches. It runs the loop
//     P := PI;  for i: q := (P[0] + A[i]*B_i[0]) mod 2;  P := ((P + A[i]*B_i + q*M_i) / 2) mod 2^n
// with integer arithmetic, where B_i and M_i are the multiplicand and modulus seen by row i
// (they differ from row to row only while latches hold old values). The mod 2^n step
// mirrors the array keeping n bits of partial product; the model reports how often the
// modulus was added and how often that step discarded a nonzero bit.
package syst_ref_pkg;

  typedef longint unsigned u64_t;

  typedef struct {
    u64_t p;          // result
    int   q_ones;     // rows in which the modulus multiple was added
    int   truncated;  // rows whose partial product reached 2^n and lost its top bit
  } ref_result_t;

  function automatic ref_result_t ref_mont(input int n, input u64_t a, input u64_t b_rows[],
                                           input u64_t m_rows[], input u64_t p0);
    ref_result_t r;
    u64_t mask = (u64_t'(1) << n) - 1;
    r.p = p0 & mask;
    r.q_ones = 0;
    r.truncated = 0;
    for (int i = 0; i < n; i++) begin
      u64_t ai   = (a >> i) & 1;
      u64_t q    = (r.p ^ (ai & b_rows[i])) & 1;
      u64_t full = (r.p + ai * b_rows[i] + q * m_rows[i]) >> 1;
      if (q != 0) r.q_ones++;
      if ((full & ~mask) != 0) r.truncated++;
      r.p = full & mask;
    end
    return r;
  endfunction

  // Exact Montgomery product check: p * 2^n == a*b (mod m), using no division by 2^n.
  function automatic bit mont_congruent(input int n, input u64_t a, input u64_t b,
                                        input u64_t m, input u64_t p);
    u64_t lhs = p % m;
    for (int i = 0; i < n; i++) lhs = (lhs * 2) % m;
    return lhs == ((a % m) * (b % m)) % m;
  endfunction

endpackage
