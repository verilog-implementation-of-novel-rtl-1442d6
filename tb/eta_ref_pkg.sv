// eta_ref_pkg: behavioural reference of the error-tolerant addition rule,
// written as a direct bit scan (no CSGC groups, no gate structure) so that the
// testbenches can check the RTL against an independent model.
//
//   high part: ordinary addition of bits [w-1:n], carry-in 0, carry-out kept;
//   low part : scan bits n-1 down to 0; sum bit = a ^ b until the first
//              position with a = b = 1, from which every sum bit is 1.
//
// Also holds the accuracy measures used by the accuracy testbench:
//   OE  = |Rc - Re|, ACC = 1 - OE / Rc, a result is acceptable if ACC > MAA.
package eta_ref_pkg;

  typedef longint unsigned u64_t;

  function automatic u64_t mask(int unsigned w);
    return (w >= 64) ? '1 : ((u64_t'(1) << w) - 1);
  endfunction

  // Approximate sum of the error-tolerant adder, w total bits, n inaccurate.
  function automatic u64_t eta_sum(u64_t a, u64_t b, int unsigned w, int unsigned n);
    u64_t hi, lo;
    bit   forced;
    hi = (((a & mask(w)) >> n) + ((b & mask(w)) >> n)) << n;
    lo = 0;
    forced = 1'b0;
    for (int i = int'(n) - 1; i >= 0; i--) begin
      if (a[i] && b[i]) forced = 1'b1;
      lo[i] = forced ? 1'b1 : (a[i] ^ b[i]);
    end
    return hi | lo;
  endfunction

  // Expected control vector: position i high when some position j >= i of
  // the low part holds two ones.
  function automatic u64_t ctl_ref(u64_t a, u64_t b, int unsigned n);
    u64_t c;
    bit   seen;
    c = 0;
    seen = 1'b0;
    for (int i = int'(n) - 1; i >= 0; i--) begin
      seen = seen | (a[i] & b[i]);
      c[i] = seen;
    end
    return c;
  endfunction

  // ACC > maa_pct percent, in integers: 100 * (Rc - OE) > maa_pct * Rc.
  // Rc = 0 only for 0 + 0, which the adder gets right.
  function automatic bit acceptable(u64_t rc, u64_t re, int unsigned maa_pct);
    u64_t oe;
    oe = (rc > re) ? rc - re : re - rc;
    if (rc == 0) return oe == 0;
    if (oe > rc) return 1'b0;
    return 100 * (rc - oe) > u64_t'(maa_pct) * rc;
  endfunction

endpackage
