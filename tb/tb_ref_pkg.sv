// tb_ref_pkg: reference arithmetic for the testbenches, written
// independently of the design: schoolbook modular arithmetic on wide
// integers and a direct O(n^2) evaluation of the number theoretic transform.
package tb_ref_pkg;
  typedef logic [127:0] u128;

  function automatic u128 rmul(u128 a, u128 b, u128 q);
    logic [255:0] p;
    p = 256'(a) * 256'(b);
    return u128'(p % 256'(q));
  endfunction

  function automatic u128 rpow(u128 b, u128 e, u128 q);
    u128 r;
    r = 1;
    b = b % q;
    while (e != 0) begin
      if (e[0]) r = rmul(r, b, q);
      b = rmul(b, b, q);
      e = e >> 1;
    end
    return r;
  endfunction

  // modular inverse by Fermat (q prime)
  function automatic u128 rinv(u128 a, u128 q);
    return rpow(a, q - 2, q);
  endfunction

  function automatic int unsigned rbr(int unsigned x, int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < bits; i++) if (x & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  // A_k = sum_j a_j * w^(j*k) mod q, evaluated by Horner's rule per k
  function automatic void dft(input u128 a[], input u128 w, input u128 q, output u128 r[]);
    int n;
    n = a.size();
    r = new[n];
    for (int k = 0; k < n; k++) begin
      u128 wk, acc;
      wk  = rpow(w, u128'(k), q);
      acc = 0;
      for (int j = n - 1; j >= 0; j--) acc = (rmul(acc, wk, q) + a[j]) % q;
      r[k] = acc;
    end
  endfunction
endpackage
