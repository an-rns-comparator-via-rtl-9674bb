// tb_phi_ref_pkg: reference arithmetic for the testbenches of the
// {2^n-1, 2^n, 2^(n+1)-1} comparator.
//
// Everything here works on plain integers: the moduli, the forward
// conversion of an integer X to its three residues, and the partition and
// section numbers taken straight from their definition
//   p1 = X div (m2*m3),  p2 = (X mod m2*m3) div m3,
// which is independent of the residue formulas the hardware uses.
package tb_phi_ref_pkg;
  function automatic longint m1(int n); return (longint'(1) << n) - 1;       endfunction
  function automatic longint m2(int n); return (longint'(1) << n);           endfunction
  function automatic longint m3(int n); return (longint'(1) << (n + 1)) - 1; endfunction
  function automatic longint range_m(int n); return m1(n) * m2(n) * m3(n);   endfunction

  function automatic longint res1(int n, longint x); return x % m1(n); endfunction
  function automatic longint res2(int n, longint x); return x % m2(n); endfunction
  function automatic longint res3(int n, longint x); return x % m3(n); endfunction

  function automatic longint part_p1(int n, longint x);
    return x / (m2(n) * m3(n));
  endfunction

  function automatic longint sect_p2(int n, longint x);
    return (x % (m2(n) * m3(n))) / m3(n);
  endfunction

  // uniform-ish random value in [0, lim) for lim below 2^62
  function automatic longint rand_below(longint lim);
    longint r;
    r = {$urandom(), $urandom()};
    r = r & 64'h3fff_ffff_ffff_ffff;
    return r % lim;
  endfunction
endpackage
