// rc4_ref_pkg: a plain software model of RC4 with an N-entry state array,
// used by the testbenches as the independent reference.
//   schedule(): S[k] = k; for i in 0..N-1: j = (j + S[i] + K[i mod len]) mod N,
//               swap S[i], S[j]; then i = j = 0.
//   next():     i = (i+1) mod N; j = (j + S[i]) mod N; swap; return S[(S[i]+S[j]) mod N].
package rc4_ref_pkg;

  typedef byte unsigned bytes_t[];

  // bytes of a string
  function automatic bytes_t str2bytes(string s);
    bytes_t b;
    b = new[s.len()];
    foreach (b[n]) b[n] = s[n];
    return b;
  endfunction

  // elements first .. first+count-1 of an array
  function automatic bytes_t slice(bytes_t a, int first, int count);
    bytes_t b;
    b = new[count];
    foreach (b[n]) b[n] = a[first + n];
    return b;
  endfunction

  class rc4_model;
    int unsigned n;
    int unsigned s[];
    int unsigned i, j;

    function new(int unsigned n_);
      n = n_;
      s = new[n];
      foreach (s[k]) s[k] = k;
      i = 0;
      j = 0;
    endfunction

    function void schedule(byte unsigned key[], int unsigned len);
      int unsigned jj, tmp;
      for (int unsigned k = 0; k < n; k++) s[k] = k;
      jj = 0;
      for (int unsigned ii = 0; ii < n; ii++) begin
        jj = (jj + s[ii] + int'(key[ii % len])) % n;
        tmp = s[ii];
        s[ii] = s[jj];
        s[jj] = tmp;
      end
      i = 0;
      j = 0;
    endfunction

    function byte unsigned next();
      int unsigned ii, jj, tmp;
      ii = (i + 1) % n;
      jj = (j + s[ii]) % n;
      tmp = s[ii];
      s[ii] = s[jj];
      s[jj] = tmp;
      i = ii;
      j = jj;
      return 8'(s[(s[ii] + s[jj]) % n]);
    endfunction
  endclass

endpackage
