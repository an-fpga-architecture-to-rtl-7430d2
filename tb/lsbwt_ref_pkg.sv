// Reference model for the LSBWT testbenches: rotation comparison, the
// expected number of tied characters per iteration and the expected cycle
// count 2n + 2 + sum_i (m_i + 2). It works on the string itself, with no
// knowledge of the hardware. Strings are passed as dynamic byte arrays.
package lsbwt_ref_pkg;

  // Length of the common prefix of the rotations starting at a and b,
  // capped at the string length.
  function automatic int rot_lcp(input byte unsigned s[], input int a, input int b);
    int n = s.size();
    int l = 0;
    while (l < n && s[(a + l) % n] == s[(b + l) % n]) l++;
    return l;
  endfunction

  // -1, 0 or 1 as rotation a is below, equal to or above rotation b.
  function automatic int rot_cmp(input byte unsigned s[], input int a, input int b);
    int n = s.size();
    int l = rot_lcp(s, a, b);
    if (l == n) return 0;
    return (s[(a + l) % n] < s[(b + l) % n]) ? -1 : 1;
  endfunction

  // Tied characters per substitution iteration x = 1, 2, ...: the number of
  // rotations whose first x characters are shared with another rotation.
  // Iterations stop when none are tied, or after x = n-1.
  function automatic void tied_counts(input byte unsigned s[], output int m[$]);
    int n = s.size();
    int maxl[] = new[n];
    m.delete();
    for (int i = 0; i < n; i++) begin
      maxl[i] = 0;
      for (int j = 0; j < n; j++)
        if (j != i) begin
          int l = rot_lcp(s, i, j);
          if (l > maxl[i]) maxl[i] = l;
        end
    end
    for (int x = 1; x < n; x++) begin
      int c = 0;
      for (int i = 0; i < n; i++) if (maxl[i] >= x) c++;
      if (c == 0) break;
      m.push_back(c);
    end
  endfunction

  function automatic int expected_steps(input byte unsigned s[], output int iters);
    int m[$];
    int st;
    tied_counts(s, m);
    st = 2 * s.size() + 2;
    foreach (m[i]) st += 2 + m[i];
    iters = m.size() + 1;
    return st;
  endfunction

endpackage
