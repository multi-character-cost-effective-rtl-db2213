// cs_geom.svh: geometry of a signature set, included inside a module that has
// the parameters NSIG and SIGS (cs_pkg::sig_t [NSIG-1:0]).
//   geo_ucol()       matrix column U holding every u-substring's first character
//                    (the largest u-substring offset)
//   geo_ncols()      number of matrix columns: max over k of U - uoff_k + len_k
//   geo_max_ulen()   longest u-substring
//   geo_max_len()    longest signature
//   geo_max_chunks() six-character comparators of the longest signature

  function automatic int geo_ucol();
    int m = 0;
    for (int k = 0; k < NSIG; k++) m = imax(m, int'(SIGS[k].uoff));
    return m;
  endfunction

  function automatic int geo_ncols();
    int m = 1;
    for (int k = 0; k < NSIG; k++)
      m = imax(m, geo_ucol() - int'(SIGS[k].uoff) + int'(SIGS[k].len));
    return m;
  endfunction

  function automatic int geo_max_ulen();
    int m = 1;
    for (int k = 0; k < NSIG; k++) m = imax(m, int'(SIGS[k].ulen));
    return m;
  endfunction

  function automatic int geo_max_len();
    int m = 1;
    for (int k = 0; k < NSIG; k++) m = imax(m, int'(SIGS[k].len));
    return m;
  endfunction

  function automatic int geo_max_chunks();
    return cdiv(geo_max_len(), LUT_IN);
  endfunction
