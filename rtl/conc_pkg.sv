// conc_pkg: sizing rules shared by the concentrator, its router and the
// mirrored output-side network.
//
// An (n,m) concentrator connects any set of at most m active inputs out of n
// to some m outputs, without caring which input lands on which output. The
// recursive construction used here splits an (n,m) network into a stage of
// 2x2 crossbars and two half-size concentrators, down to leaves with m <= 2
// that are single-stage sparse crossbars. Every function below follows that
// recursion, so a parent and the sub-networks it instantiates always agree
// on widths and configuration offsets.
//
// Splitting rule (the construction's own choice where sizes are odd):
//   n even, m even : n/2-1 crossbars, input n-2 wired to the upper half,
//                    input n-1 wired to the lower half
//   n even, m odd  : n/2 crossbars, no direct inputs
//   n odd          : (n-1)/2 crossbars, input n-1 wired to the upper half
//   upper half: (ceil(n/2), ceil(m/2)), lower half: (floor(n/2), floor(m/2))
// Configuration layout of one level: crossbar bits first (bit i = crossbar
// i crossed), then the upper half's bits, then the lower half's bits. A
// leaf stores, for each output j, the offset of its selected input inside
// the window j .. j+n-m.
package conc_pkg;

  // ceil(log2(x)), 0 for x <= 1
  function automatic int unsigned clog2i(input int unsigned x);
    int unsigned r = 0;
    while ((64'd1 << r) < 64'(x)) r++;
    return r;
  endfunction

  // number of 2x2 crossbars in the first stage of an (n,m) level, m > 2
  function automatic int unsigned n_xbar(input int unsigned n, input int unsigned m);
    if (n % 2 == 1) return (n - 1) / 2;
    if (m % 2 == 1) return n / 2;
    return n / 2 - 1;
  endfunction

  function automatic bit has_dir_up(input int unsigned n, input int unsigned m);
    return (n % 2 == 1) || (m % 2 == 0);
  endfunction

  function automatic bit has_dir_lo(input int unsigned n, input int unsigned m);
    return (n % 2 == 0) && (m % 2 == 0);
  endfunction

  function automatic int unsigned n_up(input int unsigned n);
    return (n + 1) / 2;
  endfunction

  function automatic int unsigned n_lo(input int unsigned n);
    return n / 2;
  endfunction

  function automatic int unsigned m_up(input int unsigned m);
    return (m + 1) / 2;
  endfunction

  function automatic int unsigned m_lo(input int unsigned m);
    return m / 2;
  endfunction

  // width of one leaf output's select: the window holds n-m+1 inputs
  function automatic int unsigned leaf_sel_w(input int unsigned n, input int unsigned m);
    return clog2i(n - m + 1);
  endfunction

  // configuration bits of an (n,m) network
  function automatic int unsigned cfg_bits(input int unsigned n, input int unsigned m);
    if (m <= 2) return m * leaf_sel_w(n, m);
    return n_xbar(n, m) + cfg_bits(n_up(n), m_up(m)) + cfg_bits(n_lo(n), m_lo(m));
  endfunction

  // 2:1 multiplexers of an (n,m) concentrator: two per crossbar, and
  // n-m per leaf output (a mux tree over its window of n-m+1 inputs)
  function automatic int unsigned mux_cost(input int unsigned n, input int unsigned m);
    if (m <= 2) return m * (n - m);
    return 2 * n_xbar(n, m) + mux_cost(n_up(n), m_up(m)) + mux_cost(n_lo(n), m_lo(m));
  endfunction

  // worst-case number of 2:1 multiplexers on a path through an (n,m) concentrator
  function automatic int unsigned mux_depth(input int unsigned n, input int unsigned m);
    int unsigned du, dl;
    if (m <= 2) return clog2i(n - m + 1);
    du = mux_depth(n_up(n), m_up(m));
    dl = mux_depth(n_lo(n), m_lo(m));
    return 1 + ((du > dl) ? du : dl);
  endfunction

  // a width that is never zero, for vectors that may be empty
  function automatic int unsigned atleast1(input int unsigned x);
    return (x == 0) ? 1 : x;
  endfunction

endpackage
