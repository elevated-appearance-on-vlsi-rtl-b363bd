// sq_pkg: elaboration-time geometry of the simplified squaring partial-product
// matrix and of the Wallace tree that sums it.
//
// X*X for an N-bit unsigned X is written as a matrix of single bits, one
// column per result weight 2^c, c = 0 .. 2N-1:
//   * the diagonal products x_i*x_i reduce to x_i and sit in column 2i;
//   * the two equal cross products x_i*x_j and x_j*x_i (i < j) of column
//     i+j are replaced by one copy shifted one column left, into i+j+1.
// Column 1 is therefore always empty (its result bit is constant 0).
//
// The Wallace tree is described by column heights only, so every module
// that needs a height or an adder count calls the functions below with the
// operand width N. Reduction rule, applied to every column in every layer
// (this design's choice, Wallace's greedy rule of reducing as much as
// possible in every layer):
//   floor(h/3) full adders; a leftover pair goes to a half adder, a
//   leftover single bit passes through.
// A full or half adder leaves its sum in the same column and its carry in
// the next one. Layers are added until no column is taller than two, and a
// carry-propagate adder then adds the two remaining rows. Carries out of
// the top column are dropped: the square of an N-bit number is below 2^(2N),
// so they are always zero.
package sq_pkg;

  // Largest operand width the functions below are sized for.
  localparam int MAX_N    = 32;
  localparam int MAX_COLS = 2 * MAX_N;
  localparam int MAX_LAYERS = 32;

  // Number of bits in column c of the simplified partial-product matrix.
  function automatic int pp_height(input int n, input int c);
    int h;
    h = 0;
    for (int i = 0; i < n; i++) begin
      for (int j = i + 1; j < n; j++) begin
        if (i + j + 1 == c) h++;
      end
    end
    if ((c % 2 == 0) && (c / 2 < n)) h++;
    return h;
  endfunction

  // Row of column c (= i+j+1) that holds the folded cross product x_i*x_j;
  // cross products are stacked by ascending i, the diagonal bit goes last.
  function automatic int pp_cross_row(input int n, input int c, input int i);
    int r;
    r = 0;
    for (int k = 0; k < i; k++) begin
      if ((c - 1 - k > k) && (c - 1 - k < n)) r++;
    end
    return r;
  endfunction

  // Height of column c after l reduction layers (l = 0: the matrix itself).
  function automatic int wt_height(input int n, input int l, input int c);
    int h  [MAX_COLS];
    int hn [MAX_COLS];
    int fa, ha, ps, cin;
    for (int k = 0; k < MAX_COLS; k++) h[k] = (k < 2 * n) ? pp_height(n, k) : 0;
    for (int s = 0; s < l; s++) begin
      cin = 0;
      for (int k = 0; k < 2 * n; k++) begin
        if (h[k] >= 2) begin
          fa = h[k] / 3;
          ha = (h[k] % 3 == 2) ? 1 : 0;
          ps = (h[k] % 3 == 1) ? 1 : 0;
        end else begin
          fa = 0;
          ha = 0;
          ps = h[k];
        end
        hn[k] = fa + ha + ps + cin;
        cin   = fa + ha;
      end
      for (int k = 0; k < 2 * n; k++) h[k] = hn[k];
    end
    return h[c];
  endfunction

  // Full adders, half adders and pass-through bits of column c in layer l.
  function automatic int wt_nfa(input int n, input int l, input int c);
    int h;
    h = wt_height(n, l, c);
    return h / 3;
  endfunction

  function automatic int wt_nha(input int n, input int l, input int c);
    int h;
    h = wt_height(n, l, c);
    return (h % 3 == 2) ? 1 : 0;
  endfunction

  function automatic int wt_npass(input int n, input int l, input int c);
    int h;
    h = wt_height(n, l, c);
    return (h % 3 == 1) ? 1 : 0;
  endfunction

  // Tallest column after l layers.
  function automatic int wt_max_height_at(input int n, input int l);
    int m;
    m = 0;
    for (int k = 0; k < 2 * n; k++) begin
      if (wt_height(n, l, k) > m) m = wt_height(n, l, k);
    end
    return m;
  endfunction

  // Number of reduction layers until every column holds at most two bits.
  function automatic int wt_layers(input int n);
    int l;
    l = 0;
    while (wt_max_height_at(n, l) > 2 && l < MAX_LAYERS) l++;
    return l;
  endfunction

  // Tallest column at any layer: the row count of the matrix buses.
  function automatic int wt_max_height(input int n);
    int m;
    m = 1;
    for (int l = 0; l <= wt_layers(n); l++) begin
      if (wt_max_height_at(n, l) > m) m = wt_max_height_at(n, l);
    end
    return m;
  endfunction

  // Adder counts of the whole tree (reported, and checked by the testbenches).
  function automatic int wt_total_fa(input int n);
    int t;
    t = 0;
    for (int l = 0; l < wt_layers(n); l++)
      for (int k = 0; k < 2 * n; k++) t += wt_nfa(n, l, k);
    return t;
  endfunction

  function automatic int wt_total_ha(input int n);
    int t;
    t = 0;
    for (int l = 0; l < wt_layers(n); l++)
      for (int k = 0; k < 2 * n; k++) t += wt_nha(n, l, k);
    return t;
  endfunction

endpackage
