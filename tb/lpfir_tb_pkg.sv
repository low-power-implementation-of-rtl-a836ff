// lpfir_tb_pkg: reference models for the filter processor testbenches.
//
// - Coefficient ordering: NORM keeps the original order, SORT1 sorts the
//   coefficients in ascending order, SORT2 chains the coefficients so that
//   neighbours differ in few bits: from each possible start it repeatedly
//   takes the remaining coefficient with the smallest Hamming distance to
//   the last one taken (ties: lowest index), and keeps the chain with the
//   smallest total distance. For large N this costs O(N^3) operations.
// - Memory configuration: turns an ordering into coefficient words. With
//   pos(k) the position at which tap k is processed within a sample,
//     SF(0) = 0,  SF(k) = pos(k) < pos(k-1)            (k >= 1)
//     PCVMA(0) = 1,  PCVMA(k) = PCVMA(k-1) + SF(k) + 1
//   Tap k writes cell PCVMA(k)-1; tap k-1 reads the cell PCVMA(k-1), which
//   is that same cell when SF(k) = 0 and the cell below it, holding the
//   previous sample's value after the shift, when SF(k) = 1. The last tap
//   reads a cell nobody writes, which stays zero. For the folded structure
//   a word w < ceil(N/2) covers taps w and N-1-w, processed one after the
//   other.
// - Filter reference: direct convolution y(n) = sum_k h(k) x(n-k), with
//   x(n) = 0 before the first sample.
package lpfir_tb_pkg;

  typedef enum int { NORM = 0, SORT1 = 1, SORT2 = 2 } order_e;

  typedef struct {
    int h;
    int pcvma;
    bit sf;
    bit pair;
    bit neg2;
    int pcvma2;
    bit sf2;
  } cw_ref_t;

  function automatic int hamming(input int a, input int b, input int w);
    int d = 0;
    for (int i = 0; i < w; i++) d += ((a >> i) & 1) ^ ((b >> i) & 1);
    return d;
  endfunction

  // Order of the word indices 0..wh.size()-1.
  function automatic void make_order(input int wh[], input order_e kind,
                                     input int coef_w, output int ord[]);
    int m = wh.size();
    bit used[];
    ord = new[m];
    used = new[m];
    for (int i = 0; i < m; i++) begin ord[i] = i; used[i] = 0; end
    if (kind == NORM) return;
    // stable insertion sort, ascending value
    for (int i = 1; i < m; i++) begin
      int j = i;
      while (j > 0 && wh[ord[j-1]] > wh[ord[j]]) begin
        int t = ord[j]; ord[j] = ord[j-1]; ord[j-1] = t; j--;
      end
    end
    if (kind == SORT1) return;
    // SORT2: nearest neighbour chain from every start, keep the chain with
    // the smallest total Hamming distance (first start wins a tie).
    begin
      int best_ord[];
      int best_total = 1 << 30;
      int chain[];
      best_ord = new[m];
      chain = new[m];
      for (int s = 0; s < m; s++) begin
        int total = 0;
        for (int i = 0; i < m; i++) used[i] = 0;
        chain[0] = s;
        used[s] = 1;
        for (int p = 1; p < m; p++) begin
          int best = -1, bestd = 1 << 30;
          for (int c = 0; c < m; c++) begin
            if (!used[c]) begin
              int d = hamming(wh[chain[p-1]], wh[c], coef_w);
              if (d < bestd) begin bestd = d; best = c; end
            end
          end
          chain[p] = best;
          used[best] = 1;
          total += bestd;
        end
        if (total < best_total) begin
          best_total = total;
          for (int i = 0; i < m; i++) best_ord[i] = chain[i];
        end
      end
      for (int i = 0; i < m; i++) ord[i] = best_ord[i];
    end
  endfunction

  // Coefficient words for taps h[0..N-1] in the given order.
  function automatic void build_words(input int h[], input bit folded, input bit antisym,
                                      input order_e kind, input int coef_w,
                                      output cw_ref_t words[]);
    int m = folded ? (h.size() + 1) / 2 : h.size();
    int wh[], ord[];
    wh = new[m];
    for (int w = 0; w < m; w++) wh[w] = h[w];
    make_order(wh, kind, coef_w, ord);
    build_words_ord(h, folded, antisym, ord, words);
  endfunction

  // Coefficient words for taps h[0..N-1] processed in the word order ord.
  function automatic void build_words_ord(input int h[], input bit folded, input bit antisym,
                                          input int ord[], output cw_ref_t words[]);
    int n = h.size();
    int m = folded ? (n + 1) / 2 : n;
    int pos[], pcvma[];
    bit sf[];
    int p = 0;
    pos = new[n];
    for (int j = 0; j < m; j++) begin
      int w = ord[j];
      pos[w] = p++;
      if (folded && (n - 1 - w) != w) pos[n - 1 - w] = p++;
    end
    sf = new[n];
    pcvma = new[n];
    sf[0] = 0;
    pcvma[0] = 1;
    for (int k = 1; k < n; k++) begin
      sf[k] = pos[k] < pos[k-1];
      pcvma[k] = pcvma[k-1] + int'(sf[k]) + 1;
    end
    words = new[m];
    for (int j = 0; j < m; j++) begin
      int w = ord[j];
      words[j].h      = h[w];
      words[j].pcvma  = pcvma[w];
      words[j].sf     = sf[w];
      words[j].pair   = folded && (n - 1 - w) != w;
      words[j].neg2   = words[j].pair && antisym;
      words[j].pcvma2 = words[j].pair ? pcvma[n - 1 - w] : 0;
      words[j].sf2    = words[j].pair ? sf[n - 1 - w] : 0;
    end
  endfunction

  // Updates per sample for a set of words.
  function automatic int steps_of(input cw_ref_t words[]);
    int s = 0;
    foreach (words[i]) s += words[i].pair ? 2 : 1;
    return s;
  endfunction

  // Reference output for sample n of history x[0..n].
  function automatic longint ref_y(input int h[], input int x[], input int n);
    longint acc = 0;
    for (int k = 0; k < h.size(); k++)
      if (n - k >= 0) acc += longint'(h[k]) * longint'(x[n - k]);
    return acc;
  endfunction

  // Random coef_w-bit signed values.
  function automatic void rand_vec(input int n, input int w, output int v[]);
    int lim = 1 << (w - 1);
    v = new[n];
    foreach (v[i]) v[i] = int'($urandom_range(2 * lim - 1)) - lim;
  endfunction

  // Random linear phase coefficients: symmetric, or anti-symmetric (centre
  // tap zero for odd N), coef_w-bit signed values.
  function automatic void rand_lp_coefs(input int n, input int coef_w, input bit antisym,
                                        output int h[]);
    int lim = 1 << (coef_w - 1);
    h = new[n];
    for (int k = 0; k < (n + 1) / 2; k++) begin
      int v = int'($urandom_range(2 * lim - 1)) - lim;
      if (antisym && v == -lim) v = -lim + 1;
      h[k] = v;
      h[n - 1 - k] = antisym ? -v : v;
    end
    if (antisym && (n % 2 == 1)) h[n / 2] = 0;
  endfunction

endpackage
