// tb_bdc_ref_pkg: reference model for the testbenches of the bus data
// compression blocks, written independently of the RTL.
//
// Pattern numbers are found by brute force: every string of slot tags
// (H=0, L=1, U=2) of the needed length is visited in lexicographic order, the
// legal ones (U only right after L, L followed by U unless it is the last slot)
// are counted, and the position of the wanted string is its PI.  A burst is
// encoded by classifying each byte against the one before it, listing its
// nibbles, padding to whole beats with H slots and cutting into beats.
package tb_bdc_ref_pkg;

  localparam int SLOTS = 4;
  localparam int T_H = 0, T_L = 1, T_U = 2;

  typedef int tags_t [SLOTS];

  typedef struct {
    int word;
    int pi;
    tags_t tags;
  } beat_t;

  function automatic bit legal(int s[], int n);
    for (int p = 0; p < n; p++) begin
      if (s[p] == T_U && (p == 0 || s[p-1] != T_L)) return 0;
      if (s[p] == T_L && p < n - 1 && s[p+1] != T_U) return 0;
    end
    return 1;
  endfunction

  // Sequence of length n with index idx in lexicographic order.
  function automatic void seq_of_index(int idx, int n, ref int s[]);
    s = new[n];
    for (int p = n - 1; p >= 0; p--) begin
      s[p] = idx % 3;
      idx  = idx / 3;
    end
  endfunction

  function automatic int pow3(int n);
    int r = 1;
    for (int i = 0; i < n; i++) r = r * 3;
    return r;
  endfunction

  // PI of a beat given its full tag list; -1 if illegal.
  function automatic int ref_pi(tags_t t);
    int n, first, cnt;
    int s[];
    first = (t[0] == T_U) ? 1 : 0;
    n     = SLOTS - first;
    cnt   = 0;
    for (int idx = 0; idx < pow3(n); idx++) begin
      bit same;
      seq_of_index(idx, n, s);
      if (!legal(s, n)) continue;
      same = 1;
      for (int p = 0; p < n; p++) if (s[p] != t[p + first]) same = 0;
      if (same) return cnt;
      cnt++;
    end
    return -1;
  endfunction

  // Number of patterns with or without a carried upper nibble.
  function automatic int ref_npat(bit carry);
    int n, cnt;
    int s[];
    n   = SLOTS - (carry ? 1 : 0);
    cnt = 0;
    for (int idx = 0; idx < pow3(n); idx++) begin
      seq_of_index(idx, n, s);
      if (legal(s, n)) cnt++;
    end
    return cnt;
  endfunction

  // Tags of pattern 'pi' given the carry state; ok=0 if there is no such pattern.
  function automatic void ref_tags(int pi, bit carry, output tags_t t, output bit ok);
    int n, first, cnt;
    int s[];
    first = carry ? 1 : 0;
    n     = SLOTS - first;
    cnt   = 0;
    ok    = 0;
    foreach (t[p]) t[p] = T_H;
    for (int idx = 0; idx < pow3(n); idx++) begin
      seq_of_index(idx, n, s);
      if (!legal(s, n)) continue;
      if (cnt == pi) begin
        if (carry) t[0] = T_U;
        for (int p = 0; p < n; p++) t[p + first] = s[p];
        ok = 1;
        return;
      end
      cnt++;
    end
  endfunction

  // Encode a burst of bytes into beats.
  function automatic void ref_encode(byte unsigned d[$], bit cmp, ref beat_t beats[$]);
    int nib[$];
    int tg[$];
    beats.delete();
    foreach (d[i]) begin
      int hi, lo;
      hi = int'(d[i]) >> 4;
      lo = int'(d[i]) & 15;
      if (cmp && i > 0 && hi == (int'(d[i-1]) >> 4)) begin
        nib.push_back(lo); tg.push_back(T_H);
      end else begin
        nib.push_back(lo); tg.push_back(T_L);
        nib.push_back(hi); tg.push_back(T_U);
      end
    end
    while (nib.size() % SLOTS != 0) begin
      nib.push_back(0); tg.push_back(T_H);
    end
    for (int b = 0; b < nib.size() / SLOTS; b++) begin
      beat_t bt;
      bt.word = 0;
      for (int p = 0; p < SLOTS; p++) begin
        bt.word = bt.word | (nib[b*SLOTS + p] << (4*p));
        bt.tags[p] = tg[b*SLOTS + p];
      end
      bt.pi = ref_pi(bt.tags);
      beats.push_back(bt);
    end
  endfunction

  // Image-like test data: a slowly drifting value with small steps, so that
  // many neighbours share their upper nibble; 'rough' adds large jumps.
  function automatic void gen_image(int n, int rough, ref byte unsigned d[$]);
    int v;
    d.delete();
    v = $urandom_range(0, 255);
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(0, 99) < rough) v = $urandom_range(0, 255);
      else v = v + $urandom_range(0, 6) - 3;
      if (v < 0) v = 0;
      if (v > 255) v = 255;
      d.push_back(byte'(v));
    end
  endfunction

endpackage
