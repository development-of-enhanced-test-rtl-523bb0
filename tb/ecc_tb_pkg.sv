// ecc_tb_pkg: reference encoders used by the testbenches of the ECC
// decompressor.
//
// The functions build compressed streams from plain test data, written
// directly from the code definitions and independently of the RTL:
//   icc_encode   - Integrated Compression Code. Data is cut into
//                  alternating runs (L bits of the current type a, then one
//                  terminating ~a, then a toggles). Each run is sent as
//                  bypass bits (L zeros and a one) when L <= 1, as an AVR
//                  codeword when 2 <= L <= 4 or the run is of 1s, and as
//                  the shorter of AVR and Golomb (Golomb on a tie) for runs
//                  of 0s longer than 4. Runs of 1s longer than the AVR range
//                  fall back to Golomb.
//   ninec_encode - nine-coded block code with a K/2 header.
//   gen_vectors  - synthetic scan data with long runs.
//   gen_cubes, fill_zero, fill_mt, fill_cbs, diff_vectors
//                - synthetic test cubes with don't-care bits and the four
//                  ways of filling them (zero fill, minimum-transition fill,
//                  column-wise bit stuffing, and bit stuffing followed by
//                  difference vectors); wtm gives the weighted transition
//                  metric of a vector, the scan-in power estimate.
package ecc_tb_pkg;

  typedef bit bitq_t[$];

  // codeword kinds, as driven on {bypass, select}
  localparam bit [1:0] MODE_AVR    = 2'b00;
  localparam bit [1:0] MODE_GOLOMB = 2'b01;
  localparam bit [1:0] MODE_BYPASS = 2'b10;

  typedef struct {
    int n_bypass;
    int n_avr;
    int n_golomb;
    int n_golomb_multi;   // Golomb codewords with q >= 1
    int n_avr_ones;       // AVR codewords for runs of 1s
  } icc_stats_t;

  function automatic int avr_max(int k);
    return (1 << (k + 2)) - 4;
  endfunction

  // AVR group of run length l (1..), or 0 if l is out of range
  function automatic int avr_group(int l, int k);
    for (int i = 1; i <= k; i++)
      if (l <= (1 << (i + 2)) - 4) return i;
    return 0;
  endfunction

  function automatic void put_bits(ref bitq_t q, input int value, input int n);
    for (int b = n - 1; b >= 0; b--) q.push_back(bit'((value >> b) & 1));
  endfunction

  function automatic void avr_encode(ref bitq_t q, input int l, input int k);
    int i, j, first;
    bit p;
    i     = avr_group(l, k);
    first = (1 << (i + 1)) - 3;
    j     = l - first;
    p     = (j >= (1 << i));
    if (p) j -= (1 << i);
    repeat (i) q.push_back(p);
    q.push_back(!p);
    put_bits(q, j, i);
  endfunction

  function automatic void golomb_encode(ref bitq_t q, input int l, input int m);
    int lg;
    lg = $clog2(m);
    repeat (l / m) q.push_back(1'b1);
    q.push_back(1'b0);
    put_bits(q, l % m, lg);
  endfunction

  // data: plain bits. code/modes: encoded stream and one mode per codeword
  // (a bypass bit counts as one codeword).
  function automatic void icc_encode(input bitq_t data, input int k, input int m,
                                     ref bitq_t code, ref bit [1:0] modes[$],
                                     ref icc_stats_t st);
    int  pos, l, avr_cost, gol_cost;
    bit  a;
    a   = 1'b0;
    pos = 0;
    while (pos < data.size()) begin
      l = 0;
      while (pos < data.size() && data[pos] == a) begin
        l++;
        pos++;
      end
      pos++;                              // terminator (may lie past the end)
      avr_cost = (avr_group(l, k) != 0) ? 2 * avr_group(l, k) + 1 : 1 << 30;
      gol_cost = l / m + 1 + $clog2(m);
      if (l <= 1) begin
        repeat (l) begin
          code.push_back(1'b0);
          modes.push_back(MODE_BYPASS);
          st.n_bypass++;
        end
        code.push_back(1'b1);
        modes.push_back(MODE_BYPASS);
        st.n_bypass++;
      end else if ((a == 1'b1 || l <= 4) && avr_cost < (1 << 30)) begin
        avr_encode(code, l, k);
        modes.push_back(MODE_AVR);
        st.n_avr++;
        if (a) st.n_avr_ones++;
      end else if (avr_cost < gol_cost) begin
        avr_encode(code, l, k);
        modes.push_back(MODE_AVR);
        st.n_avr++;
      end else begin
        golomb_encode(code, l, m);
        modes.push_back(MODE_GOLOMB);
        st.n_golomb++;
        if (l >= m) st.n_golomb_multi++;
      end
      a = !a;
    end
  endfunction

  // 9C: header of khw bits holding kh, then one codeword per 2*kh-bit block
  // (the last block is padded with zeros).
  function automatic void ninec_encode(input bitq_t data, input int kh, input int khw,
                                       ref bitq_t code, ref int case_cnt[10]);
    int    nblk;
    int    kind[2];   // 0: zeros, 1: ones, 2: mixed
    int    c;
    bitq_t d;
    d = data;
    while (d.size() % (2 * kh) != 0) d.push_back(1'b0);
    put_bits(code, kh, khw);
    nblk = d.size() / (2 * kh);
    for (int b = 0; b < nblk; b++) begin
      for (int h = 0; h < 2; h++) begin
        int ones;
        ones = 0;
        for (int i = 0; i < kh; i++) ones += d[b * 2 * kh + h * kh + i];
        kind[h] = (ones == 0) ? 0 : (ones == kh) ? 1 : 2;
      end
      case ({kind[0][1:0], kind[1][1:0]})
        4'b0000: begin c = 1; code.push_back(1'b0); end
        4'b0101: begin c = 2; put_bits(code, 'b10, 2); end
        4'b0001: begin c = 3; put_bits(code, 'b11000, 5); end
        4'b0100: begin c = 4; put_bits(code, 'b11001, 5); end
        4'b0110: begin c = 5; put_bits(code, 'b11010, 5); end
        4'b1001: begin c = 6; put_bits(code, 'b11011, 5); end
        4'b0010: begin c = 7; put_bits(code, 'b11100, 5); end
        4'b1000: begin c = 8; put_bits(code, 'b11101, 5); end
        default: begin c = 9; put_bits(code, 'b1111, 4); end
      endcase
      case_cnt[c]++;
      for (int h = 0; h < 2; h++)
        if (kind[h] == 2)
          for (int i = 0; i < kh; i++) code.push_back(d[b * 2 * kh + h * kh + i]);
    end
  endfunction

  // n vectors of w bits; each bit repeats the previous one with
  // probability keep/100 (runs of both values, like filled test cubes).
  function automatic bitq_t gen_vectors(int n, int w, int keep);
    bitq_t q;
    bit    v;
    v = 1'b0;
    for (int i = 0; i < n * w; i++) begin
      if (($urandom % 100) >= keep) v = !v;
      q.push_back(v);
    end
    return q;
  endfunction

  // ---------------------------------------------------------------------
  // Test cubes and don't-care filling.
  // A cube is n vectors of w positions; care[i] says whether position i is
  // specified and val[i] holds its value. Positions are numbered vector by
  // vector, first scanned bit first.
  // ---------------------------------------------------------------------
  typedef struct {
    int    n;
    int    w;
    bitq_t val;
    bitq_t care;
  } cubes_t;

  // specified bits with probability care_pct; specified values come in
  // short runs, as they do for neighbouring scan cells
  function automatic cubes_t gen_cubes(int n, int w, int care_pct);
    cubes_t c;
    bit     v;
    c.n = n;
    c.w = w;
    v = 1'b0;
    for (int i = 0; i < n * w; i++) begin
      if (($urandom % 100) < 30) v = !v;
      c.care.push_back(($urandom % 100) < care_pct);
      c.val.push_back(v);
    end
    return c;
  endfunction

  // zero fill: every X becomes 0
  function automatic bitq_t fill_zero(cubes_t c);
    bitq_t q;
    for (int i = 0; i < c.n * c.w; i++) q.push_back(c.care[i] ? c.val[i] : 1'b0);
    return q;
  endfunction

  // minimum-transition fill: an X takes the last specified value to its
  // left in the same vector; leading Xs take the first specified value
  function automatic bitq_t fill_mt(cubes_t c);
    bitq_t q;
    for (int v = 0; v < c.n; v++) begin
      bit cur, found;
      found = 1'b0;
      cur   = 1'b0;
      for (int i = 0; i < c.w && !found; i++)
        if (c.care[v * c.w + i]) begin
          cur   = c.val[v * c.w + i];
          found = 1'b1;
        end
      for (int i = 0; i < c.w; i++) begin
        if (c.care[v * c.w + i]) cur = c.val[v * c.w + i];
        q.push_back(cur);
      end
    end
    return q;
  endfunction

  // column-wise bit stuffing: Xs of the first vector become 0, an X of a
  // later vector copies the bit at the same position of the vector before
  function automatic bitq_t fill_cbs(cubes_t c);
    bitq_t q;
    for (int i = 0; i < c.n * c.w; i++)
      if (c.care[i])      q.push_back(c.val[i]);
      else if (i < c.w)   q.push_back(1'b0);
      else                q.push_back(q[i - c.w]);
    return q;
  endfunction

  // difference vectors: d1 = t1, di = t(i-1) XOR ti
  function automatic bitq_t diff_vectors(bitq_t t, int w);
    bitq_t q;
    for (int i = 0; i < t.size(); i++) q.push_back((i < w) ? t[i] : (t[i] ^ t[i - w]));
    return q;
  endfunction

  // does filled data t agree with every specified bit of c?
  function automatic bit fill_ok(cubes_t c, bitq_t t);
    for (int i = 0; i < c.n * c.w; i++)
      if (c.care[i] && t[i] != c.val[i]) return 1'b0;
    return 1'b1;
  endfunction

  // weighted transition metric of one vector: sum over i of (w - i) for
  // every transition between positions i and i+1 (1-based)
  function automatic int wtm(bitq_t t, int v, int w);
    int s;
    s = 0;
    for (int i = 1; i < w; i++)
      if (t[v * w + i - 1] != t[v * w + i]) s += w - i;
    return s;
  endfunction

endpackage
