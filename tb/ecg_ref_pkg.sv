// ecg_ref_pkg: reference model of the compressed formats, for testbenches.
//
// Written from the format descriptions, independently of the RTL:
//   golomb_encode  - samples -> level-1 bitstream (header, Golomb-Rice
//                    codewords, run marks), packet by packet
//   dict_encode    - level-1 bits -> level-2 bits (8-bit words, 4 entries)
//   dict_decode    - inverse of dict_encode
//   golomb_decode  - level-1 bits -> samples
//   synth_ecg      - a synthetic ECG-like test signal (baseline wander, noise,
//                    P/QRS/T shapes, flat stretches and a few steps)
package ecg_ref_pkg;

  typedef bit bitq_t[$];
  typedef int intq_t[$];

  function automatic void put(ref bitq_t q, input longint v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(bit'((v >> i) & 1));
  endfunction

  function automatic longint get(ref bitq_t q, ref int pos, input int n);
    longint v = 0;
    for (int i = 0; i < n; i++) begin
      v = (v << 1) | longint'(q[pos]);
      pos++;
    end
    return v;
  endfunction

  // divisor code for a packet mean
  function automatic int pick_code(int mean, int th1, int th2, int th3);
    if (mean < th1) return 1;
    if (mean < th2) return 2;
    if (mean < th3) return 3;
    return 0;
  endfunction

  function automatic int code_k(int code);
    return (code == 0) ? 0 : code + 2;
  endfunction

  function automatic void put_cw(ref bitq_t q, input int d, input int k);
    int quo, rem, u;
    quo = (d >= 0) ? d / (1 << k) : -(((-d) + (1 << k) - 1) / (1 << k)); // floor
    rem = d - quo * (1 << k);
    u   = (quo >= 0) ? 2 * quo : -2 * quo - 1;
    if (u >= 16) begin
      put(q, 16'hFFFF, 16);
      put(q, d & 12'hFFF, 12);
    end else begin
      for (int i = 0; i < u; i++) q.push_back(1'b1);
      q.push_back(1'b0);
      put(q, rem, k);
    end
  endfunction

  // Level 1. Also returns per-packet codes, number of runs and escapes.
  function automatic bitq_t golomb_encode(intq_t x, int th1, int th2, int th3,
                                          ref intq_t codes, ref int runs, ref int escs);
    bitq_t q;
    int prev = 0;
    codes = {};
    runs = 0;
    escs = 0;
    for (int p = 0; p + 8 <= x.size(); p += 8) begin
      int d[8];
      int sum = 0, code, k, i;
      for (int j = 0; j < 8; j++) begin
        d[j] = x[p + j] - ((j == 0) ? prev : x[p + j - 1]);
        sum += (d[j] < 0) ? -d[j] : d[j];
      end
      prev = x[p + 7];
      code = pick_code(sum / 8, th1, th2, th3);
      codes.push_back(code);
      k = code_k(code);
      put(q, code, 2);
      i = 0;
      while (i < 8) begin
        int l = 1;
        int u, qq;
        while (i + l < 8 && d[i + l] == d[i]) l++;
        qq = d[i] >>> k;
        u = (qq >= 0) ? 2 * qq : -2 * qq - 1;
        if (u >= 16) escs++;
        put_cw(q, d[i], k);
        if (l >= 2) begin
          put_cw(q, d[i], k);
          put(q, l - 2, 3);
          runs++;
        end
        i += l;
      end
    end
    return q;
  endfunction

  function automatic int get_cw(ref bitq_t q, ref int pos, input int k);
    int u = 0, quo, d;
    while (u < 16 && q[pos] == 1'b1) begin
      u++;
      pos++;
    end
    if (u == 16) begin
      d = int'(get(q, pos, 12));
      if (d >= 2048) d -= 4096;
      return d;
    end
    pos++;                                  // the terminating 0
    quo = (u % 2 == 0) ? u / 2 : -(u + 1) / 2;
    return quo * (1 << k) + int'(get(q, pos, k));
  endfunction

  function automatic intq_t golomb_decode(bitq_t q, int npkt);
    intq_t x;
    int pos = 0, prev = 0;
    for (int p = 0; p < npkt; p++) begin
      int code, k, n = 0, last;
      bit have_last = 0;
      code = int'(get(q, pos, 2));
      k = code_k(code);
      while (n < 8) begin
        int d = get_cw(q, pos, k);
        int reps = 1;
        if (have_last && d == last) begin
          reps = int'(get(q, pos, 3)) + 1;  // run of L: two codewords, then L-2
          have_last = 0;
        end else begin
          have_last = 1;
          last = d;
        end
        for (int r = 0; r < reps; r++) begin
          prev = prev + d;
          x.push_back(prev);
          n++;
        end
      end
    end
    return x;
  endfunction

  // Level 2: dictionary with 2-bit aligned bitmasks on 8-bit words.
  function automatic bitq_t dict_encode(bitq_t in, bit [7:0] dict[4],
                                        ref int hits, ref int masks, ref int misses);
    bitq_t q;
    hits = 0;
    masks = 0;
    misses = 0;
    for (int w = 0; w + 8 <= in.size(); w += 8) begin
      bit [7:0] word = 0;
      bit done = 0;
      for (int i = 0; i < 8; i++) word = {word[6:0], in[w + i]};
      for (int e = 0; e < 4 && !done; e++)
        if (word == dict[e]) begin
          put(q, {2'b00, 2'(e)}, 4);
          hits++;
          done = 1;
        end
      for (int e = 0; e < 4 && !done; e++)
        for (int f = 0; f < 4 && !done; f++) begin
          bit [7:0] x = word ^ dict[e];
          bit [1:0] m = 2'(x >> (2 * f));
          if (m != 0 && x == (8'(m) << (2 * f))) begin
            put(q, {2'b01, 2'(f), m, 2'(e)}, 8);
            masks++;
            done = 1;
          end
        end
      if (!done) begin
        put(q, {1'b1, word}, 9);
        misses++;
      end
    end
    return q;
  endfunction

  function automatic bitq_t dict_decode(bitq_t q, bit [7:0] dict[4]);
    bitq_t o;
    int pos = 0;
    while (pos < q.size()) begin
      bit [7:0] word;
      if (q[pos] == 1'b1) begin
        pos++;
        word = 8'(get(q, pos, 8));
      end else begin
        pos++;
        if (q[pos] == 1'b0) begin
          pos++;
          word = dict[get(q, pos, 2)];
        end else begin
          int f, m;
          pos++;
          f = int'(get(q, pos, 2));
          m = int'(get(q, pos, 2));
          word = dict[get(q, pos, 2)] ^ 8'(m << (2 * f));
        end
      end
      put(o, word, 8);
    end
    return o;
  endfunction

  // Synthetic ECG: 11-bit samples around mid-scale, one beat every ~90 samples.
  function automatic intq_t synth_ecg(int n, int seed);
    intq_t x;
    int v;
    void'($urandom(seed));
    for (int i = 0; i < n; i++) begin
      int ph = i % 90;
      v = 1024 + (i / 40) % 7;                    // slow wander
      if (ph >= 10 && ph < 18) v += 12;           // P wave
      if (ph == 30) v -= 60;                      // Q
      if (ph == 31) v += 700;                     // R peak
      if (ph == 32) v -= 150;                     // S
      if (ph >= 50 && ph < 66) v += 30;           // T wave
      if (ph < 70 && (i / 90) % 3 != 1) v += int'($urandom_range(0, 3)); // noise
      if (v < 0) v = 0;
      if (v > 2047) v = 2047;
      x.push_back(v);
    end
    return x;
  endfunction

endpackage
