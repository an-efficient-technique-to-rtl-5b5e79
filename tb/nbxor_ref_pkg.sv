// nbxor_ref_pkg: software reference of the off-chip side of the NB-XOR flow,
// used by the testbenches to build stimulus and expected results.
//
//   mtc_fill     - fills the don't-cares of a test cube so that the scan
//                  vector has the fewest transitions: each X takes the value
//                  of the nearest specified bit before it; X's before the
//                  first specified bit take that bit's value; an all-X cube
//                  becomes all 0.
//   zero_fill    - fills every don't-care with 0 (for comparison).
//   wtm          - weighted transition metric of one scan vector of length l
//                  (first bit scanned in first): sum over i = 1..l-1 of
//                  (l - i) * (b[i] xor b[i+1]), an estimate of scan-in power.
//   nbxor        - the NB-XOR transform of a whole test set laid end to end
//                  in scan order: d[0] = b[0], d[j] = b[j-1] ^ b[j].
//   golomb_enc   - Golomb code, group size m (power of two): per run of L
//                  zeros ended by a 1, floor(L/m) ones, a 0, then L mod m in
//                  log2(m) bits, MSB first.
//   fdr_enc      - FDR code: run L in group k (2**k-2 <= L <= 2**(k+1)-3) is
//                  k-1 ones, a 0, then L-(2**k-2) in k bits, MSB first.
// A trailing run of zeros with no final 1 is coded as if a 1 followed it.
// Cubes are strings over '0', '1' and 'X', first character scanned in first.
package nbxor_ref_pkg;

  typedef bit bitq_t[$];

  function automatic bitq_t mtc_fill(string cube);
    bitq_t v;
    int    first;
    bit    last;
    first = -1;
    for (int i = 0; i < cube.len(); i++)
      if (cube[i] == "0" || cube[i] == "1") begin first = i; break; end
    last = (first >= 0) ? (cube[first] == "1") : 1'b0;
    for (int i = 0; i < cube.len(); i++) begin
      if (cube[i] == "0")      last = 1'b0;
      else if (cube[i] == "1") last = 1'b1;
      v.push_back(last);
    end
    return v;
  endfunction

  function automatic bitq_t zero_fill(string cube);
    bitq_t v;
    for (int i = 0; i < cube.len(); i++) v.push_back(cube[i] == "1");
    return v;
  endfunction

  function automatic longint wtm(bitq_t v);
    longint w;
    int     l;
    w = 0;
    l = v.size();
    for (int i = 0; i + 1 < l; i++) if (v[i] != v[i+1]) w += longint'(l) - longint'(i) - 1;
    return w;
  endfunction

  function automatic bitq_t nbxor(bitq_t b);
    bitq_t d;
    bit    prev;
    prev = 1'b0;
    foreach (b[i]) begin
      d.push_back(prev ^ b[i]);
      prev = b[i];
    end
    return d;
  endfunction

  function automatic int count_ones(bitq_t b);
    int n;
    n = 0;
    foreach (b[i]) n += int'(b[i]);
    return n;
  endfunction

  // Run lengths of a difference stream: zeros before each 1, plus a last
  // run if the stream ends in zeros.
  function automatic void runs_of(bitq_t d, ref int runs[$]);
    int l;
    runs.delete();
    l = 0;
    foreach (d[i]) begin
      if (d[i]) begin runs.push_back(l); l = 0; end
      else l++;
    end
    if (l > 0) runs.push_back(l);
  endfunction

  function automatic bitq_t golomb_enc(bitq_t d, int m);
    bitq_t e;
    int    runs[$];
    int    tw;
    tw = $clog2(m);
    runs_of(d, runs);
    foreach (runs[r]) begin
      for (int q = 0; q < runs[r] / m; q++) e.push_back(1'b1);
      e.push_back(1'b0);
      for (int t = tw - 1; t >= 0; t--) e.push_back(bit'((runs[r] % m) >> t));
    end
    return e;
  endfunction

  function automatic int fdr_group(int l);
    int k;
    k = 1;
    while (l > (1 << (k + 1)) - 3) k++;
    return k;
  endfunction

  function automatic bitq_t fdr_enc(bitq_t d);
    bitq_t e;
    int    runs[$];
    int    k, off;
    runs_of(d, runs);
    foreach (runs[r]) begin
      k   = fdr_group(runs[r]);
      off = runs[r] - ((1 << k) - 2);
      for (int p = 0; p < k - 1; p++) e.push_back(1'b1);
      e.push_back(1'b0);
      for (int t = k - 1; t >= 0; t--) e.push_back(bit'(off >> t));
    end
    return e;
  endfunction

  // Random test cube: each bit is X with probability x_pct percent; specified
  // bits come in short clusters of equal value, as ATPG cubes tend to.
  function automatic string rand_cube(int len, int x_pct);
    string s;
    bit    val;
    s = "";
    val = 1'b0;
    for (int i = 0; i < len; i++) begin
      if (($urandom % 100) < 32'(x_pct)) s = {s, "X"};
      else begin
        if (($urandom % 4) == 0) val = ~val;
        s = {s, val ? "1" : "0"};
      end
    end
    return s;
  endfunction

endpackage
