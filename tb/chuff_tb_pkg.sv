// chuff_tb_pkg: reference model shared by the decoder testbenches.
//
// huff_code holds a canonical Huffman code over byte symbols: the number of
// symbols per code length, the symbols in canonical (header) order, their
// lengths and codewords. It can make a random complete code by splitting leaves
// of a binary tree, or build a real Huffman code from symbol frequencies (with
// lengths limited to 15 by flattening the frequencies). Codewords are assigned
// with the sequential rule code(i) = (code(i-1) + 1) << (len(i) - len(i-1)),
// which differs from the per-length recurrence the hardware uses, and the
// starting codewords are also available in closed form,
// first(L) = sum over k < L of count(k) * 2^(L-k).
package chuff_tb_pkg;

  class huff_code;
    int cnt   [16];
    int sym   [256];   // header order
    int len   [256];
    int code  [256];
    int idx_of[256];   // symbol value -> header position, -1 if unused
    int n;
    int maxlen;

    function new();
      clear();
    endfunction

    function void clear();
      foreach (cnt[i]) cnt[i] = 0;
      foreach (idx_of[i]) idx_of[i] = -1;
      n = 0;
      maxlen = 0;
    endfunction

    // Random permutation of byte values, first `k` of them become symbols.
    function void pick_symbols(int k, ref int order[256]);
      int t, j;
      for (int i = 0; i < 256; i++) order[i] = i;
      for (int i = 255; i > 0; i--) begin
        j = int'($urandom_range(i, 0));
        t = order[i]; order[i] = order[j]; order[j] = t;
      end
    endfunction

    // Random complete prefix code with k symbols (2 <= k <= 256) and lengths
    // of at most maxl, made by splitting random leaves.
    function void random_complete(int k, int maxl);
      int depth[$];
      int order[256];
      int c, tries;
      clear();
      depth.push_back(1);
      depth.push_back(1);
      tries = 0;
      while (depth.size() < k && tries < 100000) begin
        c = int'($urandom_range(depth.size() - 1, 0));
        tries++;
        if (depth[c] < maxl) begin
          depth[c] = depth[c] + 1;
          depth.push_back(depth[c]);
        end
      end
      foreach (depth[i]) cnt[depth[i]]++;
      pick_symbols(depth.size(), order);
      n = 0;
      for (int l = 1; l <= 15; l++)
        for (int i = 0; i < cnt[l]; i++) begin
          sym[n] = order[n];
          len[n] = l;
          n++;
        end
      finish_code();
    endfunction

    // Huffman code lengths from frequencies (zero frequency = unused symbol).
    function void from_freq(int freq_in[256]);
      int f[256];
      int node_w[512];
      int parent[512];
      bit alive[512];
      int nodes, a, b, d, p, used, tmax;
      bit again;
      clear();
      foreach (f[i]) f[i] = freq_in[i];
      do begin
        again = 0;
        nodes = 0;
        for (int i = 0; i < 256; i++) begin
          node_w[i] = f[i]; parent[i] = -1; alive[i] = (f[i] > 0);
        end
        nodes = 256;
        used = 0;
        for (int i = 0; i < 256; i++) if (f[i] > 0) used++;
        if (used == 1) begin
          for (int i = 0; i < 256; i++) if (f[i] > 0) len[i] = 1;
        end else begin
          for (int m = 0; m < used - 1; m++) begin
            a = -1; b = -1;
            for (int i = 0; i < nodes; i++) if (alive[i]) begin
              if (a < 0 || node_w[i] < node_w[a]) begin b = a; a = i; end
              else if (b < 0 || node_w[i] < node_w[b]) b = i;
            end
            node_w[nodes] = node_w[a] + node_w[b];
            parent[nodes] = -1; alive[nodes] = 1;
            parent[a] = nodes; parent[b] = nodes;
            alive[a] = 0; alive[b] = 0;
            nodes++;
          end
          tmax = 0;
          for (int i = 0; i < 256; i++) if (f[i] > 0) begin
            d = 0; p = i;
            while (parent[p] >= 0) begin p = parent[p]; d++; end
            len[i] = d;
            if (d > tmax) tmax = d;
          end
          if (tmax > 15) begin
            again = 1;
            for (int i = 0; i < 256; i++) if (f[i] > 0) f[i] = (f[i] + 1) / 2;
          end
        end
      end while (again);
      // Header order: by length, then by symbol value.
      begin
        int lens_by_sym[256];
        for (int i = 0; i < 256; i++) lens_by_sym[i] = (f[i] > 0) ? len[i] : 0;
        n = 0;
        for (int l = 1; l <= 15; l++)
          for (int s = 0; s < 256; s++)
            if (lens_by_sym[s] == l) begin
              sym[n] = s; len[n] = l; cnt[l]++; n++;
            end
      end
      finish_code();
    endfunction

    function void finish_code();
      maxlen = 0;
      for (int i = 0; i < n; i++) begin
        if (i == 0) code[i] = 0;
        else        code[i] = (code[i-1] + 1) << (len[i] - len[i-1]);
        idx_of[sym[i]] = i;
        if (len[i] > maxlen) maxlen = len[i];
      end
    endfunction

    function int first_code(int l);
      int s = 0;
      for (int k = 1; k < l; k++) s += cnt[k] << (l - k);
      return s;
    endfunction

    // LUT word expected at `index` for a table of width maxlen: {len, sym}.
    function int lut_entry(int index);
      for (int i = 0; i < n; i++)
        if ((index >> (maxlen - len[i])) == code[i]) return (len[i] << 8) | sym[i];
      return -1;
    endfunction

    // Append the codeword of symbol value s to a bit queue, MSB first.
    function void encode(int s, ref bit bits[$]);
      int i = idx_of[s];
      for (int b = len[i] - 1; b >= 0; b--) bits.push_back(code[i][b]);
    endfunction
  endclass

  // Pack a bit queue into 16-bit chunks, first bit in the MSB, zero padded.
  function automatic void pack16(ref bit bits[$], ref logic [15:0] words[$]);
    logic [15:0] w;
    words.delete();
    for (int i = 0; i < bits.size(); i += 16) begin
      w = '0;
      for (int b = 0; b < 16; b++)
        if (i + b < bits.size()) w[15 - b] = bits[i + b];
      words.push_back(w);
    end
  endfunction

endpackage
