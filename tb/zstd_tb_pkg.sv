// zstd_tb_pkg - reference models for the testbenches.
//
// An independent Zstd sequence-section decoder (FSE decoding tables built from
// the predefined distributions as a decoder builds them, a backward bit reader,
// the code tables, repeat-offset resolution and sequence execution), used to
// check the kernel's output by decompressing it, plus the Zstd 4-byte hash.
package zstd_tb_pkg;

  typedef byte unsigned bytes_t[$];

  // predefined normalized distributions
  function automatic int norm(int kind, int s);
    int ll[36] = '{4,3,2,2,2,2,2,2,2,2,2,2,2,1,1,1,2,2,2,2,2,2,2,2,2,3,2,1,1,1,1,1,-1,-1,-1,-1};
    int ml[53] = '{1,4,3,2,2,2,2,2,2,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,-1,-1,-1,-1,-1,-1,-1};
    int of[29] = '{1,1,1,1,1,1,2,2,2,1,1,1,1,1,1,1,1,1,1,1,1,1,1,1,-1,-1,-1,-1,-1};
    if (kind == 0) return ll[s];
    if (kind == 1) return ml[s];
    return of[s];
  endfunction

  function automatic int nsym(int kind);
    return kind == 0 ? 36 : kind == 1 ? 53 : 29;
  endfunction

  function automatic int tlog(int kind);
    return kind == 2 ? 5 : 6;
  endfunction

  // literal length / match length baselines and extra bits (Zstd format tables)
  function automatic int ll_base_t(int c);
    int b[36] = '{0,1,2,3,4,5,6,7,8,9,10,11,12,13,14,15,16,18,20,22,24,28,32,40,48,64,128,256,512,1024,2048,4096,8192,16384,32768,65536};
    return b[c];
  endfunction
  function automatic int ll_bits_t(int c);
    int b[36] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,2,2,3,3,4,6,7,8,9,10,11,12,13,14,15,16};
    return b[c];
  endfunction
  function automatic int ml_base_t(int c);   // match length (not minus 3)
    int b[53] = '{3,4,5,6,7,8,9,10,11,12,13,14,15,16,17,18,19,20,21,22,23,24,25,26,27,28,29,30,31,32,33,34,
                  35,37,39,41,43,47,51,59,67,83,99,131,259,515,1027,2051,4099,8195,16387,32771,65539};
    return b[c];
  endfunction
  function automatic int ml_bits_t(int c);
    int b[53] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
                  1,1,1,1,2,2,3,3,4,4,5,7,8,9,10,11,12,13,14,15,16};
    return b[c];
  endfunction

  function automatic int hb(int v);
    int r = 0;
    for (int i = 0; i < 32; i++) if (v[i]) r = i;
    return r;
  endfunction

  // decoding table: symbol, bits to read, baseline of the next state
  function automatic void dtable(int kind, output int sym[64], output int nb[64], output int base[64]);
    int T = 1 << tlog(kind);
    int high = T - 1, pos = 0, step = (T >> 1) + (T >> 3) + 3;
    int nxt[53];
    for (int s = 0; s < nsym(kind); s++)
      if (norm(kind, s) == -1) begin sym[high] = s; high--; nxt[s] = 1; end
      else nxt[s] = norm(kind, s);
    for (int s = 0; s < nsym(kind); s++)
      for (int i = 0; i < norm(kind, s); i++) begin
        sym[pos] = s;
        pos = (pos + step) & (T - 1);
        while (pos > high) pos = (pos + step) & (T - 1);
      end
    for (int u = 0; u < T; u++) begin
      int s = sym[u];
      int n = nxt[s];
      nxt[s]++;
      nb[u]   = tlog(kind) - hb(n);
      base[u] = (n << nb[u]) - T;
    end
  endfunction

  // backward bit reader over a byte array
  class bitreader;
    bytes_t b;
    int pos;
    function new(bytes_t bs);
      int top;
      b = bs;
      top = b[b.size()-1];
      pos = 8 * (b.size() - 1) + hb(top);   // bits below the closing 1
    endfunction
    function int rd(int n);
      int v = 0;
      for (int i = n - 1; i >= 0; i--) begin
        int p = pos - n + i;
        v = (v << 1) | ((p >= 0) ? ((b[p / 8] >> (p % 8)) & 1) : 0);
      end
      pos -= n;
      return v;
    endfunction
  endclass

  // decode nseq sequences: literal length, match length, offset value
  function automatic int decode_seqs(bytes_t bs, int nseq, ref int ll[$], ref int ml[$], ref int ofv[$]);
    int sl[64], nl[64], bl[64], sm[64], nm[64], bm[64], so[64], no[64], bo[64];
    int stl, stm, sto;
    bitreader br;
    dtable(0, sl, nl, bl);
    dtable(1, sm, nm, bm);
    dtable(2, so, no, bo);
    ll.delete(); ml.delete(); ofv.delete();
    if (nseq == 0) return 0;
    br  = new(bs);
    stl = br.rd(6);
    sto = br.rd(5);
    stm = br.rd(6);
    for (int i = 0; i < nseq; i++) begin
      int lc = sl[stl], mc = sm[stm], oc = so[sto];
      int o, m, l;
      o = (1 << oc) + br.rd(oc);
      m = ml_base_t(mc) + br.rd(ml_bits_t(mc));
      l = ll_base_t(lc) + br.rd(ll_bits_t(lc));
      ofv.push_back(o); ml.push_back(m); ll.push_back(l);
      if (i != nseq - 1) begin
        stl = bl[stl] + br.rd(nl[stl]);
        stm = bm[stm] + br.rd(nm[stm]);
        sto = bo[sto] + br.rd(no[sto]);
      end
    end
    return br.pos;   // 0 when every bit was used
  endfunction

  // rebuild a block from its literals and decoded sequences; offs returns the
  // resolved offset of each sequence
  function automatic bytes_t execute(bytes_t lits, int ll[$], int ml[$], int ofv[$], ref int offs[$]);
    bytes_t out;
    int rep[3] = '{1, 4, 8};
    int lp = 0;
    offs.delete();
    for (int i = 0; i < ll.size(); i++) begin
      int off;
      if (ofv[i] > 3) begin
        off = ofv[i] - 3;
        rep[2] = rep[1]; rep[1] = rep[0]; rep[0] = off;
      end else begin
        int idx = ofv[i] - 1 + (ll[i] == 0 ? 1 : 0);
        if (idx == 0) off = rep[0];
        else begin
          off = (idx == 3) ? rep[0] - 1 : rep[idx];
          if (idx >= 2) rep[2] = rep[1];
          rep[1] = rep[0];
          rep[0] = off;
        end
      end
      offs.push_back(off);
      for (int k = 0; k < ll[i]; k++) out.push_back(lits[lp++]);
      for (int k = 0; k < ml[i]; k++) out.push_back(out[out.size() - off]);
    end
    while (lp < lits.size()) out.push_back(lits[lp++]);
    return out;
  endfunction

  function automatic int unsigned hash4(int unsigned u, int bits);
    int unsigned p = u * 32'd2654435761;
    return p >> (32 - bits);
  endfunction

endpackage
