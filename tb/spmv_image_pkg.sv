// spmv_image_pkg: host-side preparation of a sparse matrix-vector product for
// the testbenches, and the reference result.
//
// spmv_image turns a dense matrix A (NR x NC) and vector x into the memory
// images the accelerator reads:
//  - the matrix is cut into partitions of OB*S rows by VB*S columns, row
//    partitions outer, column partitions inner;
//  - inside a partition, stream s owns local rows s, s+S, ...; its entries are
//    (local column, value) pairs in row order, and a row-skip token
//    (column -1, value = number of the stream's rows to skip) is placed before
//    the first entry of every later non-empty row; all streams of a partition
//    are padded with zero-skip tokens to the longest one;
//  - words 2p and 2p+1 of the matrix image hold partition p's start word and
//    its per-stream length, the payload words follow from word 2*total on.
// The image is kept as 64-bit elements (word w, stream s at index w*S+s,
// element = {value, column}); metadata sits in stream 0's low 32 bits. The
// vector image holds element w*S+s of x at index w*S+s. y = A*x is computed
// with the same 18-bit signed operands and 32-bit wrapping sums as the
// hardware.
package spmv_image_pkg;

  class spmv_image;
    int S, VB, OB, NR, NC, MUL_W;
    int A[][];
    int x[];
    longint unsigned ml[$];
    longint unsigned vl[$];
    int y[];
    int n_tokens, n_empty_parts, n_nonzeros, total_parts, nrp, ncp;

    function new(int s, int vb, int ob, int nr, int nc, int mul_w = 18);
      S = s; VB = vb; OB = ob; NR = nr; NC = nc; MUL_W = mul_w;
      A = new[NR];
      foreach (A[r]) A[r] = new[NC];
      x = new[NC];
      foreach (A[r, c]) A[r][c] = 0;
    endfunction

    static function int sx(int v, int w);
      longint t;
      t = longint'(v) & ((64'd1 << w) - 1);
      if (t[w-1]) t = t - (64'd1 << w);
      return int'(t);
    endfunction

    function void build();
      int rows_pp, cols_pp, addr;
      longint unsigned data_words[$];
      rows_pp = OB * S;
      cols_pp = VB * S;
      nrp = NR / rows_pp;
      ncp = NC / cols_pp;
      total_parts = nrp * ncp;
      n_tokens = 0; n_empty_parts = 0; n_nonzeros = 0;
      ml.delete(); vl.delete();
      for (int i = 0; i < 2 * total_parts * S; i++) ml.push_back(0);
      addr = 2 * total_parts;
      for (int rp = 0; rp < nrp; rp++) begin
        for (int cp = 0; cp < ncp; cp++) begin
          longint unsigned ent[][$];
          int p, len;
          p = rp * ncp + cp;
          ent = new[S];
          len = 0;
          for (int s = 0; s < S; s++) begin
            int kcur;
            kcur = 0;
            for (int k = 0; k < OB; k++) begin
              int r;
              bit first;
              r = rp * rows_pp + s + S * k;
              first = 1;
              for (int c = 0; c < cols_pp; c++) begin
                int v;
                v = A[r][cp * cols_pp + c];
                if (v != 0) begin
                  if (first && k > kcur) begin
                    ent[s].push_back({32'(k - kcur), 32'hFFFF_FFFF});
                    n_tokens++;
                    kcur = k;
                  end
                  first = 0;
                  ent[s].push_back({32'(v), 32'(c)});
                  n_nonzeros++;
                end
              end
            end
            if (ent[s].size() > len) len = ent[s].size();
          end
          if (len == 0) n_empty_parts++;
          ml[2 * p * S]       = longint'(addr);
          ml[(2 * p + 1) * S] = longint'(len);
          for (int j = 0; j < len; j++)
            for (int s = 0; s < S; s++)
              data_words.push_back(j < ent[s].size() ? ent[s][j] : {32'd0, 32'hFFFF_FFFF});
          addr += len;
        end
      end
      foreach (data_words[i]) ml.push_back(data_words[i]);
      foreach (x[i]) vl.push_back(longint'(unsigned'(x[i])));
      // reference result
      y = new[NR];
      foreach (y[r]) begin
        y[r] = 0;
        for (int c = 0; c < NC; c++) y[r] += sx(A[r][c], MUL_W) * sx(x[c], MUL_W);
      end
    endfunction

    function int ml_words();
      return ml.size() / S;
    endfunction

    function int vl_words();
      return vl.size() / S;
    endfunction
  endclass

endpackage
