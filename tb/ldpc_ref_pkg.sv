// ldpc_ref_pkg -- bit-true behavioural reference of the decoder algorithm,
// used by the testbenches.
//
// ldpc_ref#(N,DV,DC,W) decodes one block with word-level arithmetic, written
// independently of the bit-serial hardware: normalised (factor 0.5) Min-Sum
// with the normalisation applied to the bit-node messages
//   q = sign(v) * min(|v| >> 1, 2^(W-2)-1),  v = L(Q) - L(r),
// check-node messages r = (XOR of other signs) * (min of other magnitudes),
// L(Q) = L(c) + sum r, hard decision = L(Q) < 0, and the stopping rule of
// the controller: before iteration it, stop if (et && all parity checks of
// the current decisions hold) or it-1 == max_iter.
// It also counts events the testbenches want to see exercised.
package ldpc_ref_pkg;
  import ldpc_pkg::*;

  class ldpc_ref #(int unsigned N = 2048, int unsigned DV = 6, int unsigned DC = 32, int unsigned W = 6);
    localparam int unsigned Z = N / DC;
    localparam int unsigned M = DV * Z;
    localparam int MAXMAG = (1 << (W - 2)) - 1;

    int lc   [N];
    bit dec  [N];
    int iters;
    bit conv;
    // event counters
    int n_sat, n_neg_r, n_apc_pos, n_apc_neg;

    function automatic bit parity_ok(input bit d[N]);
      for (int j = 0; j < int'(M); j++) begin
        bit p = 0;
        for (int c = 0; c < int'(DC); c++) p ^= d[cn_edge_bn(j, c, Z)];
        if (p) return 0;
      end
      return 1;
    endfunction

    function automatic void decode(input int max_iter, input bit et);
      int v  [N][DV];
      int rv [N][DV];
      int q  [N];
      bit s  [N][DV];
      int m  [N][DV];
      int it;
      bit ok;
      for (int i = 0; i < int'(N); i++) begin
        q[i] = lc[i];
        for (int r = 0; r < int'(DV); r++) v[i][r] = lc[i];
        if (((lc[i] >> (W - 2)) & 3) == 2) n_apc_neg++;
        if (((lc[i] >> (W - 2)) & 3) == 1) n_apc_pos++;
      end
      it = 1;
      forever begin
        for (int i = 0; i < int'(N); i++) dec[i] = (q[i] < 0);
        ok = parity_ok(dec);
        if ((et && ok) || (it - 1 >= max_iter)) begin
          iters = it - 1;
          conv  = ok;
          return;
        end
        // bit-node messages
        for (int i = 0; i < int'(N); i++)
          for (int r = 0; r < int'(DV); r++) begin
            int a;
            s[i][r] = v[i][r] < 0;
            a = (v[i][r] < 0) ? -v[i][r] : v[i][r];
            a = a >> 1;
            if (a > MAXMAG) begin a = MAXMAG; n_sat++; end
            m[i][r] = a;
          end
        // check nodes
        for (int j = 0; j < int'(M); j++) begin
          int r = j / Z;
          for (int c = 0; c < int'(DC); c++) begin
            bit sg = 0;
            int mn = MAXMAG;
            int i = cn_edge_bn(j, c, Z);
            for (int c2 = 0; c2 < int'(DC); c2++) begin
              int i2;
              if (c2 == c) continue;
              i2 = cn_edge_bn(j, c2, Z);
              sg ^= s[i2][r];
              if (m[i2][r] < mn) mn = m[i2][r];
            end
            rv[i][r] = sg ? -mn : mn;
            if (sg) n_neg_r++;
          end
        end
        // bit nodes
        for (int i = 0; i < int'(N); i++) begin
          q[i] = lc[i];
          for (int r = 0; r < int'(DV); r++) q[i] += rv[i][r];
          for (int r = 0; r < int'(DV); r++) v[i][r] = q[i] - rv[i][r];
        end
        it++;
      end
    endfunction
  endclass
endpackage
