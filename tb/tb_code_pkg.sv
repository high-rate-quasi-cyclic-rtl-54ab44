// tb_code_pkg: testbench helpers for the QC-LDPC code. make_codeword builds
// the parity-check matrix from the circulant offsets, brings it to reduced
// row echelon form over GF(2) (rows packed in 64-bit words), draws the free
// bits at random and solves for the pivot bits, giving a uniformly random
// codeword. syndrome_weight counts unsatisfied checks of a word.
package tb_code_pkg;
  import qc_ldpc_pkg::*;

  typedef bit cw_t [];

  function automatic cw_t make_codeword(input int m, input int nb, input int p, input int w,
                                        input int offs [], input bit all_zero);
    int n, rows, nw, rank;
    longint unsigned h [][];
    int piv [];
    bit x [];
    n = nb * p; rows = m * p; nw = (n + 63) / 64;
    h = new[rows];
    foreach (h[r]) begin
      h[r] = new[nw];
      foreach (h[r][q]) h[r][q] = 0;
    end
    for (int i = 0; i < m; i++)
      for (int j = 0; j < nb; j++)
        for (int k = 0; k < w; k++)
          for (int r = 0; r < p; r++) begin
            int c;
            c = j * p + (r + offs[(i*nb + j)*w + k]) % p;
            h[i*p + r][c / 64] ^= (64'd1 << (c % 64));
          end
    piv = new[rows];
    rank = 0;
    for (int c = 0; c < n && rank < rows; c++) begin
      int sel;
      sel = -1;
      for (int r = rank; r < rows; r++)
        if (h[r][c / 64][c % 64]) begin sel = r; break; end
      if (sel < 0) continue;
      if (sel != rank) begin
        longint unsigned tmp [];
        tmp = h[sel]; h[sel] = h[rank]; h[rank] = tmp;
      end
      for (int r = 0; r < rows; r++)
        if (r != rank && h[r][c / 64][c % 64])
          for (int q = 0; q < nw; q++) h[r][q] ^= h[rank][q];
      piv[rank] = c;
      rank++;
    end
    x = new[n];
    foreach (x[c]) x[c] = all_zero ? 1'b0 : 1'($urandom);
    for (int r = 0; r < rank; r++) x[piv[r]] = 1'b0;
    for (int r = 0; r < rank; r++) begin
      bit par;
      par = 0;
      for (int q = 0; q < nw; q++) begin
        longint unsigned v;
        v = 0;
        for (int b = 0; b < 64 && q*64 + b < n; b++) v[b] = x[q*64 + b];
        par ^= ^(h[r][q] & v);
      end
      x[piv[r]] = par;
    end
    return x;
  endfunction

  function automatic int syndrome_weight(input int m, input int nb, input int p, input int w,
                                         input int offs [], input bit x []);
    int cnt;
    cnt = 0;
    for (int i = 0; i < m; i++)
      for (int r = 0; r < p; r++) begin
        bit par;
        par = 0;
        for (int j = 0; j < nb; j++)
          for (int k = 0; k < w; k++)
            par ^= x[j * p + (r + offs[(i*nb + j)*w + k]) % p];
        cnt += par;
      end
    return cnt;
  endfunction
endpackage
