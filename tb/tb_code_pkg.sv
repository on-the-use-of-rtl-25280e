// tb_code_pkg: testbench-side model of the quasi-cyclic LDPC code.
//
// code_model #(Z, DV, DC) builds the parity-check matrix H directly from its
// definition (DV x DC circulants, block (i,j) = identity rotated by
// (i*j) mod Z), independently of the RTL wiring functions. It offers:
//   - syndrome weight of a word,
//   - random codewords: H is brought to reduced row-echelon form once by
//     Gaussian elimination over GF(2); free bits are drawn at random and the
//     pivot bits solved from the reduced rows,
//   - one iteration of the (adapted) deterministic GDBF decoder, used as the
//     reference for the RTL decoder in GDBF mode.
package tb_code_pkg;

  class code_model #(int Z = 27, int DV = 3, int DC = 12);
    localparam int N = Z * DC;
    localparam int M = Z * DV;
    typedef logic [N-1:0] word_t;

    word_t h   [M];   // rows of H
    word_t rr  [M];   // reduced rows
    int    piv [M];   // pivot column of each reduced row, -1 if the row is zero
    bit    is_piv [N];
    int    rank;
    int    col_rows [N][DV];  // the DV checks of each column

    function new();
      for (int i = 0; i < DV; i++)
        for (int r = 0; r < Z; r++) begin
          h[i * Z + r] = '0;
          for (int j = 0; j < DC; j++)
            h[i * Z + r][j * Z + (r + (i * j) % Z) % Z] = 1'b1;
        end
      for (int n = 0; n < N; n++) begin
        int k;
        k = 0;
        for (int m = 0; m < M; m++) if (h[m][n]) begin col_rows[n][k] = m; k++; end
      end
      reduce();
    endfunction

    function void reduce();
      int row;
      for (int m = 0; m < M; m++) begin rr[m] = h[m]; piv[m] = -1; end
      for (int n = 0; n < N; n++) is_piv[n] = 0;
      row = 0;
      for (int col = 0; col < N && row < M; col++) begin
        int sel;
        sel = -1;
        for (int m = row; m < M; m++) if (rr[m][col]) begin sel = m; break; end
        if (sel < 0) continue;
        begin word_t t; t = rr[sel]; rr[sel] = rr[row]; rr[row] = t; end
        for (int m = 0; m < M; m++)
          if (m != row && rr[m][col]) rr[m] ^= rr[row];
        piv[row] = col;
        is_piv[col] = 1;
        row++;
      end
      rank = row;
    endfunction

    function int syn_weight(word_t x);
      int w;
      w = 0;
      for (int m = 0; m < M; m++) w += int'(^(h[m] & x));
      return w;
    endfunction

    function word_t random_codeword();
      word_t x;
      for (int n = 0; n < N; n++) x[n] = is_piv[n] ? 1'b0 : 1'($urandom);
      for (int r = 0; r < rank; r++) x[piv[r]] = ^(rr[r] & x);
      return x;
    endfunction

    // One GDBF step with reliability. Returns 0 (and leaves v) when the
    // syndrome is already zero, 1 after a flip step.
    function bit gdbf_step(ref word_t v, input word_t y, input word_t rel);
      bit c [M];
      int e [N];
      int emax;
      bit any;
      any = 0;
      for (int m = 0; m < M; m++) begin c[m] = ^(h[m] & v); any |= c[m]; end
      if (!any) return 0;
      emax = 0;
      for (int n = 0; n < N; n++) begin
        e[n] = int'(v[n] ^ y[n]);
        for (int k = 0; k < DV; k++) if (c[col_rows[n][k]]) e[n]++;
        if (e[n] > emax) emax = e[n];
      end
      for (int n = 0; n < N; n++) if (!rel[n] && e[n] == emax) v[n] = ~v[n];
      return 1;
    endfunction
  endclass

endpackage
