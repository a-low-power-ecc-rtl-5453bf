// ecc_ref_pkg: reference model for the testbenches, written apart from the
// RTL. It lists the H-matrix columns by nested loops over row indices
// (colex order, which is increasing numeric order), computes check bits by
// summing columns, and places data bits on input paths by walking each group.
package ecc_ref_pkg;

  typedef logic [63:0] word_t;
  typedef logic [6:0]  chk_t;

  function automatic chk_t ref_col(int p);
    chk_t cols [64];
    int n = 0;
    for (int b = 1; b < 7; b++)
      for (int a = 0; a < b; a++) begin
        cols[n] = chk_t'((1 << a) | (1 << b)); n++;
      end
    for (int c = 2; c < 7; c++)
      for (int b = 1; b < c; b++)
        for (int a = 0; a < b; a++) begin
          cols[n] = chk_t'((1 << a) | (1 << b) | (1 << c)); n++;
        end
    cols[56] = 7'b0001111; cols[57] = 7'b0011110; cols[58] = 7'b0101011;
    cols[59] = 7'b0111100; cols[60] = 7'b1000111; cols[61] = 7'b1100011;
    cols[62] = 7'b1110001; cols[63] = 7'b1111000;
    return cols[p];
  endfunction

  // Check bits of a vector of input paths.
  function automatic chk_t ref_check(word_t paths);
    chk_t c = '0;
    for (int p = 0; p < 64; p++) if (paths[p]) c ^= ref_col(p);
    return c;
  endfunction

  // Input path of every data bit, groups m2 -> paths 0.., m3 -> 21.., rest -> 56..
  function automatic void ref_map(word_t m2, word_t m3, output int dest [64]);
    int n2 = 0, n3 = 21, n4 = 56;
    for (int i = 0; i < 64; i++) begin
      if (m2[i])      begin dest[i] = n2; n2++; end
      else if (m3[i]) begin dest[i] = n3; n3++; end
      else            begin dest[i] = n4; n4++; end
    end
  endfunction

  function automatic word_t ref_order(word_t m2, word_t m3, word_t data);
    int dest [64];
    word_t o = '0;
    ref_map(m2, m3, dest);
    for (int i = 0; i < 64; i++) o[dest[i]] = data[i];
    return o;
  endfunction

  // Check bits of a data word stored under route (m2, m3).
  function automatic chk_t ref_encode(word_t m2, word_t m3, word_t data);
    return ref_check(ref_order(m2, m3, data));
  endfunction

  // Random partition: 21 bits in m2, 35 in m3, 8 left.
  function automatic void ref_rand_route(output word_t m2, output word_t m3);
    int perm [64];
    for (int i = 0; i < 64; i++) perm[i] = i;
    for (int i = 63; i > 0; i--) begin
      int j = int'($urandom_range(i, 0));
      int t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    m2 = '0; m3 = '0;
    for (int k = 0; k < 21; k++) m2[perm[k]] = 1'b1;
    for (int k = 21; k < 56; k++) m3[perm[k]] = 1'b1;
  endfunction

  function automatic word_t rand_word();
    return {$urandom(), $urandom()};
  endfunction

endpackage
