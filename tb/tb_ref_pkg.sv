// tb_ref_pkg: reference models shared by the testbenches, written from the code definitions
// and independent of the RTL's own functions.
//   ref_ham38   : (38,32) shortened Hamming codeword, positional (checks at positions 2^j)
//   ref_ham74   : (7,4) Hamming parity {p3,p2,p1} of data bits d0..d3 at positions 3,5,6,7
//   ref_column  : a wireless column {valid, ftype, vc, ham38(data)}
//   ref_block   : the 7 columns of a product-code block built from 4 columns
package tb_ref_pkg;
  typedef logic [42:0] col_t;
  typedef col_t block_t [7];

  function automatic logic [37:0] ref_ham38(logic [31:0] d);
    logic [37:0] w = '0;
    int n = 0;
    for (int p = 1; p <= 38; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16 && p != 32) begin
        w[p-1] = d[n];
        n++;
      end
    for (int j = 0; j < 6; j++) begin
      automatic logic x = 0;
      for (int p = 1; p <= 38; p++)
        if (((p >> j) & 1) == 1 && p != (1 << j)) x ^= w[p-1];
      w[(1 << j) - 1] = x;
    end
    return w;
  endfunction

  function automatic logic [2:0] ref_ham74(logic [3:0] d);
    // codeword positions 1..7 = p1 p2 d0 p3 d1 d2 d3
    logic [7:1] c;
    c[3] = d[0]; c[5] = d[1]; c[6] = d[2]; c[7] = d[3];
    c[1] = c[3] ^ c[5] ^ c[7];
    c[2] = c[3] ^ c[6] ^ c[7];
    c[4] = c[5] ^ c[6] ^ c[7];
    return {c[4], c[2], c[1]};
  endfunction

  function automatic col_t ref_column(logic v, logic [1:0] ft, logic [1:0] vc, logic [31:0] d);
    return {v, ft, vc, ref_ham38(d)};
  endfunction

  function automatic block_t ref_block(col_t c0, col_t c1, col_t c2, col_t c3);
    block_t b;
    b[0] = c0; b[1] = c1; b[2] = c2; b[3] = c3;
    for (int k = 0; k < 43; k++) begin
      automatic logic [2:0] p = ref_ham74({c3[k], c2[k], c1[k], c0[k]});
      b[4][k] = p[0]; b[5][k] = p[1]; b[6][k] = p[2];
    end
    return b;
  endfunction
endpackage
