// tb_gsa_pkg: reference description of the example control algorithm used by
// the testbenches, written at the level of the graph-scheme, not of the
// memory image. Eight chains (codes 0..7) of operator vertices b1..b21:
//   chain 0: b1 b2 b3     -> x1 ? chain 1 : chain 2
//   chain 1: b4 b5 b6  \
//   chain 2: b7 b8     /  -> x2 ? chain 3 : chain 4   (one class)
//   chain 3: b9 b10 b11 \
//   chain 4: b12 b13    / -> x3 ? chain 5 : chain 6   (one class)
//   chain 5: b14 b15 b16 \
//   chain 6: b17 b18     / -> x4 ? chain 0 : chain 7  (one class)
//   chain 7: b19 b20 b21  -> end
// Vertex b_q drives microoperations with indices (7q mod 50), (13q+5 mod 50)
// and (3q+11 mod 50), counted from 0 for y1.
package tb_gsa_pkg;

  localparam int NCH = 8;
  localparam int NY  = 50;

  function automatic int chain_len(int g);
    int lens [NCH] = '{3, 3, 2, 3, 2, 3, 2, 3};
    return lens[g];
  endfunction

  function automatic int first_vertex(int g);
    int fv [NCH] = '{1, 4, 7, 9, 12, 14, 17, 19};
    return fv[g];
  endfunction

  // class of pseudoequivalent chains; -1 for the chain that ends the algorithm
  function automatic int chain_class(int g);
    int c [NCH] = '{0, 1, 1, 2, 2, 3, 3, -1};
    return c[g];
  endfunction

  // class c tests condition x(c+1)
  function automatic int next_chain(int c, logic [3:0] x);
    int t [4] = '{1, 3, 5, 0};
    int f [4] = '{2, 4, 6, 7};
    return x[c] ? t[c] : f[c];
  endfunction

  function automatic logic [NY-1:0] yset(int q);
    logic [NY-1:0] v;
    v = '0;
    v[(q * 7) % NY]      = 1'b1;
    v[(q * 13 + 5) % NY] = 1'b1;
    v[(q * 3 + 11) % NY] = 1'b1;
    return v;
  endfunction

endpackage
