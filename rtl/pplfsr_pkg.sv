// pplfsr_pkg: types and constants shared by the prefix-tree based programmable
// parallel LFSR.
//
// The LFSR is of Galois type. With F_1..F_n the state bits, D_0..D_{n-1} the
// programmable generating sequence (D_n = 1 is implied) and M the serial input,
// one serial clock does
//     F_i <- D_{i-1} & F_n ^ F_{i-1},   F_0 taken as the next input bit M.
// The parallel circuit does j of these steps at once. Each output bit of the
// parallel circuit is a GF(2) sum of products, evaluated as a "last output
// only" (LOO) prefix problem by a tree of AND-XOR (AX) nodes. Which tree is
// used can be chosen per equation; the package names the available choices.
//
// Bit conventions used by every module of the design:
//   state[i-1] = F_i        (i = 1..n, state[n-1] = F_n drives the feedback)
//   poly[i]    = D_i        (i = 0..n-1, D_n = 1 is not stored)
//   msg[k]     = M_k        (k = 0..j-1, M_0 enters first)
package pplfsr_pkg;

  // Topology of one LOO prefix tree over m elements.
  //   PPT_SERIAL      : ripple chain of the serial prefix algorithm
  //                     (m-1 nodes, depth m-1)
  //   PPT_BRENT_KUNG  : the Brent-Kung up-sweep, the part of a Brent-Kung
  //                     network that reaches the last output; pairs from the
  //                     first element, an odd element out is the last one.
  //                     Sklansky's last output uses the same tree.
  //   PPT_KOGGE_STONE : the tree behind the last output of a Kogge-Stone
  //                     network; pairs from the last element, an odd element
  //                     out is the first one.
  // Both trees have depth ceil(log2(m)).
  typedef enum logic [1:0] {
    PPT_SERIAL      = 2'd0,
    PPT_BRENT_KUNG  = 2'd1,
    PPT_KOGGE_STONE = 2'd2
  } ppt_topo_e;

  // Number of AX levels of a Brent-Kung LOO tree over `elems` elements.
  function automatic int unsigned bk_depth(input int unsigned elems);
    int unsigned d, c;
    d = 0;
    c = elems;
    while (c > 1) begin
      c = (c + 1) / 2;
      d++;
    end
    return d;
  endfunction

  // Elements left after `lvl` pairing levels of a Brent-Kung LOO tree.
  function automatic int unsigned bk_count(input int unsigned elems, input int unsigned lvl);
    int unsigned c;
    c = elems;
    for (int unsigned l = 0; l < lvl; l++) c = (c + 1) / 2;
    return c;
  endfunction

endpackage
