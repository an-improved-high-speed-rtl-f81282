// crt_pkg: constants and elaboration-time helpers shared by the CRT
// residue-to-binary converter.
//
// The default residue base is the eight 5-bit moduli {32,31,29,27,25,23,19,17}
// (dynamic range M = 144259293600, about 37.07 bits). The functions below are
// only evaluated at elaboration: they size the Wallace tree, give the
// pipeline latency of each sub-block and compute multiplicative inverses for
// the projection tables. Every latency function returns 0 for an unpipelined
// (purely combinational) instance.
package crt_pkg;

  localparam int              N_DEFAULT = 8;
  localparam int unsigned     MODULI_DEFAULT [N_DEFAULT] = '{32, 31, 29, 27, 25, 23, 19, 17};
  localparam longint unsigned M_DEFAULT = 64'd144259293600;
  localparam int              A_DEFAULT = 5;   // a = ceil(log2 m), residue width
  localparam int              B_DEFAULT = 38;  // b = ceil(log2 M), result width

  // Number of operands left after `level` layers of 3:2 compression of n operands.
  function automatic int csa_tree_count(input int n, input int level);
    int c = n;
    for (int l = 0; l < level; l++) c = 2 * (c / 3) + (c % 3);
    return c;
  endfunction

  // Number of 3:2 layers needed to bring n operands down to two.
  function automatic int csa_tree_levels(input int n);
    int c = n;
    int lv = 0;
    while (c > 2) begin
      c = 2 * (c / 3) + (c % 3);
      lv++;
    end
    return lv;
  endfunction

  // Pipeline latencies (clock cycles) of the sub-blocks.
  function automatic int lf_latency(input bit pipe);
    return pipe ? 2 : 0;   // one register after the 3-variable functions, one after the multiplexers
  endfunction

  function automatic int csa_tree_latency(input int n, input bit pipe);
    return pipe ? csa_tree_levels(n) : 0;   // one register per 3:2 layer
  endfunction

  function automatic int rca_latency(input int w, input bit pipe);
    return pipe ? w : 0;   // one register per full-adder position
  endfunction

  function automatic int prefix_levels(input int w);
    return (w < 2) ? 0 : $clog2(w);
  endfunction

  function automatic int cpa_latency(input int w, input bit pipe);
    return pipe ? prefix_levels(w) : 0;   // one register per prefix level
  endfunction

  function automatic int csa_latency(input bit pipe);
    return pipe ? 1 : 0;
  endfunction

  // Multiplicative inverse of a modulo m (a and m co-prime, m > 1).
  function automatic longint unsigned mod_inverse(input longint unsigned a, input longint unsigned m);
    longint unsigned r = 0;
    for (longint unsigned i = 1; i < m; i++)
      if (((a % m) * i) % m == 1) begin
        r = i;
        break;
      end
    return r;
  endfunction

  // Truth table of the lowest five outputs of the projection table for the
  // first modulus (32) of the default base: entry x, bits [5x +: 5], holds
  // bits 4..0 of |x * N_1|_32 * M_1. Used as the default of lf_block.
  function automatic logic [32*5-1:0] default_lf_table();
    logic [32*5-1:0]  t;
    longint unsigned  mj = M_DEFAULT / 32;
    longint unsigned  nj = mod_inverse(mj % 32, 32);
    for (int i = 0; i < 32; i++) t[i*5 +: 5] = 5'(((longint'(i) * nj) % 32) * mj);
    return t;
  endfunction

endpackage
