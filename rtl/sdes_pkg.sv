// sdes_pkg: tables of the Simplified DES (S-DES) cipher used as the pseudo-random function f
// of the reader/tag mutual authentication.
//
// Permutations are lists of 1-based source bit positions, bit 1 being the most significant
// bit, in output order: output bit i (from the left) is input bit TABLE[i]. The two S-boxes
// follow the design; the five permutation tables are the classic S-DES ones (10-bit key
// permutation, 8-bit subkey selection, initial permutation, expansion and 4-bit permutation),
// which this design adopts because the design text does not list its own.
package sdes_pkg;

  typedef int unsigned perm10_t [10];
  typedef int unsigned perm8_t  [8];
  typedef int unsigned perm4_t  [4];
  typedef logic [1:0]  sbox_t   [4][4];   // [row][column]

  localparam perm10_t PC1  = '{3, 5, 2, 7, 4, 10, 1, 9, 8, 6};  // key permutation (P10)
  localparam perm8_t  PC2  = '{6, 3, 7, 4, 8, 5, 10, 9};        // subkey selection (P8)
  localparam perm8_t  IP   = '{2, 6, 3, 1, 4, 8, 5, 7};         // initial permutation
  localparam perm8_t  IPI  = '{4, 1, 3, 5, 7, 2, 8, 6};         // inverse initial permutation
  localparam perm8_t  EP   = '{4, 1, 2, 3, 2, 3, 4, 1};         // expansion of a 4-bit half
  localparam perm4_t  P4   = '{2, 4, 3, 1};                     // permutation of the S-box output

  // S-boxes of the design. Row = input bits 1 and 4, column = input bits 2 and 3.
  localparam sbox_t S0 = '{'{2'd1, 2'd0, 2'd2, 2'd3},
                           '{2'd3, 2'd1, 2'd0, 2'd2},
                           '{2'd2, 2'd0, 2'd3, 2'd1},
                           '{2'd1, 2'd3, 2'd2, 2'd0}};
  localparam sbox_t S1 = '{'{2'd0, 2'd3, 2'd1, 2'd2},
                           '{2'd3, 2'd2, 2'd0, 2'd1},
                           '{2'd1, 2'd0, 2'd3, 2'd2},
                           '{2'd2, 2'd1, 2'd3, 2'd0}};

endpackage
