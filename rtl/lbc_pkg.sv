// lbc_pkg -- types, constants and bit permutations shared by the LBC-IoT core.
//
// LBC-IoT is a 32-bit Feistel block cipher with an 80-bit key and 32 rounds.
// This package holds the block/key/subkey widths, the round count and the
// two 16-bit bit permutations P1 and P2 of the round function, plus their
// inverses (used when decrypting).
//
// Bit numbering of the permutation table follows the FIPS convention: bit 1
// is the leftmost (most significant) bit of the 16-bit word. An entry
// P(x) = y means output bit x is taken from input bit y, as in the DES
// tables; in Verilog index terms out[16-x] = in[16-y]. Reading the table as
// "source to output" rather than "input to destination" is this design's
// choice; the published table does not say which way it reads.
package lbc_pkg;

  localparam int unsigned BLOCK_W  = 32;
  localparam int unsigned HALF_W   = 16;
  localparam int unsigned KEY_W    = 80;
  localparam int unsigned KHALF_W  = 40;
  localparam int unsigned ROUNDS   = 32;
  // Subkeys K1..K5 are slices of the key; K6..K32 are generated.
  localparam int unsigned DIRECT_KEYS = 5;
  localparam int unsigned GEN_KEYS    = ROUNDS - DIRECT_KEYS;   // 27
  // Rotation amounts of the round function and of the key schedule.
  localparam int unsigned ROT_R = 7;
  localparam int unsigned ROT_K = 3;

  typedef logic [HALF_W-1:0]  half_t;
  typedef logic [KHALF_W-1:0] khalf_t;
  typedef logic [3:0]         nibble_t;

  // Permutation tables, FIPS numbering (entry x-1 holds P(x)).
  typedef int unsigned ptab_t [16];
  localparam ptab_t P1_TAB = '{13, 10, 7, 12, 9, 14, 3, 2, 5, 16, 15, 4, 1, 6, 11, 8};
  localparam ptab_t P2_TAB = '{5, 8, 16, 12, 3, 11, 2, 13, 4, 1, 14, 6, 9, 15, 7, 10};

  // out bit x <- in bit P(x)
  function automatic half_t perm_fwd(input half_t d, input ptab_t tab);
    half_t o;
    for (int x = 1; x <= 16; x++) o[16-x] = d[16-tab[x-1]];
    return o;
  endfunction

  // inverse: out bit P(x) <- in bit x
  function automatic half_t perm_inv(input half_t d, input ptab_t tab);
    half_t o;
    for (int x = 1; x <= 16; x++) o[16-tab[x-1]] = d[16-x];
    return o;
  endfunction

  function automatic half_t p1(input half_t d);     return perm_fwd(d, P1_TAB); endfunction
  function automatic half_t p2(input half_t d);     return perm_fwd(d, P2_TAB); endfunction
  function automatic half_t p1_inv(input half_t d); return perm_inv(d, P1_TAB); endfunction
  function automatic half_t p2_inv(input half_t d); return perm_inv(d, P2_TAB); endfunction

  // circular left shift of a half block by ROT_R
  function automatic half_t rotl7(input half_t d);
    return {d[HALF_W-1-ROT_R:0], d[HALF_W-1:HALF_W-ROT_R]};
  endfunction

  // circular shifts of a 40-bit key half by ROT_K
  function automatic khalf_t rotl3(input khalf_t d);
    return {d[KHALF_W-1-ROT_K:0], d[KHALF_W-1:KHALF_W-ROT_K]};
  endfunction
  function automatic khalf_t rotr3(input khalf_t d);
    return {d[ROT_K-1:0], d[KHALF_W-1:ROT_K]};
  endfunction

  // Operation selected at start.
  typedef enum logic {OP_ENC = 1'b0, OP_DEC = 1'b1} op_e;

endpackage
