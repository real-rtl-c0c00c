// real_pkg: shared types, constants and code-structure functions for the
// retention-error-aware (REAL) LDPC codec of an MLC NAND flash controller.
//
// The parity-check matrix H is quasi-cyclic: an MB x NB array of Z x Z blocks,
// each either all-zero or a cyclic shift of the identity.  Block (b,c) with
// shift s has a one at (row t, column (t+s) mod Z), so bit u of block column c
// meets row t = (u - s) mod Z of block row b.  Shifts are computed, not stored:
//   CODE_ARRAY    : every block present, s = b*c mod Z.  With MB=4, NB=36 this
//                   is the regular column-weight-4, row-weight-36, rate-8/9
//                   code of the evaluated configuration.  Because
//                   |(b1-b2)(c1-c2)| <= 105 < Z=512 it has no 4-cycles.
//   CODE_DUALDIAG : information blocks s = b*(c+1) mod Z, the last MB block
//                   columns form a dual-diagonal of identities, so the check
//                   bits follow from the information bits by back-substitution.
//                   Used where a real encoder must produce codewords (an
//                   all-present array of permutation blocks is rank deficient,
//                   so no [P | I] form exists for CODE_ARRAY).
// Z must be a power of two.  LLR convention: positive means bit 0; a total
// LLR <= 0 decides bit 1.
package real_pkg;

  typedef enum logic [0:0] {CODE_ARRAY = 1'b0, CODE_DUALDIAG = 1'b1} code_e;

  // Block (b,c) of H is non-zero.
  function automatic bit blk_present(code_e code, int mb, int nb, int b, int c);
    if (code == CODE_ARRAY) return 1'b1;
    if (c < nb - mb) return 1'b1;
    return (c == nb - mb + b) || (c == nb - mb + b - 1);
  endfunction

  // Cyclic shift of block (b,c); only meaningful when the block is present.
  function automatic int unsigned blk_shift(code_e code, int mb, int nb, int z, int b, int c);
    if (code == CODE_ARRAY) return (b * c) % z;
    if (c < nb - mb) return (b * (c + 1)) % z;
    return 0;
  endfunction

  // Three-bit E_j case code, reported for observation counting.
  typedef enum logic [2:0] {
    EJ_UP_DIFF  = 3'd1,  // case 1: upper page, partner P_c and HD_c disagree
    EJ_LO_DIFF  = 3'd2,  // case 2: lower page, disagree
    EJ_LO_POS   = 3'd3,  // case 3: lower page, both say 0
    EJ_LO_NEG   = 3'd4,  // case 4: lower page, both say 1
    EJ_UP_POS   = 3'd5,  // case 5: upper page, both say 0
    EJ_UP_NEG   = 3'd6   // case 6: upper page, both say 1
  } ej_case_e;

endpackage
