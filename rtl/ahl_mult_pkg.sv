// Shared types for the aging-aware NR4SD multiplier.
//
// The multiplier operand is recoded into Non-Redundant radix-4 Signed-Digit
// (NR4SD) form. Two flavours exist: NR4SD- with digits {-2,-1,0,+1} and
// NR4SD+ with digits {-1,0,+1,+2}. Every digit but the most significant one
// is stored in two bits; the most significant digit keeps Modified Booth (MB)
// form {-2..+2} in three bits, so an n-bit operand needs n+1 stored bits.
// The bit-level meaning of the stored pairs and of the one-hot encodings
// follows the NR4SD- and NR4SD+ encoding tables of the design description.
package ahl_mult_pkg;

  // Which NR4SD flavour the multiplier uses.
  typedef enum logic {
    NR4SD_MINUS = 1'b0,  // digits {-2,-1,0,+1}
    NR4SD_PLUS  = 1'b1   // digits {-1,0,+1,+2}
  } nr4sd_kind_e;

  // One stored NR4SD digit. For NR4SD- hi = n-_{2j+1} (weight -2) and
  // lo = n+_{2j} (weight +1). For NR4SD+ hi = n+_{2j+1} (weight +2) and
  // lo = n-_{2j} (weight -1).
  typedef struct packed {
    logic hi;
    logic lo;
  } nr_digit_t;

  // One-hot encoding of an NR4SD digit, as fed to a partial product
  // generator. `two` is two- for NR4SD- and two+ for NR4SD+.
  typedef struct packed {
    logic one_p;  // digit = +1
    logic one_m;  // digit = -1
    logic two;    // digit = -2 (NR4SD-) or +2 (NR4SD+)
  } nr_enc_t;

  // Modified Booth encoding of the most significant digit.
  typedef struct packed {
    logic s;      // sign, 1 = negative
    logic one;    // |digit| = 1
    logic two;    // |digit| = 2
  } mb_enc_t;

endpackage
