// rsa_pkg: constants and types shared by the RSA exponentiation core.
//
// Operands are 1024-bit numbers kept as 64 words of 16 bits, least
// significant word first. The 16-bit word follows the 16x16 multiplier
// split of the multiplication engine; the 1024-bit key size is the main
// configuration evaluated. The slot map of the operand RAM is a choice of
// this design: the RAM is divided into 16 slots of N_WORDS words each and a
// word address is {slot, word index}.
package rsa_pkg;

  parameter int unsigned WORD_W  = 16;   // engine word width
  parameter int unsigned N_WORDS = 64;   // words per operand (1024 bits)
  parameter int unsigned SLOT_W  = 4;    // slot field of a RAM address

  // Slots of the operand RAM. SLOT_ONE holds nothing: reading it yields the
  // number 1 (word 0 = 1, all other words 0).
  typedef enum logic [SLOT_W-1:0] {
    SLOT_N   = 4'd0,   // modulus n (odd)
    SLOT_NP  = 4'd1,   // n' = -n^-1 mod r
    SLOT_R2  = 4'd2,   // r^2 mod n
    SLOT_X   = 4'd3,   // message x
    SLOT_E   = 4'd4,   // exponent, bit i in word i/16, bit i%16
    SLOT_XT0 = 4'd5,   // x~ = x*r mod n, result pair
    SLOT_XT1 = 4'd6,
    SLOT_A0  = 4'd7,   // accumulator A, result pair
    SLOT_A1  = 4'd8,
    SLOT_M   = 4'd9,   // m = t*n' mod r (Montgomery intermediate)
    SLOT_R0  = 4'd10,  // r mod n, kept for reuse with the same modulus
    SLOT_R1  = 4'd11,
    SLOT_ONE = 4'd15   // constant 1
  } slot_e;

endpackage
