// mult_pkg: sizes and types shared by the 12x9b Booth multiplier.
//
// The multiplicand Y is 12 bits and the multiplier X 9 bits, both two's
// complement, so the product needs 21 bits. Radix-4 Booth recoding of a
// 9-bit multiplier gives 5 digits, each of which selects one of six
// candidates from Y (0, Y, 2Y, 2Y#, Y#, 1; '#' is the bitwise complement
// and "1" is the all-ones word). Every digit yields a 14-bit partial product.
// The compressor tree and completion adder span bit positions 0..21 (22
// positions): the top position only carries the pre-computed sign-extension
// constant and the product's redundant sign, and is dropped at the output.
package mult_pkg;

  localparam int unsigned YW    = 12;             // multiplicand width
  localparam int unsigned XW    = 9;              // multiplier width
  localparam int unsigned PRODW = YW + XW;        // product width, 21
  localparam int unsigned NDIG  = (XW + 1) / 2;   // Booth digits, 5
  localparam int unsigned SELW  = YW + 1;         // selected candidate, 13b
  localparam int unsigned PPW   = YW + 2;         // partial product, 14b
  localparam int unsigned SUMW  = 2 * (NDIG - 1) + PPW; // tree/adder width, 22

  // One-hot Booth select bits of one digit, S0 in bit 0 up to S5 in bit 5.
  typedef struct packed {
    logic one;   // S5: all-ones word (digit -0, triplet 111)
    logic yn;    // S4: Y#  (digit -1)
    logic y2n;   // S3: 2Y# (digit -2)
    logic y2;    // S2: 2Y  (digit +2)
    logic y;     // S1: Y   (digit +1)
    logic zero;  // S0: 0   (digit 0, triplet 000)
  } booth_sel_t;

endpackage
