// Shared types and constants for the compressed-sign ("new fractional")
// number format and its arithmetic element.
//
// A word of NF_W bits (16 by default) is {shift, field[NF_W-2:0]}. The field
// is a two's complement number whose run of leading sign bits has been
// halved (rounded up); the shift flag records whether the original run was
// even (1) or odd (0). Expanded, the word is a left-justified two's
// complement fraction of 2*NF_W bits (Q1.31 for 16-bit words). The modules
// take NF_W as a parameter; the constants below describe the default,
// 16-bit, configuration. The bit layout (flag in the top bit) and the op
// codes of the arithmetic element are this design's own choices.
package nf_pkg;

  localparam int unsigned NF_W    = 16;        // packed word
  localparam int unsigned FIELD_W = NF_W - 1;  // compressed two's complement field
  localparam int unsigned WIDE_W  = 2 * NF_W;  // expanded two's complement word

  typedef struct packed {
    logic                 shift;  // 1: sign run was even, 0: odd
    logic [FIELD_W-1:0]   field;  // compressed two's complement field
  } nf_word_t;

  // Operations of the arithmetic element
  typedef enum logic [2:0] {
    OP_NOP = 3'd0,  // hold the accumulator
    OP_CLR = 3'd1,  // acc <= 0
    OP_LDA = 3'd2,  // acc <= A
    OP_ADD = 3'd3,  // acc <= sat(acc + A)
    OP_SUB = 3'd4,  // acc <= sat(acc - A)
    OP_MPY = 3'd5,  // acc <= A * B
    OP_MAC = 3'd6,  // acc <= sat(acc + A * B)
    OP_MSU = 3'd7   // acc <= sat(acc - A * B)
  } nf_op_t;

endpackage
