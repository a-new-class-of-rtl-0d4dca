// Decoder: compressed-sign word -> two's complement fraction of twice the
// width (16 -> 32 bits by default).
//
// The k leading sign bits of the NF_W-1-bit field are doubled to 2k; if the
// shift flag is 0 one of them is removed again, giving 2k-1. The remaining
// field bits follow, and the result is left-justified in 2*NF_W bits with
// zeros below. This is the expansion the format is defined by.
//
// Because every bit below the sign run is copied unchanged, the field itself,
// read as a two's complement number, is the significand, and the expanded
// value equals field << (NF_W + 2 - k - shift) (18 - k - shift for 16-bit
// words, a shift of 2..17). That significand and shift are brought out for
// the 15 x 15 multiplier; this split is this design's own arrangement of
// the same arithmetic. mant is therefore wired straight from the input
// field, on purpose.
//
// Interface: w in ({shift, field}); q (Q1.31 by default), mant (signed,
// NF_W-1 bits) and shamt out. Timing: combinational.
module nf_decode #(
  parameter int unsigned NF_W = 16,
  localparam int unsigned FW  = NF_W - 1,          // field width
  localparam int unsigned WW  = 2 * NF_W,          // expanded width
  localparam int unsigned KW  = $clog2(FW + 1),    // run length of the field
  localparam int unsigned NW  = $clog2(2 * FW + 1),// run length after expansion
  localparam int unsigned SW  = $clog2(NF_W + 2)   // shamt
) (
  input  logic [NF_W-1:0]      w,
  output logic [WW-1:0]        q,
  output logic signed [FW-1:0] mant,
  output logic [SW-1:0]        shamt
);
  typedef struct packed {
    logic          shift;
    logic [FW-1:0] field;
  } word_t;

  word_t          wd;
  logic [KW-1:0]  k;       // sign-run length of the field, 1..FW
  logic [NW-1:0]  nsign;   // sign-run length after expansion, 1..2*FW
  logic [FW-1:0]  rest;    // field bits below the sign run, MSB aligned
  logic           s;

  assign wd = word_t'(w);

  nf_lsc #(.W(FW), .CW(KW)) u_lsc (.x(wd.field), .n(k));

  always_comb begin
    s     = wd.field[FW-1];
    nsign = NW'({k, 1'b0}) - NW'(1) + NW'(wd.shift);
    rest  = wd.field << k;
    q     = ({WW{s}} << (NW'(WW) - nsign))
          | ({rest, {(WW-FW){1'b0}}} >> nsign);
    mant  = wd.field;
    shamt = SW'(NF_W + 2) - SW'(k) - SW'(wd.shift);
  end
endmodule
