// 15 x 15-bit multiplier for the compressed-sign format (NF_W-1 bits square
// in general).
//
// No decoded operand has more than 15 significant bits, so the product is
// formed from the two 15-bit two's complement significands (the decoders'
// "mant", i.e. the raw fields) and only then shifted into the 32-bit
// fractional format. With operands a = ma << sa and b = mb << sb (Q1.31),
// the Q1.31 product is (ma * mb) << (sa + sb - 31): a left shift of up to 3
// or an arithmetic right shift of up to 27, which truncates toward -infinity
// like a plain 32 x 32 fractional multiply keeping the top word. The one
// product that overflows, -1.0 x -1.0, saturates to the largest value and
// raises "sat". The saturation and truncation are this design's choices.
//
// Interface: ma, sa, mb, sb in; p (Q1.31 by default) and sat out.
// Timing: combinational.
module nf_mul15 #(
  parameter int unsigned NF_W = 16,
  localparam int unsigned FW  = NF_W - 1,
  localparam int unsigned WW  = 2 * NF_W,
  localparam int unsigned SW  = $clog2(NF_W + 2),
  localparam int unsigned TW  = SW + 1
) (
  input  logic signed [FW-1:0] ma,
  input  logic [SW-1:0]        sa,
  input  logic signed [FW-1:0] mb,
  input  logic [SW-1:0]        sb,
  output logic [WW-1:0]        p,
  output logic                 sat
);
  localparam logic [WW-1:0] PMAX = {1'b0, {(WW-1){1'b1}}};

  logic signed [2*FW-1:0] prod;  // 2*FW-bit product
  logic signed [WW:0]     wide;  // one bit more than the result, room for +1.0
  logic [TW-1:0]          t;     // sa + sb

  always_comb begin
    prod = ma * mb;
    t    = TW'(sa) + TW'(sb);
    if (t >= TW'(WW - 1)) wide = (WW+1)'(prod) <<< (t - TW'(WW - 1));
    else                  wide = (WW+1)'(prod) >>> (TW'(WW - 1) - t);
    sat  = (wide > $signed({1'b0, PMAX}));
    p    = sat ? PMAX : wide[WW-1:0];
  end
endmodule
