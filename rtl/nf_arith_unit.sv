// Arithmetic element of a 16-bit DSP working natively in the compressed-sign
// ("new fractional") 16-bit format.
//
// Data stays 16 bits wide on the buses; only the arithmetic is 32 bits.
// Operand A and B words are each expanded by a decoder into 32-bit two's
// complement fractions. Their 15-bit significands go to a 15 x 15 multiplier
// whose product is shifted into 32-bit form; decoded A and the product feed
// a 32-bit saturating ALU and accumulator. The accumulator is encoded back to
// a 16-bit word, with rounding, for storing. This decode / 32-bit arithmetic
// / encode organisation and the 15 x 15 multiplier follow the format's
// intended hardware use; the op set, the one-cycle timing, saturation and
// the status flags are this design's choices.
//
// Interface: op, a_in, b_in each cycle. y is the encoded accumulator and
// acc the full 32-bit one. ovf marks an ALU saturation in the last op,
// mul_sat a saturated product (-1.0 x -1.0) in the last op; y_sat and
// y_renorm describe the current encoding of acc.
// Timing: one op per clock; acc, y and flags reflect an op one cycle later.
// NF_W sets the word width (16, the format's main size, by default); the
// arithmetic is then 2*NF_W bits wide with an (NF_W-1)-square multiplier.
module nf_arith_unit #(
  parameter int unsigned NF_W = 16,
  localparam int unsigned FW  = NF_W - 1,
  localparam int unsigned WW  = 2 * NF_W,
  localparam int unsigned SW  = $clog2(NF_W + 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  nf_pkg::nf_op_t    op,
  input  logic [NF_W-1:0]   a_in,
  input  logic [NF_W-1:0]   b_in,
  output logic [NF_W-1:0]   y,
  output logic [WW-1:0]     acc,
  output logic              ovf,
  output logic              mul_sat,
  output logic              y_sat,
  output logic              y_renorm
);
  logic [WW-1:0]         a_q, prod;
  logic signed [FW-1:0]  a_m, b_m;
  logic [SW-1:0]         a_s, b_s;
  logic                      prod_sat;

  nf_decode #(.NF_W(NF_W)) u_dec_a (.w(a_in), .q(a_q), .mant(a_m), .shamt(a_s));
  nf_decode #(.NF_W(NF_W)) u_dec_b (.w(b_in), .q(), .mant(b_m), .shamt(b_s));

  nf_mul15 #(.NF_W(NF_W)) u_mul (.ma(a_m), .sa(a_s), .mb(b_m), .sb(b_s), .p(prod), .sat(prod_sat));

  nf_alu32 #(.DW(WW)) u_alu (.clk(clk), .rst_n(rst_n), .op(op), .a(a_q), .p(prod),
                  .acc(acc), .ovf(ovf));

  nf_encode #(.NF_W(NF_W)) u_enc (.x(acc), .w(y), .sat(y_sat), .renorm(y_renorm));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mul_sat <= 1'b0;
    else        mul_sat <= prod_sat && (op inside {nf_pkg::OP_MPY, nf_pkg::OP_MAC, nf_pkg::OP_MSU});
  end
endmodule
