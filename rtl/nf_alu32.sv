// 32-bit two's complement ALU with accumulator (DW bits in general).
//
// Once operands are expanded to 32 bits the format needs no special
// arithmetic: this is a conventional saturating add/subtract unit feeding a
// 32-bit accumulator register. Each cycle it applies one nf_op_t to the
// accumulator, with A the decoded operand and P the multiplier product.
// Sums that leave the range clip to the largest / smallest value (0x7FFFFFFF
// / 0x80000000) and set "ovf" for that cycle. The op set, the saturation and
// the reset value (0, asynchronous active-low reset) are this design's
// choices.
//
// Interface: op, a, p in; acc and ovf out (registered).
// Timing: one op per clock; acc shows the result one cycle after the op.
module nf_alu32
  import nf_pkg::*;
#(
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  nf_op_t        op,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] p,
  output logic [DW-1:0] acc,
  output logic          ovf
);
  localparam logic [DW-1:0] DMAX = {1'b0, {(DW-1){1'b1}}};
  localparam logic [DW-1:0] DMIN = {1'b1, {(DW-1){1'b0}}};

  logic [DW-1:0] opnd, next;
  logic          sub, use_sum, sat;
  logic [DW:0]   sum;

  always_comb begin
    opnd    = (op inside {OP_ADD, OP_SUB}) ? a : p;
    sub     = (op == OP_SUB) || (op == OP_MSU);
    use_sum = op inside {OP_ADD, OP_SUB, OP_MAC, OP_MSU};
    // one extra bit so the true sign survives overflow
    sum = {acc[DW-1], acc}
        + (sub ? -{opnd[DW-1], opnd} : {opnd[DW-1], opnd});
    sat = use_sum && (sum[DW] != sum[DW-1]);
    unique case (op)
      OP_NOP:  next = acc;
      OP_CLR:  next = '0;
      OP_LDA:  next = a;
      OP_MPY:  next = p;
      default: next = sat ? (sum[DW] ? DMIN : DMAX) : sum[DW-1:0];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      ovf <= 1'b0;
    end else begin
      acc <= next;
      ovf <= sat;
    end
  end
endmodule
