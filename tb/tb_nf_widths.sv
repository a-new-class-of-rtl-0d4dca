// The format at other word sizes: runs nf_width_check on the decoder,
// encoder and multiplier built for 8-bit words (16-bit arithmetic, checked
// exhaustively) and 12-bit words (24-bit arithmetic), then the arithmetic
// element itself at 8 bits for a short MAC sequence against the checker's
// arithmetic.
module tb_nf_widths;
  import nf_pkg::*;

  bit done8, done12;
  int checks8, checks12, fail8, fail12;
  int checks = 0, failures = 0;

  nf_width_check #(.NF_W(8))  u_w8  (.done(done8),  .checks(checks8),  .failures(fail8));
  nf_width_check #(.NF_W(12)) u_w12 (.done(done12), .checks(checks12), .failures(fail12));

  // 8-bit arithmetic element: 0.5 * 0.5 accumulated four times = 1.0 -> sat
  logic        clk = 0, rst_n = 0;
  nf_op_t      op = OP_NOP;
  logic [7:0]  a_in = '0, b_in = '0, y;
  logic [15:0] acc;
  logic        ovf, mul_sat, y_sat, y_renorm;
  nf_arith_unit #(.NF_W(8)) u_au (.clk(clk), .rst_n(rst_n), .op(op), .a_in(a_in), .b_in(b_in),
                                  .y(y), .acc(acc), .ovf(ovf), .mul_sat(mul_sat),
                                  .y_sat(y_sat), .y_renorm(y_renorm));
  always #5 clk = ~clk;

  task automatic au(nf_op_t o, logic [7:0] a, logic [7:0] b);
    @(negedge clk) begin op = o; a_in = a; b_in = b; end
    @(posedge clk); #1;
  endtask

  initial begin
    // 8-bit word 0x20 = {0, 0100000}: run of one 0, odd -> 0x4000 = 0.5
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    au(OP_MPY, 8'h20, 8'h20);
    checks++; if (acc != 16'h2000) begin failures++; $display("FAIL 8-bit MPY %h", acc); end
    checks++; if (y != 8'hA0) begin failures++; $display("FAIL 8-bit y %h", y); end  // 0.25
    au(OP_MAC, 8'h20, 8'h20);
    au(OP_MAC, 8'h20, 8'h20);
    checks++; if (acc != 16'h6000 || ovf) begin failures++; $display("FAIL 8-bit MAC %h", acc); end
    au(OP_MAC, 8'h20, 8'h20);
    checks++; if (acc != 16'h7FFF || !ovf) begin failures++; $display("FAIL 8-bit sat %h", acc); end
    checks++; if (y != 8'h3F || !y_sat) begin failures++; $display("FAIL 8-bit y %h", y); end
    wait (done8 && done12);
    checks += checks8 + checks12;
    failures += fail8 + fail12;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
