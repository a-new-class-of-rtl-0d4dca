// Test of nf_alu32. Random op sequences, with operands biased toward the
// extremes so that the accumulator saturates both ways, are compared cycle
// by cycle with a 64-bit model of the accumulator. Checks: acc one cycle
// after each op, the ovf flag, reset to zero, and that each op and both
// saturation directions occurred.
module tb_nf_alu32;
  import nf_pkg::*;
  import nf_ref_pkg::*;

  logic              clk = 0, rst_n = 0;
  nf_op_t            op;
  logic [WIDE_W-1:0] a, p, acc;
  logic              ovf;
  int checks = 0, failures = 0, cycles = 0;
  int op_seen [8];
  int n_pos_sat = 0, n_neg_sat = 0;
  logic [31:0] model;
  bit          model_ovf;

  nf_alu32 dut (.clk(clk), .rst_n(rst_n), .op(op), .a(a), .p(p), .acc(acc), .ovf(ovf));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic [31:0] pick();
    case ($urandom % 4)
      0: return 32'h7FFF_0000 + ($urandom % 32'h10000);
      1: return 32'h8000_0000 + ($urandom % 32'h10000);
      default: return $urandom;
    endcase
  endfunction

  initial begin
    foreach (op_seen[i]) op_seen[i] = 0;
    op = OP_NOP; a = '0; p = '0;
    model = '0; model_ovf = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (acc != 0 || ovf) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 20000; i++) begin
      longint s;
      @(negedge clk);
      op = nf_op_t'($urandom % 8);
      a  = pick();
      p  = pick();
      model_ovf = 0;
      case (op)
        OP_NOP: ;
        OP_CLR: model = 0;
        OP_LDA: model = a;
        OP_MPY: model = p;
        default: begin
          longint o;
          o = (op inside {OP_ADD, OP_SUB}) ? longint'($signed(a))
                                           : longint'($signed(p));
          if (op inside {OP_SUB, OP_MSU}) o = -o;
          s = longint'($signed(model)) + o;
          model_ovf = (s > 64'sh7FFF_FFFF) || (s < -64'sh8000_0000);
          if (s > 64'sh7FFF_FFFF) n_pos_sat++;
          if (s < -64'sh8000_0000) n_neg_sat++;
          model = ref_sat32(s);
        end
      endcase
      op_seen[op]++;
      @(posedge clk); #1;
      checks++;
      if (acc != model || ovf != model_ovf) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s acc=%h exp=%h ovf=%b", op.name(), acc, model, ovf);
      end
    end
    foreach (op_seen[i]) begin
      checks++;
      if (op_seen[i] == 0) begin failures++; $display("FAIL op %0d never ran", i); end
    end
    checks++;
    if (n_pos_sat == 0 || n_neg_sat == 0) begin failures++; $display("FAIL saturation not seen"); end
    $display("ops with positive saturation %0d, negative %0d", n_pos_sat, n_neg_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
