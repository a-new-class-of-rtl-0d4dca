// Test of nf_mul15. Operands are random 16-bit words (plus the extremes);
// the testbench splits each into its 15-bit significand and shift itself and
// compares the product with the 64-bit multiply of the two expanded values
// (also -1.0 times every word),
// truncated to Q1.31 and saturated. It also checks that -1.0 x -1.0 raises
// sat and that no other product does.
module tb_nf_mul15;
  import nf_pkg::*;
  import nf_ref_pkg::*;

  logic signed [FIELD_W-1:0] ma, mb;
  logic [4:0]                sa, sb;
  logic [WIDE_W-1:0]         p;
  logic                      sat;
  int checks = 0, failures = 0, n_sat = 0;

  nf_mul15 dut (.ma(ma), .sa(sa), .mb(mb), .sb(sb), .p(p), .sat(sat));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: ma=%h sa=%0d mb=%h sb=%0d p=%h",
                                  what, ma, sa, mb, sb, p);
    end
  endtask

  task automatic try_pair(logic [15:0] a, logic [15:0] b);
    logic [31:0] e;
    ma = a[14:0]; sa = 5'(18 - ref_k(a[14:0]) - int'(a[15]));
    mb = b[14:0]; sb = 5'(18 - ref_k(b[14:0]) - int'(b[15]));
    #1;
    e = ref_mul(ref_decode(a), ref_decode(b));
    check(p == e, "product");
    check(sat == (ref_decode(a) == 32'h8000_0000 && ref_decode(b) == 32'h8000_0000),
          "sat flag");
    if (sat) n_sat++;
  endtask

  localparam logic [15:0] EDGE [8] = '{16'h4000, 16'h3FFF, 16'h0000, 16'h8001,
                                        16'hFFFF, 16'h7FFF, 16'hC000, 16'hBFFF};

  initial begin
    foreach (EDGE[i]) foreach (EDGE[j]) try_pair(EDGE[i], EDGE[j]);
    // -1.0 times every word (exact negation, with the one saturating case)
    for (int i = 0; i < 65536; i++) try_pair(16'h4000, 16'(i));
    for (int i = 0; i < 200000; i++) try_pair(16'($urandom), 16'($urandom));
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL sat never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
