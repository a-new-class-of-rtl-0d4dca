// Exhaustive test of nf_decode: every one of the 65536 words is expanded and
// compared with the bit-by-bit reference, including the significand and
// shift outputs. It then counts how many codes fall into each binary range
// (octave) below 1.0 and checks the number of significant digits per range
// against the table of the format: 14,14,13,13,12,12,11,11,10 for the first
// nine ranges. Directed vectors cover -1.0, the largest value, zero and the
// smallest codes.
module tb_nf_decode;
  import nf_pkg::*;
  import nf_ref_pkg::*;

  nf_word_t                  w;
  logic [WIDE_W-1:0]         q;
  logic signed [FIELD_W-1:0] mant;
  logic [4:0]                shamt;
  int checks = 0, failures = 0;
  int octave_count [1:9];
  localparam int DIGITS [1:9] = '{14, 14, 13, 13, 12, 12, 11, 11, 10};

  nf_decode dut (.w(w), .q(q), .mant(mant), .shamt(shamt));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: w=%h q=%h", what, w, q);
    end
  endtask

  task automatic vec(logic [15:0] word, logic [31:0] exp);
    w = word; #1;
    check(q == exp, $sformatf("directed %h -> %h", word, exp));
  endtask

  initial begin
    for (int j = 1; j <= 9; j++) octave_count[j] = 0;
    for (int i = 0; i < 65536; i++) begin
      logic [31:0] e;
      w = nf_word_t'(16'(i)); #1;
      e = ref_decode(16'(i));
      check(q == e, "decode");
      check(mant == $signed(w.field), "mant");
      check(int'(shamt) == 18 - ref_k(w.field) - int'(w.shift), "shamt");
      // the expanded value is the significand shifted
      check(q == 32'(longint'(mant) <<< shamt), "mant<<shamt");
      if (!q[31] && q != 0) begin
        int n;
        n = ref_lsc32(q);
        if (n <= 9) octave_count[n]++;
      end
    end
    for (int j = 1; j <= 9; j++) begin
      checks++;
      if (octave_count[j] != (1 << (DIGITS[j] - 1))) begin
        failures++;
        $display("FAIL range %0d: %0d codes, expected %0d significant digits",
                 j, octave_count[j], DIGITS[j]);
      end
    end
    vec(16'h4000, 32'h8000_0000);  // -1.0
    vec(16'h3FFF, 32'h7FFE_0000);  // largest
    vec(16'h0000, 32'h0000_0000);  // zero
    vec(16'h8001, 32'h0000_0008);  // smallest positive
    vec(16'hFFFF, 32'hFFFF_FFFC);  // smallest-magnitude negative
    vec(16'h8800, 32'h0200_0000);  // run of 3 zeros, shift 1 -> 6 zeros
    vec(16'h0800, 32'h0400_0000);  // run of 3 zeros, shift 0 -> 5 zeros
    vec(16'h7C00, 32'hFF80_0000);  // five ones -> ten ones, one removed
    vec(16'hFC00, 32'hFFC0_0000);  // five ones -> ten ones
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
