// Test of nf_encode.
//  1. Round trip: every canonical word (all but 0x8000, a second zero) is
//     expanded by the reference decoder and must encode back to itself.
//  2. Rounding: directed edge values (powers of two and their neighbours,
//     values around zero, the extremes) and 200000 random values of every
//     sign-run length must encode to the word holding the nearest grid value
//     (ties upward), with the sat and renorm flags as predicted.
module tb_nf_encode;
  import nf_pkg::*;
  import nf_ref_pkg::*;

  logic [WIDE_W-1:0] x;
  nf_word_t          w;
  logic              sat, renorm;
  int checks = 0, failures = 0;
  int n_sat = 0, n_renorm = 0;

  nf_encode dut (.x(x), .w(w), .sat(sat), .renorm(renorm));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: x=%h w=%h", what, x, w);
    end
  endtask

  task automatic try_value(logic [31:0] v);
    logic [31:0] r;
    bit          s;
    x = v; #1;
    r = ref_round(v, s);
    check(ref_decode(w) == r, "nearest value");
    check(w != 16'h8000, "canonical zero");
    check(sat == s, "sat flag");
    check(renorm == (r != 0 && ref_lsc32(r) != ref_lsc32(v)), "renorm flag");
    if (sat) n_sat++;
    if (renorm) n_renorm++;
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) begin
      if (i != 16'h8000) begin
        x = ref_decode(16'(i)); #1;
        check(w == 16'(i), "round trip");
      end
    end
    for (int b = 0; b < 32; b++) begin
      for (int d = -3; d <= 3; d++) begin
        try_value((32'd1 << b) + 32'(d));
        try_value(-(32'd1 << b) + 32'(d));
      end
    end
    try_value(32'h7FFF_FFFF);
    try_value(32'h7FFF_0000);
    try_value(32'h7FFE_FFFF);
    try_value(32'h8000_0000);
    for (int i = 0; i < 200000; i++) begin
      logic [31:0] v;
      v = $urandom;
      v = $signed(v) >>> ($urandom % 32);  // spread over all run lengths
      try_value(v);
    end
    checks++;
    if (n_sat == 0 || n_renorm == 0) begin
      failures++;
      $display("FAIL flags never seen: sat=%0d renorm=%0d", n_sat, n_renorm);
    end
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
