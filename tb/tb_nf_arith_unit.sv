// End-to-end test of nf_arith_unit, the 16-bit arithmetic element.
//
// A reference model (bit-by-bit decoder, 64-bit multiply and accumulate,
// nearest-value rounding) runs beside the unit. After every op the
// testbench checks, one clock later, the 32-bit accumulator, the 16-bit
// encoded result and all four flags. Three phases:
//   1. random ops on random words and on words near +-1.0;
//   2. directed cases: -1.0 x -1.0, an accumulator that rounds up to +1.0
//      when encoded, one that rounds into a shorter sign run;
//   3. an FIR filter: 16 coefficients and a stream of 48 samples, all in
//      the 16-bit format, run as CLR + 16 MAC per output; every output word
//      is compared with the reference and the MAC rate (one per clock) is
//      checked by counting cycles.
// Every mechanism (each op, ALU saturation both ways, product saturation,
// encoder saturation, renormalisation after rounding, zero result) is
// counted and must occur at least once.
module tb_nf_arith_unit;
  import nf_pkg::*;
  import nf_ref_pkg::*;

  localparam int TAPS = 16;
  localparam int SAMPLES = 48;

  logic              clk = 0, rst_n = 0;
  nf_op_t            op;
  nf_word_t          a_in, b_in, y;
  logic [WIDE_W-1:0] acc;
  logic              ovf, mul_sat, y_sat, y_renorm;

  int checks = 0, failures = 0, cycles = 0;
  int op_seen [8];
  int n_pos_sat = 0, n_neg_sat = 0, n_mul_sat = 0, n_y_sat = 0, n_renorm = 0, n_zero = 0;
  logic [31:0] model;

  nf_arith_unit dut (.clk(clk), .rst_n(rst_n), .op(op), .a_in(a_in), .b_in(b_in),
                     .y(y), .acc(acc), .ovf(ovf), .mul_sat(mul_sat),
                     .y_sat(y_sat), .y_renorm(y_renorm));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: op=%s a=%h b=%h acc=%h exp=%h y=%h",
                                  what, op.name(), a_in, b_in, acc, model, y);
    end
  endtask

  // Apply one op and check the unit against the model a cycle later.
  task automatic step(nf_op_t o, logic [15:0] a, logic [15:0] b);
    logic [31:0] da, db, pr, r;
    bit          e_ovf, e_mul_sat, e_ysat;
    longint      s;
    @(negedge clk);
    op = o; a_in = a; b_in = b;
    da = ref_decode(a);
    db = ref_decode(b);
    pr = ref_mul(da, db);
    e_ovf = 0;
    e_mul_sat = (o inside {OP_MPY, OP_MAC, OP_MSU}) && da == 32'h8000_0000 && db == 32'h8000_0000;
    case (o)
      OP_NOP: ;
      OP_CLR: model = 0;
      OP_LDA: model = da;
      OP_MPY: model = pr;
      default: begin
        case (o)
          OP_ADD:  s = longint'($signed(model)) + longint'($signed(da));
          OP_SUB:  s = longint'($signed(model)) - longint'($signed(da));
          OP_MAC:  s = longint'($signed(model)) + longint'($signed(pr));
          default: s = longint'($signed(model)) - longint'($signed(pr));
        endcase
        e_ovf = (s > 64'sh7FFF_FFFF) || (s < -64'sh8000_0000);
        if (s > 64'sh7FFF_FFFF) n_pos_sat++;
        if (s < -64'sh8000_0000) n_neg_sat++;
        model = ref_sat32(s);
      end
    endcase
    op_seen[o]++;
    @(posedge clk); #1;
    r = ref_round(model, e_ysat);
    check(acc == model, "acc");
    check(ref_decode(y) == r, "encoded result");
    check(y != 16'h8000, "canonical zero");
    check(ovf == e_ovf, "ovf");
    check(mul_sat == e_mul_sat, "mul_sat");
    check(y_sat == e_ysat, "y_sat");
    check(y_renorm == (r != 0 && ref_lsc32(r) != ref_lsc32(model)), "y_renorm");
    if (mul_sat) n_mul_sat++;
    if (y_sat) n_y_sat++;
    if (y_renorm) n_renorm++;
    if (y == 16'h0000) n_zero++;
  endtask

  function automatic logic [15:0] big_word();
    // words near +-1.0: sign run of 1
    return ($urandom % 2) ? {1'b0, 2'b01, 13'($urandom)} : {1'b0, 2'b10, 13'($urandom)};
  endfunction

  logic [15:0] coef [TAPS];
  logic [15:0] xs [SAMPLES];

  initial begin
    foreach (op_seen[i]) op_seen[i] = 0;
    op = OP_NOP; a_in = '0; b_in = '0; model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(acc == 0 && y == 0 && !ovf && !mul_sat, "reset");

    // 1. random
    for (int i = 0; i < 20000; i++) begin
      if (i % 2) step(nf_op_t'($urandom % 8), 16'($urandom), 16'($urandom));
      else       step(nf_op_t'($urandom % 8), big_word(), big_word());
    end

    // 2. directed
    step(OP_MPY, 16'h4000, 16'h4000);       // -1.0 x -1.0 saturates
    step(OP_LDA, 16'h3FFF, 16'h0000);       // largest word
    step(OP_ADD, 16'h8001, 16'h0000);       // + 8 LSB: encodes to +1.0 -> saturates
    step(OP_CLR, 16'h0000, 16'h0000);
    step(OP_LDA, 16'h0FFF, 16'h0000);       // all-ones significand
    step(OP_ADD, 16'h8001, 16'h0000);       // may round into a shorter sign run

    // 3. FIR: y[n] = sum_k c[k] x[n-k]
    foreach (coef[i]) coef[i] = {1'b0, 15'($urandom)} >> ($urandom % 4);
    foreach (xs[i])   xs[i]   = 16'($urandom);
    for (int n = TAPS - 1; n < SAMPLES; n++) begin
      int c0;
      step(OP_CLR, 16'h0000, 16'h0000);
      c0 = cycles;
      for (int k = 0; k < TAPS; k++) step(OP_MAC, coef[k], xs[n - k]);
      check(cycles - c0 == TAPS, "one MAC per clock");
    end

    foreach (op_seen[i]) check(op_seen[i] > 0, $sformatf("op %0d used", i));
    check(n_pos_sat > 0, "ALU positive saturation seen");
    check(n_neg_sat > 0, "ALU negative saturation seen");
    check(n_mul_sat > 0, "product saturation seen");
    check(n_y_sat > 0, "encoder saturation seen");
    check(n_renorm > 0, "rounding renormalisation seen");
    check(n_zero > 0, "zero result seen");
    $display("mechanisms: alu_sat+ %0d alu_sat- %0d mul_sat %0d enc_sat %0d renorm %0d zero %0d",
             n_pos_sat, n_neg_sat, n_mul_sat, n_y_sat, n_renorm, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
