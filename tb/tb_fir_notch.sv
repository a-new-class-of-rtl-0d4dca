// FIR band-stop workload for nf_arith_unit.
//
// A 127-tap band-stop FIR (ideal band 0.30..0.60 of Nyquist, Kaiser window,
// beta = 12, so the stopband proper is about 0.40..0.50) is designed in
// double precision. Its coefficients are rounded
// two ways: to 16-bit fixed-point fractions (Q15) and, through nf_encode,
// to the compressed-sign format. The stopband gain of each rounded set is
// evaluated at 512 frequencies; the compressed-sign set must reject at least
// 10 dB more, since its small outer taps keep more significant bits
// (typical run: double -124 dB, Q15 -76 dB, compressed-sign -92 dB).
//
// The compressed-sign filter is then run on the arithmetic element: a tone
// in the passband and one in the middle of the stopband, each quantised to
// the 16-bit format, are filtered with CLR + 127 MAC per output. Every
// accumulator value is compared with the reference model, the MAC rate is
// checked (127 clocks per output), and the tone attenuation measured from
// the outputs must reach 80 dB.
module tb_fir_notch;
  import nf_pkg::*;
  import nf_ref_pkg::*;

  localparam int    L     = 127;
  localparam int    NF    = 512;
  localparam real   PI    = 3.14159265358979323846;
  localparam real   W1    = 0.30 * PI;  // band edges of the ideal filter
  localparam real   W2    = 0.60 * PI;
  localparam real   CORE_LO = 0.40 * PI;  // where the stopband is measured
  localparam real   CORE_HI = 0.50 * PI;
  localparam real   BETA  = 12.0;
  localparam int    NOUT  = 64;

  logic              clk = 0, rst_n = 0;
  nf_op_t            op;
  nf_word_t          a_in, b_in, y;
  logic [WIDE_W-1:0] acc;
  logic              ovf, mul_sat, y_sat, y_renorm;

  logic [WIDE_W-1:0] enc_x;
  nf_word_t          enc_w;
  logic              enc_sat, enc_renorm;

  int checks = 0, failures = 0, cycles = 0;

  real      h [L];
  real      hq15 [L], hnf [L];
  nf_word_t cw [L];

  nf_arith_unit dut (.clk(clk), .rst_n(rst_n), .op(op), .a_in(a_in), .b_in(b_in),
                     .y(y), .acc(acc), .ovf(ovf), .mul_sat(mul_sat),
                     .y_sat(y_sat), .y_renorm(y_renorm));
  nf_encode quant (.x(enc_x), .w(enc_w), .sat(enc_sat), .renorm(enc_renorm));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic real bessel_i0(real x);
    real s = 1.0, t = 1.0;
    for (int k = 1; k < 40; k++) begin
      t = t * (x / (2.0 * k)) * (x / (2.0 * k));
      s = s + t;
    end
    return s;
  endfunction

  function automatic real to_real(logic [31:0] q);
    return real'($signed(q)) / 2147483648.0;
  endfunction

  // Round a real in [-1, 1) to the compressed-sign format through nf_encode.
  task automatic quantise(real v, output nf_word_t w);
    real s = v * 2147483648.0;
    if (s > 2147483647.0) s = 2147483647.0;
    enc_x = 32'($rtoi(s >= 0 ? s + 0.5 : s - 0.5));
    #1 w = enc_w;
  endtask

  // Largest gain, in dB, over the core of the stopband.
  function automatic real stop_gain_db(real c [L]);
    real worst = 0.0;
    for (int i = 0; i < NF; i++) begin
      real w = PI * i / NF;
      if (w >= CORE_LO && w <= CORE_HI) begin
        real re = 0.0, im = 0.0, m;
        for (int n = 0; n < L; n++) begin
          re += c[n] * $cos(w * n);
          im -= c[n] * $sin(w * n);
        end
        m = $sqrt(re * re + im * im);
        if (m > worst) worst = m;
      end
    end
    return 20.0 * $log10(worst + 1.0e-30);
  endfunction

  // Run the filter on a tone; returns the peak |output| over the settled part.
  task automatic run_tone(real freq, real amp, output real peak);
    nf_word_t xs [L + NOUT];
    logic [31:0] model;
    peak = 0.0;
    foreach (xs[i]) quantise(amp * $sin(freq * i), xs[i]);
    for (int n = L - 1; n < L + NOUT; n++) begin
      int c0;
      @(negedge clk) op = OP_CLR;
      model = 0;
      for (int k = 0; k < L; k++) begin
        @(negedge clk);
        if (k == 0) c0 = cycles;
        op = OP_MAC; a_in = cw[k]; b_in = xs[n - k];
        model = ref_sat32(longint'($signed(model))
                + longint'($signed(ref_mul(ref_decode(cw[k]), ref_decode(xs[n - k])))));
      end
      @(negedge clk) op = OP_NOP;
      check(cycles - c0 == L, "one MAC per clock");
      check(acc == model, $sformatf("FIR output %0d", n));
      begin
        real v;
        v = to_real(acc);
        if (v < 0.0) v = -v;
        if (v > peak) peak = v;
      end
    end
  endtask

  initial begin
    real g_ideal, g_q15, g_nf, p_pass, p_stop, atten;
    op = OP_NOP; a_in = '0; b_in = '0; enc_x = '0;
    // design: ideal band-stop = delta - band-pass, Kaiser windowed
    for (int n = 0; n < L; n++) begin
      real m, ideal, r;
      m = n - (L - 1) / 2.0;
      if (m == 0.0) ideal = 1.0 - (W2 - W1) / PI;
      else          ideal = -($sin(W2 * m) - $sin(W1 * m)) / (PI * m);
      r = 2.0 * n / (L - 1) - 1.0;
      h[n] = ideal * bessel_i0(BETA * $sqrt(1.0 - r * r)) / bessel_i0(BETA);
    end
    // two roundings of the same coefficients
    for (int n = 0; n < L; n++) begin
      hq15[n] = real'($rtoi(h[n] * 32768.0 + (h[n] >= 0 ? 0.5 : -0.5))) / 32768.0;
      quantise(h[n], cw[n]);
      hnf[n]  = to_real(ref_decode(cw[n]));
    end
    g_ideal = stop_gain_db(h);
    g_q15   = stop_gain_db(hq15);
    g_nf    = stop_gain_db(hnf);
    $display("stopband gain: double %0.1f dB, Q15 %0.1f dB, compressed-sign %0.1f dB",
             g_ideal, g_q15, g_nf);
    check(g_nf < g_q15 - 10.0, "compressed-sign coefficients reject 10 dB more than Q15");

    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_tone(0.10 * PI, 0.5, p_pass);
    run_tone(0.45 * PI, 0.5, p_stop);
    atten = 20.0 * $log10(p_pass / (p_stop + 1.0e-30));
    $display("tone attenuation through the unit: %0.1f dB", atten);
    check(atten > 80.0, "stopband tone attenuated by 80 dB");
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
