// Checker for one word width NF_W, used by tb_nf_widths. Instantiates the
// decoder, encoder and multiplier at that width and compares them with a
// width-generic reference written here bit by bit:
//   * every word decodes to the reference value, and every canonical word
//     (all but {1, 0...0}, a second zero) encodes back to itself;
//   * each binary range k below 1.0 holds 2^(NF_W-2-ceil(k/2)) positive
//     codes, i.e. NF_W-1-ceil(k/2) significant bits;
//   * expanded inputs (all of them when 2*NF_W <= 16, else 100000 random)
//     encode to the nearest value, ties upward, +1.0 saturating;
//   * 20000 random products against a 64-bit multiply.
// Raises done when finished; checks and failures count what it did.
module nf_width_check #(
  parameter int unsigned NF_W = 8
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int FW = NF_W - 1;
  localparam int WW = 2 * NF_W;
  localparam int SW = $clog2(NF_W + 2);

  logic [NF_W-1:0]       dw, ew;
  logic [WW-1:0]         dq, ex, mp;
  logic signed [FW-1:0]  dm, ma, mb;
  logic [SW-1:0]         ds, sa, sb;
  logic                  esat, erenorm, msat;

  nf_decode #(.NF_W(NF_W)) u_dec (.w(dw), .q(dq), .mant(dm), .shamt(ds));
  nf_encode #(.NF_W(NF_W)) u_enc (.x(ex), .w(ew), .sat(esat), .renorm(erenorm));
  nf_mul15  #(.NF_W(NF_W)) u_mul (.ma(ma), .sa(sa), .mb(mb), .sb(sb), .p(mp), .sat(msat));

  function automatic int run_k(logic [NF_W-1:0] w);
    int k = 1;
    while (k < FW && w[FW-1-k] == w[FW-1]) k++;
    return k;
  endfunction

  function automatic logic [WW-1:0] gen_decode(logic [NF_W-1:0] w);
    logic [WW-1:0] q = '0;
    int pos = WW - 1;
    int k   = run_k(w);
    int ns  = 2 * k - (w[NF_W-1] ? 0 : 1);
    for (int i = 0; i < ns; i++) begin q[pos] = w[FW-1]; pos--; end
    for (int i = FW - 1 - k; i >= 0; i--) begin q[pos] = w[i]; pos--; end
    return q;
  endfunction

  function automatic longint sval(logic [WW-1:0] q);
    return longint'($signed(q));
  endfunction

  function automatic int run_n(logic [WW-1:0] x);
    int n = 1;
    while (n < WW && x[WW-1-n] == x[WW-1]) n++;
    return n;
  endfunction

  function automatic longint gen_round(logic [WW-1:0] x, output bit sat);
    longint v = sval(x);
    int n = run_n(x);
    int cap = x[WW-1] ? 2 * FW : 2 * FW - 1;
    longint q, m, lo, hi, r;
    if (n > cap) n = cap;
    q  = longint'(1) << (WW - (n / 2 + FW));
    m  = v % q;
    if (m < 0) m += q;
    lo = v - m;
    hi = lo + q;
    r  = (v - lo < hi - v) ? lo : hi;
    sat = (r >= (longint'(1) << (WW - 1)));
    if (sat) r = ((longint'(1) << (FW - 1)) - 1) << (WW - FW);
    return r;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL width %0d %s", NF_W, what);
    end
  endtask

  task automatic try_encode(logic [WW-1:0] v);
    longint r;
    bit     s;
    ex = v; #1;
    r = gen_round(v, s);
    check(sval(gen_decode(ew)) == r, $sformatf("nearest %h -> %h", v, ew));
    check(esat == s, "sat");
    check(ew != {1'b1, {FW{1'b0}}}, "canonical zero");
  endtask

  int per_range [1:8];

  initial begin
    done = 0; checks = 0; failures = 0;
    dw = '0; ex = '0; ma = '0; mb = '0; sa = '0; sb = '0;
    for (int j = 1; j <= 8; j++) per_range[j] = 0;
    // decode, round trip, precision per range
    for (int i = 0; i < (1 << NF_W); i++) begin
      dw = NF_W'(i); #1;
      check(dq == gen_decode(dw), "decode");
      check(sval(dq) == longint'(dm) * (longint'(1) << ds), "mant << shamt");
      if (!dq[WW-1] && dq != 0) begin
        int n;
        n = run_n(dq);
        if (n <= 8) per_range[n]++;
      end
      if (dw != {1'b1, {FW{1'b0}}}) begin
        ex = dq; #1;
        check(ew == dw, "round trip");
      end
    end
    for (int j = 1; j <= 8; j++)
      check(per_range[j] == (1 << (FW - 1 - (j + 1) / 2)), $sformatf("codes in range %0d", j));
    // rounding
    if (WW <= 16) begin
      for (int i = 0; i < (1 << WW); i++) try_encode(WW'(i));
    end else begin
      for (int i = 0; i < 100000; i++) begin
        logic [WW-1:0] v;
        v = WW'({$urandom, $urandom});
        v = $signed(v) >>> ($urandom % WW);
        try_encode(v);
      end
    end
    // products
    for (int i = 0; i < 20000; i++) begin
      logic [NF_W-1:0] a, b;
      longint e;
      a = NF_W'($urandom); b = NF_W'($urandom);
      if (i == 0) begin a = {2'b01, {(NF_W-2){1'b0}}}; b = a; end  // -1.0 x -1.0
      ma = a[FW-1:0]; sa = SW'(NF_W + 2 - run_k(a) - int'(a[NF_W-1]));
      mb = b[FW-1:0]; sb = SW'(NF_W + 2 - run_k(b) - int'(b[NF_W-1]));
      #1;
      e = (sval(gen_decode(a)) * sval(gen_decode(b))) >>> (WW - 1);
      check(msat == (e >= (longint'(1) << (WW - 1))), "product sat");
      if (e >= (longint'(1) << (WW - 1))) e = (longint'(1) << (WW - 1)) - 1;
      check(sval(mp) == e, "product");
    end
    done = 1;
  end
endmodule
