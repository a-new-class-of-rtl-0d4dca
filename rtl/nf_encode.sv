// Encoder: two's complement fraction of 2*NF_W bits -> compressed-sign word
// of NF_W bits (32 -> 16 bits by default).
//
// The run of n leading sign bits is halved, rounding up (k = ceil(n/2)), and
// the shift flag is set to 0 when n is odd, 1 when it is even. The bits after
// the run are rounded into the NF_W-1-k field bits that remain. How a word
// is compressed follows the format; the rounding details are this design's:
//   * round to nearest, ties toward +infinity (add half an LSB, truncate);
//   * the LSB is the one of the input's own sign run, so when rounding
//     carries into the run (e.g. 0x3FFFFFFF -> 0x40000000) the result is
//     exact at the new, shorter run and is simply re-encoded ("renorm");
//   * positive values rounding to +1.0 saturate to the largest code (0x3FFF
//     for 16-bit words, 1 - 2^-14), flagged by "sat";
//   * positive inputs below 8 LSB and negative ones below 4 LSB lie under
//     the last codes (+8 and -4 LSB) and round against that grid;
//   * zero is encoded as all zeros.
//
// Interface: x in (Q1.31 by default); w out, plus the sat and renorm flags.
// Timing: combinational (two leading-sign counts, one adder, two shifters).
module nf_encode #(
  parameter int unsigned NF_W = 16,
  localparam int unsigned FW  = NF_W - 1,
  localparam int unsigned WW  = 2 * NF_W,
  localparam int unsigned KW  = $clog2(FW + 1),
  localparam int unsigned CW  = $clog2(WW + 1)
) (
  input  logic [WW-1:0]   x,
  output logic [NF_W-1:0] w,
  output logic            sat,
  output logic            renorm
);
  // Largest positive word expanded: sign run of 1, then FW-1 ones
  localparam logic [WW-1:0] MAX_WIDE = {1'b0, {(FW-1){1'b1}}, {(WW-FW){1'b0}}};

  logic [CW-1:0]  n, n2, ncap;
  logic [CW-1:0]  len;       // kept bits, from the MSB: FW..2*FW
  logic [CW-1:0]  drop;      // cleared low bits
  logic [WW:0]    sum;
  logic [WW-1:0]  mask, r, shifted;
  logic [KW-1:0]  k;
  logic           s;

  nf_lsc #(.W(WW), .CW(CW)) u_lsc_in  (.x(x), .n(n));
  nf_lsc #(.W(WW), .CW(CW)) u_lsc_out (.x(r), .n(n2));

  always_comb begin
    s    = x[WW-1];
    // The last codes: positive n <= 2*FW-2, negative n <= 2*FW.
    if (s) ncap = (n > CW'(2 * FW))     ? CW'(2 * FW)     : n;
    else   ncap = (n > CW'(2 * FW - 1)) ? CW'(2 * FW - 1) : n;
    len  = (ncap >> 1) + CW'(FW);
    drop = CW'(WW) - len;
    mask = {WW{1'b1}} << drop;
    sum  = {s, x} + ((WW+1)'(1) << (drop - CW'(1)));
    sum[WW-1:0] = sum[WW-1:0] & mask;
    sat  = !s && sum[WW-1];
    r    = sat ? MAX_WIDE : sum[WW-1:0];
  end

  always_comb begin
    k       = KW'((n2 + CW'(1)) >> 1);
    shifted = r << n2;
    renorm  = (r != '0) && (n2 != n);
    if (r == '0) begin
      w = '0;
    end else begin
      w = {~n2[0],
           ({FW{r[WW-1]}} << (KW'(FW) - k)) | (shifted[WW-1 -: FW] >> k)};
    end
  end
endmodule
