// Leading-sign counter: counts how many bits, starting at the MSB, equal the
// MSB (1..W). Used by the decoder on the 15-bit field and by the encoder on
// the 32-bit word. Purely combinational. The highest bit position that
// differs from the sign decides the count; if none differs the count is W.
module nf_lsc #(
  parameter int unsigned W  = 32,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  x,
  output logic [CW-1:0] n
);
  always_comb begin
    n = CW'(W);
    for (int i = 0; i < int'(W) - 1; i++) begin
      if (x[i] != x[W-1]) n = CW'(int'(W) - 1 - i);
    end
  end
endmodule
