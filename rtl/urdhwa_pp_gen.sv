// Partial-product generator of the Urdhwa Tiryakbhyam ("vertically and
// crosswise") multiplication. Every product bit a[i] & b[j] is formed at
// once by one AND gate, before any addition starts; pp[i][j] has weight
// 2**(i+j), so column k of the multiplication is the set of pp[i][j] with
// i + j = k (the vertical pair for k = 0, crosswise pairs above).
// Interface: a and b are N-bit unsigned operands; pp is an N x N array of
// single-bit partial products, indexed [multiplicand bit][multiplier bit].
// Purely combinational. N defaults to the 8-bit size of the multiplier.
module urdhwa_pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]        a,
  input  logic [N-1:0]        b,
  output logic [N-1:0][N-1:0] pp
);
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      assign pp[i][j] = a[i] & b[j];
    end
  end
endmodule
