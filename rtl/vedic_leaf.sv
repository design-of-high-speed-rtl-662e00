// vedic_leaf: small N x N unsigned multiplier by the Urdhva-Tiryakbhyam
// ("vertically and crosswise") rule, the leaf of vedic_multiplier.
//
// For each result column k the cross product CP_k = sum of a[i]*b[j] over
// i + j = k is formed (the vertical product for the outer columns, the
// crosswise products for the inner ones), and the columns are summed with
// their weights 2^k; the carries of one column flow into the next. With the
// default N = 3 this is the 3x3 block that a 24-bit operand reaches after
// three halvings. The column rule is the design's; the leaf size is this
// implementation's choice. Purely combinational; p = a * b.
module vedic_leaf #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned CW = $clog2(N + 1);  // width of one column sum

  logic [CW-1:0] cp [2*N-1];

  always_comb begin
    for (int k = 0; k < 2 * N - 1; k++) begin
      cp[k] = '0;
      for (int i = 0; i < N; i++)
        if (k - i >= 0 && k - i < N)
          cp[k] = cp[k] + CW'(a[i] & b[k-i]);
    end
  end

  always_comb begin
    p = '0;
    for (int k = 0; k < 2 * N - 1; k++)
      p = p + ((2*N)'(cp[k]) << k);
  end

endmodule
