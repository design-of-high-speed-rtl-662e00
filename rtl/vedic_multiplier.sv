// vedic_multiplier: N x N unsigned multiplier after the Urdhva-Tiryakbhyam
// ("vertically and crosswise") rule, built from N/2 x N/2 blocks.
//
// The operands are halved K times, as long as the block size stays even
// and above 2 (24 -> 12 -> 6 -> 3, so K = 3 and the leaf is 3x3). Level 0
// holds every leaf product a_i * b_j of the LEAF-bit digits, each formed by
// vedic_leaf with column cross products. Each higher level l builds the
// products of blocks twice as wide from four products of level l-1:
//   P = {AH*BH, AL*BL} + ((AH*BL + AL*BH) << S/2)
// using vedic_combine, whose two adders are Kogge-Stone adders. Level K
// holds the single N x N product. The tree is written as generate loops
// over a table of partial products rather than as a self-instantiating
// module; the structure is the same as the recursive description. The
// table carries a split_var hint so that the simulator treats its entries
// as separate signals instead of one array that seems to feed itself.
// The halving rule for sizes that are not a power of two is this design's
// choice. Purely combinational; p = a * b.
module vedic_multiplier #(
  parameter int unsigned N        = 24,
  parameter int unsigned SPARSITY = 2
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // Number of halvings: while the block is even and larger than 2.
  function automatic int unsigned halvings(int unsigned n);
    int unsigned k = 0;
    while ((n % 2 == 0) && (n > 2)) begin
      n = n / 2;
      k++;
    end
    return k;
  endfunction

  localparam int unsigned K     = halvings(N);
  localparam int unsigned LEAF  = N >> K;
  localparam int unsigned NBMAX = 1 << K;

  // pr[l][i][j]: product of block i of a and block j of b at level l.
  logic [2*N-1:0] pr [K+1][NBMAX][NBMAX] /*verilator split_var*/;

  for (genvar l = 0; l <= K; l++) begin : g_lvl
    localparam int unsigned S  = LEAF << l;   // block width at this level
    localparam int unsigned NB = NBMAX >> l;  // blocks per operand
    for (genvar i = 0; i < NBMAX; i++) begin : g_i
      for (genvar j = 0; j < NBMAX; j++) begin : g_j
        if (i < NB && j < NB) begin : g_blk
          logic [2*S-1:0] q;
          if (l == 0) begin : g_leaf
            vedic_leaf #(.N(LEAF)) u_leaf (
              .a(a[i*LEAF +: LEAF]), .b(b[j*LEAF +: LEAF]), .p(q)
            );
          end else begin : g_comb
            vedic_combine #(.H(S/2), .SPARSITY(SPARSITY)) u_comb (
              .p_hh(pr[l-1][2*i+1][2*j+1][S-1:0]),
              .p_hl(pr[l-1][2*i+1][2*j][S-1:0]),
              .p_lh(pr[l-1][2*i][2*j+1][S-1:0]),
              .p_ll(pr[l-1][2*i][2*j][S-1:0]),
              .p(q)
            );
          end
          assign pr[l][i][j] = (2*N)'(q);
        end else begin : g_none
          assign pr[l][i][j] = '0;
        end
      end
    end
  end

  assign p = pr[K][0][0];

endmodule
