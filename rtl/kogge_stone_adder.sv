// kogge_stone_adder: W-bit parallel-prefix adder in sparse Kogge-Stone form.
//
// Bit generate/propagate signals are first reduced to group signals over
// groups of SPARSITY bits. A Kogge-Stone prefix tree (distance 1, 2, 4, ...
// levels, log2 of the group count deep) then produces the carry out of every
// group, with the carry-in folded into group 0. Inside a group the carries
// are rippled from the group's carry-in, which is the "sparse" trade: a
// SPARSITY-times smaller tree for a short ripple at the end. SPARSITY=1 is
// the dense Kogge-Stone adder.
//
// Interface: sum = a + b + cin, cout is the carry out of bit W-1. Purely
// combinational. The adder family is the one the design specifies; the
// group size (2 by default) and widths are this design's choices.
module kogge_stone_adder #(
  parameter int unsigned W        = 32,
  parameter int unsigned SPARSITY = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NG     = (W + SPARSITY - 1) / SPARSITY;
  localparam int unsigned LEVELS = (NG > 1) ? $clog2(NG) : 0;

  logic [W-1:0]  g, p;
  logic [NG-1:0] gg0, gp0;          // group generate / propagate
  logic [NG-1:0] tg [LEVELS+1];     // prefix generate per tree level
  logic [NG-1:0] tp [LEVELS+1];     // prefix propagate per tree level
  logic [W:0]    c;

  assign g = a & b;
  assign p = a ^ b;

  // Group generate/propagate over SPARSITY bits (serial prefix inside group).
  always_comb begin
    for (int unsigned j = 0; j < NG; j++) begin
      gg0[j] = 1'b0;
      gp0[j] = 1'b1;
      for (int unsigned k = 0; k < SPARSITY; k++) begin
        if (j * SPARSITY + k < W) begin
          gg0[j] = g[j*SPARSITY+k] | (p[j*SPARSITY+k] & gg0[j]);
          gp0[j] = gp0[j] & p[j*SPARSITY+k];
        end
      end
    end
  end

  // Kogge-Stone tree over the groups; carry-in folded into group 0.
  always_comb begin
    tg[0] = gg0;
    tp[0] = gp0;
    tg[0][0] = gg0[0] | (gp0[0] & cin);
    for (int unsigned l = 1; l <= LEVELS; l++) begin
      for (int unsigned j = 0; j < NG; j++) begin
        if (j >= (1 << (l - 1))) begin
          tg[l][j] = tg[l-1][j] | (tp[l-1][j] & tg[l-1][j-(1<<(l-1))]);
          tp[l][j] = tp[l-1][j] & tp[l-1][j-(1<<(l-1))];
        end else begin
          tg[l][j] = tg[l-1][j];
          tp[l][j] = tp[l-1][j];
        end
      end
    end
  end

  // Ripple inside each group from the group carry-in.
  always_comb begin
    c = '0;
    for (int unsigned i = 0; i < W; i++) begin
      if (i % SPARSITY == 0)
        c[i] = (i == 0) ? cin : tg[LEVELS][i/SPARSITY-1];
      c[i+1] = g[i] | (p[i] & c[i]);
    end
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];

endmodule
