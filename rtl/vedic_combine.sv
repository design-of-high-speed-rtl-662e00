// vedic_combine: joins the four H x H partial products of a 2H x 2H Vedic
// multiplier step, A = AH:AL, B = BH:BL:
//   P = {AH*BH, AL*BL} + ((AH*BL + AL*BH) << H)
// The two vertical products sit side by side without an adder; the two
// crosswise products are summed by one Kogge-Stone adder and added at
// weight 2^H by a second one, as in the design's Vedic multiplier with
// parallel-prefix adders. Purely combinational.
module vedic_combine #(
  parameter int unsigned H        = 12,
  parameter int unsigned SPARSITY = 2
) (
  input  logic [2*H-1:0] p_hh,
  input  logic [2*H-1:0] p_hl,
  input  logic [2*H-1:0] p_lh,
  input  logic [2*H-1:0] p_ll,
  output logic [4*H-1:0] p
);

  logic [2*H:0]   p_mid;
  logic [4*H-1:0] xsum_sh;
  logic           unused_cout;

  kogge_stone_adder #(.W(2*H), .SPARSITY(SPARSITY)) u_mid (
    .a(p_hl), .b(p_lh), .cin(1'b0), .sum(p_mid[2*H-1:0]), .cout(p_mid[2*H])
  );

  assign xsum_sh = (4*H)'({p_mid, {H{1'b0}}});

  kogge_stone_adder #(.W(4*H), .SPARSITY(SPARSITY)) u_fin (
    .a({p_hh, p_ll}), .b(xsum_sh), .cin(1'b0), .sum(p), .cout(unused_cout)
  );

endmodule
