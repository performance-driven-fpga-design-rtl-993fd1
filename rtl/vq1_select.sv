// vq1_select: the VQ1 winner stage for four codewords.
//
// Chains the comparator (A1, A2 and the four cross differences), the MUX that
// turns the pair-winner difference into A3, the LUT that maps (A1,A2,A3) to a
// position and the decoder that outputs the least distortion Dx with its index
// Ix. Used once per group of four distortions; the hierarchy of the encoder
// reuses it to reduce any power-of-four codebook.
// Purely combinational: the decision for four distortions takes two subtractor
// delays, a 4:1 mux, a LUT and a 4:1 mux. Equal distortions resolve to the
// later input. Structure as in the published block diagram.
module vq1_select #(
  parameter int unsigned DW = 18,
  parameter int unsigned IW = 8
) (
  input  logic [DW-1:0] d   [4],
  input  logic [IW-1:0] idx [4],
  output logic [DW-1:0] dx,
  output logic [IW-1:0] ix
);

  logic        a1, a2, a3;
  logic [DW:0] d_cross [4];
  logic [1:0]  sel;

  vq_comparator #(.DW(DW)) u_cmp (.d(d), .a1(a1), .a2(a2), .d_cross(d_cross));
  vq_a3_mux     #(.DW(DW)) u_mux (.d_cross(d_cross), .a1(a1), .a2(a2), .a3(a3));
  vq_index_lut             u_lut (.a1(a1), .a2(a2), .a3(a3), .sel(sel));
  vq_decoder    #(.DW(DW), .IW(IW)) u_dec (.d(d), .idx(idx), .sel(sel), .dx(dx), .ix(ix));

endmodule
