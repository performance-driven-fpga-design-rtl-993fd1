// vq_comparator: the subtractor bank of the 4-codeword winner stage (VQ1).
//
// Given the four distortions D1..D4 of one VQ1 group, it forms
//   A1 = sign(D1 - D2)   (1 when D1 < D2)
//   A2 = sign(D3 - D4)   (1 when D3 < D4)
// and the four cross differences D1-D4, D1-D3, D2-D3 and D2-D4 between a
// candidate of the first pair and a candidate of the second pair. The MUX that
// follows picks the one cross difference that compares the two pair winners.
// Each difference is DW+1 bits wide, two's complement, so its MSB is the sign.
//
// Purely combinational. The set of subtractors and the A1/A2 definitions
// follow the published block diagram; the widths and the ordering of the
// d_cross outputs (0: D1-D4, 1: D1-D3, 2: D2-D3, 3: D2-D4) are this design's.
module vq_comparator #(
  parameter int unsigned DW = 18          // distortion width
) (
  input  logic [DW-1:0] d [4],            // d[0]=D1 .. d[3]=D4
  output logic          a1,               // D1 < D2
  output logic          a2,               // D3 < D4
  output logic [DW:0]   d_cross [4]       // D1-D4, D1-D3, D2-D3, D2-D4
);

  logic [DW:0] d12, d34;

  always_comb begin
    d12        = {1'b0, d[0]} - {1'b0, d[1]};
    d34        = {1'b0, d[2]} - {1'b0, d[3]};
    a1         = d12[DW];
    a2         = d34[DW];
    d_cross[0] = {1'b0, d[0]} - {1'b0, d[3]};
    d_cross[1] = {1'b0, d[0]} - {1'b0, d[2]};
    d_cross[2] = {1'b0, d[1]} - {1'b0, d[2]};
    d_cross[3] = {1'b0, d[1]} - {1'b0, d[3]};
  end

endmodule
