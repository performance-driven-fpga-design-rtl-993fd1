// vq_a3_mux: the multiplexer of the 4-codeword winner stage (VQ1).
//
// A1 says which of D1, D2 won the first pair and A2 which of D3, D4 won the
// second. The mux uses them to pick the cross difference between the two pair
// winners and outputs its sign as A3 (1: the first-pair winner is smaller).
//   A1 A2 | selected difference
//    1  1 | D1 - D3
//    1  0 | D1 - D4
//    0  1 | D2 - D3
//    0  0 | D2 - D4
// Purely combinational. The inputs and outputs are those of the published
// block diagram; the selection table follows from the definitions of A1, A2.
module vq_a3_mux #(
  parameter int unsigned DW = 18          // distortion width
) (
  input  logic [DW:0] d_cross [4],        // D1-D4, D1-D3, D2-D3, D2-D4
  input  logic        a1,
  input  logic        a2,
  output logic        a3
);

  logic [DW:0] sel_diff;

  always_comb begin
    unique case ({a1, a2})
      2'b11:   sel_diff = d_cross[1];     // D1 - D3
      2'b10:   sel_diff = d_cross[0];     // D1 - D4
      2'b01:   sel_diff = d_cross[2];     // D2 - D3
      default: sel_diff = d_cross[3];     // D2 - D4
    endcase
    a3 = sel_diff[DW];
  end

endmodule
