// vq_index_lut: the look-up table of the 4-codeword winner stage (VQ1).
//
// Maps the three comparison flags to the position (0..3) of the codeword with
// the least distortion among the four:
//   A3 = 1: winner of the first pair  -> A1 ? 0 : 1
//   A3 = 0: winner of the second pair -> A2 ? 2 : 3
// Written as an eight-entry table, as a LUT would hold it. Because each flag is
// the sign of a difference, equal distortions go to the later codeword.
// Purely combinational. The document names the LUT and its inputs; the table
// contents follow from the flag definitions.
module vq_index_lut (
  input  logic       a1,
  input  logic       a2,
  input  logic       a3,
  output logic [1:0] sel          // winner position: 0 = D1 .. 3 = D4
);

  always_comb begin
    unique case ({a3, a2, a1})
      3'b000: sel = 2'd3;
      3'b001: sel = 2'd3;
      3'b010: sel = 2'd2;
      3'b011: sel = 2'd2;
      3'b100: sel = 2'd1;
      3'b101: sel = 2'd0;
      3'b110: sel = 2'd1;
      default: sel = 2'd0;        // 3'b111
    endcase
  end

endmodule
