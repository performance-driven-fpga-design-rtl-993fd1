// vq_decoder: output stage of the 4-codeword winner stage (VQ1).
//
// Takes the four (distortion, index) pairs (D1,I0) .. (D4,I3) and the winner
// position from the LUT, and outputs the least distortion Dx and its codebook
// index Ix. In the first stage the indices are the codewords' own numbers; in
// later stages of the hierarchy they are the winners of earlier stages, so the
// index width IW is the full codebook index width.
// Purely combinational. The document names the block and its inputs and
// outputs; it is built here as a 4-to-1 selector.
module vq_decoder #(
  parameter int unsigned DW = 18,         // distortion width
  parameter int unsigned IW = 8           // index width
) (
  input  logic [DW-1:0] d   [4],
  input  logic [IW-1:0] idx [4],
  input  logic [1:0]    sel,
  output logic [DW-1:0] dx,
  output logic [IW-1:0] ix
);

  always_comb begin
    dx = d[sel];
    ix = idx[sel];
  end

endmodule
