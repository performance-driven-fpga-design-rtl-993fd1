// vq_dist_seq: distortion unit (VQ_Module) of the architecture that is
// parallel across the codebook and sequential across the vector dimension.
//
// One instance serves one codevector. The vector arrives one dimension per
// clock: pixel x_k of the input vector and pixel c_k of the codevector, with
// in_first on k = 0 and in_last on k = K-1. A three-stage pipeline computes
//   stage 1: e_k = x_k - c_k            (signed, PIX_W+1 bits)
//   stage 2: s_k = e_k * e_k            (2*PIX_W bits)
//   stage 3: D   = sum of s_k over k    (accumulator, DW bits)
// and raises out_valid for one clock with the full distortion
// D = sum_k (x_k - c_k)^2 three clocks after the clock that carried in_last.
// A new vector may follow the previous one without a gap, so one vector is
// finished every K clocks. The subtract / square / add structure and the
// pipelining along K follow the published design; the stage boundaries,
// first/last flags and the active-low synchronous reset are this design's.
module vq_dist_seq
  import vq_pkg::*;
#(
  parameter int unsigned K  = 4,                  // vector dimension
  parameter int unsigned DW = dist_width(K)       // distortion width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic          in_last,
  input  pixel_t        x,
  input  pixel_t        c,
  output logic          out_valid,
  output logic [DW-1:0] distortion
);

  logic signed [PIX_W:0]   e_q;
  logic [2*PIX_W-1:0]      s_q;
  logic [DW-1:0]           acc_q;
  logic                    v1, f1, l1, v2, f2, l2, ov_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; f1 <= 1'b0; l1 <= 1'b0;
      v2 <= 1'b0; f2 <= 1'b0; l2 <= 1'b0;
      ov_q  <= 1'b0;
      e_q   <= '0;
      s_q   <= '0;
      acc_q <= '0;
    end else begin
      // stage 1: subtract
      v1  <= in_valid;
      f1  <= in_first;
      l1  <= in_last;
      e_q <= $signed({1'b0, x}) - $signed({1'b0, c});
      // stage 2: square
      v2  <= v1;
      f2  <= f1;
      l2  <= l1;
      s_q <= (2*PIX_W)'(e_q * e_q);
      // stage 3: accumulate along K
      if (v2) acc_q <= f2 ? DW'(s_q) : acc_q + DW'(s_q);
      ov_q <= v2 && l2;
    end
  end

  assign out_valid = ov_q;
  assign distortion      = acc_q;

endmodule
