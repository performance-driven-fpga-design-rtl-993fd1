// vq_dist_par: distortion unit (VQ_Module) of the architecture that is
// parallel both across the codebook and across the vector dimension.
//
// One instance serves one codevector and takes the whole K-dimensional input
// vector and codevector in one clock. K subtractors and K squarers work side
// by side, and a pairwise adder tree of log2(K) levels sums the squares:
// first D_01 .. D_0,K/2 from neighbouring pairs, then sums of those pairs, and
// so on down to the distortion D. Every stage is registered, so a new vector
// can enter each clock and its distortion leaves 2 + log2(K) clocks later with
// out_valid. K must be a power of two, at least 2. Subtract / square / pairwise
// adder tree are the published structure; the register placement and reset are
// this design's.
module vq_dist_par
  import vq_pkg::*;
#(
  parameter int unsigned K  = 4,                  // vector dimension
  parameter int unsigned DW = dist_width(K)       // distortion width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  pixel_t        x [K],
  input  pixel_t        c [K],
  output logic          out_valid,
  output logic [DW-1:0] distortion
);

  localparam int unsigned LV = $clog2(K);        // adder tree levels
  localparam int unsigned LAT = LV + 2;          // total latency in clocks

  logic signed [PIX_W:0] e_q [K];
  logic [DW-1:0]         t_q [LV+1][K];           // t_q[0]: squares, t_q[l]: level l sums
  logic [LAT-1:0]        v_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q <= '0;
      for (int i = 0; i < K; i++) begin
        e_q[i] <= '0;
        for (int l = 0; l <= LV; l++) t_q[l][i] <= '0;
      end
    end else begin
      v_q <= {v_q[LAT-2:0], in_valid};
      for (int i = 0; i < K; i++) begin
        e_q[i]    <= $signed({1'b0, x[i]}) - $signed({1'b0, c[i]});
        t_q[0][i] <= DW'($unsigned((2*PIX_W)'(e_q[i] * e_q[i])));
      end
      for (int l = 0; l < LV; l++)
        for (int i = 0; i < K; i++)
          if (i < (K >> (l + 1))) t_q[l+1][i] <= t_q[l][(2*i)%K] + t_q[l][(2*i+1)%K];
          else                    t_q[l+1][i] <= '0;
    end
  end

  assign out_valid = v_q[LAT-1];
  assign distortion      = t_q[LV][0];

  initial begin
    assert (K >= 2 && (K & (K - 1)) == 0)
      else $error("vq_dist_par: K=%0d must be a power of two >= 2", K);
  end

endmodule
