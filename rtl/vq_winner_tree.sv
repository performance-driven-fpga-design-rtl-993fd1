// vq_winner_tree: finds the codeword of least distortion among N by reusing
// the four-codeword VQ1 stage hierarchically.
//
// Level 0 splits the N distortions into groups of four; one vq1_select per
// group gives the group's least distortion and its index. Level 1 does the same
// with those N/4 winners, carrying their indices along, and so on until one
// winner is left after log4(N) levels. N must be a power of four (4, 16, 64,
// 256, ...). Each level ends in a register, so a new set of N distortions can
// enter every clock and its winner (out_dist, out_idx) leaves log4(N) clocks
// later with out_valid. Equal distortions resolve to the higher index.
// Reusing VQ1 in parallel is the published scheme; how the later levels are
// formed (again from VQ1 stages) and the register per level are this design's.
module vq_winner_tree
  import vq_pkg::*;
#(
  parameter int unsigned N  = 256,               // codebook size, a power of 4
  parameter int unsigned DW = dist_width(4),     // distortion width
  parameter int unsigned IW = idx_width(N)       // index width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] d [N],
  output logic          out_valid,
  output logic [DW-1:0] out_dist,
  output logic [IW-1:0] out_idx
);

  localparam int unsigned L = $clog2(N) / 2;     // number of VQ1 levels

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned NIN  = N >> (2 * l);
    localparam int unsigned NOUT = NIN / 4;

    logic [DW-1:0] din [NIN];
    logic [IW-1:0] iin [NIN];
    logic          vin;
    logic [DW-1:0] dq  [NOUT];
    logic [IW-1:0] iq  [NOUT];
    logic          vq;

    if (l == 0) begin : g_src
      assign din = d;
      assign vin = in_valid;
      for (genvar i = 0; i < NIN; i++) begin : g_idx
        assign iin[i] = IW'(i);
      end
    end else begin : g_src
      assign din = g_lvl[l-1].dq;
      assign iin = g_lvl[l-1].iq;
      assign vin = g_lvl[l-1].vq;
    end

    for (genvar g = 0; g < NOUT; g++) begin : g_grp
      logic [DW-1:0] gd [4];
      logic [IW-1:0] gi [4];
      logic [DW-1:0] wd;
      logic [IW-1:0] wi;
      for (genvar j = 0; j < 4; j++) begin : g_in
        assign gd[j] = din[4*g+j];
        assign gi[j] = iin[4*g+j];
      end
      vq1_select #(.DW(DW), .IW(IW)) u_vq1 (.d(gd), .idx(gi), .dx(wd), .ix(wi));
      always_ff @(posedge clk) begin
        dq[g] <= wd;
        iq[g] <= wi;
      end
    end

    always_ff @(posedge clk) begin
      if (!rst_n) vq <= 1'b0;
      else        vq <= vin;
    end
  end

  assign out_valid = g_lvl[L-1].vq;
  assign out_dist  = g_lvl[L-1].dq[0];
  assign out_idx   = g_lvl[L-1].iq[0];

  initial begin
    assert (is_pow4(N)) else $error("vq_winner_tree: N=%0d must be a power of four", N);
  end

endmodule
