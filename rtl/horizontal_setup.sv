// horizontal_setup: the check-node half of one min-sum iteration.
//
// One cn_unit per row of H, all working in parallel. Messages travel in edge
// order (row by row of H), so check node i reads and writes the consecutive
// edges row_start(i) .. row_start(i)+row_deg(i)-1. For the document's matrix
// the ten outputs are, in order, Lr1_2, Lr1_6, Lr2_1, Lr2_7, Lr3_5, Lr3_8,
// Lr4_4, Lr4_9, Lr5_3 and Lr5_10 (check node, variable node).
//
// Interface: q[e] signed W-bit variable-to-check messages, r[e] signed W-bit
// check-to-variable messages, e = 0 .. N_EDGE-1. Purely combinational.
//
// The block's name, its place in the decoder and its output names follow the
// document's direct implementation; the edge ordering and the generic
// construction from H are this design's own.
module horizontal_setup
  import ldpc_pkg::*;
#(
  parameter int W = LLR_W
) (
  input  logic signed [W-1:0] q [N_EDGE],
  output logic signed [W-1:0] r [N_EDGE]
);

  for (genvar i = 0; i < N_CHK; i++) begin : g_cn
    localparam int DC = row_deg(i);
    localparam int RS = row_start(i);

    logic signed [W-1:0] q_i [DC];
    logic signed [W-1:0] r_i [DC];

    for (genvar k = 0; k < DC; k++) begin : g_edge
      assign q_i[k]    = q[RS + k];
      assign r[RS + k] = r_i[k];
    end

    cn_unit #(.DC(DC), .W(W)) u_cn (
      .q (q_i),
      .r (r_i)
    );
  end

endmodule
