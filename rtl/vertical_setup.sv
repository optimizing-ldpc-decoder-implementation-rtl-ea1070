// vertical_setup: the variable-node half of one min-sum iteration, with the
// bit decision.
//
// One vn_unit per column of H. Variable node j collects the R messages of its
// col_deg(j) edges, adds its channel LLR, and returns one extrinsic Q message
// per edge together with its reliability y[j]. bit_decision then turns the
// ten reliabilities into the decided word z (1 where y <= 0) and its
// complement vhat.
//
// Interface: llr[j] signed W-bit channel LLRs (rx1..rx10), r[e] signed W-bit
// check-to-variable messages in edge order; q[e] the next variable-to-check
// messages, y[j] the YW-bit reliabilities, z and vhat N_VAR-bit words (bit j
// for variable node j+1). Purely combinational.
//
// The block's name and its inputs (the ten R messages and the ten channel
// LLRs) follow the document's direct implementation; the rest is this
// design's own arrangement of the document's equations.
module vertical_setup
  import ldpc_pkg::*;
#(
  parameter int W  = LLR_W,
  parameter int YW = W + $clog2(DV_MAX + 1)
) (
  input  logic signed [W-1:0]  llr [N_VAR],
  input  logic signed [W-1:0]  r   [N_EDGE],
  output logic signed [W-1:0]  q   [N_EDGE],
  output logic signed [YW-1:0] y   [N_VAR],
  output logic [N_VAR-1:0]     z,
  output logic [N_VAR-1:0]     vhat
);

  for (genvar j = 0; j < N_VAR; j++) begin : g_vn
    localparam int DV = col_deg(j);

    logic signed [W-1:0]  r_j [DV];
    logic signed [W-1:0]  q_j [DV];
    logic signed [YW-1:0] y_j;

    for (genvar k = 0; k < DV; k++) begin : g_edge
      assign r_j[k]            = r[col_edge(j, k)];
      assign q[col_edge(j, k)] = q_j[k];
    end

    vn_unit #(.DV(DV), .W(W), .YW(YW)) u_vn (
      .llr (llr[j]),
      .r   (r_j),
      .q   (q_j),
      .y   (y_j)
    );

    assign y[j] = y_j;
  end

  bit_decision #(.N(N_VAR), .YW(YW)) u_dec (
    .y    (y),
    .z    (z),
    .vhat (vhat)
  );

endmodule
