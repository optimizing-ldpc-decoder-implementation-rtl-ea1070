// vn_unit: one min-sum variable (bit) node.
//
// The node adds its channel LLR to the R messages of all DV check nodes it is
// connected to, giving the bit reliability y. The message it sends back to
// each check node leaves that check node's own R out: q[k] = y - r[k], i.e.
// the channel LLR plus the R messages of all other check nodes.
//
// Interface: llr is the signed W-bit channel LLR, r[k] the signed W-bit
// check-to-variable messages, q[k] the new variable-to-check messages and y
// the full-precision reliability (YW bits). Purely combinational.
//
// The sums are the document's (its Eq. 4 and 5, and the pseudocode). Clipping
// q to the symmetric range +-(2^(W-1)-1) is this design's choice; y is kept
// wide enough never to overflow.
module vn_unit #(
  parameter int DV = 1,
  parameter int W  = 16,
  parameter int YW = W + $clog2(DV + 1)
) (
  input  logic signed [W-1:0]  llr,
  input  logic signed [W-1:0]  r [DV],
  output logic signed [W-1:0]  q [DV],
  output logic signed [YW-1:0] y
);

  localparam logic signed [YW-1:0] Q_MAX = YW'((2 ** (W - 1)) - 1);
  localparam logic signed [YW-1:0] Q_MIN = -Q_MAX;

  always_comb begin
    y = YW'(llr);
    for (int k = 0; k < DV; k++) y += YW'(r[k]);
    for (int k = 0; k < DV; k++) begin
      logic signed [YW-1:0] ext;
      ext = y - YW'(r[k]);
      if (ext > Q_MAX)      q[k] = Q_MAX[W-1:0];
      else if (ext < Q_MIN) q[k] = Q_MIN[W-1:0];
      else                  q[k] = ext[W-1:0];
    end
  end

endmodule
