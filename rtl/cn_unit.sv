// cn_unit: one min-sum check node.
//
// For each of its DC edges the check node returns the product of the signs of
// the other incoming Q messages times the smallest magnitude among them
// (min-sum check node update). It finds the two smallest magnitudes, min1 and
// min2, and the edge that holds min1 in a single pass: the edge that holds
// min1 receives min2, every other edge receives min1. The sign is the XOR of
// all incoming signs with the edge's own sign removed.
//
// Interface: q[k] are signed W-bit variable-to-check messages, r[k] the signed
// W-bit check-to-variable messages for the same edges. Purely combinational.
//
// The update rule is the document's. Magnitudes saturate at 2^(W-1)-1 so an
// input of -2^(W-1) cannot overflow the signed output (this design's choice);
// a check node of degree 1 has no other edge and sends 0.
module cn_unit #(
  parameter int DC = 2,
  parameter int W  = 16
) (
  input  logic signed [W-1:0] q [DC],
  output logic signed [W-1:0] r [DC]
);

  localparam logic [W-1:0] MAG_MAX = {1'b0, {(W-1){1'b1}}};

  logic [W-1:0]          mag [DC];
  logic [DC-1:0]         sgn;
  logic                  sgn_all;
  logic [W-1:0]          min1, min2;
  logic [$clog2(DC+1)-1:0] min1_idx;

  always_comb begin
    for (int k = 0; k < DC; k++) begin
      sgn[k] = q[k][W-1];
      mag[k] = sgn[k] ? W'(-q[k]) : W'(q[k]);
      if (mag[k] > MAG_MAX) mag[k] = MAG_MAX;
    end
    sgn_all  = ^sgn;
    min1     = MAG_MAX;
    min2     = MAG_MAX;
    min1_idx = '0;
    for (int k = 0; k < DC; k++) begin
      if (mag[k] < min1) begin
        min2     = min1;
        min1     = mag[k];
        min1_idx = ($clog2(DC+1))'(k);
      end else if (mag[k] < min2) begin
        min2 = mag[k];
      end
    end
    for (int k = 0; k < DC; k++) begin
      logic [W-1:0] m;
      m = (min1_idx == ($clog2(DC+1))'(k)) ? min2 : min1;
      if (DC == 1) m = '0;
      r[k] = (sgn_all ^ sgn[k]) ? -$signed(m) : $signed(m);
    end
  end

endmodule
