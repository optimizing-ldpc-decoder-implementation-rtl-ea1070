// bit_decision: hard decision on every bit of the code word.
//
// Bit i is decided 1 when its reliability y[i] is zero or negative and 0 when
// it is positive. The LLR is log P(0)/P(1), so a positive value favours 0.
// vhat is the same word in the opposite polarity (1 for a positive y), which
// is how the decoder's output is shown in the document's simulation results;
// both are provided so that either convention can be used downstream.
//
// Interface: y[i] signed YW-bit reliabilities; z and vhat are N-bit words,
// bit i for variable node i+1. Purely combinational.
module bit_decision #(
  parameter int N  = 10,
  parameter int YW = 17
) (
  input  logic signed [YW-1:0] y [N],
  output logic [N-1:0]         z,
  output logic [N-1:0]         vhat
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      z[i]    = (y[i] <= 0);
      vhat[i] = ~z[i];
    end
  end

endmodule
