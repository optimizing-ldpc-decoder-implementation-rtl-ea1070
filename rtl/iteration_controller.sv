// iteration_controller: decides how many of the unrolled iterations count.
//
// The decoder evaluates all IMAX iterations side by side; bit k of ok is high
// when the word decided after iteration k+1 satisfies every parity check.
// With EARLY_STOP set, the controller picks the first iteration whose word
// passes (decoding "stops" there) and falls back to the last iteration when
// none does. With EARLY_STOP clear it always picks the last iteration.
//
// Interface: ok is IMAX bits; sel is the 0-based index of the chosen
// iteration, iter the number of iterations performed (1..IMAX) and converged
// whether the chosen word is a code word. Purely combinational.
//
// Stopping at the first iteration that satisfies H x Z^T = 0, or at IMAX, is
// the document's rule. Making early stopping switchable is this design's
// choice: the document's simulation result reports five iterations for an
// input that already satisfies every check after the first one.
module iteration_controller #(
  parameter int IMAX       = 5,
  parameter bit EARLY_STOP = 1'b1,
  parameter int IW         = (IMAX < 2) ? 1 : $clog2(IMAX + 1)
) (
  input  logic [IMAX-1:0] ok,
  output logic [IW-1:0]   sel,
  output logic [IW-1:0]   iter,
  output logic            converged
);

  always_comb begin
    sel = IW'(IMAX - 1);
    if (EARLY_STOP) begin
      for (int k = IMAX - 1; k >= 0; k--)
        if (ok[k]) sel = IW'(k);
    end
    iter      = sel + 1'b1;
    converged = ok[sel];
  end

endmodule
