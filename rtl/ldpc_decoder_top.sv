// ldpc_decoder_top: the decoder as a clocked block: LLR buffer, min-sum
// decoding, bit decision.
//
// A word of ten received LLRs is captured in llr_buffer when in_valid is high.
// The fully parallel decoder works on the buffered word combinationally, so
// the decoded word, its message bits, the iteration count and the parity flag
// are valid from the next cycle on (out_valid) and stay valid until another
// word is loaded. The iteration controller inside the decoder stops at the
// first iteration whose decided word satisfies every parity check, or after
// IMAX iterations.
//
// Interface: clk, rst_n (asynchronous, active low), in_valid with rx[0..9]
// (signed W-bit LLRs of bits 1..10, positive favours 0); out_valid, z (decided
// code word, bit j = bit j+1, 1 where the reliability is <= 0), vhat (its
// complement), msg (bits 1..5 of z), iter, parity_ok.
//
// The chain LLR buffer -> variable/check nodes -> bit decision with an
// iteration controller follows the document's architecture; the load/valid
// handshake and the one-cycle latency are this design's own.
module ldpc_decoder_top
  import ldpc_pkg::*;
#(
  parameter int W          = LLR_W,
  parameter int IMAX       = IT_MAX,
  parameter bit EARLY_STOP = 1'b1,
  localparam int IW        = (IMAX < 2) ? 1 : $clog2(IMAX + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] rx [N_VAR],
  output logic                out_valid,
  output logic [N_VAR-1:0]    z,
  output logic [N_VAR-1:0]    vhat,
  output logic [K_MSG-1:0]    msg,
  output logic [IW-1:0]       iter,
  output logic                parity_ok
);

  logic signed [W-1:0] llr [N_VAR];

  llr_buffer #(.N(N_VAR), .W(W)) u_buf (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (in_valid),
    .d     (rx),
    .llr   (llr),
    .full  (out_valid)
  );

  ldpc_min_sum_decoder #(.W(W), .IMAX(IMAX), .EARLY_STOP(EARLY_STOP)) u_dec (
    .rx        (llr),
    .z         (z),
    .vhat      (vhat),
    .msg       (msg),
    .iter      (iter),
    .parity_ok (parity_ok)
  );

  // A loaded word always produces a result within IMAX iterations.
  a_iter_range : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> (iter >= 1 && iter <= IW'(IMAX)));

  // A word presented with in_valid is reported valid on the next cycle.
  a_valid_follows : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |=> out_valid);

endmodule
