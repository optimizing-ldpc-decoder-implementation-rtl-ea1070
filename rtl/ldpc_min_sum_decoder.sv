// ldpc_min_sum_decoder: fully parallel min-sum LDPC decoder, iterations
// unrolled, no registers.
//
// Every check node and every variable node has its own hardware, and each of
// the IMAX iterations has its own copy of that hardware, so a code word is
// decoded in one combinational pass. Iteration t runs horizontal_setup (check
// node update) on the variable-to-check messages Q_t, then vertical_setup
// (variable node update and bit decision) on the resulting R_t and the
// channel LLRs; this yields the decided word of iteration t and the messages
// Q_{t+1}. Q_1 is the channel LLR of each edge's variable node. A
// syndrome_check per iteration tests H x Z^T = 0, and iteration_controller
// picks the word of the first iteration that passes, or of the last one.
//
// With IMAX = 1 the decoder reduces to the single chain rx -> check nodes ->
// variable nodes -> decision, which for this matrix already gives the same
// word as five iterations.
//
// Interface: rx[j] is the signed W-bit LLR of bit j+1 (positive favours 0).
// z is the decided code word (bit j = bit j+1; 1 where y <= 0), vhat its
// complement, msg the first K_MSG bits of z, iter the iterations performed,
// parity_ok whether z is a code word.
//
// Following the document: the 5x10 matrix, min-sum updates, five
// iterations, early termination on a zero syndrome, 16-bit LLRs, a design
// without registers. This design's own choices: unrolling the iterations in
// space, message clipping, and taking the message bits as the first five code
// bits (each row of H pairs one of bits 1..5 with one of bits 6..10).
module ldpc_min_sum_decoder
  import ldpc_pkg::*;
#(
  parameter int W          = LLR_W,
  parameter int IMAX       = IT_MAX,
  parameter bit EARLY_STOP = 1'b1,
  localparam int YW        = W + $clog2(DV_MAX + 1),
  localparam int IW        = (IMAX < 2) ? 1 : $clog2(IMAX + 1)
) (
  input  logic signed [W-1:0] rx [N_VAR],
  output logic [N_VAR-1:0]    z,
  output logic [N_VAR-1:0]    vhat,
  output logic [K_MSG-1:0]    msg,
  output logic [IW-1:0]       iter,
  output logic                parity_ok
);

  localparam logic signed [W-1:0] L_MAX = W'((2 ** (W - 1)) - 1);

  logic signed [W-1:0] q_init [N_EDGE];
  logic [N_VAR-1:0]    z_it  [IMAX];
  logic [N_VAR-1:0]    vh_it [IMAX];
  logic [IMAX-1:0]     ok_it;
  logic [IW-1:0]       sel;

  // Initialisation: each edge starts with its variable node's channel LLR,
  // clipped to the symmetric message range.
  for (genvar e = 0; e < N_EDGE; e++) begin : g_init
    assign q_init[e] = (rx[edge_var(e)] < -L_MAX) ? -L_MAX : rx[edge_var(e)];
  end

  for (genvar t = 0; t < IMAX; t++) begin : g_iter
    logic signed [W-1:0]  q_in  [N_EDGE];  // Q entering iteration t+1
    logic signed [W-1:0]  r_t   [N_EDGE];
    logic signed [W-1:0]  q_out [N_EDGE];  // Q handed to the next iteration
    logic signed [YW-1:0] y_t   [N_VAR];
    logic [N_CHK-1:0]     syn_t;

    if (t == 0) begin : g_first
      assign q_in = q_init;
    end else begin : g_next
      assign q_in = g_iter[t-1].q_out;
    end

    horizontal_setup #(.W(W)) u_h (
      .q (q_in),
      .r (r_t)
    );

    vertical_setup #(.W(W), .YW(YW)) u_v (
      .llr  (rx),
      .r    (r_t),
      .q    (q_out),
      .y    (y_t),
      .z    (z_it[t]),
      .vhat (vh_it[t])
    );

    syndrome_check u_syn (
      .z         (z_it[t]),
      .syndrome  (syn_t),
      .parity_ok (ok_it[t])
    );
  end

  iteration_controller #(.IMAX(IMAX), .EARLY_STOP(EARLY_STOP), .IW(IW)) u_ctrl (
    .ok        (ok_it),
    .sel       (sel),
    .iter      (iter),
    .converged (parity_ok)
  );

  assign z    = z_it[sel];
  assign vhat = vh_it[sel];
  assign msg  = z[K_MSG-1:0];

endmodule
