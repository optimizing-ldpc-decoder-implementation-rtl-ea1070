// tb_ldpc_decoder_top: end-to-end test of the clocked decoder.
//
// Random 5-bit messages are encoded (each parity bit copies the message bit
// it shares a check with), mapped to LLRs (+A for 0, -A for 1) and disturbed
// with noise of up to +-1.25 A, large enough to flip some bits. Words are loaded through the
// in_valid handshake with random idle cycles between them. Each result is
// compared with the integer reference decoder one cycle after loading, and
// held results are checked while no new word arrives.
//
// A default decoder (early stopping) and a second one with early stopping
// switched off run side by side. The test counts how often each mechanism
// occurs and fails if one never does: early termination, running all five
// iterations, a bit corrected against the channel's hard decision, an
// input at the most negative LLR (clipped), a result held over idle cycles,
// and a message recovered despite channel errors.
module tb_ldpc_decoder_top;
  import ldpc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [15:0] rx [10];
  logic out_valid, out_valid_f;
  logic [9:0] z, vhat, z_f, vhat_f;
  logic [4:0] msg, msg_f;
  logic [2:0] iter, iter_f;
  logic parity_ok, parity_ok_f;
  int checks = 0, failures = 0, cycles = 0;
  int n_early = 0, n_full = 0, n_corr = 0, n_clip = 0, n_hold = 0, n_recover = 0;

  ldpc_decoder_top u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .rx(rx),
    .out_valid(out_valid), .z(z), .vhat(vhat), .msg(msg), .iter(iter),
    .parity_ok(parity_ok));

  ldpc_decoder_top #(.EARLY_STOP(1'b0)) u_full (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .rx(rx),
    .out_valid(out_valid_f), .z(z_f), .vhat(vhat_f), .msg(msg_f), .iter(iter_f),
    .parity_ok(parity_ok_f));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("%s: got %0d (%b) expected %0d (%b)", what, got, got, exp, exp);
    end
  endtask

  task automatic count_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [10];
    logic [9:0] cw, ez, ez_f, hard;
    logic [4:0] m;
    int eit, eit_f;

    foreach (rx[j]) rx[j] = '0;
    repeat (3) @(posedge clk);
    #1;
    check("valid low in reset", int'(out_valid), 0);
    rst_n = 1'b1;

    for (int n = 0; n < 2000; n++) begin
      // encode: bit j+5 copies the message bit it shares a check with
      m = 5'($urandom);
      cw[4:0] = m;
      for (int e = 0; e < 10; e += 2) cw[EDGES[e + 1][1]] = cw[EDGES[e][1]];
      for (int j = 0; j < 10; j++) begin
        automatic int a = 4000;
        automatic int noise = int'($urandom % 10000) - 5000;
        v[j] = (cw[j] ? -a : a) + noise;
        if (($urandom % 50) == 0) v[j] = -32768;
        v[j] = sext(v[j], 16);
      end
      @(negedge clk);
      foreach (rx[j]) rx[j] = 16'(v[j]);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      foreach (rx[j]) rx[j] = 16'($urandom);  // must not disturb the held word
      decode(v, 16, 5, 1'b1, ez, eit);
      decode(v, 16, 5, 1'b0, ez_f, eit_f);
      for (int j = 0; j < 10; j++) hard[j] = (v[j] <= 0);
      check("out_valid", int'(out_valid), 1);
      check("z", int'(z), int'(ez));
      check("vhat", int'(vhat), int'(10'(~ez)));
      check("msg", int'(msg), int'(ez[4:0]));
      check("iter", int'(iter), eit);
      check("parity_ok", int'(parity_ok), 1);
      check("z (no early stop)", int'(z_f), int'(ez_f));
      check("iter (no early stop)", int'(iter_f), 5);
      if (iter < 3'd5) n_early++;
      if (iter_f == 3'd5) n_full++;
      if (z != hard) n_corr++;
      foreach (v[j]) if (v[j] == -32768) begin n_clip++; break; end
      if (hard[4:0] != m && msg == m) n_recover++;
      // idle cycles: the result must hold
      repeat ($urandom % 3) begin
        @(negedge clk);
        check("held z", int'(z), int'(ez));
        n_hold++;
      end
    end
    $display("early stops %0d, full runs %0d, corrections %0d, clipped inputs %0d, holds %0d, recovered messages %0d",
             n_early, n_full, n_corr, n_clip, n_hold, n_recover);
    count_seen("early termination", n_early);
    count_seen("all iterations", n_full);
    count_seen("bit correction", n_corr);
    count_seen("clipped input", n_clip);
    count_seen("held result", n_hold);
    count_seen("message recovered", n_recover);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
