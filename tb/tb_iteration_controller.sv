// tb_iteration_controller: exhaustive test of the iteration selection.
//
// For all 32 patterns of per-iteration parity results, an early-stopping
// controller must pick the first passing iteration (or the fifth when none
// passes), and a controller without early stopping must always report five
// iterations.
module tb_iteration_controller;
  logic [4:0] ok;
  logic [2:0] sel_e, iter_e, sel_f, iter_f;
  logic conv_e, conv_f;
  int checks = 0, failures = 0;

  iteration_controller #(.IMAX(5), .EARLY_STOP(1'b1)) u_early (
    .ok(ok), .sel(sel_e), .iter(iter_e), .converged(conv_e));
  iteration_controller #(.IMAX(5), .EARLY_STOP(1'b0)) u_full (
    .ok(ok), .sel(sel_f), .iter(iter_f), .converged(conv_f));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("ok=%b %s: got %0d expected %0d", ok, what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 32; p++) begin
      int first;
      ok = 5'(p);
      #1;
      first = 5;
      for (int k = 4; k >= 0; k--) if ((p & (1 << k)) != 0) first = k + 1;
      check("early iter", int'(iter_e), first);
      check("early sel", int'(sel_e), first - 1);
      check("early converged", int'(conv_e), int'(p != 0));
      check("full iter", int'(iter_f), 5);
      check("full converged", int'(conv_f), (p >> 4) & 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
