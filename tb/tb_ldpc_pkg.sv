// tb_ldpc_pkg: checks the tables the package derives from H.
//
// The edge count, the check-node degrees and first edges, the variable-node
// degrees and edges, and the variable of each edge are compared with values
// written out by hand from the 5x10 matrix (edges numbered row by row:
// C1-V2, C1-V6, C2-V1, C2-V7, C3-V5, C3-V8, C4-V4, C4-V9, C5-V3, C5-V10).
module tb_ldpc_pkg;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;

  localparam int EXP_VAR [10] = '{1, 5, 0, 6, 4, 7, 3, 8, 2, 9};

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check("N_EDGE", N_EDGE, 10);
    check("K_MSG", K_MSG, 5);
    for (int i = 0; i < N_CHK; i++) begin
      check("row_deg", row_deg(i), 2);
      check("row_start", row_start(i), 2 * i);
    end
    for (int e = 0; e < 10; e++) begin
      check("edge_var", edge_var(e), EXP_VAR[e]);
      check("col_edge", col_edge(EXP_VAR[e], 0), e);
    end
    for (int j = 0; j < N_VAR; j++) check("col_deg", col_deg(j), 1);
    check("iter_w", iter_w(IT_MAX), 3);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
