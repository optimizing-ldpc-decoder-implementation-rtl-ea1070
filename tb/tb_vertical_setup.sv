// tb_vertical_setup: self-checking test of the variable-node stage.
//
// Random channel LLRs and check-node messages go in. For every bit the
// reliability must equal LLR + the R message of its edge, the decided bit
// must follow the sign rule, vhat must be its complement, and the new edge
// message must be the LLR alone (each bit of this code sits in one check,
// so no other check contributes).
module tb_vertical_setup;
  import ldpc_ref_pkg::*;
  localparam int W = 16;
  logic signed [W-1:0] llr [10], r [10], q [10];
  logic signed [W:0]   y [10];
  logic [9:0] z, vhat;
  int checks = 0, failures = 0;

  vertical_setup #(.W(W)) dut (.llr(llr), .r(r), .q(q), .y(y), .z(z), .vhat(vhat));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int l [10], a [10], yy [10];
    for (int n = 0; n < 1000; n++) begin
      for (int j = 0; j < 10; j++) begin
        l[j] = sext($urandom, W) >>> ($urandom % 10);
        llr[j] = W'(l[j]);
      end
      for (int e = 0; e < 10; e++) begin
        a[e] = clip(sext($urandom, W) >>> ($urandom % 10), W);
        r[e] = W'(a[e]);
      end
      #1;
      for (int j = 0; j < 10; j++) yy[j] = l[j];
      for (int e = 0; e < 10; e++) yy[EDGES[e][1]] += a[e];
      for (int j = 0; j < 10; j++) begin
        check("y", int'(y[j]), yy[j]);
        check("z", int'(z[j]), int'(yy[j] <= 0));
        check("vhat", int'(vhat[j]), int'(yy[j] > 0));
      end
      for (int e = 0; e < 10; e++)
        check("q", int'(q[e]), clip(l[EDGES[e][1]], W));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
