// tb_vn_unit: self-checking test of the variable node.
//
// Drives a degree-1 and a degree-3 variable node with random LLRs and
// check-node messages, and checks y = LLR + sum of all R and each
// q[k] = LLR + sum of the other R, clipped to +-(2^(W-1)-1).
module tb_vn_unit;
  localparam int W = 16;
  localparam int MAXM = (1 << (W - 1)) - 1;

  logic signed [W-1:0]  llr1, llr3;
  logic signed [W-1:0]  r1 [1], q1 [1];
  logic signed [W-1:0]  r3 [3], q3 [3];
  logic signed [W:0]    y1;
  logic signed [W+1:0]  y3;
  int checks = 0, failures = 0;

  vn_unit #(.DV(1), .W(W)) u_dv1 (.llr(llr1), .r(r1), .q(q1), .y(y1));
  vn_unit #(.DV(3), .W(W)) u_dv3 (.llr(llr3), .r(r3), .q(q3), .y(y3));

  function automatic int clip(int v);
    return (v > MAXM) ? MAXM : (v < -MAXM) ? -MAXM : v;
  endfunction

  function automatic int rnd();
    return (($urandom % 8) == 0) ? ((($urandom % 2) == 1) ? MAXM : -MAXM)
                                 : (int'($signed(W'($urandom))) >>> ($urandom % 8));
  endfunction

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
    for (int n = 0; n < 2000; n++) begin
      int l1, l3, a1, a3[3], s3;
      l1 = rnd(); a1 = rnd(); l3 = rnd();
      foreach (a3[k]) a3[k] = rnd();
      llr1 = W'(l1); r1[0] = W'(a1); llr3 = W'(l3);
      foreach (a3[k]) r3[k] = W'(a3[k]);
      #1;
      check("dv1 y", int'(y1), l1 + a1);
      check("dv1 q", int'(q1[0]), clip(l1));
      s3 = l3 + a3[0] + a3[1] + a3[2];
      check("dv3 y", int'(y3), s3);
      foreach (a3[k]) check("dv3 q", int'(q3[k]), clip(s3 - a3[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
