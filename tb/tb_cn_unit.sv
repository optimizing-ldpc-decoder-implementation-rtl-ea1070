// tb_cn_unit: self-checking test of the min-sum check node.
//
// Drives a degree-2 and a degree-4 check node with random and corner-case
// messages (zero, equal magnitudes, the most negative value) and compares
// every output with a direct evaluation of the check-node rule: product of
// the other edges' signs times the smallest of their magnitudes.
module tb_cn_unit;
  localparam int W = 16;
  localparam int MAXM = (1 << (W - 1)) - 1;

  logic signed [W-1:0] q2 [2], r2 [2];
  logic signed [W-1:0] q4 [4], r4 [4];
  int checks = 0, failures = 0;

  cn_unit #(.DC(2), .W(W)) u_dc2 (.q(q2), .r(r2));
  cn_unit #(.DC(4), .W(W)) u_dc4 (.q(q4), .r(r4));

  function automatic int expect_r(int q[], int e);
    int sgn = 1, mn = MAXM;
    foreach (q[f]) if (f != e) begin
      int a = (q[f] < 0) ? -q[f] : q[f];
      if (q[f] < 0) sgn = -sgn;
      if (a < mn) mn = a;
    end
    return sgn * mn;
  endfunction

  function automatic int rnd_llr(int mode);
    case (mode)
      0: return 0;
      1: return -(1 << (W - 1));
      2: return MAXM;
      default: return int'($signed(W'($urandom))) >>> ($urandom % 12);
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      automatic int v2[] = new[2];
      automatic int v4[] = new[4];
      foreach (v2[k]) begin v2[k] = rnd_llr($urandom % 10); q2[k] = W'(v2[k]); end
      foreach (v4[k]) begin v4[k] = rnd_llr($urandom % 10); q4[k] = W'(v4[k]); end
      if (n % 7 == 0) begin v4[2] = v4[0]; q4[2] = q4[0]; end  // tie
      #1;
      foreach (v2[k]) begin
        checks++;
        if (r2[k] != W'(expect_r(v2, k))) begin
          failures++;
          if (failures < 10) $display("DC2 q=%0d,%0d edge %0d r=%0d exp %0d", v2[0], v2[1], k, r2[k], expect_r(v2, k));
        end
      end
      foreach (v4[k]) begin
        checks++;
        if (r4[k] != W'(expect_r(v4, k))) begin
          failures++;
          if (failures < 10) $display("DC4 edge %0d r=%0d exp %0d", k, r4[k], expect_r(v4, k));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
