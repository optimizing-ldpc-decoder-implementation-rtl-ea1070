// tb_horizontal_setup: self-checking test of the check-node stage.
//
// Random edge messages go in; each of the ten outputs (Lr1_2 ... Lr5_10)
// is compared with the reference check-node rule evaluated over the other
// edges of the same row of H.
module tb_horizontal_setup;
  import ldpc_ref_pkg::*;
  localparam int W = 16;
  logic signed [W-1:0] q [10], r [10];
  int checks = 0, failures = 0;

  horizontal_setup #(.W(W)) dut (.q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [10];
    for (int n = 0; n < 1000; n++) begin
      for (int e = 0; e < 10; e++) begin
        v[e] = clip(sext($urandom, W) >>> ($urandom % 10), W);
        q[e] = W'(v[e]);
      end
      #1;
      for (int e = 0; e < 10; e++) begin
        checks++;
        if (int'(r[e]) != cn_msg(v, e, W)) begin
          failures++;
          if (failures < 10) $display("edge %0d r=%0d exp %0d", e, r[e], cn_msg(v, e, W));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
