// tb_bit_decision: self-checking test of the hard decision.
//
// Every bit must be 1 where its reliability is zero or negative and 0 where
// it is positive; vhat must be the complement. Covers zero, +-1 and the
// extremes as well as random values.
module tb_bit_decision;
  localparam int N = 10, YW = 17;
  logic signed [YW-1:0] y [N];
  logic [N-1:0] z, vhat;
  int checks = 0, failures = 0;

  bit_decision #(.N(N), .YW(YW)) dut (.y(y), .z(z), .vhat(vhat));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [N];
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < N; i++) begin
        case ($urandom % 6)
          0: v[i] = 0;
          1: v[i] = 1;
          2: v[i] = -1;
          3: v[i] = (n % 2 == 1) ? 65535 : -65536;
          default: v[i] = int'($signed(YW'($urandom)));
        endcase
        y[i] = YW'(v[i]);
      end
      #1;
      for (int i = 0; i < N; i++) begin
        checks += 2;
        if (z[i] != (v[i] <= 0)) begin
          failures++;
          if (failures < 10) $display("y=%0d z=%b", v[i], z[i]);
        end
        if (vhat[i] != (v[i] > 0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
