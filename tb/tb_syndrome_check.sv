// tb_syndrome_check: exhaustive test of H x Z^T over all 1024 words.
//
// The expected syndrome is written out from the rows of H: check 1 pairs
// bits 2 and 6, check 2 bits 1 and 7, check 3 bits 5 and 8, check 4 bits 4
// and 9, check 5 bits 3 and 10.
module tb_syndrome_check;
  logic [9:0] z;
  logic [4:0] syndrome;
  logic parity_ok;
  int checks = 0, failures = 0;

  syndrome_check dut (.z(z), .syndrome(syndrome), .parity_ok(parity_ok));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] exp_s;
    for (int w = 0; w < 1024; w++) begin
      z = 10'(w);
      #1;
      // z[j] is bit j+1
      exp_s[0] = z[1] ^ z[5];
      exp_s[1] = z[0] ^ z[6];
      exp_s[2] = z[4] ^ z[7];
      exp_s[3] = z[3] ^ z[8];
      exp_s[4] = z[2] ^ z[9];
      checks += 2;
      if (syndrome != exp_s) begin
        failures++;
        if (failures < 10) $display("z=%b syn=%b exp %b", z, syndrome, exp_s);
      end
      if (parity_ok != (exp_s == 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
