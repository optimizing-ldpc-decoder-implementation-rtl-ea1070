// tb_ldpc_full_size: the decoder at its default parameters (16-bit LLRs,
// five iterations, early stopping) taken through complete decodes.
//
// First the published example in 16-bit form, which must decode to
// vhat = 0101010010 (bit 1 first) after one iteration, then random noisy
// words checked against the integer reference decoder. Each word is loaded
// with in_valid and its result is checked on the next cycle.
module tb_ldpc_full_size;
  import ldpc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [15:0] rx [10];
  logic out_valid;
  logic [9:0] z, vhat;
  logic [4:0] msg;
  logic [2:0] iter;
  logic parity_ok;
  int checks = 0, failures = 0, cycles = 0;

  ldpc_decoder_top u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .rx(rx),
    .out_valid(out_valid), .z(z), .vhat(vhat), .msg(msg), .iter(iter),
    .parity_ok(parity_ok));

  localparam logic [15:0] FIG_RX16 [10] = '{
    16'b1111110001101001, 16'b0000011100001001, 16'b1111000010110000,
    16'b0000000101101001, 16'b0000101000101001, 16'b0000100001110001,
    16'b1111011001010001, 16'b1111001111111001, 16'b0000110110011000,
    16'b0000100001110010
  };
  localparam logic [9:0] FIG_VHAT = {<<{10'b0101010010}};

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("%s: got %0d (%b) expected %0d (%b)", what, got, got, exp, exp);
    end
  endtask

  task automatic load(input int v [10]);
    @(negedge clk);
    foreach (rx[j]) rx[j] = 16'(v[j]);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [10];
    logic [9:0] ez;
    int eit;
    foreach (rx[j]) rx[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    foreach (v[j]) v[j] = sext(int'(FIG_RX16[j]), 16);
    load(v);
    check("published example vhat", int'(vhat), int'(FIG_VHAT));
    check("published example iter", int'(iter), 1);
    check("published example valid", int'(out_valid), 1);

    for (int n = 0; n < 1000; n++) begin
      foreach (v[j]) v[j] = sext($urandom, 16) >>> ($urandom % 14);
      load(v);
      decode(v, 16, 5, 1'b1, ez, eit);
      check("z", int'(z), int'(ez));
      check("iter", int'(iter), eit);
      check("parity_ok", int'(parity_ok), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
