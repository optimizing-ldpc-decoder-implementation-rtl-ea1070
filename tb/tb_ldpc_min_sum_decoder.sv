// tb_ldpc_min_sum_decoder: self-checking test of the combinational decoder.
//
// 1. The published 14-bit example: ten LLRs that decode, after five
//    iterations without early stopping, to vhat = 0101010010 (bit 1 first)
//    with an iteration count of 5.
// 2. The same LLRs in the 16-bit format (two more fraction bits) on the
//    default decoder, which stops after the first iteration with the same
//    word.
// 3. A single-iteration decoder (IMAX = 1), which is the plain chain
//    rx -> horizontal_setup -> vertical_setup -> vhat, on the same example.
// 4. Random LLRs, compared bit for bit and iteration for iteration with the
//    integer reference decoder, on all three instances.
module tb_ldpc_min_sum_decoder;
  import ldpc_ref_pkg::*;

  logic signed [13:0] rx14 [10];
  logic signed [15:0] rx16 [10];
  logic [9:0] z14, vh14, z16, vh16;
  logic [4:0] msg14, msg16;
  logic [2:0] it14, it16;
  logic ok14, ok16;
  logic [9:0] z1, vh1;
  logic [4:0] msg1;
  logic it1;
  logic ok1;
  int checks = 0, failures = 0;

  ldpc_min_sum_decoder #(.W(14), .IMAX(5), .EARLY_STOP(1'b0)) u_w14 (
    .rx(rx14), .z(z14), .vhat(vh14), .msg(msg14), .iter(it14), .parity_ok(ok14));
  ldpc_min_sum_decoder u_def (
    .rx(rx16), .z(z16), .vhat(vh16), .msg(msg16), .iter(it16), .parity_ok(ok16));

  ldpc_min_sum_decoder #(.IMAX(1)) u_one (
    .rx(rx16), .z(z1), .vhat(vh1), .msg(msg1), .iter(it1), .parity_ok(ok1));

  localparam logic [13:0] FIG_RX [10] = '{
    14'b11111100011010, 14'b00000111000010, 14'b11110000101100,
    14'b00000001011010, 14'b00001010001010, 14'b00001000011100,
    14'b11110110010100, 14'b11110011111110, 14'b00001101100110,
    14'b00001000011100
  };
  localparam logic [15:0] FIG_RX16 [10] = '{
    16'b1111110001101001, 16'b0000011100001001, 16'b1111000010110000,
    16'b0000000101101001, 16'b0000101000101001, 16'b0000100001110001,
    16'b1111011001010001, 16'b1111001111111001, 16'b0000110110011000,
    16'b0000100001110010
  };
  // Published output, bit 1 leftmost; reversed so that bit j sits at [j-1].
  localparam logic [9:0] FIG_VHAT = {<<{10'b0101010010}};

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("%s: got %0d (%b) expected %0d (%b)", what, got, got, exp, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v14 [10], v16 [10];
    logic [9:0] ez;
    int eit;

    // 1. published 14-bit example
    foreach (rx14[j]) rx14[j] = FIG_RX[j];
    foreach (rx16[j]) rx16[j] = FIG_RX16[j];
    #1;
    check("fig vhat w14", int'(vh14), int'(FIG_VHAT));
    check("fig iter w14", int'(it14), 5);
    check("fig parity w14", int'(ok14), 1);
    check("fig z w14", int'(z14), int'(10'(~FIG_VHAT)));
    check("fig msg w14", int'(msg14), int'(z14[4:0]));
    // 2. same LLRs, 16-bit, early stop
    check("fig vhat w16", int'(vh16), int'(FIG_VHAT));
    check("fig iter w16", int'(it16), 1);
    check("fig parity w16", int'(ok16), 1);
    // 3. single iteration
    check("fig vhat one iteration", int'(vh1), int'(FIG_VHAT));
    check("fig iter one iteration", int'(it1), 1);

    // 4. random words against the reference decoder
    for (int n = 0; n < 3000; n++) begin
      for (int j = 0; j < 10; j++) begin
        case ($urandom % 8)
          0: v16[j] = -32768;
          1: v16[j] = 0;
          default: v16[j] = sext($urandom, 16) >>> ($urandom % 14);
        endcase
        v14[j] = sext($urandom, 14) >>> ($urandom % 12);
        rx16[j] = 16'(v16[j]);
        rx14[j] = 14'(v14[j]);
      end
      #1;
      decode(v16, 16, 5, 1'b1, ez, eit);
      check("rand z w16", int'(z16), int'(ez));
      check("rand vhat w16", int'(vh16), int'(10'(~ez)));
      check("rand iter w16", int'(it16), eit);
      check("rand msg w16", int'(msg16), int'(ez[4:0]));
      decode(v16, 16, 1, 1'b0, ez, eit);
      check("rand z one iteration", int'(z1), int'(ez));
      check("rand parity one iteration", int'(ok1), 1);
      decode(v14, 14, 5, 1'b0, ez, eit);
      check("rand z w14", int'(z14), int'(ez));
      check("rand iter w14", int'(it14), eit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
