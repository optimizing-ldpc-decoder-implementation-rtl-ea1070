// tb_llr_buffer: self-checking test of the LLR input buffer.
//
// Checks that reset empties the buffer, that a word is captured on the clock
// edge that samples load and becomes visible one cycle after it is
// presented, and that the contents hold while load is low.
module tb_llr_buffer;
  localparam int N = 10, W = 16;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic signed [W-1:0] d [N], llr [N];
  logic full;
  int checks = 0, failures = 0;
  int cycles = 0;

  llr_buffer #(.N(N), .W(W)) dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .llr(llr), .full(full));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] held [N];
    automatic bit loaded = 1'b0;
    foreach (d[i]) d[i] = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (full) failures++;
    foreach (llr[i]) begin checks++; if (llr[i] != 0) failures++; end
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      foreach (d[i]) d[i] = W'($urandom);
      load = ($urandom % 3) != 0;
      if (load) begin
        foreach (d[i]) held[i] = d[i];
        loaded = 1'b1;
      end
      @(posedge clk);
      #1;
      checks++;
      if (full != loaded) failures++;
      if (full) foreach (llr[i]) begin
        checks++;
        if (llr[i] != held[i]) begin
          failures++;
          if (failures < 10) $display("n=%0d llr[%0d]=%h exp %h", n, i, llr[i], held[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
