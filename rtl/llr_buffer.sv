// llr_buffer: input buffer for the received LLRs.
//
// On a clock edge with load high, the N signed W-bit LLRs on d are captured
// and full is set; llr then holds them until the next load. Reset (active
// low, asynchronous) clears the contents and full.
//
// Timing: llr and full change on the clock edge that samples load, so a word
// is available to the decoder one cycle after it is presented.
//
// The document only says that the LLR input data is stored in buffers before
// decoding; the register bank, the load strobe and the reset are this design's.
module llr_buffer #(
  parameter int N = 10,
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic signed [W-1:0] d   [N],
  output logic signed [W-1:0] llr [N],
  output logic                full
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) llr[i] <= '0;
      full <= 1'b0;
    end else if (load) begin
      for (int i = 0; i < N; i++) llr[i] <= d[i];
      full <= 1'b1;
    end
  end

endmodule
