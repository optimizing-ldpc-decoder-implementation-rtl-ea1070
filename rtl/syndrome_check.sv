// syndrome_check: decoding verification, H x Z^T = 0.
//
// Each syndrome bit is the parity (XOR) of the decided bits that the check
// node's row of H selects. parity_ok is high when every check is satisfied,
// i.e. when z is a code word. Purely combinational.
//
// The test is the document's; the matrix comes from ldpc_pkg.
module syndrome_check
  import ldpc_pkg::*;
(
  input  logic [N_VAR-1:0] z,
  output logic [N_CHK-1:0] syndrome,
  output logic             parity_ok
);

  always_comb begin
    for (int i = 0; i < N_CHK; i++) syndrome[i] = ^(H[i] & z);
    parity_ok = (syndrome == '0);
  end

endmodule
