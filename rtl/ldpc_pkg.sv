// ldpc_pkg: constants shared by the min-sum LDPC decoder.
//
// The code is the rate-1/2 regular code with the 5x10 parity-check matrix H
// below: five check nodes C1..C5 and ten variable nodes V1..V10, two ones per
// row and one per column. Row i, bit j of H (bit 0 = V1) is set when check
// node C(i+1) involves code bit V(j+1). The decoder numbers the Tanner-graph
// edges row by row (C1-V2, C1-V6, C2-V1, C2-V7, ...), which is also the order
// of the check-to-variable messages Lr1_2 ... Lr5_10. The functions below
// derive the edge tables from H at elaboration time, so changing H (with
// N_CHK, N_VAR, DC_MAX and DV_MAX) is all it takes to decode another code.
//
// The matrix, the 16-bit LLR width and the limit of five iterations follow
// the document; the edge numbering and the helper functions are this
// design's own.
package ldpc_pkg;

  localparam int N_VAR  = 10;  // code word length (variable nodes)
  localparam int N_CHK  = 5;   // parity checks (check nodes)
  localparam int K_MSG  = N_VAR - N_CHK;  // message bits
  localparam int LLR_W  = 16;  // width of a received LLR
  localparam int IT_MAX = 5;   // maximum number of decoding iterations
  localparam int DC_MAX = 2;   // largest row weight of H
  localparam int DV_MAX = 1;   // largest column weight of H

  typedef logic [N_VAR-1:0] hrow_t;  // one row of H, bit j = V(j+1)

  localparam hrow_t H [N_CHK] = '{
    10'b00_0010_0010,  // C1: V2, V6
    10'b00_0100_0001,  // C2: V1, V7
    10'b00_1001_0000,  // C3: V5, V8
    10'b01_0000_1000,  // C4: V4, V9
    10'b10_0000_0100   // C5: V3, V10
  };

  // Number of ones in H (Tanner-graph edges).
  function automatic int num_edges();
    int n = 0;
    for (int i = 0; i < N_CHK; i++)
      for (int j = 0; j < N_VAR; j++)
        if (H[i][j]) n++;
    return n;
  endfunction

  localparam int N_EDGE = num_edges();

  // Degree of check node i (row weight).
  function automatic int row_deg(int i);
    int n = 0;
    for (int j = 0; j < N_VAR; j++)
      if (H[i][j]) n++;
    return n;
  endfunction

  // Index of the first edge of check node i; its edges are consecutive.
  function automatic int row_start(int i);
    int n = 0;
    for (int r = 0; r < i; r++) n += row_deg(r);
    return n;
  endfunction

  // Degree of variable node j (column weight).
  function automatic int col_deg(int j);
    int n = 0;
    for (int i = 0; i < N_CHK; i++)
      if (H[i][j]) n++;
    return n;
  endfunction

  // Edge index of the k-th edge (top to bottom) of variable node j.
  function automatic int col_edge(int j, int k);
    int e = 0;
    int seen = 0;
    for (int i = 0; i < N_CHK; i++)
      for (int c = 0; c < N_VAR; c++)
        if (H[i][c]) begin
          if (c == j) begin
            if (seen == k) return e;
            seen++;
          end
          e++;
        end
    return -1;
  endfunction

  // Variable node attached to edge e.
  function automatic int edge_var(int e);
    int n = 0;
    for (int i = 0; i < N_CHK; i++)
      for (int c = 0; c < N_VAR; c++)
        if (H[i][c]) begin
          if (n == e) return c;
          n++;
        end
    return -1;
  endfunction

  // Width of an iteration count 0..IT_MAX.
  function automatic int iter_w(int imax);
    return (imax < 2) ? 1 : $clog2(imax + 1);
  endfunction

endpackage
