// ldpc_ref_pkg: behavioural reference for the testbenches.
//
// A straightforward min-sum decoder written with integers, independent of
// the RTL's structure: each check-to-variable message is computed by
// looping over the other edges of the check node (no min1/min2 trick), and
// each variable-to-check message by summing the other check nodes' messages.
// Messages are clipped to +-(2^(W-1)-1) as in the RTL. Bits are decided 1
// where the reliability is <= 0. The parity-check matrix is written out here
// as a list of (check, variable) pairs so that it does not rely on the
// RTL's tables.
package ldpc_ref_pkg;

  localparam int NV = 10;
  localparam int NC = 5;

  // The ten ones of H, row by row: {check, variable}, both 0-based.
  localparam int EDGES [10][2] = '{
    '{0, 1}, '{0, 5}, '{1, 0}, '{1, 6}, '{2, 4},
    '{2, 7}, '{3, 3}, '{3, 8}, '{4, 2}, '{4, 9}
  };

  function automatic int clip(int v, int w);
    int m = (1 << (w - 1)) - 1;
    if (v > m) return m;
    if (v < -m) return -m;
    return v;
  endfunction

  // Check-node message on edge e from the other edges of its check node.
  function automatic int cn_msg(int q[10], int e, int w);
    int sgn = 1;
    int mn  = (1 << (w - 1)) - 1;
    int cnt = 0;
    for (int f = 0; f < 10; f++) begin
      if (f != e && EDGES[f][0] == EDGES[e][0]) begin
        int a = (q[f] < 0) ? -q[f] : q[f];
        if (q[f] < 0) sgn = -sgn;
        if (a < mn) mn = a;
        cnt++;
      end
    end
    if (cnt == 0) return 0;
    return sgn * clip(mn, w);
  endfunction

  // Decode rx (w-bit LLRs held in ints). Returns the decided word in z
  // (bit j = variable j+1) and the number of iterations in iter.
  function automatic void decode(input int rx[10], input int w, input int imax,
                                 input bit early, output logic [9:0] z,
                                 output int iter);
    int q[10];
    int r[10];
    int y[10];
    for (int e = 0; e < 10; e++) q[e] = clip(rx[EDGES[e][1]], w);
    for (int t = 1; t <= imax; t++) begin
      logic [4:0] syn;
      for (int e = 0; e < 10; e++) r[e] = cn_msg(q, e, w);
      for (int j = 0; j < NV; j++) y[j] = rx[j];
      for (int e = 0; e < 10; e++) y[EDGES[e][1]] += r[e];
      for (int e = 0; e < 10; e++) q[e] = clip(y[EDGES[e][1]] - r[e], w);
      for (int j = 0; j < NV; j++) z[j] = (y[j] <= 0);
      syn = '0;
      for (int e = 0; e < 10; e++) syn[EDGES[e][0]] ^= z[EDGES[e][1]];
      iter = t;
      if (early && syn == '0) return;
    end
  endfunction

  // Sign-extend the low w bits of v.
  function automatic int sext(int v, int w);
    int s = v & ((1 << w) - 1);
    if (s >= (1 << (w - 1))) s -= (1 << w);
    return s;
  endfunction

endpackage
