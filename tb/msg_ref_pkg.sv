// msg_ref_pkg: reference data and models for the generator testbenches.
//
// The expected deterministic sequences are written here the way they are
// specified, one bit string per signal over time (leftmost character =
// pattern 1), and turned into patterns by a function. The next-pattern
// models spell out each signal's XOR/XNOR equation term by term, so they are
// independent of the table-driven network in the RTL.
package msg_ref_pkg;

  // Six signals, sixteen patterns. Pattern 12 repeats pattern 4.
  localparam string GEN6_ROWS [6] = '{
    "1010000111000010",   // V1
    "0110100110000010",   // V2
    "1111000100110011",   // V3
    "0111101010011010",   // V4
    "0011101001010111",   // V5
    "1011110001110101"    // V6
  };

  // Four signals, six patterns.
  localparam string GEN4_ROWS [4] = '{
    "101100",             // V1
    "111010",             // V2
    "000111",             // V3
    "100101"              // V4
  };

  // Pattern n (1-based) of the six-signal table; bit i-1 carries V_i.
  function automatic logic [5:0] gen6_table(int n);
    logic [5:0] p;
    for (int i = 0; i < 6; i++) p[i] = (GEN6_ROWS[i][n-1] == "1");
    return p;
  endfunction

  function automatic logic [3:0] gen4_table(int n);
    logic [3:0] p;
    for (int i = 0; i < 4; i++) p[i] = (GEN4_ROWS[i][n-1] == "1");
    return p;
  endfunction

  // Next pattern of the six-signal machine from the previous one (d1 = V D)
  // and the one before (d2 = V D^2). Undelayed terms are resolved by hand.
  function automatic logic [5:0] gen6_next(logic [5:0] d1, logic [5:0] d2);
    logic v1, v2, v3, v4, v5, v6;
    v3 = d1[1] ^ d1[2] ^ d1[3] ^ d1[4] ^ d2[0] ^ d2[1] ^ d2[5];
    v4 = d1[3] ^ d1[4] ^ d1[5] ^ d2[1] ^ d2[3];
    v5 = ~(d1[0] ^ d1[1] ^ d2[4] ^ d2[5]);
    v2 = ~(v5 ^ d1[5] ^ d2[0] ^ d2[1]);
    v1 = v2 ^ v4 ^ v5 ^ d1[1] ^ d2[2];
    v6 = v1 ^ v4 ^ d1[3] ^ d2[1];
    return {v6, v5, v4, v3, v2, v1};
  endfunction

  function automatic logic [3:0] gen4_next(logic [3:0] d);
    logic v1, v2, v3, v4;
    v3 = d[0] ^ d[2] ^ d[3];
    v2 = v3 ^ d[1];
    v1 = v2 ^ d[0];
    v4 = ~(v1 ^ d[0]);
    return {v4, v3, v2, v1};
  endfunction

endpackage
