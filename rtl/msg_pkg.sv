// msg_pkg: shared sizes, types and connection tables of the multiple-sequence
// generators built from the inverted nonlinear autonomous machine (INLAM).
//
// An INLAM(N, M) has N signals V_1..V_N, each with an M-stage shift register
// holding V_i D^1 .. V_i D^M (the value of V_i 1..M clocks ago). Each new value
// is an XOR sum of tapped signals plus a constant:
//
//     V_i = sum_{j,k} a_ijk * V_j D^k  +  C_i        (k = 0 .. M, sums mod 2)
//
// Bit layout used throughout: a pattern is a logic [N-1:0] whose bit (i-1)
// carries V_i. A connection table is logic [M:0][N-1:0][N-1:0], indexed
// [k][i-1][j-1], so tbl[k][i-1] is the mask of the signals that row i taps at
// delay k. Delay 0 means "the current value of another signal" (an undelayed
// XOR input); those taps must not form a loop. C has bit (i-1) set when row i
// ends in an XNOR (inverted) gate. A seed table is logic [M-1:0][N-1:0] whose
// entry p is the (p+1)-th output pattern; the shift registers are loaded from
// it so that the first M patterns leave the machine before any XOR result does.
//
// The two generators given in full are tabulated below: the 6-signal, two
// time frame machine of the larger worked example, and the 4-signal, one time
// frame machine of the small example. Their taps, inversions and initial
// register contents are the published ones.
package msg_pkg;

  // ---------------------------------------------------------------- 6 x 2
  localparam int unsigned GEN6_N = 6;
  localparam int unsigned GEN6_M = 2;
  localparam int unsigned GEN6_L = 16;     // length of the deterministic part
  localparam int unsigned GEN6_PERIOD = 1260;

  typedef logic [GEN6_N-1:0] gen6_pattern_t;

  //   V1  =  V2 + V4 + V5      + V2 D        + V3 D^2
  //  ~V2  =  V5                + V6 D        + (V1 + V2) D^2
  //   V3  =                     (V2+V3+V4+V5) D + (V1 + V2 + V6) D^2
  //   V4  =                     (V4+V5+V6) D  + (V2 + V4) D^2
  //  ~V5  =                     (V1 + V2) D   + (V5 + V6) D^2
  //   V6  =  V1 + V4           + V4 D        + V2 D^2
  localparam logic [GEN6_M:0][GEN6_N-1:0][GEN6_N-1:0] GEN6_A = '{
    // k = 2 (D^2)          rows V6 .. V1
    '{6'b000010, 6'b110000, 6'b001010, 6'b100011, 6'b000011, 6'b000100},
    // k = 1 (D)
    '{6'b001000, 6'b000011, 6'b111000, 6'b011110, 6'b100000, 6'b000010},
    // k = 0 (undelayed)
    '{6'b001001, 6'b000000, 6'b000000, 6'b000000, 6'b010000, 6'b011010}
  };
  localparam logic [GEN6_N-1:0] GEN6_C = 6'b010010;   // XNOR on V2 and V5
  // Pattern 1 = (V1..V6) 1,0,1,0,0,1 ; pattern 2 = 0,1,1,1,0,0
  localparam logic [GEN6_M-1:0][GEN6_N-1:0] GEN6_SEED = '{6'b001110, 6'b100101};

  // ---------------------------------------------------------------- 4 x 1
  localparam int unsigned GEN4_N = 4;
  localparam int unsigned GEN4_M = 1;
  localparam int unsigned GEN4_L = 6;

  typedef logic [GEN4_N-1:0] gen4_pattern_t;

  //   V1 = V2 + V1 D
  //   V2 = V3 + V2 D
  //   V3 = V1 D + V3 D + V4 D
  //   V4 = ~(V1 + V1 D)
  localparam logic [GEN4_M:0][GEN4_N-1:0][GEN4_N-1:0] GEN4_A = '{
    // k = 1 (D)             rows V4 .. V1
    '{4'b0001, 4'b1101, 4'b0010, 4'b0001},
    // k = 0 (undelayed)
    '{4'b0001, 4'b0000, 4'b0100, 4'b0010}
  };
  localparam logic [GEN4_N-1:0] GEN4_C = 4'b1000;      // inverter on V4
  // Pattern 1 = (V1..V4) 1,1,0,1
  localparam logic [GEN4_M-1:0][GEN4_N-1:0] GEN4_SEED = '{4'b1011};

endpackage
