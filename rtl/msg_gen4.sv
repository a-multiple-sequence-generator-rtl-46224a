// msg_gen4: four-bit example generator, INLAM(4, 1).
//
// Four flip-flops, three XORs and one XNOR (on V4) replay the six ordered
// 4-bit patterns 1011, 0010, 0011, 1101, 0110, 1100 (written V4 V3 V2 V1,
// i.e. columns of V1 = 101100, V2 = 111010, V3 = 000111, V4 = 100101) and then
// settle into a loop of seven patterns that excludes pattern 1. Three rows
// take an undelayed input from another row (V1 from V2, V2 from V3, V4 from
// V1), so a new pattern ripples through the network in one clock period.
//
// Interface and timing: synchronous active-high rst loads pattern 1, shown
// on `pattern` in the cycle after reset; each clock with en high advances
// one pattern. The equations and preset values are the published ones; reset
// and enable are this design's own.
module msg_gen4
  import msg_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  output gen4_pattern_t pattern
);

  inlam #(
    .N    (GEN4_N),
    .M    (GEN4_M),
    .A    (GEN4_A),
    .C    (GEN4_C),
    .SEED (GEN4_SEED)
  ) u_inlam (
    .clk     (clk),
    .rst     (rst),
    .en      (en),
    .pattern (pattern)
  );

endmodule
