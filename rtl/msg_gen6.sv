// msg_gen6: six-bit multiple-sequence generator, INLAM(6, 2).
//
// It emits, one per clock, the sixteen ordered 6-bit patterns of the worked
// test-sequence example (pattern 12 repeats pattern 4) and then keeps going as
// a pseudo-random generator whose sequence repeats every 1,260 patterns; the
// deterministic patterns lie on that cycle, so they come back at the same
// period. Hardware: 12 flip-flops (two per signal) and six multi-input
// XOR/XNOR gates, equal to 23 two-input XORs; rows V2 and V5 use XNOR.
// The connection and seed tables live in msg_pkg.
//
// Interface and timing: synchronous active-high rst reloads patterns 1 and 2
// into the registers, so `pattern` shows pattern 1 in the cycle after reset;
// each clock with en high advances one pattern. The tap equations and the
// register preset values are the published ones; reset and enable are this
// design's own.
module msg_gen6
  import msg_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  output gen6_pattern_t pattern
);

  inlam #(
    .N    (GEN6_N),
    .M    (GEN6_M),
    .A    (GEN6_A),
    .C    (GEN6_C),
    .SEED (GEN6_SEED)
  ) u_inlam (
    .clk     (clk),
    .rst     (rst),
    .en      (en),
    .pattern (pattern)
  );

endmodule
