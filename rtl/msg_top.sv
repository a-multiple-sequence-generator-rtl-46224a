// msg_top: the two published multiple-sequence generators side by side.
//
// Each generator is an inverted nonlinear autonomous machine that first plays
// a fixed, ordered list of test patterns and then continues pseudo-randomly.
// The six-bit generator (16 deterministic patterns, then a period of 1,260)
// is the main design; the four-bit generator (6 deterministic patterns) is
// the small worked example. They share the clock and nothing else: each has
// its own synchronous active-high reset, which reloads its first pattern(s),
// and its own enable, which advances it by one pattern per clock.
module msg_top
  import msg_pkg::*;
(
  input  logic          clk,
  input  logic          gen6_rst,
  input  logic          gen6_en,
  output gen6_pattern_t gen6_pattern,
  input  logic          gen4_rst,
  input  logic          gen4_en,
  output gen4_pattern_t gen4_pattern
);

  msg_gen6 u_gen6 (
    .clk     (clk),
    .rst     (gen6_rst),
    .en      (gen6_en),
    .pattern (gen6_pattern)
  );

  msg_gen4 u_gen4 (
    .clk     (clk),
    .rst     (gen4_rst),
    .en      (gen4_en),
    .pattern (gen4_pattern)
  );

endmodule
