// inlam: inverted nonlinear autonomous machine INLAM(N, M), the core of the
// multiple-sequence generator.
//
// N shift registers of M stages each (inlam_shift_register) hold the last M
// values of the signals V_1..V_N. The connection network (inlam_xor_network)
// computes the next value of every signal as an XOR or XNOR of chosen
// register taps and of other signals' current values; that value enters
// stage 1 of its row on the next enabled clock. With the taps chosen by the
// time-frame-expansion synthesis, the machine first replays a given ordered
// list of N-bit patterns and then runs on as a pseudo-random generator.
// With M = 1, no undelayed taps and C = 0 it is the plain linear autonomous
// machine (an LFSR in its general matrix form).
//
// Interface and timing
//   clk, rst : synchronous active-high reset loads the first M patterns from
//              SEED (stage k of every row gets pattern M-k+1).
//   en       : one pattern per enabled clock; low holds the machine.
//   pattern  : last stage of every row, V D^M. Right after reset it shows
//              pattern 1; after the n-th enabled clock, pattern n+1.
// The structure, taps and output stage follow the published machine; the
// reset-to-seed and the enable are this design's own choices.
module inlam #(
  parameter int unsigned N = msg_pkg::GEN6_N,
  parameter int unsigned M = msg_pkg::GEN6_M,
  parameter logic [M:0][N-1:0][N-1:0] A = msg_pkg::GEN6_A,
  parameter logic [N-1:0] C = msg_pkg::GEN6_C,
  parameter logic [M-1:0][N-1:0] SEED = msg_pkg::GEN6_SEED
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [N-1:0] pattern
);

  logic [M:1][N-1:0] d;       // d[k][i] = V_(i+1) D^k
  logic [N-1:0]      v;       // next values from the network

  // Stage k of row i starts with bit i of pattern M-k+1, so that the last
  // stage shows pattern 1 and the values flow out in order.
  function automatic logic [N-1:0][M:1] row_seeds();
    logic [N-1:0][M:1] s;
    for (int i = 0; i < N; i++)
      for (int k = 1; k <= M; k++)
        s[i][k] = SEED[M-k][i];
    return s;
  endfunction

  localparam logic [N-1:0][M:1] ROW_SEED = row_seeds();

  for (genvar i = 0; i < N; i++) begin : g_row
    logic [M:1] taps;

    inlam_shift_register #(
      .M    (M),
      .SEED (ROW_SEED[i])
    ) u_sr (
      .clk  (clk),
      .rst  (rst),
      .en   (en),
      .v_in (v[i]),
      .taps (taps)
    );

    for (genvar k = 1; k <= M; k++) begin : g_tap
      assign d[k][i] = taps[k];
    end
    assign pattern[i] = taps[M];
  end

  inlam_xor_network #(
    .N (N),
    .M (M),
    .A (A),
    .C (C)
  ) u_net (
    .d (d),
    .v (v)
  );

endmodule
