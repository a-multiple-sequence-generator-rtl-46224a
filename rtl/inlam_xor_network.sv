// inlam_xor_network: the connection network of an inverted nonlinear
// autonomous machine INLAM(N, M).
//
// For every signal it forms the XOR sum
//
//     v[i] = C[i]  ^  XOR_k XOR_j ( A[k][i][j] & V_j D^k )
//
// over the register taps d[k] = V D^k (k = 1..M) and, for k = 0, over the
// current values v of the other signals. C[i] = 1 turns row i's XOR into an
// XNOR (an odd number of inverted inputs). Undelayed taps make some rows
// depend on others in the same clock period, so the rows are evaluated in
// N Gauss-Seidel sweeps over the row list; as long as the undelayed taps form
// no loop (checked at start-up), N sweeps settle every row whatever order the
// dependences run in, and synthesis folds the sweeps into one XOR tree per row.
//
// Interface: purely combinational. d[k] (k = 1..M) are the N-bit tap vectors
// from the shift registers, v is the N-bit vector of new values.
// The tap equation, the XNOR constant and the undelayed taps follow the
// published machine; the sweep evaluation is this design's own way of writing
// an arbitrary loop-free set of undelayed taps.
module inlam_xor_network #(
  parameter int unsigned N = msg_pkg::GEN6_N,
  parameter int unsigned M = msg_pkg::GEN6_M,
  parameter logic [M:0][N-1:0][N-1:0] A = msg_pkg::GEN6_A,
  parameter logic [N-1:0] C = msg_pkg::GEN6_C
) (
  input  logic [M:1][N-1:0] d,
  output logic [N-1:0]      v
);

  // XOR sum of the delayed taps of every row, plus its inversion constant.
  logic [N-1:0] delayed;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      delayed[i] = C[i];
      for (int k = 1; k <= M; k++)
        delayed[i] ^= ^(A[k][i] & d[k]);
    end
  end

  // Undelayed taps: N sweeps reach the fixed point of a loop-free network.
  always_comb begin
    v = delayed;
    for (int s = 0; s < N; s++)
      for (int i = 0; i < N; i++)
        v[i] = delayed[i] ^ (^(A[0][i] & v));
  end

  // Loop check on the undelayed taps: the transitive closure may not reach
  // any row from itself.
  function automatic logic undelayed_loop_free();
    logic [N-1:0][N-1:0] reach;
    reach = A[0];
    for (int s = 0; s < N; s++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (reach[i][j]) reach[i] |= reach[j];
    for (int i = 0; i < N; i++)
      if (reach[i][i]) return 1'b0;
    return 1'b1;
  endfunction

  initial assert (undelayed_loop_free())
    else $fatal(1, "inlam_xor_network: undelayed taps form a combinational loop");

endmodule
