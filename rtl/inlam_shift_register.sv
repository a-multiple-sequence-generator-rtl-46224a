// inlam_shift_register: one row of an inverted nonlinear autonomous machine.
//
// The row stores the history of one signal V_i: stage k (1..M) holds V_i D^k,
// the value V_i had k clocks ago. On every enabled clock edge the new value
// v_in (computed by the XOR network from all rows) enters stage 1 and every
// stage moves one place on. All stages are brought out on `taps` because the
// network may take any of them; stage M is the row's output bit.
//
// Interface and timing
//   clk, rst : synchronous, active-high reset loading SEED into the stages.
//   en       : advance by one clock delay; when low the row holds.
//   v_in     : new value of V_i (combinational input, sampled at the edge).
//   taps[k]  : V_i D^k, k = 1..M; taps[M] is the row's output.
// The shift register and its taps follow the row structure of the machine;
// the reset, the seed loading and the enable are this design's own choices
// (the machine is described as free-running from preset flip-flop values).
module inlam_shift_register #(
  parameter int unsigned M = msg_pkg::GEN6_M,
  // SEED[k] is the value of stage k after reset (bit 0 unused)
  parameter logic [M:1] SEED = '0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic       v_in,
  output logic [M:1] taps
);

  logic [M:1] shifted;

  if (M == 1) begin : g_one
    assign shifted = v_in;
  end else begin : g_many
    assign shifted = {taps[M-1:1], v_in};
  end

  always_ff @(posedge clk) begin
    if (rst)     taps <= SEED;
    else if (en) taps <= shifted;
  end

endmodule
