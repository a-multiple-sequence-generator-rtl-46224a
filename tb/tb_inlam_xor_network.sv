// tb_inlam_xor_network: checks the combinational network against equations
// written out term by term.
//
// The default instance carries the six-signal, two-delay table; a second one
// carries the four-signal, one-delay table, whose undelayed taps run against
// the row order (V1 needs V2, V2 needs V3) and so need more than one sweep.
// All 2^12 tap combinations of the first and all 2^4 of the second are
// applied.
module tb_inlam_xor_network;
  import msg_pkg::*;
  import msg_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [2:1][5:0] d6;
  logic [5:0]      v6;
  logic [1:1][3:0] d4;
  logic [3:0]      v4;

  inlam_xor_network dut6 (.d(d6), .v(v6));
  inlam_xor_network #(.N(GEN4_N), .M(GEN4_M), .A(GEN4_A), .C(GEN4_C))
    dut4 (.d(d4), .v(v4));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4096; x++) begin
      d6 = x[11:0];
      #1;
      checks++;
      if (v6 !== gen6_next(d6[1], d6[2])) begin
        failures++;
        $display("FAIL N=6 d1=%b d2=%b: got %b expected %b",
                 d6[1], d6[2], v6, gen6_next(d6[1], d6[2]));
      end
    end
    for (int x = 0; x < 16; x++) begin
      d4 = x[3:0];
      #1;
      checks++;
      if (v4 !== gen4_next(d4[1])) begin
        failures++;
        $display("FAIL N=4 d=%b: got %b expected %b", d4[1], v4, gen4_next(d4[1]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
