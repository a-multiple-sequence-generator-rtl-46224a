// tb_msg_gen6: checks the six-bit generator against its specification.
//
//  - the pattern after reset is pattern 1, and each following clock brings
//    the next table pattern: all sixteen in order, one per clock;
//  - pattern 12 equals pattern 4 (the recurrent pattern);
//  - the patterns after the table follow the next-pattern equations;
//  - the register state (two consecutive patterns) first returns to the
//    reset state after exactly 1,260 clocks;
//  - a low enable holds the output, and reset in mid-run restarts the table.
module tb_msg_gen6;
  import msg_pkg::*;
  import msg_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst, en;
  gen6_pattern_t pattern;
  always #5 clk = ~clk;

  msg_gen6 dut (.clk(clk), .rst(rst), .en(en), .pattern(pattern));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gen6_pattern_t seen [1:GEN6_L];
    gen6_pattern_t prev, cur, r1, r2, held;
    int period;

    rst = 1'b1; en = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;

    // deterministic part, one pattern per clock
    for (int n = 1; n <= GEN6_L; n++) begin
      seen[n] = pattern;
      check($sformatf("pattern %0d", n), pattern, gen6_table(n));
      @(posedge clk); #1;
    end
    check("pattern 12 repeats pattern 4", seen[12], seen[4]);

    // pseudo-random continuation against the equations
    r2 = pattern;                                  // pattern 17 already shown
    r1 = gen6_next(seen[16], seen[15]);
    check("pattern 17", r2, r1);
    r2 = seen[16]; r1 = pattern;
    for (int n = 18; n <= 200; n++) begin
      cur = gen6_next(r1, r2);
      @(posedge clk); #1;
      check($sformatf("pattern %0d", n), pattern, cur);
      r2 = r1; r1 = cur;
    end

    // hold
    en = 1'b0; held = pattern;
    repeat (5) begin @(posedge clk); #1; check("hold", pattern, held); end
    en = 1'b1;

    // period: first return of (pattern n, pattern n+1) to (pattern 1, 2)
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    check("restart pattern 1", pattern, gen6_table(1));
    prev = pattern;
    period = 0;
    for (int c = 1; c <= 3000; c++) begin
      @(posedge clk); #1;
      cur = pattern;
      if (c > 1 && prev == gen6_table(1) && cur == gen6_table(2)) begin
        period = c - 1;
        break;
      end
      prev = cur;
    end
    check("period", period, GEN6_PERIOD);
    // the table comes round again
    for (int n = 3; n <= GEN6_L; n++) begin
      @(posedge clk); #1;
      check($sformatf("second round pattern %0d", n), pattern, gen6_table(n));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
