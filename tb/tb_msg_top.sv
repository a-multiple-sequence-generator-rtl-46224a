// tb_msg_top: end-to-end test of both generators at their built sizes.
//
// Both generators run concurrently from one clock, each under its own
// random enable and with resets at different times. A scoreboard per
// generator predicts every output: the specified table while a generator is
// in its deterministic part, the hand-written next-pattern equations after
// it. The test counts how often each mechanism of the design occurred and
// fails if any never did:
//   det6 / det4   a full deterministic part matched, in order
//   rand6 / rand4 patterns produced past the deterministic part
//   recur6        the recurrent pattern (pattern 12 = pattern 4) seen
//   wrap6         the six-bit generator came round its full 1,260 period
//   loop4         the four-bit generator closed its 7-pattern loop
//   hold          a clock with the enable low (output held)
//   reseed        a reset in mid-run that restarted the table
module tb_msg_top;
  import msg_pkg::*;
  import msg_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          gen6_rst, gen6_en, gen4_rst, gen4_en;
  gen6_pattern_t gen6_pattern;
  gen4_pattern_t gen4_pattern;

  msg_top dut (
    .clk          (clk),
    .gen6_rst     (gen6_rst),
    .gen6_en      (gen6_en),
    .gen6_pattern (gen6_pattern),
    .gen4_rst     (gen4_rst),
    .gen4_en      (gen4_en),
    .gen4_pattern (gen4_pattern)
  );

  int det6, det4, rand6, rand4, recur6, wrap6, loop4, hold, reseed;

  // scoreboard state: index of the pattern on the output (1-based since the
  // last reset) and the two latest predicted patterns
  int            idx6, idx4;
  gen6_pattern_t m6_cur, m6_prev, m6_p4;
  gen4_pattern_t m4_cur;
  int            run6, run4;   // table patterns matched in a row
  logic          fresh6, fresh4; // a new pattern is on the output

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    det6 = 0; det4 = 0; rand6 = 0; rand4 = 0; recur6 = 0;
    wrap6 = 0; loop4 = 0; hold = 0; reseed = 0;
    gen6_rst = 1'b1; gen4_rst = 1'b1; gen6_en = 1'b0; gen4_en = 1'b0;
    @(posedge clk); #1;
    gen6_rst = 1'b0; gen4_rst = 1'b0;
    idx6 = 1; idx4 = 1; run6 = 0; run4 = 0;
    m6_prev = '0; m6_cur = gen6_table(1); m4_cur = gen4_table(1);
    fresh6 = 1'b1; fresh4 = 1'b1;

    for (int c = 0; c < 8000; c++) begin
      // compare what is on the outputs now
      check($sformatf("gen6 pattern %0d", idx6), gen6_pattern, m6_cur);
      check($sformatf("gen4 pattern %0d", idx4), gen4_pattern, m4_cur);
      if (fresh6) begin
        if (idx6 <= GEN6_L && gen6_pattern == gen6_table(idx6)) begin
          run6++;
          if (run6 == GEN6_L) det6++;
        end
        if (idx6 == 4) m6_p4 = gen6_pattern;
        if (idx6 == 12 && gen6_pattern == m6_p4) recur6++;
        if (idx6 > GEN6_L) rand6++;
        if (idx6 == GEN6_PERIOD + 1 && gen6_pattern == gen6_table(1)) wrap6++;
      end
      if (fresh4) begin
        if (idx4 <= GEN4_L && gen4_pattern == gen4_table(idx4)) begin
          run4++;
          if (run4 == GEN4_L) det4++;
        end
        if (idx4 > GEN4_L) rand4++;
        if (idx4 == 9 && gen4_pattern == gen4_table(2)) loop4++;
      end

      // drive the next clock
      gen6_en = ($urandom_range(7) != 0);
      gen4_en = ($urandom_range(3) != 0);
      gen6_rst = (c == 5000);          // mid-run restart of the 6-bit generator
      gen4_rst = (c % 700 == 699);
      if (!gen6_en || !gen4_en) hold++;
      @(posedge clk); #1;
      fresh6 = gen6_rst || gen6_en;
      fresh4 = gen4_rst || gen4_en;

      if (gen6_rst) begin
        reseed++;
        idx6 = 1; run6 = 0; m6_prev = '0; m6_cur = gen6_table(1);
      end else if (gen6_en) begin
        gen6_pattern_t nx;
        nx = (idx6 == 1) ? gen6_table(2) : gen6_next(m6_cur, m6_prev);
        m6_prev = m6_cur; m6_cur = nx; idx6++;
      end
      if (gen4_rst) begin
        reseed++;
        idx4 = 1; run4 = 0; m4_cur = gen4_table(1);
      end else if (gen4_en) begin
        m4_cur = gen4_next(m4_cur); idx4++;
      end
    end

    $display("mechanisms: det6=%0d det4=%0d rand6=%0d rand4=%0d recur6=%0d wrap6=%0d loop4=%0d hold=%0d reseed=%0d",
             det6, det4, rand6, rand4, recur6, wrap6, loop4, hold, reseed);
    checks++; if (det6 == 0)   begin failures++; $display("FAIL no full gen6 table"); end
    checks++; if (det4 == 0)   begin failures++; $display("FAIL no full gen4 table"); end
    checks++; if (rand6 == 0)  begin failures++; $display("FAIL gen6 never past its table"); end
    checks++; if (rand4 == 0)  begin failures++; $display("FAIL gen4 never past its table"); end
    checks++; if (recur6 == 0) begin failures++; $display("FAIL recurrent pattern never seen"); end
    checks++; if (wrap6 == 0)  begin failures++; $display("FAIL gen6 never wrapped"); end
    checks++; if (loop4 == 0)  begin failures++; $display("FAIL gen4 loop never closed"); end
    checks++; if (hold == 0)   begin failures++; $display("FAIL enable never low"); end
    checks++; if (reseed == 0) begin failures++; $display("FAIL no mid-run reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
