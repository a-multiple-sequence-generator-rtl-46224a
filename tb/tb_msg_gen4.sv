// tb_msg_gen4: checks the four-bit example generator.
//
// The six specified patterns must appear one per clock after reset; after
// them the output must follow the hand-written equations, fall into a loop
// of seven patterns (pattern 2 returns after 7 clocks) and never show
// pattern 1 again. A low enable holds the output.
module tb_msg_gen4;
  import msg_pkg::*;
  import msg_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst, en;
  gen4_pattern_t pattern;
  always #5 clk = ~clk;

  msg_gen4 dut (.clk(clk), .rst(rst), .en(en), .pattern(pattern));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gen4_pattern_t model, held;
    int first_two_again;

    rst = 1'b1; en = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int n = 1; n <= GEN4_L; n++) begin
      check($sformatf("pattern %0d", n), pattern, gen4_table(n));
      if (n < GEN4_L) begin @(posedge clk); #1; end
    end
    model = pattern;
    first_two_again = 0;
    for (int c = 1; c <= 60; c++) begin
      model = gen4_next(model);
      @(posedge clk); #1;
      check($sformatf("pattern %0d", GEN4_L + c), pattern, model);
      checks++;
      if (pattern == gen4_table(1)) begin
        failures++;
        $display("FAIL pattern 1 reappears at %0d", GEN4_L + c);
      end
      if (first_two_again == 0 && pattern == gen4_table(2))
        first_two_again = GEN4_L + c;
    end
    check("loop length", first_two_again - 2, 7);

    en = 1'b0; held = pattern;
    repeat (4) begin @(posedge clk); #1; check("hold", pattern, held); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
