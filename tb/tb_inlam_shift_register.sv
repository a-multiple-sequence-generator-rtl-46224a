// tb_inlam_shift_register: checks one machine row against a software history.
//
// Two rows are tested, the default two-stage one and a five-stage one. After
// reset every stage must hold its seed bit; then random input bits are
// shifted in under a random enable, and every tap must equal the bit that
// entered k enabled clocks ago (or the seed while fewer have entered).
module tb_inlam_shift_register;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst, en, v_in;
  always #5 clk = ~clk;

  localparam logic [2:1] SEED2 = 2'b10;
  localparam logic [5:1] SEED5 = 5'b10110;

  logic [2:1] taps2;
  logic [5:1] taps5;

  inlam_shift_register #(.SEED(SEED2)) dut2 (
    .clk(clk), .rst(rst), .en(en), .v_in(v_in), .taps(taps2));
  inlam_shift_register #(.M(5), .SEED(SEED5)) dut5 (
    .clk(clk), .rst(rst), .en(en), .v_in(v_in), .taps(taps5));

  // history[0] is the latest bit shifted in; preloaded with the seeds
  logic hist2 [1:2];
  logic hist5 [1:5];

  task automatic compare();
    for (int k = 1; k <= 2; k++) begin
      checks++;
      if (taps2[k] !== hist2[k]) begin
        failures++;
        $display("FAIL M=2 stage %0d: got %b expected %b", k, taps2[k], hist2[k]);
      end
    end
    for (int k = 1; k <= 5; k++) begin
      checks++;
      if (taps5[k] !== hist5[k]) begin
        failures++;
        $display("FAIL M=5 stage %0d: got %b expected %b", k, taps5[k], hist5[k]);
      end
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; v_in = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int k = 1; k <= 2; k++) hist2[k] = SEED2[k];
    for (int k = 1; k <= 5; k++) hist5[k] = SEED5[k];
    compare();
    for (int n = 0; n < 400; n++) begin
      en   = ($urandom_range(3) != 0);
      v_in = $urandom_range(1) == 1;
      @(posedge clk); #1;
      if (en) begin
        for (int k = 2; k > 1; k--) hist2[k] = hist2[k-1];
        hist2[1] = v_in;
        for (int k = 5; k > 1; k--) hist5[k] = hist5[k-1];
        hist5[1] = v_in;
      end
      compare();
    end
    // reset again mid-run: seeds come back
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    for (int k = 1; k <= 2; k++) hist2[k] = SEED2[k];
    for (int k = 1; k <= 5; k++) hist5[k] = SEED5[k];
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
