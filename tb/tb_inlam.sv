// tb_inlam: checks the generic machine in three configurations.
//
//  u6  default parameters (six signals, two delays): the first sixteen
//      patterns must equal the specified table, one per clock from the first
//      clock after reset, and the sequence must keep following the hand-written
//      next-pattern equations for 3,000 clocks with a random enable.
//  u15 the plain linear case (one delay, no undelayed taps, no inversion)
//      wired as the LFSR of x^4 + x + 1: from a non-zero seed it must visit
//      all 15 non-zero states and return after exactly 15 clocks.
//  u5  five signals, three delays, undelayed taps V1 <- V3 <- V5 and two
//      inverted rows, against a model that keeps the full output history and
//      evaluates the equation of every row directly from it.
module tb_inlam;
  import msg_pkg::*;
  import msg_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst, en;
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- u6
  logic [5:0] p6;
  inlam u6 (.clk(clk), .rst(rst), .en(en), .pattern(p6));

  // ---------------------------------------------------------------- u15
  localparam logic [1:0][3:0][3:0] LFSR_A = '{
    '{4'b0100, 4'b0010, 4'b1001, 4'b1000},   // s3<-s2, s2<-s1, s1<-s0^s3, s0<-s3
    '{4'b0000, 4'b0000, 4'b0000, 4'b0000}
  };
  logic [3:0] p15;
  inlam #(.N(4), .M(1), .A(LFSR_A), .C(4'b0000), .SEED(4'b0001))
    u15 (.clk(clk), .rst(rst), .en(en), .pattern(p15));

  // ---------------------------------------------------------------- u5
  localparam int N5 = 5;
  localparam int M5 = 3;
  localparam logic [M5:0][N5-1:0][N5-1:0] A5 = '{
    '{5'b00011, 5'b10000, 5'b01100, 5'b00001, 5'b10010},  // k = 3
    '{5'b00100, 5'b01001, 5'b00000, 5'b11000, 5'b00000},  // k = 2
    '{5'b10001, 5'b00110, 5'b01010, 5'b00001, 5'b01000},  // k = 1
    '{5'b00000, 5'b00000, 5'b10000, 5'b00000, 5'b00100}   // k = 0: V3<-V5, V1<-V3
  };
  localparam logic [N5-1:0] C5 = 5'b10010;
  localparam logic [M5-1:0][N5-1:0] SEED5 = '{5'b11010, 5'b00111, 5'b10101};
  logic [N5-1:0] p5;
  inlam #(.N(N5), .M(M5), .A(A5), .C(C5), .SEED(SEED5))
    u5 (.clk(clk), .rst(rst), .en(en), .pattern(p5));

  // history model: h5[n] is output pattern n (0-based); new value of row i
  // for pattern n uses patterns n-k for k = 1..M5 and, for k = 0, rows
  // already computed (rows in the order 5, 3, 1, 2, 4 follow the taps).
  logic [N5-1:0] h5 [$];
  function automatic logic [N5-1:0] model5(int n);
    logic [N5-1:0] v;
    int order [5] = '{4, 2, 0, 1, 3};
    v = '0;
    foreach (order[o]) begin
      int i;
      logic b;
      i = order[o];
      b = C5[i];
      for (int j = 0; j < N5; j++) begin
        if (A5[0][i][j]) b ^= v[j];
        for (int k = 1; k <= M5; k++)
          if (A5[k][i][j]) b ^= h5[n-k][j];
      end
      v[i] = b;
    end
    return v;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] r1, r2;            // model of u6: r2 = current, r1 = next
    logic [3:0] seen15 [$];
    int n6, n5;

    rst = 1'b1; en = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;

    // u6: table, one pattern per clock, no gaps
    en = 1'b1;
    for (int n = 1; n <= GEN6_L; n++) begin
      check($sformatf("u6 table pattern %0d", n), p6, gen6_table(n));
      @(posedge clk); #1;
    end

    // u15: period and state coverage (it has advanced 16 times already)
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    check("u15 seed", p15, 4'b0001);
    for (int n = 0; n < 15; n++) begin
      foreach (seen15[s]) if (seen15[s] == p15) begin
        failures++;
        $display("FAIL u15 state %h repeats early", p15);
      end
      checks++;
      seen15.push_back(p15);
      @(posedge clk); #1;
    end
    check("u15 period 15", p15, 4'b0001);

    // u6 and u5 against their models with a random enable
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    r2 = gen6_table(1); r1 = gen6_table(2);
    h5.delete();
    for (int p = 0; p < M5; p++) h5.push_back(SEED5[p]);
    n6 = 0; n5 = 0;
    check("u5 seed", p5, h5[0]);
    for (int c = 0; c < 3000; c++) begin
      en = ($urandom_range(4) != 0);
      @(posedge clk); #1;
      if (en) begin
        logic [5:0] nx;
        nx = gen6_next(r1, r2);
        r2 = r1; r1 = nx;
        h5.push_back(model5(h5.size()));
        n5++;
      end
      check("u6 model", p6, r2);
      check("u5 model", p5, h5[n5]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
