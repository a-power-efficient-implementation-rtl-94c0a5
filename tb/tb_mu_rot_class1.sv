// tb_mu_rot_class1: self-checking test of the class I mu-rotation.
//
// Two instances are driven with a stream of random operand pairs, one new
// pair per cycle: a plain rotation (I = 3, signs of a positive angle) and a
// reflected, pre-scaled one (I = 0, PRE = 1, upper diagonal negated) as used
// for the pi/4 butterflies. The expected results are worked out from the
// defining equation with integer division, each weight 2^-k rounded half
// up, and compared exactly one cycle after the operands were applied
// (latency check).
module tb_mu_rot_class1;
  localparam int W = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] t_i, b_i, t_a, b_a, t_b, b_b;
  int checks = 0, failures = 0;

  mu_rot_class1 #(.W(W), .I(3), .PRE(0), .DT(1), .ST(-1), .SB(1), .DB(1)) dut_a (
    .clk, .top_i(t_i), .bot_i(b_i), .top_o(t_a), .bot_o(b_a));
  mu_rot_class1 #(.W(W), .I(0), .PRE(1), .DT(-1), .ST(1), .SB(1), .DB(1)) dut_b (
    .clk, .top_i(t_i), .bot_i(b_i), .top_o(t_b), .bot_o(b_b));

  // floor(x / 2^k) without using a shift operator
  function automatic int fdiv(int x, int k);
    int d = 1 << k;
    if (x >= 0) return x / d;
    return -((-x + d - 1) / d);
  endfunction

  // floor(x / 2^k + 1/2): the rounded weight 2^-k
  function automatic int rdiv(int x, int k);
    if (k == 0) return x;
    return fdiv(x + (1 << (k - 1)), k);
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", what, got, exp);
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
    int t, b;
    t_i = '0; b_i = '0;
    @(negedge clk);
    for (int n = 0; n < 500; n++) begin
      t = $signed($urandom_range(0, 16383)) - 8192;
      b = $signed($urandom_range(0, 16383)) - 8192;
      if (n == 0) begin t = -8192; b = 8191; end
      if (n == 1) begin t = 7; b = -1; end
      t_i = W'(t); b_i = W'(b);
      @(posedge clk); #1;
      check("A top", t_a, t - rdiv(b, 3));
      check("A bot", b_a, rdiv(t, 3) + b);
      check("B top", t_b, -rdiv(t, 1) + rdiv(b, 1));
      check("B bot", b_b, rdiv(t, 1) + rdiv(b, 1));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
