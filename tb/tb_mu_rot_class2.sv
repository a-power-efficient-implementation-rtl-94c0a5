// tb_mu_rot_class2: self-checking test of the class II mu-rotation.
//
// Instance A is a plain class II rotation with I = 1 (diagonal 1 - 2^-3,
// cross 2^-1); instance B is the reflected, pre-scaled step with I = 1,
// PRE = 1 (diagonal 2^-1 - 2^-4, cross 2^-2, upper diagonal negated).
// Expected values come from the defining equations with integer division
// (weights 2^-k rounded half up) and are compared exactly one cycle after
// the operands (latency check). A float check confirms the rotation angle of instance A on a large
// vector.
module tb_mu_rot_class2;
  localparam int W = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] t_i, b_i, t_a, b_a, t_b, b_b;
  int checks = 0, failures = 0;

  mu_rot_class2 #(.W(W), .I(1), .PRE(0), .DT(1), .ST(-1), .SB(1), .DB(1)) dut_a (
    .clk, .top_i(t_i), .bot_i(b_i), .top_o(t_a), .bot_o(b_a));
  mu_rot_class2 #(.W(W), .I(1), .PRE(1), .DT(-1), .ST(1), .SB(1), .DB(1)) dut_b (
    .clk, .top_i(t_i), .bot_i(b_i), .top_o(t_b), .bot_o(b_b));

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
    real ang;
    t_i = '0; b_i = '0;
    @(negedge clk);
    for (int n = 0; n < 500; n++) begin
      t = $signed($urandom_range(0, 16383)) - 8192;
      b = $signed($urandom_range(0, 16383)) - 8192;
      if (n == 0) begin t = -8192; b = 8191; end
      t_i = W'(t); b_i = W'(b);
      @(posedge clk); #1;
      check("A top", t_a, t - rdiv(t, 3) - rdiv(b, 1));
      check("A bot", b_a, rdiv(t, 1) + b - rdiv(b, 3));
      check("B top", t_b, -(rdiv(t, 1) - rdiv(t, 4)) + rdiv(b, 2));
      check("B bot", b_b, rdiv(t, 2) + rdiv(b, 1) - rdiv(b, 4));
      @(negedge clk);
    end
    // angle of instance A: atan(2^-1 / (1 - 2^-3)) = 29.745 degrees
    t_i = 16'sd8000; b_i = 16'sd0;
    @(posedge clk); #1;
    ang = $atan2(real'(b_a), real'(t_a)) * 180.0 / 3.14159265358979;
    checks++;
    if (ang < 29.70 || ang > 29.79) begin
      failures++;
      $display("FAIL angle %f", ang);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
