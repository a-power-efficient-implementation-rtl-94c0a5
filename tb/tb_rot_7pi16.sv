// tb_rot_7pi16: self-checking test of the approximated 78.75 degree rotation.
//
// A random operand pair enters every cycle (plus corner vectors). Each output
// pair is compared, exactly LAT = 3 cycles after its operands (latency
// check), with the exact rotation of the fast DCT computed in floating
// point:
//   top_o = -sin(7pi/16) top_i + cos(7pi/16) bot_i
//   bot_o = cos(7pi/16) top_i + sin(7pi/16) bot_i
// with a tolerance of 1e-3 of the operand vector length plus 8 LSB (the
// angle and scale approximation of this block is below 7e-4). A second,
// tight check compares with the block's approximated rotation worked out in
// floating point from the mu-rotation equations and the scaling factors:
//   class II i=3, edge signs -1 +1 +1 +1
//   class I i=7, edge signs +1 +1 -1 +1
//   class II i=4, edge signs +1 +1 -1 +1
// Only the rounding of the shifts separates the two, so the tolerance there
// is 6 LSB, and a wrong shift amount anywhere in the chain exceeds it.
module tb_rot_7pi16;
  localparam int W   = 16;
  localparam int LAT = 3;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] t_i, b_i, t_o, b_o;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  rot_7pi16 dut (.clk, .top_i(t_i), .bot_i(b_i), .top_o(t_o), .bot_o(b_o));

  // 2x2 matrix of the approximated rotation, built from its steps
  real m00 = 1.0, m01 = 0.0, m10 = 0.0, m11 = 1.0;
  task automatic step(int cls, int i, int pre, int dt, int st, int sb, int db);
    real d = (cls == 2) ? (1.0 - 2.0 ** (-(2 * i + 1))) : 1.0;
    real c = 2.0 ** (-pre);
    real o = 2.0 ** (-(pre + i));
    real n00 = dt * d * c * m00 + st * o * m10;
    real n01 = dt * d * c * m01 + st * o * m11;
    real n10 = sb * o * m00 + db * d * c * m10;
    real n11 = sb * o * m01 + db * d * c * m11;
    m00 = n00; m01 = n01; m10 = n10; m11 = n11;
  endtask
  task automatic scale(int k);
    m00 *= 1.0 - 2.0 ** (-k); m01 *= 1.0 - 2.0 ** (-k);
    m10 *= 1.0 - 2.0 ** (-k); m11 *= 1.0 - 2.0 ** (-k);
  endtask

  task automatic check(string what, int got, real exp, real tol);
    real e = real'(got) - exp;
    if (e < 0) e = -e;
    if (tol > 7.0 && e > max_err) max_err = e;
    checks++;
    if (e > tol) begin
      failures++;
      $display("FAIL %s got %0d expected %f", what, got, exp);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tq [$], bq [$];

  initial begin
    int t, b;
    real tr, br, tol;
    t_i = '0; b_i = '0;
    step(2, 3, 0, -1, 1, 1, 1);
    step(1, 7, 0, 1, 1, -1, 1);
    step(2, 4, 0, 1, 1, -1, 1);
    @(negedge clk);
    for (int n = 0; n < 800 + LAT; n++) begin
      t = $signed($urandom_range(0, 2 * 11000)) - 11000;
      b = $signed($urandom_range(0, 2 * 11000)) - 11000;
      if (n == 0) begin t = 11000; b = 0; end
      if (n == 1) begin t = 0; b = -11000; end
      if (n == 2) begin t = 11000 * 7 / 10; b = 11000 * 7 / 10; end
      t_i = W'(t); b_i = W'(b);
      tq.push_back(t); bq.push_back(b);
      @(posedge clk); #1;
      if (tq.size() >= LAT) begin
        tr = real'(tq.pop_front());
        br = real'(bq.pop_front());
        tol = 1.0e-3 * $sqrt(tr * tr + br * br) + 8.0;
        check("top", t_o, -$sin(7.0 * PI / 16.0) * tr + $cos(7.0 * PI / 16.0) * br, tol);
        check("bot", b_o, $cos(7.0 * PI / 16.0) * tr + $sin(7.0 * PI / 16.0) * br, tol);
        check("top, approximated", t_o, m00 * tr + m01 * br, 6.0);
        check("bot, approximated", b_o, m10 * tr + m11 * br, 6.0);
      end
      @(negedge clk);
    end
    $display("largest deviation from the exact rotation: %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
