// tb_scale_chain: self-checking test of the factorised scaling chain.
//
// Instance A is the five-step chain of the pi/4 rotations (shifts 2,5,6,7,8),
// instance B the single step (1 - 2^-6). A new random word enters every
// cycle. The expected output is computed step by step with integer division
// (weights 2^-k rounded half up) and compared exactly N cycles later
// (latency check). The overall factor of chain A is also checked against 1/sqrt(2) on a large input.
module tb_scale_chain;
  localparam int W = 16;
  localparam int SA[5] = '{2, 5, 6, 7, 8};
  localparam int SB[1] = '{6};
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] d_i, d_a, d_b;
  int checks = 0, failures = 0;

  scale_chain #(.W(W), .N(5), .SHIFTS(SA)) dut_a (.clk, .d_i, .d_o(d_a));
  scale_chain #(.W(W), .N(1), .SHIFTS(SB)) dut_b (.clk, .d_i, .d_o(d_b));

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

  int hist [$];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, e;
    d_i = '0;
    @(negedge clk);
    for (int n = 0; n < 600; n++) begin
      v = $signed($urandom_range(0, 65535)) - 32768;
      if (n == 0) v = -32768;
      if (n == 1) v = 32767;
      if (n == 2) v = 32000;
      d_i = W'(v);
      hist.push_back(v);
      @(posedge clk); #1;
      // chain B: one cycle
      check("B", d_b, v - rdiv(v, 6));
      // chain A: five cycles
      if (hist.size() == 5) begin
        e = hist.pop_front();
        for (int s = 0; s < 5; s++) e = e - rdiv(e, SA[s]);
        check("A", d_a, e);
        if (n == 6) begin
          checks++;
          if (real'(d_a) / 32000.0 < 0.705 || real'(d_a) / 32000.0 > 0.7075) begin
            failures++;
            $display("FAIL factor %f", real'(d_a) / 32000.0);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
