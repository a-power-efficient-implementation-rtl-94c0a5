// tb_butterfly: self-checking test of the registered sum/difference pair.
//
// Instance A has SP = 0 (the B8/B4 butterflies), instance B SP = 1 (the odd
// butterfly with weight 2^-1 on its first input). Random operands enter every
// cycle; sums and differences are compared exactly one cycle later.
module tb_butterfly;
  localparam int W = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] p_i, q_i, s_a, d_a, s_b, d_b;
  int checks = 0, failures = 0;

  butterfly #(.W(W), .SP(0)) dut_a (.clk, .p_i, .q_i, .s_o(s_a), .d_o(d_a));
  butterfly #(.W(W), .SP(1)) dut_b (.clk, .p_i, .q_i, .s_o(s_b), .d_o(d_b));

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
    int p, q;
    p_i = '0; q_i = '0;
    @(negedge clk);
    for (int n = 0; n < 500; n++) begin
      p = $signed($urandom_range(0, 32767)) - 16384;
      q = $signed($urandom_range(0, 32767)) - 16384;
      if (n == 0) begin p = -16384; q = -16384; end
      p_i = W'(p); q_i = W'(q);
      @(posedge clk); #1;
      check("A sum", s_a, p + q);
      check("A diff", d_a, p - q);
      check("B sum", s_b, rdiv(p, 1) + q);
      check("B diff", d_b, rdiv(p, 1) - q);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
