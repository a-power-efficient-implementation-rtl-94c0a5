// tb_dct8_orthogonal: orthogonality and reconstruction of the approximated DCT.
//
// Every rotation of the transform is replaced by a chain of orthogonal
// mu-rotations, so the transform actually built should still be an
// orthogonal matrix M (with its slightly different angles), and its transpose
// should invert it. This bench measures M column by column from the top at
// default parameters: column n is (X(e_n * 255) - X(e_n * -256)) / 511, where
// e_n is the n-th unit impulse; the difference of the two impulses cancels
// the constant part of the rounding. It then checks:
//   - M^T M = I to within 0.003 per entry (word rounding is about 1/32 / 511
//     per entry; the residual of the factorised scaling is 3e-4);
//   - M is within 0.002 of the exact DCT matrix per entry (angle error);
//   - 2000 random vectors are rebuilt by the transpose of the measured M,
//     x' = M^T X, to within 0.75 per sample, i.e. to the input integer after
//     rounding.
// The input stream is sent back to back; outputs are matched to inputs in
// order.
module tb_dct8_orthogonal;
  import dct_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int  NRND = 2000;
  localparam int  NIMP = 2 * DCT_N;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                       rst_n;
  logic                       in_valid;
  logic signed [DCT_IN_W-1:0] x_i [DCT_N];
  logic                       out_valid;
  logic signed [DCT_W-1:0]    X_o [DCT_N];

  dct8_fdct dut (.clk, .rst_n, .in_valid, .x_i, .out_valid, .X_o);

  int checks = 0, failures = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // stimulus and results, in order
  int  xs [NIMP + NRND][DCT_N];
  real ys [NIMP + NRND][DCT_N];
  int  n_out = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (n_out < NIMP + NRND)
        for (int k = 0; k < DCT_N; k++) ys[n_out][k] <= real'(X_o[k]) / real'(1 << DCT_F);
      n_out <= n_out + 1;
    end
  end

  initial begin
    repeat (NIMP + NRND + 200) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real c_exact(int k, int n);
    real c = $cos(real'((2 * n + 1) * k) * PI / 16.0) / 2.0;
    if (k == 0) c = c / $sqrt(2.0);
    return c;
  endfunction

  initial begin
    real m [DCT_N][DCT_N];
    real s, worst_o, worst_c, worst_r;

    // impulses first, then random vectors
    for (int n = 0; n < DCT_N; n++)
      for (int j = 0; j < DCT_N; j++) begin
        xs[2 * n][j]     = (j == n) ? 255 : 0;
        xs[2 * n + 1][j] = (j == n) ? -256 : 0;
      end
    for (int r = NIMP; r < NIMP + NRND; r++)
      for (int j = 0; j < DCT_N; j++) xs[r][j] = $urandom_range(0, 511) - 256;

    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int n = 0; n < DCT_N; n++) x_i[n] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NIMP + NRND; r++) begin
      @(negedge clk);
      in_valid = 1'b1;
      for (int n = 0; n < DCT_N; n++) x_i[n] = DCT_IN_W'(xs[r][n]);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT_TOTAL + 2) @(negedge clk);

    checks++;
    if (n_out != NIMP + NRND) fail($sformatf("%0d of %0d vectors came out", n_out, NIMP + NRND));

    // measured matrix, column n
    for (int n = 0; n < DCT_N; n++)
      for (int k = 0; k < DCT_N; k++) m[k][n] = (ys[2 * n][k] - ys[2 * n + 1][k]) / 511.0;

    worst_o = 0.0;
    worst_c = 0.0;
    for (int a = 0; a < DCT_N; a++)
      for (int b = 0; b < DCT_N; b++) begin
        s = 0.0;
        for (int k = 0; k < DCT_N; k++) s += m[k][a] * m[k][b];
        if (a == b) s -= 1.0;
        if (s < 0.0) s = -s;
        if (s > worst_o) worst_o = s;
        checks++;
        if (s > 0.003) fail($sformatf("(M^T M)[%0d][%0d] off identity by %f", a, b, s));
        s = m[a][b] - c_exact(a, b);
        if (s < 0.0) s = -s;
        if (s > worst_c) worst_c = s;
        checks++;
        if (s > 0.002) fail($sformatf("M[%0d][%0d] = %f, exact %f", a, b, m[a][b], c_exact(a, b)));
      end

    worst_r = 0.0;
    for (int r = NIMP; r < NIMP + NRND; r++)
      for (int n = 0; n < DCT_N; n++) begin
        s = 0.0;
        for (int k = 0; k < DCT_N; k++) s += m[k][n] * ys[r][k];
        s = s - real'(xs[r][n]);
        if (s < 0.0) s = -s;
        if (s > worst_r) worst_r = s;
        checks++;
        if (s > 0.75) fail($sformatf("vector %0d sample %0d rebuilt with error %f", r, n, s));
      end

    $display("largest |M^T M - I| entry %f, largest |M - C| entry %f, largest reconstruction error %f",
             worst_o, worst_c, worst_r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
