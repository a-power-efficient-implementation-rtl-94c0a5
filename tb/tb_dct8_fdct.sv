// tb_dct8_fdct: end-to-end test of the pipelined 8-point forward DCT.
//
// The top is instantiated with its default parameters (9-bit samples, 16-bit
// words with 5 fraction bits). The driver applies corner vectors (all
// extremes, alternating extremes, the vectors of largest growth, impulses)
// and then 10000 random vectors with samples uniform in [-256, 255]. Most
// vectors follow each other back to back; random bubbles (in_valid low) and
// one reset in the middle of the stream exercise the valid pipeline.
//
// A monitor samples the top at every rising edge. Every vector accepted with
// in_valid is queued with its cycle number; every out_valid pops the queue,
// checks that the latency is exactly LAT_TOTAL = 14 cycles, and compares the
// eight coefficients with the exact orthonormal DCT computed in floating
// point:
//   X(k) = c(k)/2 * sum_n x(n) cos((2n+1) k pi / 16), c(0) = 1/sqrt(2).
// Limits, in the style of the IEEE 1180 accuracy test: peak error at most
// 1, mean square error at most 0.06 per coefficient and 0.02 overall, mean
// error at most 0.015 per coefficient and 0.0015 overall. The reset must
// drop the vectors in flight. Each mechanism (back-to-back vectors, bubbles,
// reset flush, extreme vectors) is counted and must occur.
module tb_dct8_fdct;
  import dct_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int  NRAND = 10000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                       rst_n;
  logic                       in_valid;
  logic signed [DCT_IN_W-1:0] x_i [DCT_N];
  logic                       out_valid;
  logic signed [DCT_W-1:0]    X_o [DCT_N];

  dct8_fdct dut (.clk, .rst_n, .in_valid, .x_i, .out_valid, .X_o);

  int checks = 0, failures = 0;

  typedef struct {
    int  x [DCT_N];
    int  cyc;
  } vec_t;

  vec_t q [$];
  int   cyc = 0;
  int   n_out = 0, n_rand_out = 0;
  real  se [DCT_N], me [DCT_N], peak = 0.0;
  bit   stats_on = 1'b0;

  // mechanism counters
  int n_b2b = 0, n_bubble = 0, n_flush = 0, n_extreme = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  function automatic real ref_dct(int x [DCT_N], int k);
    real s = 0.0;
    for (int n = 0; n < DCT_N; n++) s += real'(x[n]) * $cos(real'((2 * n + 1) * k) * PI / 16.0);
    s = s / 2.0;
    if (k == 0) s = s / $sqrt(2.0);
    return s;
  endfunction

  // monitor: outputs first, then capture of the inputs of this edge
  bit prev_in_valid = 1'b0;
  always @(posedge clk) begin
    cyc++;
    if (!rst_n) begin
      if (q.size() > 0) n_flush++;
      q.delete();
    end else begin
      if (out_valid) begin
        vec_t v;
        real  e;
        if (q.size() == 0) begin
          fail("out_valid without a vector in flight");
        end else begin
          v = q.pop_front();
          checks++;
          if (cyc - v.cyc != LAT_TOTAL) fail($sformatf("latency %0d", cyc - v.cyc));
          for (int k = 0; k < DCT_N; k++) begin
            e = real'(X_o[k]) / real'(1 << DCT_F) - ref_dct(v.x, k);
            checks++;
            if (e > 1.0 || e < -1.0) fail($sformatf("X(%0d) error %f", k, e));
            if (stats_on) begin
              se[k] += e * e;
              me[k] += e;
            end
            if ((e < 0 ? -e : e) > peak) peak = (e < 0 ? -e : e);
          end
          n_out++;
          if (stats_on) n_rand_out++;
        end
      end
      if (in_valid) begin
        vec_t v;
        for (int n = 0; n < DCT_N; n++) v.x[n] = int'(x_i[n]);
        v.cyc = cyc;
        q.push_back(v);
        if (prev_in_valid) n_b2b++;
      end else if (prev_in_valid) begin
        n_bubble++;
      end
    end
    prev_in_valid = in_valid && rst_n;
  end

  initial begin
    repeat (NRAND * 2 + 2000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int x [DCT_N]);
    @(negedge clk);
    in_valid = 1'b1;
    for (int n = 0; n < DCT_N; n++) x_i[n] = DCT_IN_W'(x[n]);
  endtask

  task automatic idle(int cycles);
    repeat (cycles) begin
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  initial begin
    int x [DCT_N];
    real mse_all, me_all;
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int n = 0; n < DCT_N; n++) x_i[n] = '0;
    for (int k = 0; k < DCT_N; k++) begin se[k] = 0.0; me[k] = 0.0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // out_valid must be low after reset
    idle(LAT_TOTAL + 2);
    checks++;
    if (out_valid) fail("out_valid high with nothing in flight");

    // corner vectors
    for (int c = 0; c < 8 + DCT_N; c++) begin
      for (int n = 0; n < DCT_N; n++) begin
        case (c)
          0: x[n] = -256;
          1: x[n] = 255;
          2: x[n] = (n % 2 == 1) ? -256 : 255;
          3: x[n] = (n % 2 == 1) ? 255 : -256;
          4: x[n] = ((n + 1) % 4 < 2) ? 255 : -256;            // pattern of X(2)
          5: x[n] = (n < 4) ? 255 : -256;                        // pattern of X(1)
          6: x[n] = ((n % 4) == 1 || (n % 4) == 2) ? -256 : 255;
          7: x[n] = 0;
          default: x[n] = (n == c - 8) ? 255 : 0;                // impulses
        endcase
      end
      if (c < 7) n_extreme++;
      put(x);
    end

    // a bubble, then a burst cut by a reset
    idle(3);
    for (int r = 0; r < 6; r++) begin
      for (int n = 0; n < DCT_N; n++) x[n] = $signed($urandom_range(0, 511)) - 256;
      put(x);
    end
    @(negedge clk);
    in_valid = 1'b0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    idle(LAT_TOTAL + 2);
    checks++;
    if (n_flush == 0) fail("reset did not meet vectors in flight");

    // random vectors, mostly back to back, with random bubbles
    stats_on = 1'b1;
    for (int r = 0; r < NRAND; r++) begin
      for (int n = 0; n < DCT_N; n++) x[n] = $signed($urandom_range(0, 511)) - 256;
      put(x);
      if ($urandom_range(0, 15) == 0) idle($urandom_range(1, 3));
    end
    idle(LAT_TOTAL + 2);

    checks++;
    if (q.size() != 0) fail($sformatf("%0d vectors never came out", q.size()));
    checks++;
    if (n_rand_out != NRAND) fail($sformatf("%0d random vectors came out", n_rand_out));

    // accuracy statistics
    mse_all = 0.0;
    me_all = 0.0;
    for (int k = 0; k < DCT_N; k++) begin
      $display("X(%0d): mean square error %f, mean error %f", k, se[k] / NRAND, me[k] / NRAND);
      mse_all += se[k] / NRAND / DCT_N;
      me_all += me[k] / NRAND / DCT_N;
      checks += 2;
      if (se[k] / NRAND > 0.06) fail($sformatf("X(%0d) mean square error", k));
      if (me[k] / NRAND > 0.015 || me[k] / NRAND < -0.015) fail($sformatf("X(%0d) mean error", k));
    end
    $display("overall: mean square error %f, mean error %f, peak error %f", mse_all, me_all, peak);
    checks += 2;
    if (mse_all > 0.02) fail("overall mean square error");
    if (me_all > 0.0015 || me_all < -0.0015) fail("overall mean error");

    $display("mechanisms: back-to-back %0d, bubbles %0d, reset flushes %0d, extreme vectors %0d",
             n_b2b, n_bubble, n_flush, n_extreme);
    checks += 4;
    if (n_b2b == 0) fail("no back-to-back vectors");
    if (n_bubble == 0) fail("no bubbles");
    if (n_flush == 0) fail("no reset flush");
    if (n_extreme == 0) fail("no extreme vectors");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
