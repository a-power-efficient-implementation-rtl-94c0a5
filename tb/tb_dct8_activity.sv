// tb_dct8_activity: switching activity of the DCT datapath under random data.
//
// Workload: 10000 equally distributed random input vectors (samples uniform
// in [-256, 255]), applied back to back to the top at its default
// parameters. Every computational step of the flow graph ends in a register
// behind a shift-and-add; there are 64 such step outputs of 16 bits:
//   B8 8, B4 4, odd butterfly 4, each pi/4 rotation 1 x 2 + 5 x 2 scaling,
//   67.5 degrees 3 x 2 + 2, 33.75 degrees 4 x 2 + 2, 78.75 degrees 3 x 2.
// The bench watches these 1024 register bits through hierarchical references
// and counts how many change per input vector. Because every adder output is
// registered, this is the glitch-free switching of the adder outputs. It
// reports the average number of switches per adder output bit and per input
// pattern change.
//
// Checks: every coefficient against a floating-point DCT (error at most 1),
// exactly one output per input vector, and an average activity between 0.2
// and 0.8 switches per bit (random data toggles about half the bits; a value
// outside that range means the datapath is stuck or the probes are wrong).
module tb_dct8_activity;
  import dct_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int  NVEC = 10000;
  localparam int  NW = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                       rst_n;
  logic                       in_valid;
  logic signed [DCT_IN_W-1:0] x_i [DCT_N];
  logic                       out_valid;
  logic signed [DCT_W-1:0]    X_o [DCT_N];

  dct8_fdct dut (.clk, .rst_n, .in_valid, .x_i, .out_valid, .X_o);

  // the 64 registered step outputs
  logic [DCT_W-1:0] w [NW];
  always_comb begin
    for (int k = 0; k < 8; k++) w[k] = dut.a[k];
    w[8]  = dut.b0;  w[9]  = dut.b1;  w[10] = dut.b2;  w[11] = dut.b3;
    w[12] = dut.d4;  w[13] = dut.d5;  w[14] = dut.d6;  w[15] = dut.d7;
    w[16] = dut.u_rot_even.top_r;  w[17] = dut.u_rot_even.bot_r;
    for (int s = 1; s <= 5; s++) begin
      w[17 + s] = dut.u_rot_even.u_scale_top.stage[s];
      w[22 + s] = dut.u_rot_even.u_scale_bot.stage[s];
    end
    w[28] = dut.u_rot_odd.top_r;  w[29] = dut.u_rot_odd.bot_r;
    for (int s = 1; s <= 5; s++) begin
      w[29 + s] = dut.u_rot_odd.u_scale_top.stage[s];
      w[34 + s] = dut.u_rot_odd.u_scale_bot.stage[s];
    end
    w[40] = dut.u_rot_3pi8.t1;  w[41] = dut.u_rot_3pi8.b1;
    w[42] = dut.u_rot_3pi8.t2;  w[43] = dut.u_rot_3pi8.b2;
    w[44] = dut.u_rot_3pi8.t3;  w[45] = dut.u_rot_3pi8.b3;
    w[46] = dut.u_rot_3pi8.u_scale_top.stage[1];
    w[47] = dut.u_rot_3pi8.u_scale_bot.stage[1];
    w[48] = dut.u_rot_3pi16.t1;  w[49] = dut.u_rot_3pi16.b1;
    w[50] = dut.u_rot_3pi16.t2;  w[51] = dut.u_rot_3pi16.b2;
    w[52] = dut.u_rot_3pi16.t3;  w[53] = dut.u_rot_3pi16.b3;
    w[54] = dut.u_rot_3pi16.t4;  w[55] = dut.u_rot_3pi16.b4;
    w[56] = dut.u_rot_3pi16.u_scale_top.stage[1];
    w[57] = dut.u_rot_3pi16.u_scale_bot.stage[1];
    w[58] = dut.u_rot_7pi16.t1;  w[59] = dut.u_rot_7pi16.b1;
    w[60] = dut.u_rot_7pi16.t2;  w[61] = dut.u_rot_7pi16.b2;
    w[62] = dut.u_rot_7pi16.top_o;  w[63] = dut.u_rot_7pi16.bot_o;
  end

  int checks = 0, failures = 0;

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

  typedef struct { int x [DCT_N]; } vec_t;
  vec_t q [$];
  int   n_out = 0;

  // activity: counted while the pipeline is completely filled with the
  // random stream
  logic [DCT_W-1:0] w_prev [NW];
  longint toggles = 0;
  int     counted = 0;
  int     n_in = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        vec_t v;
        real  e;
        if (q.size() == 0) fail("output without input");
        else begin
          v = q.pop_front();
          for (int k = 0; k < DCT_N; k++) begin
            e = real'(X_o[k]) / real'(1 << DCT_F) - ref_dct(v.x, k);
            checks++;
            if (e > 1.0 || e < -1.0) fail($sformatf("X(%0d) error %f", k, e));
          end
          n_out++;
        end
      end
      if (in_valid) begin
        vec_t v;
        for (int n = 0; n < DCT_N; n++) v.x[n] = int'(x_i[n]);
        q.push_back(v);
        n_in++;
      end
      if (n_in > LAT_TOTAL + 1 && in_valid) begin
        for (int j = 0; j < NW; j++) toggles += $countones(w[j] ^ w_prev[j]);
        counted++;
      end
    end
    for (int j = 0; j < NW; j++) w_prev[j] <= w[j];
  end

  initial begin
    repeat (NVEC + 200) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real act;
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int n = 0; n < DCT_N; n++) x_i[n] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NVEC; r++) begin
      @(negedge clk);
      in_valid = 1'b1;
      for (int n = 0; n < DCT_N; n++) x_i[n] = DCT_IN_W'($urandom_range(0, 511));
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT_TOTAL + 2) @(negedge clk);

    checks++;
    if (n_out != NVEC) fail($sformatf("%0d of %0d vectors came out", n_out, NVEC));
    act = real'(toggles) / real'(counted) / real'(NW * DCT_W);
    $display("switching activity: %0d input pattern changes, %f switches per adder output bit and pattern",
             counted, act);
    checks++;
    if (counted < NVEC / 2 || act < 0.2 || act > 0.8) fail("switching activity out of range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
