// dct8_fdct: pipelined 8-point forward DCT with approximated rotation angles.
//
// The transform follows Chen's fast DCT: an input butterfly B8, a second
// butterfly B4 on the even half, and 2x2 rotations by 45, 67.5, 33.75 and
// 78.75 degrees. Instead of multiplying by quantised cosines, each rotation
// is replaced by a short sequence of orthogonal mu-rotations (class I and
// class II) that need only shifts and adds, followed by a factorised
// scaling constant, so the transform stays orthogonal:
//
//   x --in reg--> B8 --+-- even: B4 --+-- rot_pi4 (ODD=0) ---------> X(0), X(4)
//                      |              +-- rot_3pi8 -----------------> X(6), X(2)
//                      +-- odd:  rot_pi4 (ODD=1) on x2-x5, x1-x6
//                                butterfly (2^-1 weight) with x3-x4, x0-x7
//                                +-- rot_3pi16 ---------------------> X(5), X(3)
//                                +-- rot_7pi16 ---------------------> X(7), X(1)
//
// X(k) = c(k)/2 * sum_n x(n) cos((2n+1) k pi/16), c(0) = 1/sqrt(2), c(k) = 1
// otherwise, to within the angle and word quantisation (peak error about
// 0.6 for 9-bit inputs).
//
// Word format: inputs are IN_W-bit two's complement integers; inside, and at
// the outputs, words are W bits with F fraction bits (16 = 9 + 2 guard bits +
// 5 fraction bits). Every weight 2^-k rounds to nearest, half up.
//
// Timing: every step of the flow graph ends in a register. The paths have
// different depths (X(0)/X(4): 8, X(2)/X(6): 6, X(1)/X(7): 11, X(3)/X(5): 13
// steps after the input register). Delay registers, this design's choice,
// align them, so a vector taken with in_valid leaves LAT_TOTAL = 14 cycles
// later with out_valid, and one vector is accepted every cycle. Only the
// valid pipeline is reset.
module dct8_fdct
  import dct_pkg::*;
#(
  parameter int IN_W = DCT_IN_W,
  parameter int W    = DCT_W,
  parameter int F    = DCT_F
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x_i [DCT_N],
  output logic                   out_valid,
  output logic signed [W-1:0]    X_o [DCT_N]
);

  typedef logic signed [W-1:0] word_t;

  // Depths, in cycles after the input register, of the four output pairs.
  localparam int T_X04 = 2 + LAT_PI4;
  localparam int T_X26 = 2 + LAT_3PI8;
  localparam int T_X17 = 1 + LAT_PI4 + 1 + LAT_7PI16;
  localparam int T_X35 = 1 + LAT_PI4 + 1 + LAT_3PI16;
  localparam int T_MAX = T_X35;

  // Input register: sample placed at bit F of the datapath word.
  word_t xr [DCT_N];
  always_ff @(posedge clk) begin
    for (int n = 0; n < DCT_N; n++) xr[n] <= word_t'(x_i[n]) <<< F;
  end

  // B8: a(k) = x(k) + x(7-k), a(7-k) = x(k) - x(7-k).
  word_t a [DCT_N];
  for (genvar k = 0; k < DCT_N / 2; k++) begin : g_b8
    butterfly #(.W(W), .SP(0)) u_bf (
      .clk, .p_i(xr[k]), .q_i(xr[DCT_N-1-k]), .s_o(a[k]), .d_o(a[DCT_N-1-k])
    );
  end

  // Even half. B4: b0 = a0 + a3, b3 = a0 - a3, b1 = a1 + a2, b2 = a1 - a2.
  word_t b0, b1, b2, b3;
  butterfly #(.W(W), .SP(0)) u_b4_03 (.clk, .p_i(a[0]), .q_i(a[3]), .s_o(b0), .d_o(b3));
  butterfly #(.W(W), .SP(0)) u_b4_12 (.clk, .p_i(a[1]), .q_i(a[2]), .s_o(b1), .d_o(b2));

  word_t y0, y4, y6, y2;
  rot_pi4  #(.W(W), .ODD(1'b0)) u_rot_even (.clk, .top_i(b0), .bot_i(b1), .top_o(y0), .bot_o(y4));
  rot_3pi8 #(.W(W))             u_rot_3pi8 (.clk, .top_i(b2), .bot_i(b3), .top_o(y6), .bot_o(y2));

  // Odd half. pi/4 rotation of x(2)-x(5) and x(1)-x(6); the other two rows
  // wait for it.
  word_t c5, c6, a4_d, a7_d;
  rot_pi4 #(.W(W), .ODD(1'b1)) u_rot_odd (.clk, .top_i(a[5]), .bot_i(a[6]), .top_o(c5), .bot_o(c6));
  delay_line #(.W(W), .D(LAT_PI4)) u_dly_a4 (.clk, .d_i(a[4]), .d_o(a4_d));
  delay_line #(.W(W), .D(LAT_PI4)) u_dly_a7 (.clk, .d_i(a[7]), .d_o(a7_d));

  // Odd butterfly: d4 = a4/2 + c5, d5 = a4/2 - c5, d7 = a7/2 + c6, d6 = a7/2 - c6.
  word_t d4, d5, d6, d7;
  butterfly #(.W(W), .SP(1)) u_bo_45 (.clk, .p_i(a4_d), .q_i(c5), .s_o(d4), .d_o(d5));
  butterfly #(.W(W), .SP(1)) u_bo_76 (.clk, .p_i(a7_d), .q_i(c6), .s_o(d7), .d_o(d6));

  word_t y5, y3, y7, y1;
  rot_3pi16 #(.W(W)) u_rot_3pi16 (.clk, .top_i(d5), .bot_i(d6), .top_o(y5), .bot_o(y3));
  rot_7pi16 #(.W(W)) u_rot_7pi16 (.clk, .top_i(d4), .bot_i(d7), .top_o(y7), .bot_o(y1));

  // Path balancing.
  delay_line #(.W(W), .D(T_MAX - T_X04)) u_al0 (.clk, .d_i(y0), .d_o(X_o[0]));
  delay_line #(.W(W), .D(T_MAX - T_X04)) u_al4 (.clk, .d_i(y4), .d_o(X_o[4]));
  delay_line #(.W(W), .D(T_MAX - T_X26)) u_al2 (.clk, .d_i(y2), .d_o(X_o[2]));
  delay_line #(.W(W), .D(T_MAX - T_X26)) u_al6 (.clk, .d_i(y6), .d_o(X_o[6]));
  delay_line #(.W(W), .D(T_MAX - T_X17)) u_al1 (.clk, .d_i(y1), .d_o(X_o[1]));
  delay_line #(.W(W), .D(T_MAX - T_X17)) u_al7 (.clk, .d_i(y7), .d_o(X_o[7]));
  assign X_o[3] = y3;
  assign X_o[5] = y5;

  // Valid pipeline.
  logic [LAT_TOTAL-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT_TOTAL-2:0], in_valid};
  end
  assign out_valid = vld[LAT_TOTAL-1];

  if (1 + T_MAX != LAT_TOTAL) begin : g_lat_check
    $error("dct8_fdct: LAT_TOTAL does not match the path depths");
  end

endmodule
