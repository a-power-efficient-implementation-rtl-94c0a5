// rot_3pi16: approximated 33.75 degree rotation (odd part, X(3) and X(5)).
//
// Four mu-rotations replace the exact rotation (angles in degrees):
//   1. class II, I = 1: +29.745   t = (1-2^-3) t + 2^-1 b,  b = -2^-1 t + (1-2^-3) b
//   2. class I,  I = 3: + 7.125   t += 2^-3 b,  b -= 2^-3 t
//   3. class II, I = 4: - 3.583   t = (1-2^-9) t - 2^-4 b,  b = 2^-4 t + (1-2^-9) b
//   4. class I,  I = 7: + 0.448   t += 2^-7 b,  b -= 2^-7 t
// 33.734 degrees in all, then one scaling step (1 - 2^-6) for the product
// of the scaling factors, 1/(1 + 2^-6) to within 2^-14. top_o is X(5) and
// bot_o is X(3). Coefficients and order follow the published flow graph.
// Latency LAT_3PI16 = 5 cycles, one pair per cycle.
module rot_3pi16 #(
  parameter int W = dct_pkg::DCT_W
) (
  input  logic                clk,
  input  logic signed [W-1:0] top_i,
  input  logic signed [W-1:0] bot_i,
  output logic signed [W-1:0] top_o,
  output logic signed [W-1:0] bot_o
);

  localparam int SHIFTS[1] = '{6};

  logic signed [W-1:0] t1, b1, t2, b2, t3, b3, t4, b4;

  mu_rot_class2 #(.W(W), .I(1), .PRE(0), .DT(1), .ST(1), .SB(-1), .DB(1)) u_r1 (
    .clk, .top_i, .bot_i, .top_o(t1), .bot_o(b1)
  );
  mu_rot_class1 #(.W(W), .I(3), .PRE(0), .DT(1), .ST(1), .SB(-1), .DB(1)) u_r2 (
    .clk, .top_i(t1), .bot_i(b1), .top_o(t2), .bot_o(b2)
  );
  mu_rot_class2 #(.W(W), .I(4), .PRE(0), .DT(1), .ST(-1), .SB(1), .DB(1)) u_r3 (
    .clk, .top_i(t2), .bot_i(b2), .top_o(t3), .bot_o(b3)
  );
  mu_rot_class1 #(.W(W), .I(7), .PRE(0), .DT(1), .ST(1), .SB(-1), .DB(1)) u_r4 (
    .clk, .top_i(t3), .bot_i(b3), .top_o(t4), .bot_o(b4)
  );

  scale_chain #(.W(W), .N(1), .SHIFTS(SHIFTS)) u_scale_top (.clk, .d_i(t4), .d_o(top_o));
  scale_chain #(.W(W), .N(1), .SHIFTS(SHIFTS)) u_scale_bot (.clk, .d_i(b4), .d_o(bot_o));

endmodule
