// rot_7pi16: approximated 78.75 degree rotation (odd part, X(1) and X(7)).
//
// Three mu-rotations replace the exact rotation:
//   1. class II, I = 3, as a reflection:
//        t = -(1-2^-7) t + 2^-3 b,  b = 2^-3 t + (1-2^-7) b
//   2. class I,  I = 7:  t += 2^-7 b,  b -= 2^-7 t
//   3. class II, I = 4:  t = (1-2^-9) t + 2^-4 b,  b = -2^-4 t + (1-2^-9) b
// The reflection gives the 90 degree part, the mu-rotations
// 7.181 + 0.448 + 3.583 = 11.212 degrees, so the angle is 78.788 degrees.
// The residual scaling factor is 1 - 2^-14 and no scaling step follows.
// top_i is the odd-part row that starts from x(3)-x(4), bot_i the row from
// x(0)-x(7); top_o is X(7) and bot_o is X(1). Coefficients follow the
// published flow graph; the sign of the upper diagonal of step 1 is this
// design's reading (see the README). Latency LAT_7PI16 = 3 cycles.
module rot_7pi16 #(
  parameter int W = dct_pkg::DCT_W
) (
  input  logic                clk,
  input  logic signed [W-1:0] top_i,
  input  logic signed [W-1:0] bot_i,
  output logic signed [W-1:0] top_o,
  output logic signed [W-1:0] bot_o
);

  logic signed [W-1:0] t1, b1, t2, b2;

  mu_rot_class2 #(.W(W), .I(3), .PRE(0), .DT(-1), .ST(1), .SB(1), .DB(1)) u_r1 (
    .clk, .top_i, .bot_i, .top_o(t1), .bot_o(b1)
  );
  mu_rot_class1 #(.W(W), .I(7), .PRE(0), .DT(1), .ST(1), .SB(-1), .DB(1)) u_r2 (
    .clk, .top_i(t1), .bot_i(b1), .top_o(t2), .bot_o(b2)
  );
  mu_rot_class2 #(.W(W), .I(4), .PRE(0), .DT(1), .ST(1), .SB(-1), .DB(1)) u_r3 (
    .clk, .top_i(t2), .bot_i(b2), .top_o(top_o), .bot_o(bot_o)
  );

endmodule
