// rot_3pi8: approximated 67.5 degree rotation (even part, X(2) and X(6)).
//
// Three mu-rotations replace the exact rotation:
//   1. class II, I = 1, pre-scale 2^-1, as a reflection:
//        t = -(2^-1 - 2^-4) top + 2^-2 bot,  b = 2^-2 top + (2^-1 - 2^-4) bot
//   2. class I,  I = 3:  t -= 2^-3 b,  b += 2^-3 t
//   3. class I,  I = 9:  t -= 2^-9 b,  b += 2^-9 t
// then one scaling step (1 - 2^-6), close to the product of the three
// scaling factors, 1/(1 + 2^-6). The reflection realises the 90 degree part
// of the angle, the mu-rotations 29.745 - 7.125 - 0.112 = 22.508 degrees.
// With top_i = (x(1)+x(6)) - (x(2)+x(5)) and bot_i = (x(0)+x(7)) - (x(3)+x(4)),
// the two differences of B4, top_o is X(6) and bot_o is X(2), both including
// the factor 1/2 of the orthonormal DCT. Coefficients and order follow the published flow
// graph. Latency LAT_3PI8 = 4 cycles, one pair per cycle.
module rot_3pi8 #(
  parameter int W = dct_pkg::DCT_W
) (
  input  logic                clk,
  input  logic signed [W-1:0] top_i,
  input  logic signed [W-1:0] bot_i,
  output logic signed [W-1:0] top_o,
  output logic signed [W-1:0] bot_o
);

  localparam int SHIFTS[1] = '{6};

  logic signed [W-1:0] t1, b1, t2, b2, t3, b3;

  mu_rot_class2 #(.W(W), .I(1), .PRE(1), .DT(-1), .ST(1), .SB(1), .DB(1)) u_r1 (
    .clk, .top_i, .bot_i, .top_o(t1), .bot_o(b1)
  );
  mu_rot_class1 #(.W(W), .I(3), .PRE(0), .DT(1), .ST(-1), .SB(1), .DB(1)) u_r2 (
    .clk, .top_i(t1), .bot_i(b1), .top_o(t2), .bot_o(b2)
  );
  mu_rot_class1 #(.W(W), .I(9), .PRE(0), .DT(1), .ST(-1), .SB(1), .DB(1)) u_r3 (
    .clk, .top_i(t2), .bot_i(b2), .top_o(t3), .bot_o(b3)
  );

  scale_chain #(.W(W), .N(1), .SHIFTS(SHIFTS)) u_scale_top (.clk, .d_i(t3), .d_o(top_o));
  scale_chain #(.W(W), .N(1), .SHIFTS(SHIFTS)) u_scale_bot (.clk, .d_i(b3), .d_o(bot_o));

endmodule
