// rot_pi4: approximated 45 degree rotation of the fast DCT.
//
// 45 degrees is met exactly by one class I mu-rotation with I = 0. Its edges
// carry weight 2^-1, which also supplies the factor 1/2 of the DCT
// normalisation, and the rotation's scaling factor 1/sqrt(2) is replaced by
// the factorised chain (1-2^-2)(1-2^-5)(1-2^-6)(1-2^-7)(1-2^-8) = 0.70685.
//   ODD = 0 (even part, X(0) and X(4)):
//     top_o ~ (top_i + bot_i) / (2 sqrt 2),   bot_o ~ (top_i - bot_i) / (2 sqrt 2)
//   ODD = 1 (odd part, rows x(2)-x(5) and x(1)-x(6)):
//     top_o ~ (bot_i - top_i) / (2 sqrt 2),   bot_o ~ (top_i + bot_i) / (2 sqrt 2)
// The edge signs of both orientations, the shift amounts and the order of the
// scaling steps are those of the published signal flow graph. Latency
// LAT_PI4 = 6 cycles (one rotation step, five scaling steps), one pair per
// cycle.
module rot_pi4 #(
  parameter int W   = dct_pkg::DCT_W,
  parameter bit ODD = 1'b0
) (
  input  logic                clk,
  input  logic signed [W-1:0] top_i,
  input  logic signed [W-1:0] bot_i,
  output logic signed [W-1:0] top_o,
  output logic signed [W-1:0] bot_o
);

  localparam int SHIFTS[5] = '{2, 5, 6, 7, 8};
  localparam int DT = ODD ? -1 : 1;
  localparam int DB = ODD ? 1 : -1;

  logic signed [W-1:0] top_r, bot_r;

  mu_rot_class1 #(.W(W), .I(0), .PRE(1), .DT(DT), .ST(1), .SB(1), .DB(DB)) u_rot (
    .clk, .top_i, .bot_i, .top_o(top_r), .bot_o(bot_r)
  );

  scale_chain #(.W(W), .N(5), .SHIFTS(SHIFTS)) u_scale_top (.clk, .d_i(top_r), .d_o(top_o));
  scale_chain #(.W(W), .N(5), .SHIFTS(SHIFTS)) u_scale_bot (.clk, .d_i(bot_r), .d_o(bot_o));

endmodule
