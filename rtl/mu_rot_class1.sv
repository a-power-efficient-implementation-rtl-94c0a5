// mu_rot_class1: class I mu-rotation, the shift-and-add step of CORDIC.
//
// Computes, with I the rotation index and PRE a common pre-scale,
//   top_o = DT * 2^-PRE * top_i + ST * 2^-(PRE+I) * bot_i
//   bot_o = SB * 2^-(PRE+I) * top_i + DB * 2^-PRE * bot_i
// A plain class I rotation by +atan(2^-I) has DT = DB = SB = +1, ST = -1.
// The four signs are parameters because the signal flow graph also uses this
// step as a reflection (one diagonal negated) and, with I = 0 and PRE = 1, as
// the 2^-1-weighted pi/4 butterflies. The scaling factor 1/sqrt(1 + 2^-2I)
// is not applied here: the flow graph applies it once per approximated angle
// in a separate scaling chain (scale_chain).
//
// Every weight 2^-k is an arithmetic right shift of a two's complement word,
// rounded to nearest (half up) by feeding the most significant dropped bit in
// as carry; shifts and signs are fixed wiring, so the step costs two adders. The result is registered: latency one cycle,
// one operand pair per cycle. The registered step is this design's reading of
// the requirement that every interconnection of the graph holds a timing
// element.
module mu_rot_class1 #(
  parameter int W   = dct_pkg::DCT_W,
  parameter int I   = 0,
  parameter int PRE = 0,
  parameter int DT  = 1,
  parameter int ST  = -1,
  parameter int SB  = 1,
  parameter int DB  = 1
) (
  input  logic                clk,
  input  logic signed [W-1:0] top_i,
  input  logic signed [W-1:0] bot_i,
  output logic signed [W-1:0] top_o,
  output logic signed [W-1:0] bot_o
);

  // Weight 2^-k with rounding: arithmetic shift plus the most significant
  // dropped bit as carry-in, i.e. floor(x / 2^k + 1/2).
  function automatic logic signed [W-1:0] shr(logic signed [W-1:0] x, int k);
    logic signed [W-1:0] q;
    if (k == 0) return x;
    q = x >>> k;
    return q + $signed({{(W-1){1'b0}}, x[k-1]});
  endfunction

  logic signed [W-1:0] top_d, bot_d, top_x, bot_x;
  logic signed [W-1:0] top_n, bot_n;

  always_comb begin
    top_d = shr(top_i, PRE);        // diagonal terms
    bot_d = shr(bot_i, PRE);
    top_x = shr(top_i, PRE + I);  // cross terms
    bot_x = shr(bot_i, PRE + I);
    top_n = ((DT > 0) ? top_d : -top_d) + ((ST > 0) ? bot_x : -bot_x);
    bot_n = ((SB > 0) ? top_x : -top_x) + ((DB > 0) ? bot_d : -bot_d);
  end

  always_ff @(posedge clk) begin
    top_o <= top_n;
    bot_o <= bot_n;
  end

endmodule
