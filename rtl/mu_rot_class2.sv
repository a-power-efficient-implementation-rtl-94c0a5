// mu_rot_class2: class II mu-rotation.
//
// Computes, with I the rotation index and PRE a common pre-scale,
//   c(x)  = 2^-PRE * x - 2^-(PRE+2I+1) * x          (diagonal, 1 - 2^-(2I+1))
//   top_o = DT * c(top_i) + ST * 2^-(PRE+I) * bot_i
//   bot_o = SB * 2^-(PRE+I) * top_i + DB * c(bot_i)
// A plain class II rotation by +atan(2^-I / (1 - 2^-(2I+1))) has
// DT = DB = SB = +1 and ST = -1. Its scaling factor 1/sqrt(1 + 2^-(4I+2)) is
// left to the scaling chain of the approximated angle. The signs are
// parameters because the flow graph uses this step as a reflection for the
// 67.5 and 78.75 degree angles, and PRE = 1 folds the 2^-1 normalisation of
// the even part into the first 67.5 degree step.
//
// Weights are arithmetic right shifts rounded half up; four adders per step.
// The diagonal correction and the cross terms are computed in the same step,
// and the result is registered: latency one cycle, one pair per cycle.
module mu_rot_class2 #(
  parameter int W   = dct_pkg::DCT_W,
  parameter int I   = 1,
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

  localparam int CS = PRE + 2 * I + 1;  // shift of the diagonal correction

  logic signed [W-1:0] top_d, bot_d, top_x, bot_x;
  logic signed [W-1:0] top_n, bot_n;

  always_comb begin
    top_d = shr(top_i, PRE) - shr(top_i, CS);
    bot_d = shr(bot_i, PRE) - shr(bot_i, CS);
    top_x = shr(top_i, PRE + I);
    bot_x = shr(bot_i, PRE + I);
    top_n = ((DT > 0) ? top_d : -top_d) + ((ST > 0) ? bot_x : -bot_x);
    bot_n = ((SB > 0) ? top_x : -top_x) + ((DB > 0) ? bot_d : -bot_d);
  end

  always_ff @(posedge clk) begin
    top_o <= top_n;
    bot_o <= bot_n;
  end

endmodule
