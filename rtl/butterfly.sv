// butterfly: registered sum and difference of two words.
//
//   s_o = 2^-SP * p_i + q_i
//   d_o = 2^-SP * p_i - q_i
// With SP = 0 this is one pair of the input butterflies B8 and B4 of the
// fast DCT. With SP = 1 it is the butterfly of the odd part, where the
// undisturbed rows (x(3)-x(4) and x(0)-x(7)) enter with weight 2^-1 and the
// rows leaving the pi/4 rotation enter with weight 1. Latency one cycle.
module butterfly #(
  parameter int W  = dct_pkg::DCT_W,
  parameter int SP = 0
) (
  input  logic                clk,
  input  logic signed [W-1:0] p_i,
  input  logic signed [W-1:0] q_i,
  output logic signed [W-1:0] s_o,
  output logic signed [W-1:0] d_o
);

  // Weight 2^-k with rounding: arithmetic shift plus the most significant
  // dropped bit as carry-in, i.e. floor(x / 2^k + 1/2).
  function automatic logic signed [W-1:0] shr(logic signed [W-1:0] x, int k);
    logic signed [W-1:0] q;
    if (k == 0) return x;
    q = x >>> k;
    return q + $signed({{(W-1){1'b0}}, x[k-1]});
  endfunction

  logic signed [W-1:0] p_s;

  assign p_s = shr(p_i, SP);

  always_ff @(posedge clk) begin
    s_o <= p_s + q_i;
    d_o <= p_s - q_i;
  end

endmodule
