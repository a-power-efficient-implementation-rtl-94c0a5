// scale_chain: multiplication by a factorised scaling constant.
//
// The scaling factor of an approximated rotation is written in canonical
// signed digits and factorised into terms (1 - 2^-k). Each term is one
// shift-and-subtract step, y = x - round(x / 2^k), followed by a register, so an
// N-term chain has latency N cycles and accepts one word per cycle.
// SHIFTS[0] is applied first. Example: SHIFTS = '{2,5,6,7,8} gives
// 0.75 * 0.96875 * 0.984375 * 0.9921875 * 0.99609375 = 0.70685, the
// 1/sqrt(2) of the pi/4 rotation. Each shift rounds half up, a choice of
// this design.
module scale_chain #(
  parameter int W           = dct_pkg::DCT_W,
  parameter int N           = 1,
  parameter int SHIFTS[N]   = '{6}
) (
  input  logic                clk,
  input  logic signed [W-1:0] d_i,
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

  logic signed [W-1:0] stage [N+1];

  assign stage[0] = d_i;

  for (genvar s = 0; s < N; s++) begin : g_step
    always_ff @(posedge clk) begin
      stage[s+1] <= stage[s] - shr(stage[s], SHIFTS[s]);
    end
  end

  assign d_o = stage[N];

endmodule
