// delay_line: D-cycle register delay of a W-bit word (D = 0 is a wire).
// Used to balance the paths of the DCT pipeline so that all coefficients of
// one input vector leave together.
module delay_line #(
  parameter int W = dct_pkg::DCT_W,
  parameter int D = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d_i,
  output logic [W-1:0] d_o
);

  if (D == 0) begin : g_wire
    assign d_o = d_i;
  end else begin : g_regs
    logic [W-1:0] r [D];
    always_ff @(posedge clk) begin
      r[0] <= d_i;
      for (int k = 1; k < D; k++) r[k] <= r[k-1];
    end
    assign d_o = r[D-1];
  end

endmodule
