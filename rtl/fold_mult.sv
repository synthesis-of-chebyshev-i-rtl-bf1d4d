// fold_mult -- the single shared multiplier of the folded filter.
//
// All seven coefficient multiplications of the filter are executed here, one
// per clock cycle. The unit is pipelined by two stages, as the folding
// schedule assumes (a multiplication takes two time units): the first stage
// registers the operands, the second registers the scaled product.
//
//   p_out(t+2) = (d_in(t) * c_in(t)) >>> COEF_FRAC, wrapped to ACC_W bits
//
// The result is truncated (arithmetic shift, rounding toward minus infinity).
// Word widths and the truncation are this design's choices. A synchronous
// active-low reset clears both stages, so a reset filter starts from a zero
// state.
module fold_mult #(
  parameter int ACC_W     = 24,
  parameter int COEF_W    = 16,
  parameter int COEF_FRAC = 14
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [ACC_W-1:0]  d_in,
  input  logic signed [COEF_W-1:0] c_in,
  output logic signed [ACC_W-1:0]  p_out
);
  localparam int PROD_W = ACC_W + COEF_W;

  logic signed [ACC_W-1:0]  d_q;
  logic signed [COEF_W-1:0] c_q;
  logic signed [PROD_W-1:0] prod;
  logic signed [ACC_W-1:0]  prod_sh;

  always_comb begin
    prod    = PROD_W'(d_q) * PROD_W'(c_q);
    prod_sh = ACC_W'(prod >>> COEF_FRAC);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_q   <= '0;
      c_q   <= '0;
      p_out <= '0;
    end else begin
      d_q   <= d_in;
      c_q   <= c_in;
      p_out <= prod_sh;
    end
  end
endmodule
