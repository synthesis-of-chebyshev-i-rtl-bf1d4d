// fold_add -- the single shared adder of the folded filter.
//
// The six additions of the filter are executed here, one per clock cycle, and
// the seventh cycle of each iteration is an idle (null) slot. The unit has one
// pipeline stage, matching the one time unit an addition takes in the
// folding schedule: s_out(t+1) = a_in(t) + b_in(t), wrapping at ACC_W bits.
// The output register also serves as the zero-delay path of the schedule (a
// result consumed by the very next addition is read straight from s_out).
// Wrap-around on overflow and the synchronous active-low reset are this
// design's choices.
module fold_add #(
  parameter int ACC_W = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ACC_W-1:0] a_in,
  input  logic signed [ACC_W-1:0] b_in,
  output logic signed [ACC_W-1:0] s_out
);
  always_ff @(posedge clk) begin
    if (!rst_n) s_out <= '0;
    else        s_out <= a_in + b_in;
  end
endmodule
