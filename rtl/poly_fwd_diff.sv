// poly_fwd_diff: evaluates a 4th-order polynomial once per parallel data clock.
//
// The a-priori delay and fringe phase are given as 4th-order polynomials in
// time; this evaluator steps them by forward differences, so each clock costs
// four additions and no multiplication. The host loads the value and its
// first to fourth forward differences at step 0 (coef[0..4]) with `load`;
// every clock with `step` high advances one step: d0+=d1, d1+=d2, d2+=d3,
// d3+=d4. `value` is the polynomial at the current step k and `value_next`
// (value + d1) the one at step k+1, which the zero-crossing decision needs in
// the same clock. Numbers are two's complement fixed point; the scaling is
// the caller's (the correlator uses 32 fraction bits).
// The polynomial order follows the design description; the forward
// difference method and the word width are this design's own choices.
module poly_fwd_diff #(
  parameter int W = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic signed [W-1:0] coef [5],
  input  logic                step,
  output logic signed [W-1:0] value,
  output logic signed [W-1:0] value_next
);

  logic signed [W-1:0] d [5];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) d[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < 5; i++) d[i] <= coef[i];
    end else if (step) begin
      for (int i = 0; i < 4; i++) d[i] <= d[i] + d[i+1];
    end
  end

  assign value      = d[0];
  assign value_next = d[0] + d[1];

endmodule
