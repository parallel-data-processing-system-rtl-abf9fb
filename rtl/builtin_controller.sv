// builtin_controller: per-clock a-priori delay and fringe phase, and the
// control registers derived from them.
//
// One 4th-order polynomial gives the geometric delay in samples and one per
// channel gives the fringe phase in units of pi/8; both are fixed point with
// FRAC fraction bits and are advanced once per parallel data clock (`step`).
// For the delay, a zero-crossing decision compares the delay at this clock
// and the next and fills the bit-select control register (d_shift, d_up,
// d_bsel); for each channel's phase it fills the phase control register
// (p_shift, p_up, p_pc) and gives the integer phase modulo 16 (p_int).
// Assertions flag a delay or phase that moves by a whole unit or more in one
// clock, which the control registers cannot express.
// `d_int` is the integer part of the current delay, used to start the
// readout (whole words, sample offset in the word, 90-degree quadrant).
// The polynomial delay model and the per-clock calculation follow the design
// description; the fixed-point format and the separate phase polynomial per
// channel are this design's own choices.
module builtin_controller #(
  parameter int N    = 64,
  parameter int NCH  = 4,
  parameter int PW   = 64,
  parameter int FRAC = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 coef_load,
  input  logic signed [PW-1:0] delay_coef [5],
  input  logic signed [PW-1:0] phase_coef [NCH][5],
  input  logic                 step,
  output logic signed [PW-1:0] delay_now,
  output logic [31:0]          d_int,
  output logic                 d_shift,
  output logic                 d_up,
  output logic [N-1:0]         d_bsel,
  output logic [NCH-1:0]       p_shift,
  output logic [NCH-1:0]       p_up,
  output logic [N-1:0]         p_pc  [NCH],
  output logic [3:0]           p_int [NCH]
);

  logic signed [PW-1:0] dnext;

  poly_fwd_diff #(.W(PW)) u_delay (
    .clk, .rst_n, .load(coef_load), .coef(delay_coef), .step,
    .value(delay_now), .value_next(dnext)
  );

  zero_cross_decision #(.N(N), .W(PW), .FRAC(FRAC)) u_dzc (
    .cur(delay_now), .nxt(dnext), .shift(d_shift), .up(d_up), .pos(),
    .bsel(d_bsel)
  );

  assign d_int = delay_now[FRAC +: 32];

  // The zero-crossing decision handles one integer step per word at most.
  localparam logic signed [PW-1:0] ONE = PW'(1) <<< FRAC;
  a_delay_step: assert property (@(posedge clk) disable iff (!rst_n)
    step |-> (dnext - delay_now < ONE && delay_now - dnext < ONE))
    else $error("delay changes by a sample or more in one word");

  for (genvar c = 0; c < NCH; c++) begin : g_ph
    logic signed [PW-1:0] pnow, pnext;
    poly_fwd_diff #(.W(PW)) u_phase (
      .clk, .rst_n, .load(coef_load), .coef(phase_coef[c]), .step,
      .value(pnow), .value_next(pnext)
    );
    zero_cross_decision #(.N(N), .W(PW), .FRAC(FRAC)) u_pzc (
      .cur(pnow), .nxt(pnext), .shift(p_shift[c]), .up(p_up[c]), .pos(),
      .bsel(p_pc[c])
    );
    assign p_int[c] = pnow[FRAC +: 4];
    a_phase_step: assert property (@(posedge clk) disable iff (!rst_n)
      step |-> (pnext - pnow < ONE && pnow - pnext < ONE))
      else $error("phase of channel %0d changes by pi/8 or more in one word", c);
  end

endmodule
