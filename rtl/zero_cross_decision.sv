// zero_cross_decision: finds where, inside one parallel word, a linearly
// interpolated quantity crosses an integer step, and writes the n-bit control
// register (bit-select control register for the delay, phase control register
// for the fringe phase).
//
// Inputs are the quantity at parallel clock k (`cur`) and k+1 (`nxt`), fixed
// point with FRAC fraction bits. Sample i of word k sits at time k + i/N.
// When floor(cur) and floor(nxt) differ, `shift` is high, `up` tells the
// direction, and the samples from the crossing on have their bit set: the
// register reads 0...01...1 from sample 0 (bit 0) upwards. The crossing is
// found with a divider: with a the distance from `cur` to the crossed integer
// and b the distance from there to `nxt`, the first shifted sample is
//   up:   ceil (N*a/(a+b))
//   down: floor(N*a/(a+b)) + 1
// which can equal N (no sample of this word shifts; the shift still counts).
// Purely combinational. The step per word must stay below one integer unit.
// The 0/1 boundary register and the division come from the design
// description; the exact rounding rule is this design's own choice.
module zero_cross_decision #(
  parameter int N    = 64,
  parameter int W    = 64,
  parameter int FRAC = 32
) (
  input  logic signed [W-1:0] cur,
  input  logic signed [W-1:0] nxt,
  output logic                shift,
  output logic                up,
  output logic [$clog2(N+1)-1:0] pos,
  output logic [N-1:0]        bsel
);

  localparam int PW = $clog2(N+1);
  localparam int DW = FRAC + PW + 1;

  logic signed [W-1:0] icur, inxt;  // integer parts, floor
  logic signed [W-1:0] a_full, b_full;
  logic [FRAC:0]       a, b;
  logic [DW-1:0]       num, den, quo, rem;

  always_comb begin
    icur  = cur >>> FRAC;
    inxt  = nxt >>> FRAC;
    shift = (icur != inxt);
    up    = (nxt > cur);
    if (up) begin
      a_full = (inxt <<< FRAC) - cur;
      b_full = nxt - (inxt <<< FRAC);
    end else begin
      a_full = cur - (icur <<< FRAC);
      b_full = (icur <<< FRAC) - nxt;
    end
    a   = a_full[FRAC:0];
    b   = b_full[FRAC:0];
    num = DW'(a) * DW'(N);
    den = DW'(a) + DW'(b);
    if (den == '0) den = DW'(1);
    quo = num / den;
    rem = num % den;
    if (!shift)
      pos = PW'(N);
    else if (up)
      pos = PW'(quo + ((rem != '0) ? DW'(1) : DW'(0)));
    else
      pos = PW'(quo + DW'(1));
    if (pos > PW'(N)) pos = PW'(N);
    for (int i = 0; i < N; i++) bsel[i] = (PW'(i) >= pos);
  end

endmodule
