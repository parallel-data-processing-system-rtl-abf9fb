// phase_jump90: 90-degree fringe phase jumps that go with one-sample delay
// shifts.
//
// Fringe stopping is done at the band centre frequency, so every one-sample
// step of the delay tracker must come with a 90-degree jump of the fringe
// phase. The same bit-select control register that steers the delay tracker
// gives the jump's timing: samples whose `bsel` bit is set see the new
// quadrant. A 2-bit counter holds the quadrant reached so far (the integer
// delay modulo 4); `qoff` gives each sample's quadrant offset for the current
// word and is combinational, and the counter moves on the clock edge at which
// the delay tracker writes its output register, so both stay in step.
// `load` presets the counter (the initial integer delay modulo 4).
// Taking the jump's timing from the bit-select register follows the design
// description; the jump's sign (+90 degrees per sample of added delay) is
// this design's own choice.
module phase_jump90 #(
  parameter int N = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [1:0]     q_init,
  input  logic           run,
  input  logic           shift,
  input  logic           up,
  input  logic [N-1:0]   bsel,
  output logic [2*N-1:0] qoff,
  output logic [1:0]     quadrant
);

  logic [1:0] q;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (shift && bsel[i]) qoff[2*i +: 2] = up ? q + 2'd1 : q - 2'd1;
      else                  qoff[2*i +: 2] = q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              q <= '0;
    else if (load)           q <= q_init;
    else if (run && shift)   q <= up ? q + 2'd1 : q - 2'd1;
  end

  assign quadrant = q;

endmodule
