// fringe_rotator: per-sample fringe phase and fringe switching codes.
//
// The fringe phase is kept in steps of pi/8 (16 states). For every parallel
// word the built-in controller supplies the integer part of the phase at the
// word's start (`p_int`) and the phase control register (`pc`, 0...01...1):
// the samples whose bit is set are one pi/8 step further on (`pup`) or back.
// Each sample's 90-degree jump offset (`qoff`, in quadrants) is added, and
// the total phase is reduced to the nearest quadrant, which selects the
// sample's 2-bit fringe switching code: + or - real, + or - imaginary
// (corr_pkg::fswitch_e). Codes are registered on the clock on which the
// delay tracker writes its output register Y, so code i belongs to Y's
// sample i; `codes_valid` matches y_valid.
// The pi/8 phase step and the 0/1 boundary register follow the design
// description, as does the 2-bit real/imaginary, +/- switching; reducing the
// pi/8 phase to the nearest quadrant is this design's own choice.
module fringe_rotator
  import corr_pkg::*;
#(
  parameter int N = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,
  input  logic [3:0]     p_int,
  input  logic           pshift,
  input  logic           pup,
  input  logic [N-1:0]   pc,
  input  logic [2*N-1:0] qoff,
  output logic [2*N-1:0] codes,
  output logic           codes_valid
);

  logic [2*N-1:0] nxt;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [3:0] p;
      p = p_int + {qoff[2*i +: 2], 2'b00};
      if (pshift && pc[i]) p = pup ? p + 4'd1 : p - 4'd1;
      nxt[2*i +: 2] = phase_to_switch(p);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      codes       <= '0;
      codes_valid <= 1'b0;
    end else begin
      codes_valid <= run;
      if (run) codes <= nxt;
    end
  end

endmodule
