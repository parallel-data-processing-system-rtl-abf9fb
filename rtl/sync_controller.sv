// sync_controller: starts the readout of all synchronization buffers at once.
//
// Each station's buffer raises `arrived` once it has seen the agreed time
// code and is storing data. Readout starts on the first clock after `arm` at
// which every buffer has arrived and holds at least `need[i]` words (the
// words its reader will skip at the start plus a small margin), so the data
// handed to the correlation part begin at the same time code for all
// stations. `start` is a one-clock pulse; `synced` stays high until the next
// `arm`. `wait_cycles` counts the clocks spent waiting after the first
// station arrived, which is the delay difference the buffers absorbed.
// Starting when all time stamps are in follows the design description; the
// fill requirement is this design's own choice.
module sync_controller #(
  parameter int M = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        arm,
  input  logic [M-1:0] arrived,
  input  logic [31:0] fill [M],
  input  logic [31:0] need [M],
  output logic        start,
  output logic        synced,
  output logic [31:0] wait_cycles
);

  typedef enum logic [1:0] {C_IDLE, C_WAIT, C_RUN} state_e;
  state_e state;
  logic   ready;

  always_comb begin
    ready = &arrived;
    for (int i = 0; i < M; i++)
      if (fill[i] < need[i]) ready = 1'b0;
  end

  assign start  = (state == C_WAIT) && ready && !arm;
  assign synced = (state == C_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_IDLE;
      wait_cycles <= '0;
    end else if (arm) begin
      state       <= C_WAIT;
      wait_cycles <= '0;
    end else if (state == C_WAIT) begin
      if (ready) state <= C_RUN;
      else if (|arrived) wait_cycles <= wait_cycles + 1;
    end
  end

endmodule
