// delay_tracker: delay tracking in one-sample steps on parallel data.
//
// Two parallel shift registers hold consecutive words of one station: A (the
// older word) and B (the newer one). A parallel data selector takes N
// consecutive samples out of the window {B, A} at an offset given by the
// control counter `s` and writes them to the output register Y. When the
// bit-select control register reports a bit shift (`shift`), the samples
// whose `bsel` bit is set are taken one sample later (`up`) or earlier, and
// the control counter is incremented or decremented on the same clock.
// When the counter passes its maximum it returns to zero and two new words
// are loaded at once (one input word is skipped, adv=2); when it passes zero
// it is set to its maximum and no word is loaded (adv=0). Otherwise one word
// is loaded per clock (adv=1): B moves to A and the buffer word enters B.
// The window carries one more sample, the last sample of the word before A,
// so that a negative shift at counter zero stays inside the window.
//
// Interface: w0/w1 are the next two unread buffer words; adv tells the buffer
// how many of them were consumed this clock. `load` fills A/B from w0/w1 and
// sets the counter to s_init. With `run` high, Y is written every clock and
// y_valid follows one clock later. Samples are QB bits, sample 0 in the LSBs.
// The A/B registers, the counter and the wrap rules follow the design
// description; the extra guard sample and the adv handshake are this design's
// own choices.
module delay_tracker #(
  parameter int N  = 64,
  parameter int QB = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [$clog2(N)-1:0] s_init,
  input  logic              run,
  input  logic              shift,
  input  logic              up,
  input  logic [N-1:0]      bsel,
  input  logic [N*QB-1:0]   w0,
  input  logic [N*QB-1:0]   w1,
  output logic [1:0]        adv,
  output logic [N*QB-1:0]   y,
  output logic              y_valid,
  output logic [$clog2(N)-1:0] ctrl_count,
  output logic              skip_evt,
  output logic              hold_evt
);

  localparam int SW = $clog2(N);

  logic [N*QB-1:0] reg_a, reg_b;
  logic [QB-1:0]   guard;
  logic [SW-1:0]   s;
  logic [(2*N+1)*QB-1:0] win;
  logic [N*QB-1:0] sel;
  logic            wrap_up, wrap_dn;

  assign win = {reg_b, reg_a, guard};

  always_comb begin
    for (int i = 0; i < N; i++) begin
      int idx;
      idx = 1 + int'(s) + i;
      if (shift && bsel[i]) idx = up ? idx + 1 : idx - 1;
      sel[i*QB +: QB] = win[idx*QB +: QB];
    end
  end

  assign wrap_up = run && shift && up && (s == SW'(N-1));
  assign wrap_dn = run && shift && !up && (s == '0);

  always_comb begin
    if (load)          adv = 2'd2;
    else if (!run)     adv = 2'd0;
    else if (wrap_up)  adv = 2'd2;
    else if (wrap_dn)  adv = 2'd0;
    else               adv = 2'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_a   <= '0;
      reg_b   <= '0;
      guard   <= '0;
      s       <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else if (load) begin
      reg_a   <= w0;
      reg_b   <= w1;
      guard   <= '0;
      s       <= s_init;
      y_valid <= 1'b0;
    end else begin
      y_valid <= run;
      if (run) begin
        y <= sel;
        if (wrap_up) begin
          reg_a <= w0;
          reg_b <= w1;
          guard <= reg_b[(N-1)*QB +: QB];
          s     <= '0;
        end else if (wrap_dn) begin
          s     <= SW'(N-1);
        end else begin
          reg_a <= reg_b;
          reg_b <= w0;
          guard <= reg_a[(N-1)*QB +: QB];
          if (shift) s <= up ? s + 1'b1 : s - 1'b1;
        end
      end
    end
  end

  assign ctrl_count = s;
  assign skip_evt   = wrap_up;
  assign hold_evt   = wrap_dn;

endmodule
