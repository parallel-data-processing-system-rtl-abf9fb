// atm_formatter: station-side formatter of the ATM interface unit.
//
// The sampler delivers, per data clock, P samples of each of 4 channels, 2
// bits per sample (sign in bit 1, magnitude in bit 0). The formatter keeps
// 1, 2 or 4 channels (`nch_mode` 0/1/2: channel 0, channels 0-1, all four)
// and 1 or 2 bits per sample (`q2`: 0 = sign bit only), and packs the kept
// bits into 128-bit output words, time-major: sample 0 of every kept channel
// first, from bit 0 up. The output rate therefore follows the selection, in
// four steps of 8, 16, 32 or 64 bits per data clock. With one channel and 2
// bits, an output word is exactly the correlator's parallel word of 64
// samples.
//
// A real-time clock (year, day, hour, minute, second) counts TICKS_PER_SEC
// data clocks per second; `rtc_set` loads it and restarts the second and the
// packing. On the first data clock of each new second a time code word
// (corr_pkg::SYNC_CODE in the upper 64 bits, the time in the low 38 bits)
// is sent ahead of the new second's data, which starts on a word boundary.
// Because at most 64 bits arrive per clock, a data word completes at most
// every other clock and the time code always finds a free slot.
// Channel and bit selection, time code insertion and the clock's fields
// follow the design description; P = 8 (P may not exceed 8), the word layout and the calendar
// (365-day years, no leap handling) are this design's own choices.
module atm_formatter
  import corr_pkg::*;
#(
  parameter int P             = 8,
  parameter int TICKS_PER_SEC = 128_000_000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rtc_set,
  input  time_code_t       rtc_value,
  input  logic [1:0]       nch_mode,
  input  logic             q2,
  input  logic             in_valid,
  input  logic [4*P*2-1:0] in_samples,   // channel c, sample j at [(c*P+j)*2 +: 2]
  output logic             out_valid,
  output logic [127:0]     out_word,
  output logic             out_is_tc,
  output time_code_t       rtc_now
);

  localparam int MAXB = 4 * P * 2;
  localparam int TW   = $clog2(TICKS_PER_SEC);

  logic [MAXB-1:0] sel;
  logic [7:0]      nb;
  logic [127:0]    acc;
  logic [7:0]      cnt;
  logic [TW-1:0]   tick;
  logic            sec_end;
  time_code_t      t;

  // bit selection
  always_comb begin
    int k, nch;
    nch = (nch_mode == 2'd0) ? 1 : (nch_mode == 2'd1) ? 2 : 4;
    sel = '0;
    k   = 0;
    for (int j = 0; j < P; j++) begin
      for (int c = 0; c < 4; c++) begin
        if (c < nch) begin
          if (q2) begin
            sel[k +: 2] = in_samples[(c*P+j)*2 +: 2];
            k = k + 2;
          end else begin
            sel[k] = in_samples[(c*P+j)*2 + 1];
            k = k + 1;
          end
        end
      end
    end
    nb = 8'(k);
  end

  assign sec_end = (tick == TW'(TICKS_PER_SEC - 1));

  // real-time clock
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick <= '0;
      t    <= '0;
    end else if (rtc_set) begin
      tick <= '0;
      t    <= rtc_value;
    end else if (in_valid) begin
      tick <= sec_end ? '0 : tick + 1'b1;
      if (sec_end) begin
        if (t.second != 6'd59) t.second <= t.second + 1'b1;
        else begin
          t.second <= '0;
          if (t.minute != 6'd59) t.minute <= t.minute + 1'b1;
          else begin
            t.minute <= '0;
            if (t.hour != 5'd23) t.hour <= t.hour + 1'b1;
            else begin
              t.hour <= '0;
              if (t.day != 9'd365) t.day <= t.day + 1'b1;
              else begin
                t.day  <= 9'd1;
                t.year <= t.year + 1'b1;
              end
            end
          end
        end
      end
    end
  end

  assign rtc_now = t;

  // packing and time code insertion
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_is_tc <= 1'b0;
      out_word  <= '0;
    end else begin
      out_valid <= 1'b0;
      out_is_tc <= 1'b0;
      if (rtc_set) begin
        acc <= '0;
        cnt <= '0;
      end else if (in_valid) begin
        logic [127:0] nxt;
        nxt = acc | (128'(sel) << cnt);
        if (tick == '0) begin
          // first data clock of a second: announce it
          out_valid <= 1'b1;
          out_is_tc <= 1'b1;
          out_word  <= {SYNC_CODE, 26'd0, t};
        end
        if (cnt + nb == 8'd128) begin
          out_valid <= 1'b1;
          out_word  <= nxt;
          acc       <= '0;
          cnt       <= '0;
        end else begin
          acc <= nxt;
          cnt <= cnt + nb;
        end
      end
    end
  end

endmodule
