// gbit_correlator: two-station, multi-channel VLBI correlator that works on
// parallel data.
//
// Samples arrive N per parallel data clock and channel, from station X and
// from station Y, each stream with time codes inserted. Per channel and
// station a sync_buffer stores the data from the agreed time code on; the
// sync_controller starts all of them together once every station's time code
// is in and the buffers hold enough words. From the clock after the start
// the built-in controller steps the a-priori delay and fringe phase
// polynomials once per clock. Station Y goes through a delay_tracker that
// follows the delay in one-sample steps inside the parallel word (the
// initial whole-word delay is taken up by the buffer's read offset); station
// X goes through an identical tracker that never shifts, so both outputs are
// registered alike. The 90-degree phase jump that goes with each delay step
// is applied by phase_jump90, and fringe_rotator turns phase and jumps into
// one fringe switching code per sample. Each channel's lag_correlator then
// accumulates L complex lags.
//
// The station-side formatter of the ATM interface unit stands beside the
// correlator with its own ports: in a real system its words reach the
// correlator's station inputs over the ATM line (same clock assumed here).
//
// Host interface: load the polynomials (`coef_load`), pulse `arm` with the
// start time code, stream the station data, set `acc_en`; read the lags
// through rd_ch/rd_lag. The delay must be non-negative at the start and
// change by less than one sample per clock; each phase by less than pi/8.
// Timing: start -> buffers present words (1 clock) -> trackers load (1 clock)
// -> `running`; results reach the accumulators one clock after a word is
// tracked, and the first L/N tracked words only fill the lag histories.
// The structure follows the design description; the single clock for the
// whole correlator, the host interface and the start margin (START_MARGIN words, which
// the buffers must hold beyond the initial delay before readout starts) are
// this design's own choices.
module gbit_correlator
  import corr_pkg::*;
#(
  parameter int     N        = N_PAR,
  parameter int     NCH      = 4,
  parameter int     L        = 1024,
  parameter int     ACC_W    = 40,
  parameter longint BUF_BITS = 64 * 1024 * 1024,
  parameter int     PW       = 64,
  parameter int     FRAC     = 32,
  parameter int     START_MARGIN = 16,
  parameter int     FMT_P    = 8,
  parameter int     FMT_TICKS_PER_SEC = 128_000_000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // station data, one word of N 2-bit samples per channel
  input  logic [NCH-1:0]          x_valid,
  input  logic [2*N-1:0]          x_word [NCH],
  input  logic [NCH-1:0]          y_valid,
  input  logic [2*N-1:0]          y_word [NCH],
  // host control
  input  logic                    coef_load,
  input  logic signed [PW-1:0]    delay_coef [5],
  input  logic signed [PW-1:0]    phase_coef [NCH][5],
  input  logic                    arm,
  input  time_code_t              start_tc,
  input  logic                    acc_en,
  input  logic                    acc_clear,
  input  logic [$clog2(NCH)-1:0]  rd_ch,
  input  logic [$clog2(L)-1:0]    rd_lag,
  output logic signed [ACC_W-1:0] rd_re,
  output logic signed [ACC_W-1:0] rd_im,
  // status
  output logic [2*NCH-1:0]        arrived,
  output logic                    synced,
  output logic                    running,
  output logic [31:0]             sync_wait_cycles,
  output logic                    buf_error,
  output logic                    bit_shift,
  output logic                    word_skip,
  output logic                    word_hold,
  output logic [NCH-1:0]          phase_step,
  output logic [NCH-1:0]          corr_active,
  // station-side ATM interface formatter, its output goes to the ATM line
  input  logic                    fmt_rtc_set,
  input  time_code_t              fmt_rtc_value,
  input  logic [1:0]              fmt_nch_mode,
  input  logic                    fmt_q2,
  input  logic                    fmt_in_valid,
  input  logic [4*FMT_P*2-1:0]    fmt_in_samples,
  output logic                    fmt_out_valid,
  output logic [127:0]            fmt_out_word,
  output logic                    fmt_out_is_tc,
  output time_code_t              fmt_rtc_now
);

  localparam int SW  = $clog2(N);
  localparam int NB  = 2 * NCH;      // buffers: X channels, then Y channels

  // ---------------- built-in controller ----------------
  logic signed [PW-1:0] delay_now;
  logic [31:0]          d_int;
  logic                 d_shift, d_up;
  logic [N-1:0]         d_bsel;
  logic [NCH-1:0]       p_shift, p_up;
  logic [N-1:0]         p_pc  [NCH];
  logic [3:0]           p_int [NCH];

  builtin_controller #(.N(N), .NCH(NCH), .PW(PW), .FRAC(FRAC)) u_ctrl (
    .clk, .rst_n, .coef_load, .delay_coef, .phase_coef, .step(running),
    .delay_now, .d_int, .d_shift, .d_up, .d_bsel,
    .p_shift, .p_up, .p_pc, .p_int
  );

  logic [31:0] y_offset;
  assign y_offset = d_int >> SW;

  // ---------------- data synchronization ----------------
  logic [31:0] fill [NB];
  logic [31:0] need [NB];
  logic [NB-1:0] uf, ovf, rd_first;
  logic        start;

  for (genvar b = 0; b < NB; b++) begin : g_need
    if (b < NCH) begin : g_x
      assign need[b] = 32'(START_MARGIN);
    end else begin : g_y
      assign need[b] = y_offset + 32'(START_MARGIN);
    end
  end

  sync_controller #(.M(NB)) u_sync (
    .clk, .rst_n, .arm, .arrived, .fill, .need,
    .start, .synced, .wait_cycles(sync_wait_cycles)
  );

  logic [1:0]     x_adv [NCH];
  logic [1:0]     y_adv [NCH];
  logic [2*N-1:0] xw0 [NCH], xw1 [NCH], yw0 [NCH], yw1 [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_buf
    sync_buffer #(.N(N), .QB(QBITS), .BUF_BITS(BUF_BITS)) u_xbuf (
      .clk, .rst_n, .arm, .start_tc, .in_valid(x_valid[c]), .in_word(x_word[c]),
      .arrived(arrived[c]), .tc_seen(), .start, .start_offset(32'd0),
      .rd_adv(x_adv[c]), .w0(xw0[c]), .w1(xw1[c]), .rd_first(rd_first[c]),
      .fill(fill[c]), .underflow(uf[c]), .overflow(ovf[c])
    );
    sync_buffer #(.N(N), .QB(QBITS), .BUF_BITS(BUF_BITS)) u_ybuf (
      .clk, .rst_n, .arm, .start_tc, .in_valid(y_valid[c]), .in_word(y_word[c]),
      .arrived(arrived[NCH+c]), .tc_seen(), .start, .start_offset(y_offset),
      .rd_adv(y_adv[c]), .w0(yw0[c]), .w1(yw1[c]), .rd_first(rd_first[NCH+c]),
      .fill(fill[NCH+c]), .underflow(uf[NCH+c]), .overflow(ovf[NCH+c])
    );
  end

  assign buf_error = |uf || |ovf;

  // ---------------- run control ----------------
  logic load;
  assign load = rd_first[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    running <= 1'b0;
    else if (arm)  running <= 1'b0;
    else if (load) running <= 1'b1;
  end

  // ---------------- 90-degree phase jump (shared by all channels) ----------
  logic [2*N-1:0] qoff;

  phase_jump90 #(.N(N)) u_jump (
    .clk, .rst_n, .load, .q_init(d_int[1:0]), .run(running),
    .shift(d_shift), .up(d_up), .bsel(d_bsel), .qoff, .quadrant()
  );

  // ---------------- per channel: trackers, fringe rotation, correlation ----
  logic [NCH-1:0] skip_c, hold_c;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic [2*N-1:0] xt, yt, codes;
    logic           xv, yv, cv;

    delay_tracker #(.N(N), .QB(QBITS)) u_xtrk (
      .clk, .rst_n, .load, .s_init('0), .run(running),
      .shift(1'b0), .up(1'b0), .bsel('0),
      .w0(xw0[c]), .w1(xw1[c]), .adv(x_adv[c]), .y(xt), .y_valid(xv),
      .ctrl_count(), .skip_evt(), .hold_evt()
    );

    delay_tracker #(.N(N), .QB(QBITS)) u_ytrk (
      .clk, .rst_n, .load, .s_init(d_int[SW-1:0]), .run(running),
      .shift(d_shift), .up(d_up), .bsel(d_bsel),
      .w0(yw0[c]), .w1(yw1[c]), .adv(y_adv[c]), .y(yt), .y_valid(yv),
      .ctrl_count(), .skip_evt(skip_c[c]), .hold_evt(hold_c[c])
    );

    fringe_rotator #(.N(N)) u_rot (
      .clk, .rst_n, .run(running), .p_int(p_int[c]),
      .pshift(p_shift[c]), .pup(p_up[c]), .pc(p_pc[c]), .qoff,
      .codes, .codes_valid(cv)
    );

    logic signed [ACC_W-1:0] re, im;
    lag_correlator #(.N(N), .L(L), .ACC_W(ACC_W)) u_corr (
      .clk, .rst_n, .in_valid(xv && yv && cv), .x(xt), .y(yt), .codes,
      .acc_en, .acc_clear, .hist_full(corr_active[c]),
      .rd_lag, .rd_re(re), .rd_im(im)
    );
  end

  // lag readout multiplexer
  logic signed [ACC_W-1:0] re_all [NCH];
  logic signed [ACC_W-1:0] im_all [NCH];
  for (genvar c = 0; c < NCH; c++) begin : g_rd
    assign re_all[c] = g_ch[c].re;
    assign im_all[c] = g_ch[c].im;
  end
  assign rd_re = re_all[rd_ch];
  assign rd_im = im_all[rd_ch];

  assign bit_shift  = running && d_shift;
  assign word_skip  = skip_c[0];
  assign word_hold  = hold_c[0];
  assign phase_step = {NCH{running}} & p_shift;

  // ---------------- station side: ATM interface formatter ----------------
  atm_formatter #(.P(FMT_P), .TICKS_PER_SEC(FMT_TICKS_PER_SEC)) u_fmt (
    .clk, .rst_n, .rtc_set(fmt_rtc_set), .rtc_value(fmt_rtc_value),
    .nch_mode(fmt_nch_mode), .q2(fmt_q2), .in_valid(fmt_in_valid),
    .in_samples(fmt_in_samples), .out_valid(fmt_out_valid),
    .out_word(fmt_out_word), .out_is_tc(fmt_out_is_tc), .rtc_now(fmt_rtc_now)
  );

endmodule
