// tb_gbit_correlator: end-to-end test of the correlator at reduced size (2 channels, 128 lags, small buffers).
//
// Both stations send, per channel, two stray words, the agreed time code,
// then data with one more time code inside it; station Y starts 7
// clocks later, so the synchronization has to wait for it. Station Y's data
// are station X's delayed by exactly the model delay, so with correct delay
// tracking every channel's strongest lag is the zero-delay lag L/2. The delay polynomial rises at up to 0.9 sample per word and falls
// back (quadratic), so the delay tracker shifts both ways and its counter
// wraps both ways (word skip and word hold); channel phases turn in opposite
// directions. The reference model computes, from the polynomials directly,
// every sample's integer delay and fringe phase (with the 90-degree jump of
// each delay step), the tracked Y data and the switching codes, and the
// expected value of every lag of every channel. The test counts how often
// each mechanism happened and fails when one never did. The station-side
// formatter is run in 1-channel 2-bit mode and its time code insertion is
// checked.
module tb_gbit_correlator;
  import corr_pkg::*;
  localparam int     N        = 64;
  localparam int     NCH      = 2;
  localparam int     L        = 128;
  localparam int     ACC_W    = 40;
  localparam longint BUF_BITS = 64 * 1024;
  localparam int     PW       = 64;
  localparam int     FRAC     = 32;
  localparam int     FMT_P    = 8;
  localparam int     FMT_TPS  = 16;
  localparam int     K        = 400;          // words to correlate
  localparam int     YLAG     = 7;
  localparam int     NDATA    = K + 40 + 0;  // data words per stream
  localparam int     TC_AT    = 10;         // mid-stream time code after data word

  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] x_valid, y_valid;
  logic [2*N-1:0] x_word [NCH], y_word [NCH];
  logic coef_load = 0, arm = 0, acc_en = 0, acc_clear = 0;
  logic signed [PW-1:0] delay_coef [5];
  logic signed [PW-1:0] phase_coef [NCH][5];
  time_code_t start_tc;
  logic [$clog2(NCH)-1:0] rd_ch;
  logic [$clog2(L)-1:0] rd_lag;
  logic signed [ACC_W-1:0] rd_re, rd_im;
  logic [2*NCH-1:0] arrived;
  logic synced, running, buf_error, bit_shift, word_skip, word_hold;
  logic [31:0] sync_wait_cycles;
  logic [NCH-1:0] phase_step, corr_active;
  logic fmt_rtc_set = 0, fmt_q2 = 1, fmt_in_valid = 0;
  time_code_t fmt_rtc_value, fmt_rtc_now;
  logic [1:0] fmt_nch_mode = 2'd0;
  logic [4*FMT_P*2-1:0] fmt_in_samples;
  logic fmt_out_valid, fmt_out_is_tc;
  logic [127:0] fmt_out_word;

  gbit_correlator #(.N(N), .NCH(NCH), .L(L), .ACC_W(ACC_W), .BUF_BITS(BUF_BITS), .PW(PW), .FRAC(FRAC),
    .FMT_P(FMT_P), .FMT_TICKS_PER_SEC(FMT_TPS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_up = 0, n_dn = 0, n_skip = 0, n_hold = 0, n_pstep = 0, n_words = 0;
  int n_fmt_tc = 0, n_fmt_data = 0;
  int wait_seen = 0;

  initial begin
    #(200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus data and polynomials ----------------
  logic [1:0] xs [NCH][NDATA*N];
  logic [1:0] ys [NCH][NDATA*N];
  localparam longint D0 = ((longint'(2*N) + 5) <<< 32) + 64'sd1288490188;  // 2N+5.3
  localparam longint R  = 64'sd3865470566;   // 0.9 sample per word
  localparam longint A  = R / longint'(K);   // turns around at K/2
  localparam longint PF [2] = '{64'sd1288490188, -64'sd858993459};  // +0.3, -0.2 x pi/8
  function automatic longint dly(longint k); return D0 + R*k - A*k*k; endfunction
  function automatic longint ph(int c, longint k);
    return (longint'(c) + 1 <<< 32) + PF[c % 2] * k;
  endfunction
  function automatic int lvl(logic [1:0] s);
    return (s[1] ? -1 : 1) * (s[0] ? 3 : 1);
  endfunction

  time_code_t t0, t1;

  function automatic logic [2*N-1:0] word_of(logic [1:0] s [NDATA*N], int w);
    logic [2*N-1:0] r;
    for (int i = 0; i < N; i++) r[2*i +: 2] = s[w*N + i];
    return r;
  endfunction

  // element j of a station's sequence: 2 stray words, t0, data with t1
  // after data word TC_AT
  function automatic logic [2*N-1:0] seq_word(logic [1:0] s [NDATA*N], int j, output logic v);
    v = 1;
    if (j < 2) return {2*N/32{32'hBAD0_0000 + 32'(j)}};
    if (j == 2) return {SYNC_CODE, 26'd0, t0};
    if (j == 3 + TC_AT) return {SYNC_CODE, 26'd0, t1};
    if (j > 3 + TC_AT) j = j - 1;
    if (j - 3 >= NDATA) begin v = 0; return '0; end
    return word_of(s, j - 3);
  endfunction

  // ---------------- reference model ----------------
  longint ere [NCH][L], eim [NCH][L];
  logic [1:0] xt [NCH][K*N], yt [NCH][K*N], ct [NCH][K*N];

  function automatic logic [1:0] code_of(int p16);
    case (((p16 + 2) / 4) % 4)
      0: return 2'b00;
      1: return 2'b11;
      2: return 2'b10;
      default: return 2'b01;
    endcase
  endfunction

  task automatic build_reference();
    for (int k = 0; k < K; k++) begin
      longint dk, dk1;
      dk = dly(k); dk1 = dly(k + 1);
      for (int i = 0; i < N; i++) begin
        longint d;
        d = (dk * N + (dk1 - dk) * i) >>> (FRAC + $clog2(N));
        for (int c = 0; c < NCH; c++) begin
          longint pk, pk1, p;
          pk = ph(c, k); pk1 = ph(c, k + 1);
          p = (pk * N + (pk1 - pk) * i) >>> (FRAC + $clog2(N));
          xt[c][k*N + i] = xs[c][k*N + i];
          yt[c][k*N + i] = ys[c][k*N + i + int'(d)];
          ct[c][k*N + i] = code_of(int'((p + 4 * (d % 4)) % 16 + 16) % 16);
        end
      end
    end
    for (int c = 0; c < NCH; c++)
      for (int l = 0; l < L; l++) begin ere[c][l] = 0; eim[c][l] = 0; end
    for (int c = 0; c < NCH; c++)
      for (int w = L / N; w < K; w++)
        for (int i = 0; i < N; i++) begin
          int u;
          u = w*N + i - L/2;
          for (int l = 0; l < L; l++) begin
            int pr;
            pr = lvl(xt[c][u]) * lvl(yt[c][u + l - L/2]);
            case (ct[c][u])
              2'b00: ere[c][l] += pr;
              2'b10: ere[c][l] -= pr;
              2'b01: eim[c][l] += pr;
              default: eim[c][l] -= pr;
            endcase
          end
        end
  endtask

  // ---------------- event counters ----------------
  always @(posedge clk) if (rst_n) begin
    if (bit_shift && dut.d_up) n_up++;
    if (bit_shift && !dut.d_up) n_dn++;
    if (word_skip) n_skip++;
    if (word_hold) n_hold++;
    if (|phase_step) n_pstep++;
    if (dut.g_ch[0].u_corr.in_valid) n_words++;
    if (fmt_out_valid && fmt_out_is_tc) n_fmt_tc++;
    if (fmt_out_valid && !fmt_out_is_tc) n_fmt_data++;
  end

  // accumulate exactly K tracked words
  logic err_seen = 0;
  always @(negedge clk) begin
    acc_en <= (n_words < K);
    if (n_words <= K && buf_error) err_seen <= 1;
  end

  // ---------------- stream drivers ----------------
  int cyc = 0;
  always @(negedge clk) if (rst_n && synced_or_armed) begin
    for (int c = 0; c < NCH; c++) begin
      logic v;
      x_word[c] = seq_word(xs[c], cyc, v);
      x_valid[c] = v;
      if (cyc >= YLAG) begin
        y_word[c] = seq_word(ys[c], cyc - YLAG, v);
        y_valid[c] = v;
      end else begin
        y_word[c] = '0;
        y_valid[c] = 0;
      end
    end
    cyc++;
  end
  logic synced_or_armed = 0;

  initial begin
    x_valid = '0; y_valid = '0;
    for (int c = 0; c < NCH; c++) begin x_word[c] = '0; y_word[c] = '0; end
    t0 = '{year: 12'd2002, day: 9'd40, hour: 5'd12, minute: 6'd0, second: 6'd0};
    t1 = t0; t1.second = 6'd1;
    start_tc = t0;
    rd_ch = '0; rd_lag = '0;
    fmt_rtc_value = t0; fmt_in_samples = '0;
    for (int c = 0; c < NCH; c++)
      for (int j = 0; j < NDATA*N; j++) begin
        xs[c][j] = 2'($urandom);
        ys[c][j] = 2'($urandom);
      end
    for (int k = 0; k < K; k++)
      for (int i = 0; i < N; i++) begin
        longint d;
        d = (dly(k) * N + (dly(k + 1) - dly(k)) * i) >>> (FRAC + $clog2(N));
        for (int c = 0; c < NCH; c++) ys[c][k*N + i + int'(d)] = xs[c][k*N + i];
      end
    delay_coef = '{dly(0), dly(1) - dly(0), -2*A, 0, 0};
    for (int c = 0; c < NCH; c++) phase_coef[c] = '{ph(c, 0), ph(c, 1) - ph(c, 0), 0, 0, 0};
    build_reference();

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); coef_load = 1;
    @(negedge clk); coef_load = 0; arm = 1;
    @(negedge clk); arm = 0; synced_or_armed = 1;
    // station-side formatter: one channel, 2 bits, runs alongside
    fmt_rtc_set = 1;
    @(negedge clk); fmt_rtc_set = 0; fmt_in_valid = 1;

    wait (n_words >= K);
    repeat (4) @(negedge clk);
    fmt_in_valid = 0;
    checks++; if (!synced) failures++;
    wait_seen = sync_wait_cycles;
    // re-arming stops the run; the accumulators keep their values
    synced_or_armed = 0;
    arm = 1;
    @(negedge clk); arm = 0;

    for (int c = 0; c < NCH; c++) begin
      longint best;
      int best_l;
      best = -1; best_l = -1;
      for (int l = 0; l < L; l++) begin
        rd_ch = $clog2(NCH)'(c);
        rd_lag = $clog2(L)'(l);
        #1;
        checks++;
        if (rd_re !== ACC_W'(ere[c][l]) || rd_im !== ACC_W'(eim[c][l])) begin
          failures++;
          if (failures < 10)
            $display("ch %0d lag %0d: %0d,%0d want %0d,%0d", c, l, rd_re, rd_im, ere[c][l], eim[c][l]);
        end
        if (longint'(rd_re) * rd_re + longint'(rd_im) * rd_im > best) begin
          best = longint'(rd_re) * rd_re + longint'(rd_im) * rd_im;
          best_l = l;
        end
      end
      $display("channel %0d: peak at lag %0d (zero delay at %0d)", c, best_l, L/2);
      checks++;
      if (best_l != L/2) failures++;
    end

    checks++; if (err_seen) begin failures++; $display("buffer error"); end
    $display("sync wait %0d, shifts up %0d down %0d, skips %0d, holds %0d, phase steps %0d, formatter tc %0d data %0d",
             wait_seen, n_up, n_dn, n_skip, n_hold, n_pstep, n_fmt_tc, n_fmt_data);
    checks++; if (wait_seen == 0) begin failures++; $display("no synchronization wait"); end
    checks++; if (n_up == 0 || n_dn == 0) begin failures++; $display("no delay step in one direction"); end
    checks++; if (n_skip == 0) begin failures++; $display("no word skip"); end
    checks++; if (n_hold == 0) begin failures++; $display("no word hold"); end
    checks++; if (n_pstep == 0) begin failures++; $display("no phase step"); end
    checks++; if (n_fmt_tc == 0 || n_fmt_data == 0) begin failures++; $display("formatter idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
