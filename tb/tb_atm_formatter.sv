// tb_atm_formatter: a short "second" of 32 data clocks. For every channel and
// bit selection, checks each output word against a reference packing of the
// input samples, checks that a time code word precedes every second's data,
// and checks the real-time clock's roll-over into a new year.
module tb_atm_formatter;
  import corr_pkg::*;
  localparam int P = 8, TPS = 32;
  logic clk = 0, rst_n = 0, rtc_set = 0, q2 = 0, in_valid = 0;
  time_code_t rtc_value, rtc_now;
  logic [1:0] nch_mode;
  logic [4*P*2-1:0] in_samples;
  logic out_valid, out_is_tc;
  logic [127:0] out_word;
  int checks = 0, failures = 0, n_tc = 0, n_data = 0;

  atm_formatter #(.P(P), .TICKS_PER_SEC(TPS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference bit stream of the kept bits
  logic ref_bits [$];
  time_code_t exp_t;
  int tick;

  always @(negedge clk) if (rst_n && out_valid) begin
    if (out_is_tc) begin
      n_tc++;
      checks++;
      // only the first clocks of the new second may be pending (no full word)
      if (out_word !== {SYNC_CODE, 26'd0, exp_t} || ref_bits.size() > 128) begin
        failures++;
        $display("time code %h want %h (pending bits %0d)", out_word[37:0], exp_t, ref_bits.size());
      end
    end else begin
      logic [127:0] w;
      n_data++;
      for (int b = 0; b < 128; b++) w[b] = ref_bits.pop_front();
      checks++;
      if (out_word !== w) begin
        failures++;
        if (failures < 10) $display("data %h want %h", out_word, w);
      end
    end
  end

  task automatic run_mode(logic [1:0] m, logic q, int clocks);
    int nch;
    nch = (m == 0) ? 1 : (m == 1) ? 2 : 4;
    @(negedge clk);
    nch_mode = m; q2 = q;
    rtc_set = 1;
    rtc_value = '{year: 12'd2001, day: 9'd365, hour: 5'd23, minute: 6'd59, second: 6'd58};
    exp_t = rtc_value;
    @(negedge clk);
    rtc_set = 0;
    tick = 0;
    for (int k = 0; k < clocks; k++) begin
      in_valid = 1;
      in_samples = {$urandom, $urandom};
      if (tick == 0 && k != 0) begin
        // next second
        if (exp_t.second == 59) begin
          exp_t.second = 0;
          exp_t.minute = 0; exp_t.hour = 0; exp_t.day = 1; exp_t.year = exp_t.year + 1;
        end else exp_t.second = exp_t.second + 1;
      end
      for (int j = 0; j < P; j++)
        for (int c = 0; c < nch; c++) begin
          // 2-bit: bit 0 then bit 1 of the sample; 1-bit: the sign only
          if (q) ref_bits.push_back(in_samples[(c*P+j)*2]);
          ref_bits.push_back(in_samples[(c*P+j)*2 + 1]);
        end
      tick = (tick + 1) % TPS;
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    nch_mode = 0; rtc_value = '0; in_samples = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++)
      for (int q = 0; q < 2; q++) begin
        ref_bits.delete();
        run_mode(2'(m), 1'(q), 3 * TPS);
        checks++;
        if (ref_bits.size() != 0) failures++;
      end
    checks++;
    if (rtc_now.year != 12'd2002 || rtc_now.day != 9'd1 || rtc_now.second != 6'd1) begin
      failures++;
      $display("rtc %p", rtc_now);
    end
    $display("time codes %0d data words %0d", n_tc, n_data);
    if (n_tc != 18) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
