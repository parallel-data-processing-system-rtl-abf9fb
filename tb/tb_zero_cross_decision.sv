// tb_zero_cross_decision: compares the 0...01...1 control register with an
// exact per-sample reference: sample i is shifted when the floor of the
// linearly interpolated value cur + (nxt-cur)*i/N differs from floor(cur).
module tb_zero_cross_decision;
  localparam int N = 64, W = 64, FRAC = 32;
  logic signed [W-1:0] cur, nxt;
  logic shift, up;
  logic [$clog2(N+1)-1:0] pos;
  logic [N-1:0] bsel;
  int checks = 0, failures = 0, n_up = 0, n_dn = 0, n_full = 0;

  zero_cross_decision #(.N(N), .W(W), .FRAC(FRAC)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint c, longint d);
    logic [N-1:0] exp_b;
    logic exp_shift;
    longint fc, fi;
    cur = c; nxt = c + d;
    #1;
    fc = c >>> FRAC;
    exp_shift = ((c + d) >>> FRAC) != fc;
    for (int i = 0; i < N; i++) begin
      fi = (c * N + d * i) >>> (FRAC + $clog2(N));
      exp_b[i] = exp_shift && (fi != fc);
    end
    checks++;
    if (shift !== exp_shift || bsel !== exp_b || (exp_shift && up !== (d > 0))) begin
      failures++;
      if (failures < 10)
        $display("cur=%0d d=%0d: shift %b bsel %h up %b, want %b %h", c, d, shift, bsel, up, exp_shift, exp_b);
    end
    if (exp_shift && d > 0) n_up++;
    if (exp_shift && d < 0) n_dn++;
    if (exp_shift && exp_b == '0) n_full++;
  endtask

  initial begin
    for (int t = 0; t < 20000; t++) begin
      longint c, d;
      c = (longint'($urandom) << 8) ^ longint'($urandom);
      c = c - (longint'(1) << 38);
      d = longint'($urandom_range(0, 32'hFFFF_FFFE)) - (longint'(1) << 31);
      if (t % 4 == 0) d = d / 256;
      // put the crossing near an integer boundary half of the time
      if (t % 2 == 0) c = ((c >>> FRAC) << FRAC) - d / 2;
      check(c, d);
    end
    // exact corner: landing exactly on the integer at the next word
    check(64'sh0000_0004_C000_0000, 64'sh0000_0000_4000_0000);
    check(64'sh0000_0005_0000_0000, -64'sh0000_0000_0000_0001);
    $display("up=%0d down=%0d no-sample-shift=%0d", n_up, n_dn, n_full);
    if (n_up == 0 || n_dn == 0 || n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
