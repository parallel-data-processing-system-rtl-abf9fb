// tb_lag_correlator: random X, Y and fringe codes; the reference keeps the
// whole sample history and, for every accumulated word, adds
// x(u)*y(u+l-L/2), routed by code(u), for all L lags. Checks every lag after
// two integrations and checks that acc_clear empties the accumulators.
module tb_lag_correlator;
  localparam int N = 8, L = 32, ACC_W = 40;
  localparam int K = 60;
  logic clk = 0, rst_n = 0, in_valid = 0, acc_en = 0, acc_clear = 0;
  logic [2*N-1:0] x, y, codes;
  logic hist_full;
  logic [$clog2(L)-1:0] rd_lag;
  logic signed [ACC_W-1:0] rd_re, rd_im;
  int checks = 0, failures = 0;

  lag_correlator #(.N(N), .L(L), .ACC_W(ACC_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] xs [K*N], ys [K*N], cs [K*N];
  longint ere [L], eim [L];

  function automatic int lvl(logic [1:0] s);
    return (s[1] ? -1 : 1) * (s[0] ? 3 : 1);
  endfunction

  task automatic check_all(string tag);
    for (int l = 0; l < L; l++) begin
      rd_lag = 5'(l);
      #1;
      checks++;
      if (rd_re !== ACC_W'(ere[l]) || rd_im !== ACC_W'(eim[l])) begin
        failures++;
        if (failures < 10) $display("%s lag %0d: %0d,%0d want %0d,%0d", tag, l, rd_re, rd_im, ere[l], eim[l]);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < K*N; t++) begin
      xs[t] = 2'($urandom); ys[t] = 2'($urandom); cs[t] = 2'($urandom);
      if (t >= 200 && t < 260) ys[t] = xs[t];   // a correlated stretch
    end
    for (int l = 0; l < L; l++) begin ere[l] = 0; eim[l] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    acc_en = 1;
    for (int w = 0; w < K; w++) begin
      @(negedge clk);
      in_valid = 1;
      for (int i = 0; i < N; i++) begin
        x[2*i +: 2] = xs[w*N+i];
        y[2*i +: 2] = ys[w*N+i];
        codes[2*i +: 2] = cs[w*N+i];
      end
      acc_en = (w != 20);
      // reference: accumulated when the history is full
      if (w >= L / N && acc_en) begin
        for (int i = 0; i < N; i++) begin
          int u;
          u = w*N + i - L/2;
          for (int l = 0; l < L; l++) begin
            int p;
            p = lvl(xs[u]) * lvl(ys[u + l - L/2]);
            case (cs[u])
              2'b00: ere[l] += p;
              2'b10: ere[l] -= p;
              2'b01: eim[l] += p;
              default: eim[l] -= p;
            endcase
          end
        end
      end
      if (w == 40) begin
        @(posedge clk); #1;
        in_valid = 0;
        check_all("mid");
      end
    end
    @(negedge clk);
    in_valid = 0;
    check_all("end");
    checks++;
    if (!hist_full) failures++;
    acc_clear = 1;
    @(negedge clk);
    acc_clear = 0;
    for (int l = 0; l < L; l++) begin ere[l] = 0; eim[l] = 0; end
    check_all("clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
