// tb_builtin_controller: loads a quadratic delay (rising, then falling) and
// two linear phase polynomials of opposite sign, steps them, and checks the
// integer delay, the bit-select and phase control registers and the integer
// phase against values computed from the polynomials directly.
module tb_builtin_controller;
  localparam int N = 8, NCH = 2, PW = 64, FRAC = 32;
  logic clk = 0, rst_n = 0, coef_load = 0, step = 0;
  logic signed [PW-1:0] delay_coef [5];
  logic signed [PW-1:0] phase_coef [NCH][5];
  logic signed [PW-1:0] delay_now;
  logic [31:0] d_int;
  logic d_shift, d_up;
  logic [N-1:0] d_bsel;
  logic [NCH-1:0] p_shift, p_up;
  logic [N-1:0] p_pc [NCH];
  logic [3:0] p_int [NCH];
  int checks = 0, failures = 0, n_dup = 0, n_ddn = 0, n_pup = 0, n_pdn = 0;

  builtin_controller #(.N(N), .NCH(NCH), .PW(PW), .FRAC(FRAC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // delay(k) = D0 + R*k - A*k^2 in 2^-32 samples; phase_c(k) = P0 + F_c*k
  localparam longint D0 = 64'sd20 <<< 32;
  localparam longint R  = 64'sd3435973836;     // 0.8 sample per word
  localparam longint A  = 64'sd11453246;       // turns around at k ~ 150
  localparam longint F [NCH] = '{64'sd1288490188, -64'sd858993459};
  function automatic longint dly(longint k); return D0 + R*k - A*k*k; endfunction
  function automatic longint ph(int c, longint k); return (longint'(3) <<< 32) + F[c]*k; endfunction

  task automatic ref_reg(longint cur, longint nxt, output logic sh, output logic [N-1:0] b);
    longint fc;
    fc = cur >>> FRAC;
    sh = (nxt >>> FRAC) != fc;
    for (int i = 0; i < N; i++)
      b[i] = sh && (((cur * N + (nxt - cur) * i) >>> (FRAC + $clog2(N))) != fc);
  endtask

  initial begin
    delay_coef = '{dly(0), dly(1) - dly(0), -2*A, 0, 0};
    for (int c = 0; c < NCH; c++) phase_coef[c] = '{ph(c, 0), F[c], 0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); coef_load = 1;
    @(negedge clk); coef_load = 0; step = 1;
    for (int k = 0; k < 300; k++) begin
      logic sh;
      logic [N-1:0] b;
      ref_reg(dly(k), dly(k+1), sh, b);
      checks++;
      if (d_int !== 32'(dly(k) >>> FRAC) || d_shift !== sh || d_bsel !== b ||
          (sh && d_up !== (dly(k+1) > dly(k)))) begin
        failures++;
        if (failures < 10) $display("k=%0d delay: int %0d shift %b bsel %b", k, d_int, d_shift, d_bsel);
      end
      if (sh && d_up) n_dup++;
      if (sh && !d_up) n_ddn++;
      for (int c = 0; c < NCH; c++) begin
        ref_reg(ph(c, k), ph(c, k+1), sh, b);
        checks++;
        if (p_int[c] !== 4'(ph(c, k) >>> FRAC) || p_shift[c] !== sh || p_pc[c] !== b) begin
          failures++;
          if (failures < 10) $display("k=%0d phase %0d: int %0d shift %b pc %b", k, c, p_int[c], p_shift[c], p_pc[c]);
        end
        if (sh && p_up[c]) n_pup++;
        if (sh && !p_up[c]) n_pdn++;
      end
      @(negedge clk);
    end
    $display("delay up %0d down %0d, phase up %0d down %0d", n_dup, n_ddn, n_pup, n_pdn);
    if (n_dup == 0 || n_ddn == 0 || n_pup == 0 || n_pdn == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
