// tb_phase_jump90: random delay steps; checks each sample's quadrant offset
// (the running quadrant, moved by one for samples past the boundary) and
// the counter after each clock, including wrap-around in both directions.
module tb_phase_jump90;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, load = 0, run = 0, shift = 0, up = 0;
  logic [1:0] q_init, quadrant;
  logic [N-1:0] bsel;
  logic [2*N-1:0] qoff;
  int checks = 0, failures = 0, n_wrap_up = 0, n_wrap_dn = 0;

  phase_jump90 #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int q;   // reference quadrant, integer delay modulo 4
  initial begin
    bsel = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    q_init = 2'd3; q = 3;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0; run = 1;
    for (int k = 0; k < 400; k++) begin
      int pos;
      logic [2*N-1:0] exp_q;
      shift = ($urandom_range(0, 1) == 1);
      up = ((k / 40) % 2 == 0);
      pos = $urandom_range(0, N);
      for (int i = 0; i < N; i++) bsel[i] = (i >= pos);
      #1;
      for (int i = 0; i < N; i++)
        exp_q[2*i +: 2] = 2'((shift && bsel[i]) ? (up ? q + 1 : q + 3) : q);
      checks++;
      if (qoff !== exp_q || quadrant !== 2'(q)) begin
        failures++;
        if (failures < 10) $display("k=%0d qoff=%h want %h", k, qoff, exp_q);
      end
      if (shift) begin
        if (up && q == 3) n_wrap_up++;
        if (!up && q == 0) n_wrap_dn++;
        q = up ? (q + 1) % 4 : (q + 3) % 4;
      end
      @(negedge clk);
    end
    // run low: no change
    run = 0; shift = 1; up = 1;
    @(negedge clk);
    checks++;
    if (quadrant !== 2'(q)) failures++;
    if (n_wrap_up == 0 || n_wrap_dn == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
