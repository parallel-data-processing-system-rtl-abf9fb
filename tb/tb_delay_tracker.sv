// tb_delay_tracker: drives the tracker with a random walk of one-sample delay
// steps (long positive and negative runs, so the control counter wraps both
// ways) and checks every output sample against the input stream read at the
// per-sample delay. A word buffer model answers the two-word read port.
module tb_delay_tracker;
  localparam int N = 8, QB = 2, SW = $clog2(N);
  localparam int NW = 2000;         // words in the stream model
  logic clk = 0, rst_n = 0, load = 0, run = 0, shift = 0, up = 0;
  logic [SW-1:0] s_init;
  logic [N-1:0] bsel;
  logic [N*QB-1:0] w0, w1, y;
  logic [1:0] adv;
  logic y_valid, skip_evt, hold_evt;
  logic [SW-1:0] ctrl_count;
  int checks = 0, failures = 0, n_skip = 0, n_hold = 0, n_shift = 0;

  delay_tracker #(.N(N), .QB(QB)) dut (.*);

  always #5 clk = ~clk;

  logic [QB-1:0] stream [NW*N];
  int ptr;
  always_comb
    for (int i = 0; i < N; i++) begin
      w0[i*QB +: QB] = stream[ptr*N + i];
      w1[i*QB +: QB] = stream[(ptr+1)*N + i];
    end
  always @(posedge clk) ptr <= ptr + int'(adv);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int d;            // integer delay at the start of the current word
  int exp_d [N];
  logic [N*QB-1:0] exp_y;
  logic pend;

  initial begin
    for (int i = 0; i < NW*N; i++) stream[i] = QB'($urandom);
    ptr = 3;
    s_init = 3'd5;
    d = 3*N + 5;
    bsel = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0; run = 1;
    pend = 0;
    for (int k = 0; k < 1500; k++) begin
      int pos;
      // delay direction: alternating long runs
      shift = ($urandom_range(0, 3) != 0);
      up    = ((k / 150) % 2 == 0);
      if (k >= 1400) shift = 0;
      pos   = $urandom_range(0, N);
      for (int i = 0; i < N; i++) bsel[i] = shift && (i >= pos);
      for (int i = 0; i < N; i++) begin
        exp_d[i] = d + ((shift && bsel[i]) ? (up ? 1 : -1) : 0);
        exp_y[i*QB +: QB] = stream[k*N + i + exp_d[i]];
      end
      if (shift) begin
        d = d + (up ? 1 : -1);
        n_shift++;
      end
      @(posedge clk);
      if (skip_evt) n_skip++;
      if (hold_evt) n_hold++;
      @(negedge clk);
      checks++;
      if (!y_valid || y !== exp_y) begin
        failures++;
        if (failures < 10) $display("word %0d: y=%h want %h (d=%0d)", k, y, exp_y, d);
      end
    end
    $display("shifts=%0d skips=%0d holds=%0d", n_shift, n_skip, n_hold);
    if (n_skip == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
