// tb_fringe_rotator: random phases, phase control registers and quadrant
// offsets; the reference turns each sample's phase into an angle, picks the
// nearest of 0/90/180/270 degrees (ties to the larger angle) and maps it to
// the switching code of a product multiplied by exp(-j*angle).
module tb_fringe_rotator;
  import corr_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, run = 0, pshift = 0, pup = 0;
  logic [3:0] p_int;
  logic [N-1:0] pc;
  logic [2*N-1:0] qoff, codes;
  logic codes_valid;
  int checks = 0, failures = 0;
  int seen [4];

  fringe_rotator #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] ref_code(int p16);
    real ang;
    int quad;
    ang  = real'(p16) * 22.5;
    quad = int'($floor(ang / 90.0 + 0.5)) % 4;
    case (quad)
      0: return 2'b00;   // +real
      1: return 2'b11;   // -imag  (exp(-j*90) = -j)
      2: return 2'b10;   // -real
      default: return 2'b01;   // +imag
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      logic [2*N-1:0] exp_c;
      int pos;
      @(negedge clk);
      run = 1;
      p_int = 4'($urandom);
      pshift = $urandom_range(0, 1);
      pup = $urandom_range(0, 1);
      pos = $urandom_range(0, N);
      for (int i = 0; i < N; i++) pc[i] = (i >= pos);
      qoff = 16'($urandom);
      for (int i = 0; i < N; i++) begin
        int p;
        p = int'(p_int) + 4 * int'(qoff[2*i +: 2]);
        if (pshift && pc[i]) p = pup ? p + 1 : p + 15;
        exp_c[2*i +: 2] = ref_code(p % 16);
        seen[exp_c[2*i +: 2]]++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (!codes_valid || codes !== exp_c) begin
        failures++;
        if (failures < 10) $display("k=%0d codes=%h want %h", k, codes, exp_c);
      end
    end
    for (int c = 0; c < 4; c++) if (seen[c] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
