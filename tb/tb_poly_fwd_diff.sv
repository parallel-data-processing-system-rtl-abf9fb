// tb_poly_fwd_diff: checks the forward-difference evaluator against direct
// evaluation of random 4th-order integer polynomials, step by step, and
// checks that `step` low holds the value.
module tb_poly_fwd_diff;
  localparam int W = 64;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic signed [W-1:0] coef [5];
  logic signed [W-1:0] value, value_next;
  int checks = 0, failures = 0;

  poly_fwd_diff #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  longint c [5];
  function automatic longint p(longint k);
    return c[0] + c[1]*k + c[2]*k*k + c[3]*k*k*k + c[4]*k*k*k*k;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      for (int j = 0; j < 5; j++) c[j] = longint'($urandom_range(0, 2000)) - 1000;
      // forward differences at k=0: sum (-1)^(j-i) C(j,i) p(i)
      coef[0] = p(0);
      coef[1] = p(1) - p(0);
      coef[2] = p(2) - 2*p(1) + p(0);
      coef[3] = p(3) - 3*p(2) + 3*p(1) - p(0);
      coef[4] = p(4) - 4*p(3) + 6*p(2) - 4*p(1) + p(0);
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      for (int k = 0; k < 60; k++) begin
        checks++;
        if (value !== p(k) || value_next !== p(k+1)) begin
          failures++;
          $display("poly %0d k=%0d: got %0d/%0d want %0d/%0d", t, k, value, value_next, p(k), p(k+1));
        end
        step = (k % 7 != 3);
        @(negedge clk);
        if (!step) begin
          checks++;
          if (value !== p(k)) failures++;
          step = 1;
          @(negedge clk);
        end
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
