// tb_sync_controller: three buffers arrive at different clocks and fill up;
// checks that the single start pulse comes on the first clock where all have
// arrived and hold their required words, and the counted waiting time.
module tb_sync_controller;
  localparam int M = 3;
  logic clk = 0, rst_n = 0, arm = 0;
  logic [M-1:0] arrived;
  logic [31:0] fill [M], need [M];
  logic start, synced;
  logic [31:0] wait_cycles;
  int checks = 0, failures = 0, starts = 0, start_cyc = -1;

  sync_controller #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int arr_at [M] = '{3, 10, 7};
  int cyc;
  initial begin
    need = '{32'd2, 32'd6, 32'd2};
    arrived = '0;
    for (int i = 0; i < M; i++) fill[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    for (cyc = 0; cyc < 40; cyc++) begin
      for (int i = 0; i < M; i++) begin
        arrived[i] = (cyc >= arr_at[i]);
        fill[i] = arrived[i] ? 32'(cyc - arr_at[i]) : 0;
      end
      #1;
      if (start) begin starts++; start_cyc = cyc; end
      @(negedge clk);
    end
    // buffer 1 needs 6 words: arrives at 10 -> fill 6 at 16; buffer 0 and 2
    // are ready before that
    checks++; if (starts != 1) failures++;
    checks++; if (start_cyc != 16) failures++;
    checks++; if (!synced) failures++;
    // waiting counted from the first arrival (clock 3) to the start (16)
    checks++; if (wait_cycles != 32'd13) failures++;
    $display("starts=%0d at %0d wait=%0d", starts, start_cyc, wait_cycles);
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    checks++; if (synced) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
