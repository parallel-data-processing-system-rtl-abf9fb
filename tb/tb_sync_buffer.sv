// tb_sync_buffer: a small buffer (16 words). Sends data before the time
// code, a time code with the wrong time, the agreed time code, data with a
// later time code inside it, then starts the readout at an offset and reads
// with 0/1/2-word advances, checking w0/w1 against the data stream without
// its time codes. Then checks the underflow and overflow flags.
module tb_sync_buffer;
  import corr_pkg::*;
  localparam int N = 64, QB = 2;
  localparam longint BUF_BITS = 16 * 128;
  logic clk = 0, rst_n = 0, arm = 0, in_valid = 0, start = 0;
  time_code_t start_tc;
  logic [127:0] in_word, w0, w1;
  logic arrived, tc_seen, rd_first, underflow, overflow;
  logic [31:0] start_offset, fill;
  logic [1:0] rd_adv;
  int checks = 0, failures = 0;

  sync_buffer #(.N(N), .QB(QB), .BUF_BITS(BUF_BITS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] tcw(time_code_t t);
    return {SYNC_CODE, 26'd0, t};
  endfunction
  function automatic logic [127:0] dw(int i);
    return {32'(i), 32'hD00D_0000 + 32'(i), 32'(i * 7), 32'(~i)};
  endfunction

  task automatic send(logic [127:0] w);
    @(negedge clk); in_valid = 1; in_word = w;
    @(posedge clk); #1; in_valid = 0;
  endtask

  task automatic expect_(string tag, logic c);
    checks++;
    if (!c) begin failures++; $display("fail: %s", tag); end
  endtask

  time_code_t t0, t1;
  int rp;
  initial begin
    t0 = '{year: 12'd2001, day: 9'd123, hour: 5'd4, minute: 6'd5, second: 6'd6};
    t1 = t0; t1.second = 6'd7;
    start_tc = t0;
    rd_adv = 0; start_offset = 0; in_word = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    send(dw(900)); send(dw(901));
    send(tcw(t1));                        // wrong time: ignored
    expect_("not arrived", !arrived);
    send(tcw(t0));
    expect_("arrived", arrived);
    for (int i = 0; i < 5; i++) send(dw(i));
    send(tcw(t1));                        // later time code: not stored
    for (int i = 5; i < 8; i++) send(dw(i));
    expect_("fill 8", fill == 8);
    // start at offset 2
    @(negedge clk); start = 1; start_offset = 2;
    @(negedge clk); start = 0;
    expect_("rd_first", rd_first);
    rp = 2;
    for (int k = 0; k < 5; k++) begin
      expect_($sformatf("read %0d", rp), w0 == dw(rp) && w1 == dw(rp + 1));
      rd_adv = 2'(k % 3);                 // 0, 1, 2, 0, 1
      @(negedge clk);
      rp += k % 3;
    end
    rd_adv = 0;
    expect_("no underflow yet", !underflow);
    expect_("fill after reads", fill == 32'(8 - rp));
    // read past the written data
    rd_adv = 2; @(negedge clk); rd_adv = 0;
    expect_("underflow", underflow);
    // overflow: write more than 16 unread words
    for (int i = 8; i < 30; i++) send(dw(i));
    expect_("overflow", overflow);
    // re-arm clears the state
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    expect_("re-armed", !arrived && !overflow && !underflow && fill == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
