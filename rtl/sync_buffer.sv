// sync_buffer: data synchronization buffer memory of one channel of one
// station.
//
// The incoming word stream carries time codes in-band: a word whose upper 64
// bits equal corr_pkg::SYNC_CODE is a time code (year, day, hour, minute,
// second in its low 38 bits) and is never stored. After `arm`, the buffer
// waits for the time code equal to `start_tc`; the data words that follow it
// are written to a circular memory of BUF_BITS bits, and `arrived` goes high.
// This absorbs the transmission delay of the station. Readout begins with a
// `start` pulse from the synchronization controller, at word `start_offset`
// after the time code (the whole-word part of the initial delay); from then
// on the reader takes 0, 1 or 2 words per clock (`rd_adv`) and always sees
// the next two unread words on w0/w1. Reads are synchronous: w0/w1 hold the
// words for the pointer after this clock's advance, so they are valid from
// the clock after `start` (`rd_first` marks that clock).
// `fill` is the number of stored, unread words. Sticky flags report reading
// unwritten words (`underflow`) and writing over unread ones (`overflow`).
// The 64 Mbit per channel size and starting storage at the time stamp follow
// the design description; the time-code word layout, the offset start and the
// two-word read port are this design's own choices.
module sync_buffer
  import corr_pkg::*;
#(
  parameter int  N        = 64,
  parameter int  QB       = 2,
  parameter longint BUF_BITS = 64 * 1024 * 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               arm,
  input  time_code_t         start_tc,
  input  logic               in_valid,
  input  logic [N*QB-1:0]    in_word,
  output logic               arrived,
  output logic               tc_seen,
  input  logic               start,
  input  logic [31:0]        start_offset,
  input  logic [1:0]         rd_adv,
  output logic [N*QB-1:0]    w0,
  output logic [N*QB-1:0]    w1,
  output logic               rd_first,
  output logic [31:0]        fill,
  output logic               underflow,
  output logic               overflow
);

  localparam int WW    = N * QB;
  localparam int DEPTH = int'(BUF_BITS / longint'(WW));
  localparam int AW    = $clog2(DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_STORE} state_e;

  state_e           state;
  logic [WW-1:0]    mem [DEPTH];
  logic [31:0]      wr_cnt, rd_ptr, ptr_next;
  logic             reading;
  logic             is_tc;
  time_code_t       tc;

  assign is_tc   = in_valid && (in_word[WW-1 -: 64] == SYNC_CODE);
  assign tc      = time_code_t'(in_word[$bits(time_code_t)-1:0]);
  assign arrived = (state == S_STORE);
  assign tc_seen = is_tc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      wr_cnt <= '0;
    end else if (arm) begin
      state  <= S_WAIT;
      wr_cnt <= '0;
    end else begin
      case (state)
        S_WAIT:  if (is_tc && tc == start_tc) state <= S_STORE;
        S_STORE: if (in_valid && !is_tc) wr_cnt <= wr_cnt + 1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_STORE && in_valid && !is_tc)
      mem[AW'(wr_cnt)] <= in_word;
  end

  always_comb begin
    if (start)        ptr_next = start_offset;
    else if (reading) ptr_next = rd_ptr + 32'(rd_adv);
    else              ptr_next = rd_ptr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr    <= '0;
      reading   <= 1'b0;
      rd_first  <= 1'b0;
      underflow <= 1'b0;
      overflow  <= 1'b0;
      w0        <= '0;
      w1        <= '0;
    end else begin
      rd_first <= start;
      if (arm) begin
        reading   <= 1'b0;
        rd_ptr    <= '0;
        underflow <= 1'b0;
        overflow  <= 1'b0;
      end else begin
        if (start) reading <= 1'b1;
        rd_ptr <= ptr_next;
        w0     <= mem[AW'(ptr_next)];
        w1     <= mem[AW'(ptr_next + 1)];
        if ((start || reading) && (ptr_next + 2 > wr_cnt)) underflow <= 1'b1;
        if (state == S_STORE && in_valid && !is_tc && reading &&
            (wr_cnt - rd_ptr >= 32'(DEPTH))) overflow <= 1'b1;
      end
    end
  end

  assign fill = wr_cnt - rd_ptr;

endmodule
