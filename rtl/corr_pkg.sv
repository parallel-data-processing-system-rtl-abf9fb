// corr_pkg: types and constants shared by the parallel-data VLBI correlator.
//
// A "word" is one parallel data clock's worth of samples for one channel:
// N_PAR samples of QBITS bits each, sample 0 (the earliest in time) in the
// least significant bits. The parallel width of 64 and the 2-bit sampling come
// from the design description; the sample code, the fringe switching code
// assignment and the time-code word layout are this design's own choices.
package corr_pkg;

  localparam int N_PAR = 64;   // parallel samples per data clock
  localparam int QBITS = 2;    // bits per sample (sign, magnitude)

  // 2-bit fringe switching code applied to a correlation product.
  // bit 1 = negate, bit 0 = route to the imaginary accumulator.
  typedef enum logic [1:0] {
    FS_RE_POS = 2'b00,
    FS_IM_POS = 2'b01,
    FS_RE_NEG = 2'b10,
    FS_IM_NEG = 2'b11
  } fswitch_e;

  // Time code carried in-band: a whole word whose upper 64 bits hold SYNC_CODE.
  localparam logic [63:0] SYNC_CODE = 64'hA5C3_5A3C_F00F_1EE1;

  typedef struct packed {
    logic [11:0] year;
    logic [8:0]  day;     // day of year, 1..366
    logic [4:0]  hour;
    logic [5:0]  minute;
    logic [5:0]  second;
  } time_code_t;          // 38 bits

  // Sample level of a sign/magnitude sample: s=bit1 (1 = negative),
  // m=bit0 (1 = high level). Levels are -3,-1,+1,+3.
  function automatic logic signed [2:0] sample_level(input logic [1:0] s);
    logic signed [2:0] mag;
    mag = s[0] ? 3'sd3 : 3'sd1;
    return s[1] ? -mag : mag;
  endfunction

  // Map a fringe phase in units of pi/8 to the nearest quadrant's switching
  // code: the product is rotated by exp(-j*phase).
  function automatic fswitch_e phase_to_switch(input logic [3:0] p);
    logic [1:0] q;
    q = 2'((p + 4'd2) >> 2);
    case (q)
      2'd0: return FS_RE_POS;
      2'd1: return FS_IM_NEG;
      2'd2: return FS_RE_NEG;
      default: return FS_IM_POS;
    endcase
  endfunction

endpackage
