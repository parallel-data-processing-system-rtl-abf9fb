// lag_correlator: complex lag correlator for one channel.
//
// Every parallel data clock brings one word of station X (N samples), the
// delay-tracked word of station Y and one fringe switching code per sample.
// For each of L lags the N products x(u)*y(u+l-L/2) are formed (sign and
// magnitude samples, levels -3,-1,+1,+3), each product is steered by the
// fringe switching code of its X sample to the real or imaginary sum with
// a + or - sign, and the two sums are added to the lag's accumulators.
// Lag index L/2 is zero delay. To supply the negative lags, X and the codes
// are delayed by L/2 samples and Y is kept with its last L samples.
//
// Accumulation happens on clocks where `in_valid` and `acc_en` are high and
// the histories already hold L samples (`hist_full`). `acc_clear` zeroes all
// accumulators (it wins over accumulation). The accumulators are read through
// `rd_lag` / `rd_re` / `rd_im`, combinationally.
// The lag count (1024 complex lags per channel) and the real/imaginary
// switching follow the design description; the sample levels, the
// accumulator width and the fully parallel product array are this design's
// own choices.
module lag_correlator
  import corr_pkg::*;
#(
  parameter int N     = 64,
  parameter int L     = 1024,
  parameter int ACC_W = 40
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [2*N-1:0]          x,
  input  logic [2*N-1:0]          y,
  input  logic [2*N-1:0]          codes,
  input  logic                    acc_en,
  input  logic                    acc_clear,
  output logic                    hist_full,
  input  logic [$clog2(L)-1:0]    rd_lag,
  output logic signed [ACC_W-1:0] rd_re,
  output logic signed [ACC_W-1:0] rd_im
);

  localparam int H  = L / 2;                 // X / code delay in samples
  localparam int SW = $clog2(9 * N + 1) + 1; // one word's sum, signed
  localparam int FW = $clog2(L / N + 2);

  logic [2*L-1:0]      yhist;                // previous L samples of Y
  logic [2*H-1:0]      xhist, chist;         // previous L/2 samples of X, codes
  logic [2*(L+N)-1:0]  ycat;
  logic [2*(H+N)-1:0]  xcat, ccat;
  logic [FW-1:0]       fill;
  logic signed [SW-1:0] sre [L];
  logic signed [SW-1:0] sim [L];
  logic signed [ACC_W-1:0] acc_re [L];
  logic signed [ACC_W-1:0] acc_im [L];

  assign ycat = {y, yhist};
  assign xcat = {x, xhist};
  assign ccat = {codes, chist};
  assign hist_full = (fill >= FW'(L / N));

  always_comb begin
    for (int l = 0; l < L; l++) begin
      logic signed [SW-1:0] r, m;
      r = '0;
      m = '0;
      for (int i = 0; i < N; i++) begin
        logic signed [SW-1:0] p;
        p = SW'(sample_level(xcat[2*i +: 2]) * sample_level(ycat[2*(i+l) +: 2]));
        case (fswitch_e'(ccat[2*i +: 2]))
          FS_RE_POS: r = r + p;
          FS_RE_NEG: r = r - p;
          FS_IM_POS: m = m + p;
          default:   m = m - p;
        endcase
      end
      sre[l] = r;
      sim[l] = m;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      yhist <= '0;
      xhist <= '0;
      chist <= '0;
      fill  <= '0;
    end else if (in_valid) begin
      yhist <= ycat[2*(L+N)-1 -: 2*L];
      xhist <= xcat[2*(H+N)-1 -: 2*H];
      chist <= ccat[2*(H+N)-1 -: 2*H];
      if (!hist_full) fill <= fill + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < L; l++) begin
        acc_re[l] <= '0;
        acc_im[l] <= '0;
      end
    end else if (acc_clear) begin
      for (int l = 0; l < L; l++) begin
        acc_re[l] <= '0;
        acc_im[l] <= '0;
      end
    end else if (in_valid && acc_en && hist_full) begin
      for (int l = 0; l < L; l++) begin
        acc_re[l] <= acc_re[l] + ACC_W'(sre[l]);
        acc_im[l] <= acc_im[l] + ACC_W'(sim[l]);
      end
    end
  end

  assign rd_re = acc_re[rd_lag];
  assign rd_im = acc_im[rd_lag];

endmodule
