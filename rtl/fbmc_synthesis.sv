// fbmc_synthesis: stage 2 of the transmitter, a DFT-modulated synthesis
// filter bank with K bands, oversampled by two (expansion by M = K/2). It
// combines NUM_CH channel streams of 16 MHz each into one 512 MHz complex
// baseband in which channel k occupies the 8 MHz band around +k*8 MHz.
//
// With X_k[m] the channel samples of block m, the output is
//   v[n] = sum_m sum_k X_k[m] p[n - mM] e^{+j 2 pi k (n - mM) / K},
// i.e. channel k is modulated in absolute time, so a constant symbol stream
// on channel k becomes a steady tone at k*8 MHz. Since e^{j2pi k mM/K} =
// (-1)^{km} for M = K/2, this equals
//   v[n] = sum_m p[n - mM] U_m[(n - mM) mod K],
// with U_m the inverse DFT of (-1)^{km} X_k[m]: the odd channels of every odd
// block are negated before the transform.
//
// How it works: every M clocks the block takes one channel vector (ch_take),
// widens it by IN_SHIFT bits into a D-bit frame (bands NUM_CH..K-1 are zero)
// and passes it to fft_r2 as an inverse FFT (result divided by K). The last
// L/M inverse-transformed frames are kept in a frame history; the output
// sample at phase t of the current block is the overlap-add
//   v = sum_{j=0}^{L/M-1} p[t + jM] U_{m0-j}[(t + jM) mod K],
// L/M complex-by-real multiplies per clock (20 real multipliers for the
// default sizes). This is the parallel-to-serial conversion of the
// transmitter: one complex sample per clock leaves the bank. The sum is
// rounded by OUT_SHIFT and saturated to W bits.
//
// Interface: ch_take is a one-clock pulse every M clocks; ch_re/ch_im (W-bit,
// NUM_CH entries) are sampled in that clock. out_valid/out_re/out_im then give
// one sample per clock without gaps once the first frame has passed the FFT.
// Timing: the first output sample of a block leaves log2(K)*M + 2 clocks
// after the block was taken. K, L, the oversampling by two and 16-bit words
// follow the published design; the phase correction, frame history, FFT and
// scaling are this design's.
module fbmc_synthesis #(
  parameter int K         = fbmc_pkg::K2,
  parameter int L         = fbmc_pkg::L2,
  parameter int NUM_CH    = fbmc_pkg::NUM_CH,
  parameter int W         = fbmc_pkg::TX_W,
  parameter int D         = 24,
  parameter int IN_SHIFT  = 8,
  parameter int OUT_SHIFT = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                ch_take,
  input  logic signed [W-1:0] ch_re [NUM_CH],
  input  logic signed [W-1:0] ch_im [NUM_CH],
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  import fbmc_pkg::*;

  localparam int M  = K / 2;
  localparam int J  = L / M;                         // overlapping blocks
  localparam int TW = $clog2(M);
  localparam int AW = D + 16 + $clog2(J) + 1;

  typedef logic signed [D-1:0]  data_t;
  typedef logic signed [AW-1:0] acc_t;

  logic signed [15:0] pc [L];
  logic [TW-1:0] tin;                                // input block phase
  logic [TW-1:0] tout;                               // output block phase
  logic          running;
  logic          odd_blk;                            // parity of block m
  data_t fi_re [K];
  data_t fi_im [K];
  logic  fft_out_valid;
  data_t fo_re [K];
  data_t fo_im [K];
  data_t hist_re [J][K];
  data_t hist_im [J][K];
  acc_t  acc_re, acc_im;

  for (genvar n = 0; n < L; n++) begin : g_coef
    localparam logic signed [15:0] C = 16'(p2_coef(n, L, K));
    assign pc[n] = C;
  end

  // channel vector -> IFFT frame
  assign ch_take = (tin == '0);
  always_comb
    for (int k = 0; k < K; k++) begin
      fi_re[k] = (k < NUM_CH) ? data_t'(ch_re[k]) <<< IN_SHIFT : '0;
      fi_im[k] = (k < NUM_CH) ? data_t'(ch_im[k]) <<< IN_SHIFT : '0;
      if (odd_blk && (k % 2 == 1)) begin
        fi_re[k] = -fi_re[k];
        fi_im[k] = -fi_im[k];
      end
    end

  fft_r2 #(.N(K), .D(D), .INVERSE(1'b1)) u_ifft (
    .clk, .rst_n,
    .in_valid (ch_take && rst_n),
    .in_re    (fi_re),
    .in_im    (fi_im),
    .out_valid(fft_out_valid),
    .out_re   (fo_re),
    .out_im   (fo_im)
  );

  // overlap-add of the J frames that cover this output sample
  always_comb begin
    int idx;
    acc_re = '0;
    acc_im = '0;
    for (int j = 0; j < J; j++) begin
      idx = int'(tout) + j * M;
      acc_re += AW'(hist_re[j][idx % K]) * AW'(pc[idx]);
      acc_im += AW'(hist_im[j][idx % K]) * AW'(pc[idx]);
    end
  end

  function automatic logic signed [W-1:0] rnd_sat(input acc_t v);
    acc_t q;
    q = (v + (AW'(1) <<< (OUT_SHIFT - 1))) >>> OUT_SHIFT;
    if (q > AW'((1 <<< (W - 1)) - 1)) return W'((1 <<< (W - 1)) - 1);
    if (q < -AW'(1 <<< (W - 1)))      return W'(-(1 <<< (W - 1)));
    return W'(q);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tin       <= '0;
      odd_blk   <= 1'b0;
      tout      <= '0;
      running   <= 1'b0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      for (int j = 0; j < J; j++)
        for (int k = 0; k < K; k++) begin
          hist_re[j][k] <= '0;
          hist_im[j][k] <= '0;
        end
    end else begin
      tin <= (tin == TW'(M - 1)) ? '0 : tin + 1'b1;
      if (ch_take) odd_blk <= ~odd_blk;
      if (fft_out_valid) begin
        hist_re[0] <= fo_re;
        hist_im[0] <= fo_im;
        for (int j = 1; j < J; j++) begin
          hist_re[j] <= hist_re[j-1];
          hist_im[j] <= hist_im[j-1];
        end
        tout    <= '0;
        running <= 1'b1;
      end else if (running) begin
        tout <= tout + 1'b1;
      end
      out_valid <= running;
      if (running) begin
        out_re <= rnd_sat(acc_re);
        out_im <= rnd_sat(acc_im);
      end
    end
  end

  // a new frame must arrive exactly when the current block is used up
  assert property (@(posedge clk) disable iff (!rst_n)
                   running && tout == TW'(M - 1) |-> fft_out_valid)
    else $error("fbmc_synthesis: frame history ran dry");

endmodule
