// fbmc_analysis: stage 2 of the receiver, a DFT-modulated analysis filter
// bank with K bands, oversampled by two (decimation by M = K/2). It splits the
// 512 MHz analytic baseband into K bands of 8 MHz spacing and delivers the
// first NUM_CH of them - the TVWS channels - at 16 MHz each.
//
// Band k is the prototype p[n] (L taps, fbmc_pkg::p2_coef) modulated to
// k*fs/K. For the block that ends with input sample x[e] it yields
//   y_k = sum_{n=0}^{L-1} p[n] e^{+j 2 pi k n / K} x[e - n].
// Writing n = r + K l, this is a K-point transform of the polyphase sums
//   u_r = sum_{l=0}^{L/K-1} p[r + K l] x[e - r - K l],   r = 0..K-1,
// computed as a forward DFT of u_{(-q) mod K} (q = 0..K-1), so the hardware
// transform is an FFT and band k still lies at +k*8 MHz: channels come out in
// ascending order from DC upwards. To demodulate every band in absolute time
// (a steady tone at k*8 MHz gives a constant output on channel k) the output
// of frame j is multiplied by (-1)^{k(j+1)}, which equals
// e^{-j2pi k e/K} up to the constant e^{j2pi k/K}: odd channels of even
// frames are negated.
//
// How it works: one tapped delay line of L+M input samples shifts on every
// accepted sample. During the M samples that follow the end of a block the
// delay line has moved by t (t = 0..M-1) and the two polyphase sums
// u_{2t}, u_{2t+1} of that block are read from taps r + K l + t: two lanes of
// L/K complex-by-real multiplies (20 real multipliers for the default sizes).
// The sums are rounded by U_SHIFT into a D-bit frame buffer; when the frame is
// complete it enters fft_r2, whose output (divided by K) is rounded by
// OUT_SHIFT to OUT_W bits per channel.
//
// Interface: in_valid/in_re/in_im, one sample per clock at most (the input
// may pause). ch_valid pulses once per M input samples with the NUM_CH
// channel outputs on ch_re/ch_im, which hold until the next frame. The first
// frame after reset is the block ending with input sample M-1, then every M
// samples. Timing: a channel frame appears M + log2(K)*M + 3 clocks after the
// last sample of its block when the input is continuous.
// The single delay line with multipliers and a transform, K, L, the
// oversampling by two and 13 -> 16 bit word lengths follow the published design;
// the two-lane schedule, frame-parallel FFT, phase correction and scaling
// are this design's.
module fbmc_analysis #(
  parameter int K         = fbmc_pkg::K2,
  parameter int L         = fbmc_pkg::L2,
  parameter int NUM_CH    = fbmc_pkg::NUM_CH,
  parameter int IN_W      = fbmc_pkg::RX_S1_W,
  parameter int D         = 20,
  parameter int OUT_W     = fbmc_pkg::RX_S2_W,
  parameter int U_SHIFT   = 8,
  parameter int OUT_SHIFT = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  output logic                    ch_valid,
  output logic signed [OUT_W-1:0] ch_re [NUM_CH],
  output logic signed [OUT_W-1:0] ch_im [NUM_CH]
);
  import fbmc_pkg::*;

  localparam int M    = K / 2;
  localparam int TAPS = L / K;                       // taps per polyphase branch
  localparam int DL   = L + M;                       // delay line length
  localparam int TW   = $clog2(M);
  localparam int AW   = IN_W + 16 + $clog2(TAPS) + 1;

  typedef logic signed [IN_W-1:0] smp_t;
  typedef logic signed [D-1:0]    data_t;
  typedef logic signed [AW-1:0]   acc_t;

  smp_t  dl_re [DL];
  smp_t  dl_im [DL];
  logic signed [15:0] pc [L];
  logic [TW-1:0] t;
  logic          primed;                             // a real block is in fr_*
  logic          warm;                               // first (empty) block done
  data_t fr_re [K];
  data_t fr_im [K];
  acc_t  u_re  [2];
  acc_t  u_im  [2];
  logic          fft_in_valid;
  logic          fft_out_valid;
  logic          odd_frm;                            // parity of frame j
  data_t         fo_re [K];
  data_t         fo_im [K];

  for (genvar n = 0; n < L; n++) begin : g_coef
    localparam logic signed [15:0] C = 16'(p2_coef(n, L, K));
    assign pc[n] = C;
  end

  // the two polyphase sums of this clock
  always_comb
    for (int lane = 0; lane < 2; lane++) begin
      int r, tap;
      r = 2 * int'(t) + lane;
      u_re[lane] = '0;
      u_im[lane] = '0;
      for (int l = 0; l < TAPS; l++) begin
        tap = r + K * l + int'(t);
        u_re[lane] += AW'(dl_re[tap]) * AW'(pc[r + K * l]);
        u_im[lane] += AW'(dl_im[tap]) * AW'(pc[r + K * l]);
      end
    end

  function automatic data_t u_round(input acc_t v);
    acc_t q;
    q = (v + (AW'(1) <<< (U_SHIFT - 1))) >>> U_SHIFT;
    if (q > AW'((1 <<< (D - 1)) - 1)) return data_t'((1 <<< (D - 1)) - 1);
    if (q < -AW'(1 <<< (D - 1)))      return data_t'(-(1 <<< (D - 1)));
    return data_t'(q);
  endfunction

  function automatic logic signed [OUT_W-1:0] out_round(input data_t v, input logic neg);
    logic signed [D:0] q;
    q = neg ? -(D+1)'(v) : (D+1)'(v);
    q = (q + ((D+1)'(1) <<< (OUT_SHIFT - 1))) >>> OUT_SHIFT;
    if (q > (D+1)'((1 <<< (OUT_W - 1)) - 1)) return OUT_W'((1 <<< (OUT_W - 1)) - 1);
    if (q < -(D+1)'(1 <<< (OUT_W - 1)))      return OUT_W'(-(1 <<< (OUT_W - 1)));
    return OUT_W'(q);
  endfunction

  // a frame is complete when the next block's first sample arrives
  assign fft_in_valid = in_valid && (t == '0) && primed;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DL; i++) begin
        dl_re[i] <= '0;
        dl_im[i] <= '0;
      end
      for (int q = 0; q < K; q++) begin
        fr_re[q] <= '0;
        fr_im[q] <= '0;
      end
      t      <= '0;
      primed <= 1'b0;
      warm   <= 1'b0;
    end else if (in_valid) begin
      dl_re[0] <= in_re;
      dl_im[0] <= in_im;
      for (int i = 1; i < DL; i++) begin
        dl_re[i] <= dl_re[i-1];
        dl_im[i] <= dl_im[i-1];
      end
      for (int lane = 0; lane < 2; lane++) begin
        fr_re[(K - (2 * int'(t) + lane)) % K] <= u_round(u_re[lane]);
        fr_im[(K - (2 * int'(t) + lane)) % K] <= u_round(u_im[lane]);
      end
      t <= (t == TW'(M - 1)) ? '0 : t + 1'b1;
      if (t == TW'(M - 1)) begin
        warm   <= 1'b1;
        primed <= warm;
      end
    end
  end

  fft_r2 #(.N(K), .D(D), .INVERSE(1'b0)) u_fft (
    .clk, .rst_n,
    .in_valid (fft_in_valid),
    .in_re    (fr_re),
    .in_im    (fr_im),
    .out_valid(fft_out_valid),
    .out_re   (fo_re),
    .out_im   (fo_im)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ch_valid <= 1'b0;
      odd_frm  <= 1'b0;
      for (int k = 0; k < NUM_CH; k++) begin
        ch_re[k] <= '0;
        ch_im[k] <= '0;
      end
    end else begin
      ch_valid <= fft_out_valid;
      if (fft_out_valid) begin
        odd_frm <= ~odd_frm;
        for (int k = 0; k < NUM_CH; k++) begin
          ch_re[k] <= out_round(fo_re[k], !odd_frm && (k % 2 == 1));
          ch_im[k] <= out_round(fo_im[k], !odd_frm && (k % 2 == 1));
        end
      end
    end
  end

endmodule
