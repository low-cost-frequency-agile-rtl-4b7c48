// ppf_decim: stage 1 of the receiver. A complex-valued bandpass centred on
// 630 MHz selects the 470-790 MHz TVWS band from the real RF signal sampled
// at fs = 2.048 GHz and decimates by K1, producing an analytic signal at
// fs/K1 (512 MHz for K1 = 4).
//
// How it works: the ADC delivers the RF stream already demultiplexed into K1
// polyphase components, so each clock brings K1 consecutive samples
// in_smp[0..K1-1] = x[K1 m + 0 .. K1 m + K1-1]. The block keeps the last
// L1-K1 samples in a shift register and, once per clock, forms
//   y[m] = sum_{n=0}^{L1-1} h1[n] x[K1 m + K1-1 - n]
// with the complex coefficients h1 (fbmc_pkg::h1_re/h1_im), i.e. only the
// decimated outputs are ever computed (2 L1 real multiplies per clock). The
// accumulator is kept at full precision and rounded once: the output keeps
// one fraction bit more than the input (12 -> 13 bits by default), the gain
// in resolution the decimation provides. The filter has unity passband gain
// as a complex filter, so a real tone of amplitude A appears as an analytic
// tone of amplitude A/2, i.e. A in the units of the finer output LSB.
//
// Interface: in_valid with in_smp[K1] (IN_W-bit signed); out_valid with
// out_re/out_im (OUT_W-bit signed, saturated). Timing: one sample group per
// clock, result one clock later. The polyphase structure, the complex
// bandpass, K1, L1 and the word lengths follow the published design; the
// coefficient values and the single output register are this design's.
module ppf_decim #(
  parameter int K1        = fbmc_pkg::K1,
  parameter int L1        = fbmc_pkg::L1,
  parameter int IN_W      = fbmc_pkg::ADC_W,
  parameter int OUT_W     = fbmc_pkg::RX_S1_W,
  parameter int OUT_SHIFT = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_smp [K1],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im
);
  import fbmc_pkg::*;

  localparam int HW = (L1 > K1) ? L1 - K1 : 1;       // history length
  localparam int AW = IN_W + 16 + $clog2(L1) + 1;    // accumulator width

  typedef logic signed [IN_W-1:0] smp_t;
  typedef logic signed [AW-1:0]   acc_t;

  smp_t hist [HW];
  smp_t win  [L1];
  logic signed [15:0] hr [L1];
  logic signed [15:0] hi [L1];
  acc_t acc_re, acc_im;

  for (genvar n = 0; n < L1; n++) begin : g_coef
    localparam logic signed [15:0] CR = 16'(h1_re(n, L1));
    localparam logic signed [15:0] CI = 16'(h1_im(n, L1));
    assign hr[n] = CR;
    assign hi[n] = CI;
  end

  // win[i] = x[K1 m + K1-1 - i]
  always_comb
    for (int i = 0; i < L1; i++)
      win[i] = (i < K1) ? in_smp[K1 - 1 - i] : hist[i - K1];

  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int i = 0; i < L1; i++) begin
      acc_re += AW'(win[i]) * AW'(hr[i]);
      acc_im += AW'(win[i]) * AW'(hi[i]);
    end
  end

  function automatic logic signed [OUT_W-1:0] rnd_sat(input acc_t v);
    acc_t r;
    r = (v + (AW'(1) <<< (OUT_SHIFT - 1))) >>> OUT_SHIFT;
    if (r > AW'((1 <<< (OUT_W - 1)) - 1)) return OUT_W'((1 <<< (OUT_W - 1)) - 1);
    if (r < -AW'(1 <<< (OUT_W - 1)))      return OUT_W'(-(1 <<< (OUT_W - 1)));
    return OUT_W'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < HW; j++) hist[j] <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int j = 0; j < HW; j++) hist[j] <= (j < L1 - K1) ? win[j] : '0;
        out_re <= rnd_sat(acc_re);
        out_im <= rnd_sat(acc_im);
      end
    end
  end

endmodule
