// ppf_interp: stage 1 of the transmitter. The complex baseband at fs/K1 is
// expanded by K1 and filtered with the same complex bandpass as the receiver
// (centre 630 MHz), and the real part of the analytic result is the RF
// signal for the DAC at fs = 2.048 GHz.
//
// How it works: zero-stuffing followed by the filter h1 is computed in
// polyphase form. With T = ceil(L1/K1) taps per branch and the last T inputs
// u[m..m-T+1] held in a shift register, branch p produces
//   z[K1 m + p] = Re( sum_{l=0}^{T-1} h1[K1 l + p] u[m - l] )
//               = sum_l ( h1re * ure - h1im * uim ),
// so all K1 RF samples of one clock are formed in parallel and leave as
// out_smp[0..K1-1] for the DAC's multiplexer (out_smp[0] is the earliest).
// Only the real part is computed, 2 L1 real multiplies per clock. Rounding
// by OUT_SHIFT = 15 - log2(K1) restores the amplitude lost by zero-stuffing:
// a complex in-band tone of amplitude A becomes a real RF tone of amplitude A.
//
// Interface: in_valid with in_re/in_im (W-bit signed), out_valid with
// out_smp[K1] (W-bit signed, saturated). Timing: one input per clock, the K1
// outputs one clock later. Structure, K1, L1 and the 16-bit word length follow
// the published design; coefficients and the output register are this design's.
module ppf_interp #(
  parameter int K1        = fbmc_pkg::K1,
  parameter int L1        = fbmc_pkg::L1,
  parameter int W         = fbmc_pkg::TX_W,
  parameter int OUT_SHIFT = 15 - $clog2(K1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic signed [W-1:0] out_smp [K1]
);
  import fbmc_pkg::*;

  localparam int T  = (L1 + K1 - 1) / K1;            // taps per branch
  localparam int AW = W + 16 + $clog2(2 * T) + 2;

  typedef logic signed [W-1:0]  data_t;
  typedef logic signed [AW-1:0] acc_t;

  data_t ur [T];                                     // ur[l] = Re u[m-l]
  data_t ui [T];
  data_t hr_re [T-1];                                // registered u[m-1..]
  data_t hr_im [T-1];
  logic signed [15:0] cr [K1][T];
  logic signed [15:0] ci [K1][T];
  acc_t acc [K1];

  for (genvar p = 0; p < K1; p++) begin : g_branch
    for (genvar l = 0; l < T; l++) begin : g_tap
      localparam logic signed [15:0] CR = 16'(h1_re(K1 * l + p, L1));
      localparam logic signed [15:0] CI = 16'(h1_im(K1 * l + p, L1));
      assign cr[p][l] = CR;
      assign ci[p][l] = CI;
    end
  end

  always_comb
    for (int l = 0; l < T; l++) begin
      ur[l] = (l == 0) ? in_re : hr_re[l - 1];
      ui[l] = (l == 0) ? in_im : hr_im[l - 1];
    end

  always_comb
    for (int p = 0; p < K1; p++) begin
      acc[p] = '0;
      for (int l = 0; l < T; l++)
        acc[p] += AW'(ur[l]) * AW'(cr[p][l]) - AW'(ui[l]) * AW'(ci[p][l]);
    end

  function automatic data_t rnd_sat(input acc_t v);
    acc_t r;
    r = (v + (AW'(1) <<< (OUT_SHIFT - 1))) >>> OUT_SHIFT;
    if (r > AW'((1 <<< (W - 1)) - 1)) return W'((1 <<< (W - 1)) - 1);
    if (r < -AW'(1 <<< (W - 1)))      return W'(-(1 <<< (W - 1)));
    return W'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < T - 1; l++) begin
        hr_re[l] <= '0;
        hr_im[l] <= '0;
      end
      for (int p = 0; p < K1; p++) out_smp[p] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int l = 0; l < T - 1; l++) begin
          hr_re[l] <= ur[l];
          hr_im[l] <= ui[l];
        end
        for (int p = 0; p < K1; p++) out_smp[p] <= rnd_sat(acc[p]);
      end
    end
  end

endmodule
