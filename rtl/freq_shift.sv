// freq_shift: frequency shift of a complex stream by a complex exponential
// e^{+/-j Omega n}. In the transmitter it moves the stage-2 baseband (TVWS
// channels from DC to 320 MHz) to where the stage-1 bandpass expects it; in
// the receiver it brings the lower band edge (470 MHz, aliased by the
// decimation) back to DC.
//
// How it works: a PHASE_W-bit phase accumulator advances by FCW for every
// accepted sample; its top LUT_BITS bits address a cosine/sine table of 16-bit
// Q1.15 values computed at elaboration time. The sample is multiplied by
// cos + j sin (NEG=0) or cos - j sin (NEG=1), rounded back to W bits and
// saturated. The default FCW realises Omega = 2 pi 470 MHz K1 / fs, which for
// K1 = 4 and fs = 2.048 GHz is 235/256 of a turn: the 256-entry table then
// holds every needed value exactly.
//
// Interface: in_valid/in_re/in_im, out_valid/out_re/out_im, one sample per
// clock at most. The first sample after reset is multiplied by phase 0.
// Timing: one register stage, the result appears one clock after the input.
// The 16-bit exponential and the formula for Omega follow the published design;
// the table-based oscillator, rounding and saturation are this design's.
module freq_shift #(
  parameter int W        = 16,
  parameter int PHASE_W  = 16,
  parameter int LUT_BITS = 8,
  parameter int FCW      = fbmc_pkg::shift_fcw(fbmc_pkg::K1, 16),
  parameter bit NEG      = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  import fbmc_pkg::*;

  localparam int LUT_N = 1 << LUT_BITS;
  localparam int PW    = W + 18;

  logic [PHASE_W-1:0]   phase;
  logic [LUT_BITS-1:0]  idx;
  logic signed [15:0]   c, s;
  logic signed [15:0]   cos_tab [LUT_N];
  logic signed [15:0]   sin_tab [LUT_N];
  logic signed [PW-1:0] pr, pi;

  for (genvar i = 0; i < LUT_N; i++) begin : g_tab
    localparam logic signed [15:0] C = 16'(cos_q15(i, LUT_N));
    localparam logic signed [15:0] S = 16'(sin_q15(i, LUT_N));
    assign cos_tab[i] = C;
    assign sin_tab[i] = S;
  end

  function automatic logic signed [W-1:0] rnd_sat(input logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + PW'(1 <<< 14)) >>> 15;
    if (r > PW'((1 <<< (W - 1)) - 1)) return W'((1 <<< (W - 1)) - 1);
    if (r < -PW'(1 <<< (W - 1)))      return W'(-(1 <<< (W - 1)));
    return W'(r);
  endfunction

  assign idx = phase[PHASE_W-1 -: LUT_BITS];
  assign c   = cos_tab[idx];
  assign s   = NEG ? -sin_tab[idx] : sin_tab[idx];
  assign pr  = PW'(in_re) * PW'(c) - PW'(in_im) * PW'(s);
  assign pi  = PW'(in_re) * PW'(s) + PW'(in_im) * PW'(c);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        phase  <= phase + PHASE_W'(FCW);
        out_re <= rnd_sat(pr);
        out_im <= rnd_sat(pi);
      end
    end
  end

endmodule
