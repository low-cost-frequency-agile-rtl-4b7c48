// tvws_rx: the receiver of the two-stage TVWS filter-bank transceiver
// (design with K1 = 4, K2 = 64). It takes the RF signal sampled at
// fs = 2.048 GHz with 12 bits, already split by the ADC's demultiplexer into
// K1 polyphase streams of 512 MHz, and delivers the NUM_CH = 40 TVWS channels
// at 16 MHz each with 16 bits.
//
// Chain, one clock = one group of K1 RF samples = one 512 MHz sample:
//   stage 1  ppf_decim       complex 630 MHz bandpass, decimation by K1,
//                            12 -> 13 bits;
//   shift    freq_shift      multiplies by e^{-j Omega n}, Omega =
//                            2 pi SHIFT_MHZ K1 / fs, moving SHIFT_MHZ to DC;
//   stage 2  fbmc_analysis   K2-band oversampled analysis bank, 13 -> 16
//                            bits; band k is the 8 MHz around k*8 MHz.
// With the default SHIFT_MHZ = 470, channel k is the band around
// 470 + 8k MHz.
//
// Interface: adc_valid/adc_smp[K1] (adc_smp[0] the earliest sample); ch_valid
// pulses once per 32 clocks with ch_re/ch_im, which hold until the next frame.
// Word lengths and structure follow the published design; the sign of the
// exponential is chosen so that the band arrives at DC (see the README).
module tvws_rx #(
  parameter int K1        = fbmc_pkg::K1,
  parameter int L1        = fbmc_pkg::L1,
  parameter int K2        = fbmc_pkg::K2,
  parameter int L2        = fbmc_pkg::L2,
  parameter int NUM_CH    = fbmc_pkg::NUM_CH,
  parameter int IN_W      = fbmc_pkg::ADC_W,
  parameter int S1_W      = fbmc_pkg::RX_S1_W,
  parameter int OUT_W     = fbmc_pkg::RX_S2_W,
  parameter int SHIFT_MHZ = fbmc_pkg::FLOW_MHZ
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    adc_valid,
  input  logic signed [IN_W-1:0]  adc_smp [K1],
  output logic                    ch_valid,
  output logic signed [OUT_W-1:0] ch_re [NUM_CH],
  output logic signed [OUT_W-1:0] ch_im [NUM_CH]
);
  import fbmc_pkg::*;

  localparam int FCW = (SHIFT_MHZ * K1 * 65536 / FS_MHZ) % 65536;

  logic                   s1_valid, sh_valid;
  logic signed [S1_W-1:0] s1_re, s1_im, sh_re, sh_im;

  ppf_decim #(.K1(K1), .L1(L1), .IN_W(IN_W), .OUT_W(S1_W)) u_stage1 (
    .clk, .rst_n, .in_valid(adc_valid), .in_smp(adc_smp),
    .out_valid(s1_valid), .out_re(s1_re), .out_im(s1_im)
  );

  freq_shift #(.W(S1_W), .PHASE_W(16), .FCW(FCW), .NEG(1'b1)) u_shift (
    .clk, .rst_n, .in_valid(s1_valid), .in_re(s1_re), .in_im(s1_im),
    .out_valid(sh_valid), .out_re(sh_re), .out_im(sh_im)
  );

  fbmc_analysis #(.K(K2), .L(L2), .NUM_CH(NUM_CH), .IN_W(S1_W), .OUT_W(OUT_W)) u_stage2 (
    .clk, .rst_n, .in_valid(sh_valid), .in_re(sh_re), .in_im(sh_im),
    .ch_valid, .ch_re, .ch_im
  );

endmodule
