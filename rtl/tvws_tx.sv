// tvws_tx: the transmitter of the two-stage TVWS filter-bank transceiver
// (design with K1 = 4, K2 = 64). It turns NUM_CH = 40 baseband channels of
// 16 MHz sampling rate into the real RF signal at fs = 2.048 GHz that fills
// the 470-790 MHz UHF band, delivered as K1 polyphase streams of 512 MHz for
// a DAC with an integrated multiplexer.
//
// Chain, one clock = one 512 MHz sample:
//   stage 2  fbmc_synthesis  K2-band oversampled synthesis bank: channel k
//                            lands at k*8 MHz in a 512 MHz complex baseband;
//   shift    freq_shift      multiplies by e^{+j Omega n}, Omega =
//                            2 pi SHIFT_MHZ K1 / fs, placing the band so that
//                            its K1-fold image lies at SHIFT_MHZ upwards;
//   stage 1  ppf_interp      expansion by K1 with the complex 630 MHz
//                            bandpass, real part out: K1 RF samples per clock.
// With the default SHIFT_MHZ = 470, channel k is centred on 470 + 8k MHz.
//
// Interface: ch_take pulses every K2/2 = 32 clocks and ch_re/ch_im (16 bit)
// are sampled in that clock; dac_valid/dac_smp[K1] carry 16-bit RF samples,
// dac_smp[0] the earliest of the clock. 16-bit data throughout and the
// structure follow the published design; the sign of the exponential is chosen
// so that the band arrives at 470-790 MHz (see the README).
module tvws_tx #(
  parameter int K1        = fbmc_pkg::K1,
  parameter int L1        = fbmc_pkg::L1,
  parameter int K2        = fbmc_pkg::K2,
  parameter int L2        = fbmc_pkg::L2,
  parameter int NUM_CH    = fbmc_pkg::NUM_CH,
  parameter int W         = fbmc_pkg::TX_W,
  parameter int SHIFT_MHZ = fbmc_pkg::FLOW_MHZ
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                ch_take,
  input  logic signed [W-1:0] ch_re [NUM_CH],
  input  logic signed [W-1:0] ch_im [NUM_CH],
  output logic                dac_valid,
  output logic signed [W-1:0] dac_smp [K1]
);
  import fbmc_pkg::*;

  localparam int FCW = (SHIFT_MHZ * K1 * 65536 / FS_MHZ) % 65536;

  logic                bb_valid, sh_valid;
  logic signed [W-1:0] bb_re, bb_im, sh_re, sh_im;

  fbmc_synthesis #(.K(K2), .L(L2), .NUM_CH(NUM_CH), .W(W)) u_stage2 (
    .clk, .rst_n, .ch_take, .ch_re, .ch_im,
    .out_valid(bb_valid), .out_re(bb_re), .out_im(bb_im)
  );

  freq_shift #(.W(W), .PHASE_W(16), .FCW(FCW), .NEG(1'b0)) u_shift (
    .clk, .rst_n, .in_valid(bb_valid), .in_re(bb_re), .in_im(bb_im),
    .out_valid(sh_valid), .out_re(sh_re), .out_im(sh_im)
  );

  ppf_interp #(.K1(K1), .L1(L1), .W(W)) u_stage1 (
    .clk, .rst_n, .in_valid(sh_valid), .in_re(sh_re), .in_im(sh_im),
    .out_valid(dac_valid), .out_smp(dac_smp)
  );

endmodule
