// tvws_transceiver: frequency-agile two-stage filter-bank multicarrier
// transceiver for the 40 TV white space channels of 470-790 MHz, in the
// configuration with stage-1 decimation K1 = 4 (44-tap polyphase bandpass)
// and a 64-band stage-2 filter bank (320-tap prototype), clocked at
// fs/K1 = 512 MHz.
//
// The transmitter (tvws_tx) and the receiver (tvws_rx) sit side by side and
// share only clock and reset. The RF converters are outside: the transmitter
// drives K1 16-bit samples per clock to a DAC with integrated multiplexer, the
// receiver reads K1 12-bit samples per clock from an ADC with integrated
// demultiplexer. Connecting dac_smp to adc_smp (through an RF path or, in
// simulation, directly) closes the back-to-back loop of the two chains.
//
// Interface: tx_ch_take pulses every 32 clocks and tx_ch_re/tx_ch_im are
// sampled then; rx_ch_valid pulses every 32 clocks with rx_ch_re/rx_ch_im.
// All channel words are 16 bit.
module tvws_transceiver #(
  parameter int K1     = fbmc_pkg::K1,
  parameter int NUM_CH = fbmc_pkg::NUM_CH
) (
  input  logic               clk,
  input  logic               rst_n,
  // transmitter
  output logic               tx_ch_take,
  input  logic signed [15:0] tx_ch_re [NUM_CH],
  input  logic signed [15:0] tx_ch_im [NUM_CH],
  output logic               dac_valid,
  output logic signed [15:0] dac_smp [K1],
  // receiver
  input  logic               adc_valid,
  input  logic signed [11:0] adc_smp [K1],
  output logic               rx_ch_valid,
  output logic signed [15:0] rx_ch_re [NUM_CH],
  output logic signed [15:0] rx_ch_im [NUM_CH]
);

  tvws_tx #(.K1(K1), .NUM_CH(NUM_CH)) u_tx (
    .clk, .rst_n,
    .ch_take(tx_ch_take), .ch_re(tx_ch_re), .ch_im(tx_ch_im),
    .dac_valid, .dac_smp
  );

  tvws_rx #(.K1(K1), .NUM_CH(NUM_CH)) u_rx (
    .clk, .rst_n,
    .adc_valid, .adc_smp,
    .ch_valid(rx_ch_valid), .ch_re(rx_ch_re), .ch_im(rx_ch_im)
  );

endmodule
