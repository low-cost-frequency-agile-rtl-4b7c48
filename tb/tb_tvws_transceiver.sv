// tb_tvws_transceiver: back-to-back test of the whole transceiver at its
// default parameters. The transmitter's RF samples are fed straight into the
// receiver (the 16-bit DAC words reduced to the 12-bit ADC range), so the
// test covers: channel vectors -> synthesis bank -> frequency shift ->
// interpolating bandpass -> RF -> decimating bandpass -> frequency shift ->
// analysis bank -> channel outputs.
//
// Phase 1 puts constant symbols of different amplitude and phase on channels
// 3, 10, 25 and 39 (40 channels, the outer ones at the band edges 470 and
// 790 MHz). Once the chain has filled, each of them must come back with the
// loop gain worked out from the coefficient sums (+/-8 %), with a steady
// phase (error-vector power at least 35 dB below the signal, the measured
// reconstruction error is printed), and every channel two or more bands away
// from an active one must stay 40 dB lower. Phase 2 drives all 40 channels at
// full scale so that the DAC words saturate.
// Mechanisms counted (each must occur): channel vectors taken, inverse and
// forward FFT frames, wrap of both shift oscillators, the odd-block sign
// correction of both banks, receiver frames at exactly 32-clock spacing, and
// saturation of the transmitter output.
module tb_tvws_transceiver;
  import fbmc_pkg::*;
  localparam int NC = 40, KK = 4, M = 32;
  localparam int P1 = 72, P2 = 12;               // blocks per phase
  localparam int MEAS0 = 40, MEAS1 = 56;         // rx frames measured

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic tx_ch_take, dac_valid, rx_ch_valid;
  logic signed [15:0] tx_ch_re [NC], tx_ch_im [NC];
  logic signed [15:0] dac_smp [KK];
  logic adc_valid;
  logic signed [11:0] adc_smp [KK];
  logic signed [15:0] rx_ch_re [NC], rx_ch_im [NC];

  tvws_transceiver dut (.*);

  // RF loop: keep the 12 most significant bits
  assign adc_valid = dac_valid;
  always_comb for (int p = 0; p < KK; p++) adc_smp[p] = 12'(dac_smp[p] >>> 4);

  int checks = 0, failures = 0;
  int phase = 1, takes = 0, rx_frames = 0;
  int sym_re [NC], sym_im [NC];
  // mechanism counters
  int n_ifft = 0, n_fft = 0, n_wrap_tx = 0, n_wrap_rx = 0, n_odd_tx = 0, n_odd_rx = 0, n_sat = 0;
  logic [15:0] ph_tx_q = 0, ph_rx_q = 0;
  longint cyc = 0, last_rx = -1;
  // per-channel statistics over the measured frames
  real sr [NC], si [NC], s2 [NC], pk [NC];
  int nm = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always_comb
    for (int k = 0; k < NC; k++) begin
      tx_ch_re[k] = 16'(sym_re[k]);
      tx_ch_im[k] = 16'(sym_im[k]);
    end

  always @(posedge clk) if (rst_n) begin
    if (tx_ch_take) takes++;
    if (dut.u_tx.u_stage2.u_ifft.out_valid) n_ifft++;
    if (dut.u_rx.u_stage2.u_fft.out_valid) n_fft++;
    if (dut.u_tx.u_shift.phase < ph_tx_q) n_wrap_tx++;
    if (dut.u_rx.u_shift.phase < ph_rx_q) n_wrap_rx++;
    ph_tx_q <= dut.u_tx.u_shift.phase;
    ph_rx_q <= dut.u_rx.u_shift.phase;
    if (tx_ch_take && dut.u_tx.u_stage2.odd_blk) n_odd_tx++;
    if (dut.u_rx.u_stage2.u_fft.out_valid && !dut.u_rx.u_stage2.odd_frm) n_odd_rx++;
    if (dac_valid)
      for (int p = 0; p < KK; p++)
        if (dac_smp[p] == 16'sh7fff || dac_smp[p] == -16'sh8000) n_sat++;
    if (rx_ch_valid) begin
      if (last_rx >= 0) begin
        checks++;
        if (cyc - last_rx != longint'(M)) failures++;
      end
      last_rx = cyc;
      if (phase == 1 && rx_frames >= MEAS0 && rx_frames < MEAS1) begin
        for (int k = 0; k < NC; k++) begin
          sr[k] += real'(rx_ch_re[k]);
          si[k] += real'(rx_ch_im[k]);
          s2[k] += real'(rx_ch_re[k]) ** 2 + real'(rx_ch_im[k]) ** 2;
          if ($sqrt(real'(rx_ch_re[k]) ** 2 + real'(rx_ch_im[k]) ** 2) > pk[k])
            pk[k] = $sqrt(real'(rx_ch_re[k]) ** 2 + real'(rx_ch_im[k]) ** 2);
        end
        nm++;
      end
      rx_frames++;
    end
  end

  function automatic bit active(input int k);
    return k == 3 || k == 10 || k == 25 || k == 39;
  endfunction

  function automatic bit near_active(input int k);
    for (int d = -1; d <= 1; d++) if (k + d >= 0 && k + d < NC && active(k + d)) return 1;
    return 0;
  endfunction

  initial begin
    real s, g_loop, tx_mag, mean_re, mean_im, mean_mag, ev, snr_db, worst_snr, leak;
    for (int k = 0; k < NC; k++) begin
      sym_re[k] = 0; sym_im[k] = 0;
      sr[k] = 0.0; si[k] = 0.0; s2[k] = 0.0; pk[k] = 0.0;
    end
    sym_re[3]  = 6000;
    sym_im[10] = -5000;
    sym_re[25] = 3000;  sym_im[25] = 3000;
    sym_re[39] = -4000; sym_im[39] = 2000;
    s = 0.0;
    for (int n = 0; n < 320; n++) s += real'(p2_coef(n, 320, 64));
    // synthesis gain * (1/16 for 16 -> 12 bits) * analysis gain
    g_loop = s / (32.0 * 32768.0) / 16.0 * s / real'(1 << 17);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (takes >= P1);
    worst_snr = 1.0e9; leak = 0.0;
    for (int k = 0; k < NC; k++) begin
      mean_re = sr[k] / real'(nm); mean_im = si[k] / real'(nm);
      mean_mag = $sqrt(mean_re * mean_re + mean_im * mean_im);
      if (active(k)) begin
        tx_mag = $sqrt(real'(sym_re[k]) ** 2 + real'(sym_im[k]) ** 2);
        ev = s2[k] / real'(nm) - mean_mag * mean_mag;
        if (ev < 1.0e-3) ev = 1.0e-3;
        snr_db = 10.0 * $log10(mean_mag * mean_mag / ev);
        if (snr_db < worst_snr) worst_snr = snr_db;
        $display("channel %0d (%0d MHz): sent %f, received %f (expected %f), error %f dB",
                 k, 470 + 8 * k, tx_mag, mean_mag, g_loop * tx_mag, -snr_db);
        checks++;
        if (mean_mag < 0.92 * g_loop * tx_mag || mean_mag > 1.08 * g_loop * tx_mag) failures++;
        checks++;
        if (snr_db < 35.0) failures++;
      end else if (!near_active(k)) begin
        if (pk[k] > leak) leak = pk[k];
      end
    end
    $display("measured frames %0d, worst reconstruction error %f dB, worst leakage %f", nm, -worst_snr, leak);
    checks++;
    if (nm != MEAS1 - MEAS0 || leak > 0.01 * g_loop * 3000.0) failures++;
    // phase 2: full scale on every channel
    phase = 2;
    for (int k = 0; k < NC; k++) begin
      sym_re[k] = 32767; sym_im[k] = (k % 2 == 0) ? 32767 : -32768;
    end
    wait (takes >= P1 + P2);
    $display("mechanisms: vectors %0d ifft %0d fft %0d wraps %0d/%0d odd %0d/%0d rx frames %0d saturations %0d",
             takes, n_ifft, n_fft, n_wrap_tx, n_wrap_rx, n_odd_tx, n_odd_rx, rx_frames, n_sat);
    checks++; if (takes == 0) failures++;
    checks++; if (n_ifft == 0) failures++;
    checks++; if (n_fft == 0) failures++;
    checks++; if (n_wrap_tx == 0 || n_wrap_rx == 0) failures++;
    checks++; if (n_odd_tx == 0 || n_odd_rx == 0) failures++;
    checks++; if (rx_frames == 0) failures++;
    checks++; if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((P1 + P2 + 10) * M) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
