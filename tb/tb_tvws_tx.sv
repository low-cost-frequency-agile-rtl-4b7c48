// tb_tvws_tx: end-to-end test of the transmitter at its default size. A
// constant symbol is sent on one channel at a time (channels 0, 17 and 39);
// the RF output (four samples per clock at 2.048 GHz) must then be a single
// real tone at 470 + 8c MHz. The test correlates the RF samples with that
// frequency and with the next-adjacent channel 16 MHz higher, and compares the
// tone's power with the total output power: the tone must have the expected
// amplitude (synthesis gain from the prototype coefficients, +/-6 % for the
// stage-1 passband ripple), the next-adjacent channel must be 40 dB lower and
// the tone must carry at least 99 % of the output power. It also checks that
// a channel vector is taken every 32 clocks and that RF samples flow without
// gaps.
module tb_tvws_tx;
  import fbmc_pkg::*;
  localparam int NC = 40, K1_ = 4, M = 32;
  localparam int BLK = 28;                   // blocks per channel test
  localparam int SETTLE = 16;                // blocks to skip after a change
  localparam real PI = 3.14159265358979323846;
  localparam real A = 8000.0;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic ch_take, dac_valid;
  logic signed [15:0] ch_re [NC], ch_im [NC];
  logic signed [15:0] dac_smp [K1_];

  tvws_tx dut (.*);

  int checks = 0, failures = 0;
  int test_ch = 0, blocks = 0, takes = 0;
  longint n_rf = 0, cyc = 0, last_take = -1;
  real c_re, c_im, a_re, a_im, pw;
  int nacc;
  real gain;
  always @(posedge clk) cyc <= cyc + 1;

  always_comb
    for (int k = 0; k < NC; k++) begin
      ch_re[k] = (k == test_ch) ? 16'($rtoi(A)) : '0;
      ch_im[k] = '0;
    end

  always @(posedge clk) if (rst_n) begin
    if (ch_take) begin
      takes++;
      checks++;
      if (last_take >= 0 && cyc - last_take != longint'(M)) failures++;
      last_take = cyc;
    end
    if (dac_valid) begin
      if (blocks >= SETTLE)
        for (int p = 0; p < K1_; p++) begin
          real z, a1, a2;
          longint n;
          n = n_rf + longint'(p);
          z = real'(dac_smp[p]);
          a1 = 2.0 * PI * real'((n * (470 + 8 * test_ch)) % 2048) / 2048.0;
          a2 = 2.0 * PI * real'((n * (470 + 8 * test_ch + 16)) % 2048) / 2048.0;
          c_re += z * $cos(a1); c_im -= z * $sin(a1);
          a_re += z * $cos(a2); a_im -= z * $sin(a2);
          pw += z * z;
          nacc++;
        end
      n_rf += longint'(K1_);
    end else if (n_rf > 0) begin
      failures++;
      $display("gap in RF output");
    end
  end

  initial begin
    static int chans [3] = '{0, 17, 39};
    real s;
    s = 0.0;
    for (int n = 0; n < 320; n++) s += real'(p2_coef(n, 320, 64));
    gain = s / (32.0 * 32768.0);             // synthesis bank gain
    repeat (3) @(posedge clk);
    rst_n <= 1;
    foreach (chans[i]) begin
      test_ch = chans[i];
      blocks = 0;
      c_re = 0.0; c_im = 0.0; a_re = 0.0; a_im = 0.0; pw = 0.0; nacc = 0;
      while (blocks < BLK) begin
        @(posedge clk);
        if (ch_take) blocks++;
      end
      begin
        real amp, adj, tone_pw;
        amp = 2.0 * $sqrt(c_re * c_re + c_im * c_im) / real'(nacc);
        adj = 2.0 * $sqrt(a_re * a_re + a_im * a_im) / real'(nacc);
        tone_pw = amp * amp / 2.0;
        $display("channel %0d: %0d MHz amplitude %f (expected %f), +16 MHz %f, tone/total power %f",
                 test_ch, 470 + 8 * test_ch, amp, gain * A, adj, tone_pw / (pw / real'(nacc)));
        checks++;
        if (amp < 0.94 * gain * A || amp > 1.06 * gain * A) failures++;
        checks++;
        if (adj > amp / 100.0) failures++;
        checks++;
        if (tone_pw < 0.99 * pw / real'(nacc)) failures++;
      end
    end
    $display("channel vectors taken %0d", takes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * BLK * M + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
