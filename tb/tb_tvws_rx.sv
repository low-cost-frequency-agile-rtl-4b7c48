// tb_tvws_rx: end-to-end test of the receiver at its default size. A real RF
// tone at the centre frequency 470 + 8c MHz of channel c (c = 0, 20, 39),
// sampled at 2.048 GHz with 12 bits, is fed four samples per clock. After the
// filters have settled, channel c must show a constant output of the
// expected magnitude (stage-1 gain 1, analysis gain from the prototype
// coefficients, +/-6 % for the stage-1 passband ripple), every channel two or
// more bands away must be at least 40 dB lower, and a frame must arrive every
// 32 clocks (16 MHz channel rate at a 512 MHz clock).
module tb_tvws_rx;
  import fbmc_pkg::*;
  localparam int NC = 40, K1_ = 4, M = 32;
  localparam int FRM = 30, SETTLE = 14;
  localparam real PI = 3.14159265358979323846;
  localparam real A = 1500.0;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic adc_valid = 0, ch_valid;
  logic signed [11:0] adc_smp [K1_];
  logic signed [15:0] ch_re [NC], ch_im [NC];

  tvws_rx dut (.*);

  int checks = 0, failures = 0;
  int test_ch = 0, frames = 0, total_frames = 0;
  longint cyc = 0, last_frm = -1;
  real mag_min, mag_max, leak;
  real gain;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && ch_valid) begin
    if (last_frm >= 0) begin
      checks++;
      if (cyc - last_frm != longint'(M)) begin
        failures++;
        $display("frame period %0d", cyc - last_frm);
      end
    end
    last_frm = cyc;
    if (frames >= SETTLE) begin
      real mg;
      for (int k = 0; k < NC; k++) begin
        mg = $sqrt(real'(ch_re[k]) ** 2 + real'(ch_im[k]) ** 2);
        if (k == test_ch) begin
          if (mg < mag_min) mag_min = mg;
          if (mg > mag_max) mag_max = mg;
        end else if ((k > test_ch + 1 || k < test_ch - 1) && mg > leak) leak = mg;
      end
    end
    frames++;
    total_frames++;
  end

  initial begin
    static int chans [3] = '{0, 20, 39};
    longint n;
    real s;
    s = 0.0;
    for (int i = 0; i < 320; i++) s += real'(p2_coef(i, 320, 64));
    gain = s / real'(1 << 17);               // analysis bank gain
    for (int p = 0; p < K1_; p++) adc_smp[p] = '0;
    n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    foreach (chans[i]) begin
      test_ch = chans[i];
      frames = 0;
      mag_min = 1.0e9; mag_max = 0.0; leak = 0.0;
      while (frames < FRM) begin
        @(negedge clk);
        adc_valid = 1;
        for (int p = 0; p < K1_; p++) begin
          adc_smp[p] = 12'($rtoi(A * $cos(2.0 * PI * real'(((n + longint'(p)) * (470 + 8 * test_ch)) % 2048)
                                        / 2048.0) + 2000.5) - 2000);
        end
        n += longint'(K1_);
      end
      $display("channel %0d: magnitude %f..%f (expected %f), worst leak %f",
               test_ch, mag_min, mag_max, gain * A, leak);
      checks++;
      if (mag_min < 0.94 * gain * A || mag_max > 1.06 * gain * A) failures++;
      checks++;
      if (leak > mag_min / 100.0) failures++;
    end
    checks++;
    if (total_frames < 3 * FRM) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * FRM * M + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
