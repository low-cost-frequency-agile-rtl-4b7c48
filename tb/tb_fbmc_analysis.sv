// tb_fbmc_analysis: self-checking test of the receive filter bank at its
// default size (K = 64 bands, L = 320 taps, 40 channels). The input is first
// random (with random pauses of in_valid), then a continuous complex tone at
// the centre of channel 5. Every channel of every output frame is compared
// with the filter-bank definition evaluated directly in floating point,
//   y_k = sum_n p[n] e^{+j2pi kn/K} x[e-n],  e = end of the block,
// multiplied by (-1)^{k(j+1)} and scaled like the hardware (tolerance 2 LSB
// plus 0.1 %). During the tone the
// frames must come every M = 32 clocks (16 MHz at a 512 MHz clock) and the
// next-adjacent channels 3 and 7 must be at least 40 dB below channel 5.
module tb_fbmc_analysis;
  import fbmc_pkg::*;
  localparam int K = 64, L = 320, NC = 40, IW = 13, OW = 16, M = K / 2;
  localparam int U_SHIFT = 8, OUT_SHIFT = 3;
  localparam int NR = 800, NT = 1600, NS = NR + NT;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic in_valid = 0;
  logic signed [IW-1:0] in_re = 0, in_im = 0;
  logic ch_valid;
  logic signed [OW-1:0] ch_re [NC], ch_im [NC];

  fbmc_analysis #(.K(K), .L(L), .NUM_CH(NC), .IN_W(IW), .OUT_W(OW)) dut (.*);

  int checks = 0, failures = 0;
  int xr [NS], xi [NS];
  real cs [K], sn [K];
  int nframe = 0;
  longint cyc = 0, last_cyc = 0;
  real m5 = 0.0, m37 = 0.0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check_frame(input int j);
    int e, n, bad;
    real sr, si, scale, er, ei, tol;
    e = (j + 1) * M - 1;
    scale = 1.0 / real'((1 << U_SHIFT) * K * (1 << OUT_SHIFT));
    bad = 0;
    for (int k = 0; k < NC; k++) begin
      sr = 0.0; si = 0.0;
      for (int i = 0; i < L; i++) begin
        n = e - i;
        if (n >= 0 && n < NS) begin
          sr += real'(p2_coef(i, L, K)) * (real'(xr[n]) * cs[(k * i) % K] - real'(xi[n]) * sn[(k * i) % K]);
          si += real'(p2_coef(i, L, K)) * (real'(xr[n]) * sn[(k * i) % K] + real'(xi[n]) * cs[(k * i) % K]);
        end
      end
      sr *= scale; si *= scale;
      if (k % 2 == 1 && j % 2 == 0) begin          // (-1)^{k(j+1)}
        sr = -sr; si = -si;
      end
      tol = 2.0 + 1.0e-3 * $sqrt(sr * sr + si * si);
      er = sr - real'(ch_re[k]); ei = si - real'(ch_im[k]);
      if (er > tol || er < -tol || ei > tol || ei < -tol) begin
        if (failures + bad < 5) $display("frame %0d ch %0d got %0d,%0d want %f,%f",
                                         j, k, ch_re[k], ch_im[k], sr, si);
        bad++;
      end
    end
    checks++;
    if (bad != 0) failures++;
  endtask

  always @(posedge clk) if (rst_n && ch_valid) begin
    check_frame(nframe);
    // tone segment: cadence and selectivity
    if ((nframe + 1) * M > NR + L + 2 * M && (nframe + 2) * M <= NS) begin
      checks++;
      if (cyc - last_cyc != longint'(M)) begin
        failures++;
        $display("frame period %0d", cyc - last_cyc);
      end
      m5 += $sqrt(real'(ch_re[5]) ** 2 + real'(ch_im[5]) ** 2);
      m37 += $sqrt(real'(ch_re[3]) ** 2 + real'(ch_im[3]) ** 2)
           + $sqrt(real'(ch_re[7]) ** 2 + real'(ch_im[7]) ** 2);
    end
    last_cyc = cyc;
    nframe++;
  end

  initial begin
    for (int k = 0; k < K; k++) begin
      cs[k] = $cos(2.0 * PI * real'(k) / real'(K));
      sn[k] = $sin(2.0 * PI * real'(k) / real'(K));
    end
    for (int n = 0; n < NS; n++) begin
      if (n < NR) begin
        xr[n] = int'($urandom % 4001) - 2000;
        xi[n] = int'($urandom % 4001) - 2000;
      end else begin
        xr[n] = $rtoi(1000.0 * $cos(2.0 * PI * 5.0 * real'(n) / real'(K)) + 2000.5) - 2000;
        xi[n] = $rtoi(1000.0 * $sin(2.0 * PI * 5.0 * real'(n) / real'(K)) + 2000.5) - 2000;
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      while (n < NR && $urandom % 8 == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      in_re = IW'(xr[n]);
      in_im = IW'(xi[n]);
    end
    @(negedge clk) in_valid = 0;
    repeat (10 * M) @(posedge clk);
    $display("frames %0d, channel 5 level %f, channels 3+7 level %f", nframe, m5, m37);
    checks++;
    if (nframe < NS / M - 8) failures++;
    checks++;
    if (m5 < 1000.0 || m37 > m5 / 100.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 2 + 20 * M) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
