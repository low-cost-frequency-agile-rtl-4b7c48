// tb_fbmc_synthesis: self-checking test of the transmit filter bank at its
// default size (K = 64 bands, L = 320 taps, 40 channels). Random channel
// vectors are offered first, then a constant symbol on channel 11 only. Every
// output sample is compared with the synthesis definition evaluated directly
// in floating point,
//   v[n] = sum_m sum_k X_k[m] p[n-mM] e^{+j2pi kn/K},
// scaled like the hardware (tolerance 2 LSB plus 0.1 %). The test also checks
// that a channel vector is taken exactly every M = 32 clocks, that the output
// runs without gaps, and that channel 11 alone gives a steady tone at
// 11 * 8 MHz (constant magnitude, phase step 2 pi 11/64 per sample).
module tb_fbmc_synthesis;
  import fbmc_pkg::*;
  localparam int K = 64, L = 320, NC = 40, W = 16, M = K / 2;
  localparam int NB = 60, NBR = 30;                // blocks, of which random
  localparam real PI = 3.14159265358979323846;
  localparam real A = 10000.0;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic ch_take;
  logic signed [W-1:0] ch_re [NC], ch_im [NC];
  logic out_valid;
  logic signed [W-1:0] out_re, out_im;

  fbmc_synthesis #(.K(K), .L(L), .NUM_CH(NC), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  int xr [NB][NC], xi [NB][NC];
  real cs [K], sn [K];
  int nb = 0, n_out = 0;
  longint cyc = 0, last_take = -1;
  real mag_min = 1.0e9, mag_max = 0.0, prev_re = 0.0, prev_im = 0.0;
  int ph_bad = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always_comb
    for (int k = 0; k < NC; k++) begin
      ch_re[k] = W'(xr[(nb < NB) ? nb : NB - 1][k]);
      ch_im[k] = W'(xi[(nb < NB) ? nb : NB - 1][k]);
    end

  function automatic void ref_v(input int n, output real vr, output real vi);
    int d;
    vr = 0.0; vi = 0.0;
    for (int m = 0; m < NB; m++) begin
      d = n - m * M;
      if (d >= 0 && d < L)
        for (int k = 0; k < NC; k++) begin
          vr += real'(p2_coef(d, L, K)) * (real'(xr[m][k]) * cs[(k * n) % K] - real'(xi[m][k]) * sn[(k * n) % K]);
          vi += real'(p2_coef(d, L, K)) * (real'(xr[m][k]) * sn[(k * n) % K] + real'(xi[m][k]) * cs[(k * n) % K]);
        end
    end
    vr /= 32768.0; vi /= 32768.0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ch_take) begin
      if (last_take >= 0) begin
        checks++;
        if (cyc - last_take != longint'(M)) failures++;
      end
      last_take = cyc;
      nb++;
    end
    if (out_valid && n_out < (NB - 1) * M) begin
      real vr, vi, tol, mg, cr;
      ref_v(n_out, vr, vi);
      tol = 2.0 + 1.0e-3 * $sqrt(vr * vr + vi * vi);
      checks++;
      if (vr - real'(out_re) > tol || real'(out_re) - vr > tol ||
          vi - real'(out_im) > tol || real'(out_im) - vi > tol) begin
        failures++;
        if (failures < 6) $display("n=%0d got %0d,%0d want %f,%f", n_out, out_re, out_im, vr, vi);
      end
      if (n_out >= (NBR + L / M + 1) * M) begin
        mg = $sqrt(real'(out_re) ** 2 + real'(out_im) ** 2);
        if (mg < mag_min) mag_min = mg;
        if (mg > mag_max) mag_max = mg;
        // rotation by 2 pi 11/64: the cross product with the previous sample
        cr = prev_re * real'(out_im) - prev_im * real'(out_re);
        if (n_out > (NBR + L / M + 1) * M &&
            (cr / (mg * mg) < $sin(2.0 * PI * 11.0 / 64.0) - 0.02 ||
             cr / (mg * mg) > $sin(2.0 * PI * 11.0 / 64.0) + 0.02)) ph_bad++;
      end
      prev_re = real'(out_re); prev_im = real'(out_im);
    end
    if (out_valid) n_out++;
    else if (n_out > 0) begin
      failures++;
      $display("gap in output at sample %0d", n_out);
    end
  end

  initial begin
    for (int k = 0; k < K; k++) begin
      cs[k] = $cos(2.0 * PI * real'(k) / real'(K));
      sn[k] = $sin(2.0 * PI * real'(k) / real'(K));
    end
    for (int m = 0; m < NB; m++)
      for (int k = 0; k < NC; k++) begin
        if (m < NBR) begin
          xr[m][k] = int'($urandom % 1201) - 600;
          xi[m][k] = int'($urandom % 1201) - 600;
        end else begin
          xr[m][k] = (k == 11) ? int'(A) : 0;
          xi[m][k] = 0;
        end
      end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (nb >= NB);
    repeat (2) @(posedge clk);
    $display("tone magnitude %f..%f, phase-step errors %0d", mag_min, mag_max, ph_bad);
    checks++;
    if (mag_min < 0.8 * A || mag_max > 1.0 * A || mag_max - mag_min > 0.02 * A) failures++;
    checks++;
    if (ph_bad != 0) failures++;
    checks++;
    if (n_out < (NB - 8) * M) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NB + 20) * M) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
