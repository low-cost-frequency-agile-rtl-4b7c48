// tb_fft_r2: self-checking test of the pipelined FFT in both directions.
// Random frames enter every N/2 cycles (the filter-bank block rate); every
// output frame is compared with a direct DFT computed in floating point and
// divided by N (tolerance of a few LSB for the per-stage rounding plus
// the 2e-4 relative gain error of Q1.15 twiddles), and the
// latency is checked to be log2(N)*N/2 + 1 cycles.
module tb_fft_r2;
  localparam int N = 64;
  localparam int D = 20;
  localparam int LOGN = $clog2(N);
  localparam int FRAMES = 16;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic in_valid;
  logic signed [D-1:0] in_re [N], in_im [N];
  logic fo_valid, io_valid;
  logic signed [D-1:0] fo_re [N], fo_im [N], io_re [N], io_im [N];

  fft_r2 #(.N(N), .D(D), .INVERSE(1'b0)) u_fwd (.clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(fo_valid), .out_re(fo_re), .out_im(fo_im));
  fft_r2 #(.N(N), .D(D), .INVERSE(1'b1)) u_inv (.clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(io_valid), .out_re(io_re), .out_im(io_im));

  int checks = 0, failures = 0;
  int hist_re [FRAMES][N], hist_im [FRAMES][N];
  longint t_in [FRAMES];
  longint cyc = 0;
  int nout_f = 0, nout_i = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check_frame(input int f, input bit inv, input logic signed [D-1:0] ore [N],
                             input logic signed [D-1:0] oim [N]);
    real sr, si, ang, er, ei, tol;
    int bad;
    bad = 0;
    for (int k = 0; k < N; k++) begin
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        ang = (inv ? 2.0 : -2.0) * PI * real'(k * n) / real'(N);
        sr += real'(hist_re[f][n]) * $cos(ang) - real'(hist_im[f][n]) * $sin(ang);
        si += real'(hist_re[f][n]) * $sin(ang) + real'(hist_im[f][n]) * $cos(ang);
      end
      er = sr / real'(N) - real'(ore[k]);
      ei = si / real'(N) - real'(oim[k]);
      tol = 4.0 + 2.0e-4 * ($sqrt(sr * sr + si * si) / real'(N));
      if (er > tol || er < -tol || ei > tol || ei < -tol) begin
        if (bad < 3) $display("frame %0d inv=%0d bin %0d: got %0d,%0d want %f,%f",
                              f, inv, k, ore[k], oim[k], sr / N, si / N);
        bad++;
      end
    end
    checks++;
    if (bad != 0) failures++;
  endtask

  always @(posedge clk) begin
    if (rst_n && fo_valid) begin
      checks++;
      if (cyc - t_in[nout_f] != longint'(LOGN * N / 2 + 1)) begin
        failures++;
        $display("latency %0d", cyc - t_in[nout_f]);
      end
      check_frame(nout_f, 1'b0, fo_re, fo_im);
      nout_f++;
    end
    if (rst_n && io_valid) begin
      check_frame(nout_i, 1'b1, io_re, io_im);
      nout_i++;
    end
  end

  initial begin
    int amp;
    in_valid = 0;
    for (int i = 0; i < N; i++) begin in_re[i] = '0; in_im[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < FRAMES + LOGN; f++) begin
      @(negedge clk);
      // frame 0: single impulse, frame 1: full-scale tone, then random
      amp = (f % 3 == 0) ? (1 << (D - 2)) : (1 << (D - 1)) - 1;
      for (int i = 0; i < N; i++) begin
        if (f == 0) begin
          in_re[i] = (i == 3) ? D'(20000) : '0; in_im[i] = '0;
        end else if (f == 1) begin
          in_re[i] = D'($rtoi(250000.0 * $cos(2.0 * PI * 5.0 * i / N)));
          in_im[i] = D'($rtoi(250000.0 * $sin(2.0 * PI * 5.0 * i / N)));
        end else begin
          in_re[i] = D'(int'($urandom % (2 * amp)) - amp);
          in_im[i] = D'(int'($urandom % (2 * amp)) - amp);
        end
        if (f < FRAMES) begin hist_re[f][i] = int'(in_re[i]); hist_im[f][i] = int'(in_im[i]); end
      end
      in_valid = 1;
      if (f < FRAMES) t_in[f] = cyc;
      @(negedge clk);
      in_valid = 0;
      repeat (N / 2 - 2) @(negedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (nout_f != FRAMES || nout_i != FRAMES) begin
      failures++;
      $display("frames out %0d %0d", nout_f, nout_i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
