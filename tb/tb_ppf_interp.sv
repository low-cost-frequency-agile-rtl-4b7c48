// tb_ppf_interp: self-checking test of the stage-1 transmit filter at its
// default size (K1 = 4, L1 = 44, 16 bit). Random complex inputs, then a
// complex tone at +150 MHz and one at -150 MHz of the 512 MHz rate, are
// expanded by 4. Every RF output sample is compared with the real part of a
// direct-form convolution of the zero-stuffed stream at 2.048 GHz, scaled by
// K1 (exact match expected). A complex tone at +150 MHz of the 512 MHz rate
// has images at 150, 662, 1174 and 1686 MHz after expansion; only 662 MHz
// lies in the 470-790 MHz passband. Correlating the RF output with 662 MHz
// must give amplitude A (+/-5 %), with the 150 MHz image at least 40 dB lower.
// (The other images fall in the transition bands, where aliasing is allowed.)
module tb_ppf_interp;
  import fbmc_pkg::*;
  localparam int K = 4, L = 44, W = 16;
  localparam int G0 = 300, G1 = 300, NG = G0 + G1;
  localparam real PI = 3.14159265358979323846;
  localparam real AMP = 8000.0;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic in_valid = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic out_valid;
  logic signed [W-1:0] out_smp [K];

  ppf_interp #(.K1(K), .L1(L), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  int ure [NG], uim [NG];
  int m_out = 0;
  real pk_in, pk_out;
  real c_re = 0.0, c_im = 0.0, d_re = 0.0, d_im = 0.0;
  int nc = 0;

  function automatic int ref_z(input int n);
    longint acc;
    int k, j;
    acc = 0;
    for (int i = 0; i < L; i++) begin
      j = n - i;                       // high-rate index of the stuffed input
      if (j >= 0 && j % K == 0) begin
        k = j / K;
        acc += longint'(ure[k]) * longint'(h1_re(i, L)) - longint'(uim[k]) * longint'(h1_im(i, L));
      end
    end
    acc = (acc + 4096) >>> 13;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    for (int p = 0; p < K; p++) begin
      int r;
      r = ref_z(K * m_out + p);
      checks++;
      if (int'(out_smp[p]) != r) begin
        failures++;
        if (failures < 5) $display("n=%0d got %0d want %0d", K * m_out + p, out_smp[p], r);
      end
      if (m_out >= G0 + 20 && m_out < G0 + G1 - 4) begin
        real a, b, z;
        z = real'(out_smp[p]);
        a = 2.0 * PI * 662.0 / 2048.0 * real'(K * m_out + p);
        b = 2.0 * PI * 150.0 / 2048.0 * real'(K * m_out + p);
        c_re += z * $cos(a); c_im -= z * $sin(a);
        d_re += z * $cos(b); d_im -= z * $sin(b);
        nc++;
      end
    end
    m_out++;
  end

  initial begin
    for (int m = 0; m < NG; m++) begin
      real f;
      if (m < G0) begin
        ure[m] = int'($urandom % 40000) - 20000;
        uim[m] = int'($urandom % 40000) - 20000;
      end else begin
        f = 150.0 / 512.0;
        ure[m] = $rtoi(AMP * $cos(2.0 * PI * f * real'(m)) + 10000.5) - 10000;
        uim[m] = $rtoi(AMP * $sin(2.0 * PI * f * real'(m)) + 10000.5) - 10000;
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < NG; m++) begin
      @(negedge clk);
      in_valid = 1;
      in_re = W'(ure[m]);
      in_im = W'(uim[m]);
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    pk_in  = 2.0 * $sqrt(c_re * c_re + c_im * c_im) / real'(nc);
    pk_out = 2.0 * $sqrt(d_re * d_re + d_im * d_im) / real'(nc);
    $display("662 MHz amplitude %f, 150 MHz image %f", pk_in, pk_out);
    checks++;
    if (m_out != NG) failures++;
    checks++;
    if (pk_in < 0.95 * AMP || pk_in > 1.05 * AMP) failures++;
    checks++;
    if (pk_out > AMP / 100.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NG + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
