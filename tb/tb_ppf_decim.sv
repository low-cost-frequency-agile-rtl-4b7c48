// tb_ppf_decim: self-checking test of the stage-1 receive filter at its
// default size (K1 = 4, L1 = 44, 12 -> 13 bits). A high-rate stream is built
// from random samples, then a 600 MHz tone (inside the 470-790 MHz band) and
// a 150 MHz tone (outside it). Every output is compared with a direct-form
// convolution at the full 2.048 GHz rate followed by decimation (exact match
// expected: both round the same full-precision sum). The tones check the
// function: the in-band tone must come out with amplitude A (+/-5 %), the
// out-of-band tone at least 40 dB lower.
module tb_ppf_decim;
  import fbmc_pkg::*;
  localparam int K = 4, L = 44, IW = 12, OW = 13;
  localparam int G0 = 400, G1 = 300, G2 = 300, NG = G0 + G1 + G2;
  localparam real PI = 3.14159265358979323846;
  localparam real AMP = 1500.0;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic in_valid = 0;
  logic signed [IW-1:0] in_smp [K];
  logic out_valid;
  logic signed [OW-1:0] out_re, out_im;

  ppf_decim #(.K1(K), .L1(L), .IN_W(IW), .OUT_W(OW)) dut (.*);

  int checks = 0, failures = 0;
  int x [NG * K];
  int m_out = 0;
  real max_in = 0.0, max_out = 0.0, min_in = 1.0e9;

  function automatic int ref_y(input int m, input bit im);
    longint acc;
    int n;
    acc = 0;
    for (int i = 0; i < L; i++) begin
      n = K * m + K - 1 - i;
      if (n >= 0) acc += longint'(x[n]) * longint'(im ? longint'(h1_im(i, L)) : longint'(h1_re(i, L)));
    end
    acc = (acc + 8192) >>> 14;
    if (acc > 4095) acc = 4095;
    if (acc < -4096) acc = -4096;
    return int'(acc);
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    real mag;
    checks++;
    if (int'(out_re) != ref_y(m_out, 0) || int'(out_im) != ref_y(m_out, 1)) begin
      failures++;
      if (failures < 5) $display("m=%0d got %0d,%0d want %0d,%0d", m_out, out_re, out_im,
                                 ref_y(m_out, 0), ref_y(m_out, 1));
    end
    mag = $sqrt(real'(out_re) * real'(out_re) + real'(out_im) * real'(out_im));
    if (m_out >= G0 + 20 && m_out < G0 + G1) begin
      if (mag > max_in) max_in = mag;
      if (mag < min_in) min_in = mag;
    end
    if (m_out >= G0 + G1 + 20 && mag > max_out) max_out = mag;
    m_out++;
  end

  initial begin
    for (int n = 0; n < NG * K; n++) begin
      if (n < G0 * K)
        x[n] = int'($urandom % 4095) - 2047;
      else if (n < (G0 + G1) * K)
        x[n] = $rtoi(AMP * $cos(2.0 * PI * 600.0 / 2048.0 * real'(n)) + 1000.5) - 1000;
      else
        x[n] = $rtoi(AMP * $cos(2.0 * PI * 150.0 / 2048.0 * real'(n)) + 1000.5) - 1000;
    end
    for (int p = 0; p < K; p++) in_smp[p] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < NG; m++) begin
      @(negedge clk);
      in_valid = 1;
      for (int p = 0; p < K; p++) in_smp[p] = IW'(x[K * m + p]);
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    $display("in-band amplitude %f..%f, out-of-band peak %f", min_in, max_in, max_out);
    checks++;
    if (m_out != NG) failures++;
    checks++;
    if (min_in < 0.95 * AMP || max_in > 1.05 * AMP) failures++;
    checks++;
    if (max_out > AMP / 100.0) failures++;
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
