// tb_freq_shift: checks the frequency shift of both directions at the
// receiver word length (13 bit) with the default Omega. Random samples are
// fed with occasional gaps in in_valid; each output is compared with the
// product of the input and e^{+/-j 2 pi 470*4/2048 n} computed in floating
// point and saturated to the word range (tolerance 2 LSB).
module tb_freq_shift;
  localparam int W = 13;
  localparam real PI = 3.14159265358979323846;
  localparam int NS = 2000;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic in_valid = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic pv, nv;
  logic signed [W-1:0] p_re, p_im, n_re, n_im;

  freq_shift #(.W(W), .NEG(1'b0)) u_pos (.clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(pv), .out_re(p_re), .out_im(p_im));
  freq_shift #(.W(W), .NEG(1'b1)) u_neg (.clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(nv), .out_re(n_re), .out_im(n_im));

  int checks = 0, failures = 0;
  int q_re [$], q_im [$];
  int n_out = 0;

  // the block saturates to the W-bit range
  function automatic real sat(input real v);
    if (v > 4095.0) return 4095.0;
    if (v < -4096.0) return -4096.0;
    return v;
  endfunction

  always @(posedge clk) if (rst_n && pv) begin
    real ang, wr, wi, er, ei, fr, fi;
    int xr, xi;
    xr = q_re.pop_front(); xi = q_im.pop_front();
    ang = 2.0 * PI * real'((n_out * 470 * 4) % 2048) / 2048.0;
    wr = real'(xr) * $cos(ang) - real'(xi) * $sin(ang);
    wi = real'(xr) * $sin(ang) + real'(xi) * $cos(ang);
    fr = real'(xr) * $cos(ang) + real'(xi) * $sin(ang);
    fi = -real'(xr) * $sin(ang) + real'(xi) * $cos(ang);
    wr = sat(wr); wi = sat(wi); fr = sat(fr); fi = sat(fi);
    er = wr - real'(p_re); ei = wi - real'(p_im);
    checks++;
    if (!nv || er > 2.0 || er < -2.0 || ei > 2.0 || ei < -2.0) begin
      failures++;
      if (failures < 5) $display("pos n=%0d got %0d,%0d want %f,%f", n_out, p_re, p_im, wr, wi);
    end
    er = fr - real'(n_re); ei = fi - real'(n_im);
    checks++;
    if (er > 2.0 || er < -2.0 || ei > 2.0 || ei < -2.0) begin
      failures++;
      if (failures < 5) $display("neg n=%0d got %0d,%0d want %f,%f", n_out, n_re, n_im, fr, fi);
    end
    n_out++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      if ($urandom % 5 == 0) begin
        in_valid = 0;
      end else begin
        in_valid = 1;
        in_re = W'(int'($urandom % 8191) - 4095);
        in_im = W'(int'($urandom % 8191) - 4095);
        q_re.push_back(int'(in_re)); q_im.push_back(int'(in_im));
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (q_re.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 2 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
