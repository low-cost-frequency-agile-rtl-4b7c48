// fft_r2: frame-parallel, pipelined radix-2 FFT / inverse FFT. It is the
// modulating transform of both stage-2 filter banks (a K2-point DFT in the
// receiver, a K2-point inverse DFT in the transmitter).
//
// How it works: the log2(N) butterfly stages each own a register buffer of
// one N-point frame. A frame is loaded (inputs in bit-reversed order) into the
// stage-0 buffer when in_valid is high; at the same clock edge every stage
// hands its frame to the next one and the last stage's frame goes to the
// output registers. Between two hand-overs each stage performs its N/2
// decimation-in-time butterflies in place, one per clock, on its own buffer;
// the butterfly of the hand-over cycle is applied to the frame as it moves on.
// A new frame may therefore come every N/2 cycles, which is exactly the block
// rate of a filter bank with K2 bands decimated by K2/2 and one sample per
// clock. Every butterfly halves its result (rounded to nearest), so the output
// is the transform divided by N, which cannot overflow except in the rounding
// of full-scale inputs (the result saturates).
//
// Interface: in_valid with in_re/in_im (natural order, D-bit signed); frames
// must be at least N/2 cycles apart. out_valid pulses for one cycle when a
// finished frame appears on out_re/out_im, which then hold until the next
// hand-over. INVERSE=0 computes sum x[n] e^{-j2pi kn/N}, INVERSE=1 uses
// e^{+j2pi kn/N}; both divided by N.
// Timing: a frame leaves log2(N) hand-overs after it entered, i.e. with a
// steady frame period of N/2 cycles, log2(N)*N/2 cycles later. The radix-2
// structure, the per-stage scaling and the buffer-per-stage pipeline are this
// design's choices; the transform only has to be an FFT of K2 points.
module fft_r2 #(
  parameter int N       = 64,   // transform length, power of two
  parameter int D       = 20,   // data width
  parameter int TW_W    = 16,   // twiddle width (Q1.15)
  parameter bit INVERSE = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [D-1:0] in_re [N],
  input  logic signed [D-1:0] in_im [N],
  output logic                out_valid,
  output logic signed [D-1:0] out_re [N],
  output logic signed [D-1:0] out_im [N]
);
  import fbmc_pkg::*;

  localparam int LOGN = $clog2(N);
  localparam int HALF = N / 2;
  localparam int PW   = D + TW_W + 2;       // product/sum width

  typedef logic signed [D-1:0]    data_t;
  typedef logic signed [TW_W-1:0] tw_t;

  // twiddle table: W^i = cos(2 pi i/N) -/+ j sin(2 pi i/N), i < N/2
  function automatic tw_t tw_cos(input int i);
    return tw_t'(cos_q15(i, N));
  endfunction
  function automatic tw_t tw_sin(input int i);
    return INVERSE ? tw_t'(sin_q15(i, N)) : tw_t'(-sin_q15(i, N));
  endfunction

  function automatic int bitrev(input int v);
    int r;
    r = 0;
    for (int b = 0; b < LOGN; b++) r |= ((v >> b) & 1) << (LOGN - 1 - b);
    return r;
  endfunction

  // (a*2^15 +/- t) / 2^16, rounded, saturated to D bits
  function automatic data_t half_round(input logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + (PW'(1) <<< (TW_W - 1))) >>> TW_W;
    if (r > PW'((1 <<< (D - 1)) - 1))  return data_t'((1 <<< (D - 1)) - 1);
    if (r < -PW'(1 <<< (D - 1)))       return data_t'(-(1 <<< (D - 1)));
    return data_t'(r);
  endfunction

  data_t buf_re [LOGN][N];
  data_t buf_im [LOGN][N];
  data_t nxt_re [LOGN][N];
  data_t nxt_im [LOGN][N];
  logic  vld    [LOGN];
  logic [LOGN:0] bf;                         // butterfly index, N/2 = idle

  tw_t tw_c [HALF];
  tw_t tw_s [HALF];
  for (genvar i = 0; i < HALF; i++) begin : g_tw
    localparam tw_t C = tw_cos(i);
    localparam tw_t S = tw_sin(i);
    assign tw_c[i] = C;
    assign tw_s[i] = S;
  end

  // one in-place butterfly per stage per cycle
  always_comb begin
    int pos, i0, i1, ti;
    logic signed [PW-1:0] tr, tim, ar, ai;
    for (int s = 0; s < LOGN; s++) begin
      nxt_re[s] = buf_re[s];
      nxt_im[s] = buf_im[s];
      tr  = '0;
      tim = '0;
      ar  = '0;
      ai  = '0;
      pos = int'(bf) & ((1 << s) - 1);
      i0  = (((int'(bf) >> s) << (s + 1)) | pos) % N;
      i1  = (i0 + (1 << s)) % N;
      ti  = (pos << (LOGN - 1 - s)) % HALF;
      if (bf < (LOGN+1)'(HALF)) begin
        ar  = PW'(buf_re[s][i0]) <<< (TW_W - 1);
        ai  = PW'(buf_im[s][i0]) <<< (TW_W - 1);
        tr  = PW'(buf_re[s][i1]) * PW'(tw_c[ti]) - PW'(buf_im[s][i1]) * PW'(tw_s[ti]);
        tim = PW'(buf_re[s][i1]) * PW'(tw_s[ti]) + PW'(buf_im[s][i1]) * PW'(tw_c[ti]);
        nxt_re[s][i0] = half_round(ar + tr);
        nxt_im[s][i0] = half_round(ai + tim);
        nxt_re[s][i1] = half_round(ar - tr);
        nxt_im[s][i1] = half_round(ai - tim);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bf        <= (LOGN+1)'(HALF);
      out_valid <= 1'b0;
      for (int s = 0; s < LOGN; s++) begin
        vld[s] <= 1'b0;
        for (int i = 0; i < N; i++) begin
          buf_re[s][i] <= '0;
          buf_im[s][i] <= '0;
        end
      end
      for (int i = 0; i < N; i++) begin
        out_re[i] <= '0;
        out_im[i] <= '0;
      end
    end else if (in_valid) begin
      bf        <= '0;
      out_valid <= vld[LOGN-1];
      out_re    <= nxt_re[LOGN-1];
      out_im    <= nxt_im[LOGN-1];
      vld[0]    <= 1'b1;
      for (int i = 0; i < N; i++) begin
        buf_re[0][bitrev(i)] <= in_re[i];
        buf_im[0][bitrev(i)] <= in_im[i];
      end
      for (int s = 1; s < LOGN; s++) begin
        vld[s]    <= vld[s-1];
        buf_re[s] <= nxt_re[s-1];
        buf_im[s] <= nxt_im[s-1];
      end
    end else begin
      out_valid <= 1'b0;
      if (bf < (LOGN+1)'(HALF)) bf <= bf + 1'b1;
      buf_re <= nxt_re;
      buf_im <= nxt_im;
    end
  end

  // a frame may only move on once every stage has finished its butterflies
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> bf >= (LOGN+1)'(HALF - 1))
    else $error("fft_r2: frames closer than N/2 cycles");

endmodule
