// fbmc_pkg: constants, types and coefficient generators shared by the
// two-stage TV white space (TVWS) filter-bank transceiver.
//
// The numbers are those of the configuration built in hardware ("design 2"):
// an RF sampling rate of 2.048 GHz, a stage-1 polyphase bandpass of 44 taps
// with decimation/expansion by 4, and a stage-2 DFT-modulated filter bank of
// 64 bands (40 of them carry the 8 MHz TVWS channels) with a 320-tap
// prototype, oversampled by two. Data and coefficients are 16 bit; the
// receiver takes 12-bit ADC samples, widens to 13 bit after stage 1 and to
// 16 bit after stage 2; the complex exponential of the frequency shift is
// 16 bit.
//
// The filter coefficients themselves are this design's own: the stage-1
// bandpass is a Blackman-windowed sinc lowpass (cutoff fs/8, i.e. halfway
// through the transition band of the decimated spectrum) modulated to the
// band centre of 630 MHz; the stage-2 prototype is a root-raised-cosine pulse
// with a symbol period of K2/2 samples and roll-off 0.5, which puts the
// passband edge at 4 MHz and the stopband edge at 12 MHz of a 512 MHz rate.
// All tables are computed here at elaboration time by constant functions, so
// no coefficient file is needed. Coefficients are Q1.15 (value * 32767,
// rounded, clamped to the signed 16-bit range).
package fbmc_pkg;

  // ---- system numbers (MHz) -------------------------------------------
  localparam int FS_MHZ     = 2048;  // RF sampling rate
  localparam int FC_MHZ     = 630;   // centre of the UHF TVWS band
  localparam int FLOW_MHZ   = 470;   // lower edge of the TVWS band
  localparam int TVWS_BW    = 320;   // TVWS band width
  localparam int CH_BW_MHZ  = 8;     // one TVWS channel

  // ---- design 2 sizes -------------------------------------------------
  localparam int K1         = 4;     // stage-1 decimation / expansion
  localparam int L1         = 44;    // stage-1 filter length
  localparam int K2         = 64;    // stage-2 number of bands
  localparam int L2         = 320;   // stage-2 prototype length
  localparam int NUM_CH     = 40;    // TVWS channels in use

  // ---- word lengths ---------------------------------------------------
  localparam int COEF_W     = 16;    // all coefficients, Q1.15
  localparam int TX_W       = 16;    // transmitter data path
  localparam int ADC_W      = 12;    // receiver input
  localparam int RX_S1_W    = 13;    // receiver after stage 1
  localparam int RX_S2_W    = 16;    // receiver after stage 2
  localparam int NCO_PHASE_W = 16;   // phase accumulator of the shift
  localparam int NCO_LUT_BITS = 8;   // phase bits that address the table

  // pi, as a function so that no real-valued parameter reaches synthesis
  function automatic real PI();
    return 3.14159265358979323846;
  endfunction

  // 16-bit complex sample used on the external channel interfaces
  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cpx16_t;

  // ---- helpers --------------------------------------------------------
  // Round a real value in [-1,1) to Q1.15 with clamping.
  function automatic int q15(input real v);
    real s;
    int  r;
    s = v * 32767.0;
    if (s >= 0.0) r = $rtoi(s + 0.5);
    else          r = -$rtoi(-s + 0.5);
    if (r > 32767)  r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  // Phase increment of the frequency shift: Omega = 2*pi*470MHz*K1/fs,
  // expressed as a fraction of a turn in a PHASE_W-bit accumulator.
  function automatic int shift_fcw(input int k1, input int phase_w);
    real f;
    f = real'(FLOW_MHZ) * real'(k1) / real'(FS_MHZ);
    f = f - $floor(f);
    return $rtoi(f * (2.0 ** phase_w) + 0.5) % (1 << phase_w);
  endfunction

  // ---- stage-1 complex bandpass h1[n], n = 0..len-1 --------------------
  // Real-valued prototype lowpass (unity DC gain) before modulation.
  function automatic real h1_lowpass(input int n, input int len);
    real c, t, fc, w, s;
    c  = real'(len - 1) / 2.0;
    t  = real'(n) - c;
    fc = 256.0 / real'(FS_MHZ);          // cutoff, cycles per sample
    if (t == 0.0) s = 2.0 * fc;
    else          s = $sin(2.0 * PI() * fc * t) / (PI() * t);
    w = 0.42 - 0.5 * $cos(2.0 * PI() * real'(n) / real'(len - 1))
             + 0.08 * $cos(4.0 * PI() * real'(n) / real'(len - 1));
    return s * w;
  endfunction

  function automatic int h1_re(input int n, input int len);
    real t;
    if (n < 0 || n >= len) return 0;
    t = real'(n) - real'(len - 1) / 2.0;
    return q15(h1_lowpass(n, len) * $cos(2.0 * PI() * real'(FC_MHZ) / real'(FS_MHZ) * t));
  endfunction

  function automatic int h1_im(input int n, input int len);
    real t;
    if (n < 0 || n >= len) return 0;
    t = real'(n) - real'(len - 1) / 2.0;
    return q15(h1_lowpass(n, len) * $sin(2.0 * PI() * real'(FC_MHZ) / real'(FS_MHZ) * t));
  endfunction

  // ---- stage-2 prototype p[n], n = 0..len-1 ----------------------------
  // Root-raised-cosine, symbol period k/2 samples, roll-off 0.5,
  // normalised so that its peak is 1.0 before quantisation.
  function automatic real rrc(input real t, input real tsym, input real beta);
    real x, d;
    x = t / tsym;
    if (x < 1.0e-9 && x > -1.0e-9)
      return 1.0 - beta + 4.0 * beta / PI();
    d = 1.0 - (4.0 * beta * x) * (4.0 * beta * x);
    if (d < 1.0e-9 && d > -1.0e-9)
      return beta / $sqrt(2.0) * ((1.0 + 2.0 / PI()) * $sin(PI() / (4.0 * beta))
                                + (1.0 - 2.0 / PI()) * $cos(PI() / (4.0 * beta)));
    return ($sin(PI() * x * (1.0 - beta)) + 4.0 * beta * x * $cos(PI() * x * (1.0 + beta)))
           / (PI() * x * d);
  endfunction

  function automatic int p2_coef(input int n, input int len, input int k);
    real t, pk;
    if (n < 0 || n >= len) return 0;
    t  = real'(n) - real'(len - 1) / 2.0;
    pk = 1.0 - 0.5 + 2.0 / PI();
    return q15(rrc(t, real'(k) / 2.0, 0.5) / pk);
  endfunction

  // ---- twiddles and the complex exponential ----------------------------
  // cos / sin of 2*pi*i/n in Q1.15.
  function automatic int cos_q15(input int i, input int n);
    return q15($cos(2.0 * PI() * real'(i) / real'(n)));
  endfunction

  function automatic int sin_q15(input int i, input int n);
    return q15($sin(2.0 * PI() * real'(i) / real'(n)));
  endfunction

endpackage
