// daq_filter_pkg: constants, coefficient tables and the rounding rule shared by
// the 256-channel two-stage filter.
//
// The system samples 256 multiplexed channels at 160 samples/s each with a 14-bit
// ADC and filters them in two stages. Stage 1 is three cascaded 8-point moving
// averages, i.e. a 22-tap FIR whose integer taps are the convolution of three
// length-8 boxcars (taps sum to 512); it is evaluated for every fourth input
// frame, which decimates 160 SPS to 40 SPS. Stage 2 is a 26-tap lowpass with a
// 1 Hz cutoff at 40 SPS. Products are accumulated to 32 bits and rounded to a
// 16-bit result. Those numbers follow the source description.
//
// The stage-2 tap values are this design's own: the description gives only the
// length and the cutoff. They are a Hamming-windowed sinc,
//   h[n] = (2fc/fs) sinc(2fc/fs (n - 12.5)) (0.54 - 0.46 cos(2 pi n / 25)),
//   n = 0..25, fc = 1 Hz, fs = 40 Hz,
// normalised to unit DC gain and quantised to Q15 with the two centre taps
// adjusted so that the taps sum to exactly 32768. The response is -3 dB at
// about 1.13 Hz with a stopband below -45 dB above 5 Hz.
package daq_filter_pkg;

  localparam int NUM_CH   = 256;  // multiplexed channels
  localparam int ADC_W    = 14;   // ADC code width (two's complement)
  localparam int DATA_W   = 16;   // filter result width
  localparam int ACC_W    = 32;   // accumulator width
  localparam int HIST_AW   = 5;   // history slots per channel (32 >= 26 taps)

  localparam int S1_MA_LEN = 8;                    // moving-average length
  localparam int S1_TAPS   = 3 * (S1_MA_LEN - 1) + 1; // 22 taps
  localparam int S1_DEC    = 4;                    // 160 SPS -> 40 SPS
  // Stage-1 taps sum to 8^3 = 2^9. Shifting by 7 instead of 9 maps the 14-bit
  // input range onto the 16-bit output range (gain of 4 in code units).
  localparam int S1_SHIFT  = 7;

  localparam int S2_TAPS   = 26;
  localparam int S2_DEC    = 1;                    // one output per 40 SPS input
  localparam int S2_SHIFT  = 15;                   // Q15 taps

  typedef logic [$clog2(NUM_CH)-1:0] ch_t;
  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Tap k of three cascaded L-point moving averages: the number of ways to
  // write k as a sum of three integers each in 0..L-1.
  function automatic int boxcar3_coef(input int k, input int len);
    int c;
    c = 0;
    for (int i = 0; i < len; i++)
      for (int j = 0; j < len; j++)
        if (k - i - j >= 0 && k - i - j < len) c++;
    return c;
  endfunction

  // Stage-2 Q15 taps (see the header for the formula). Symmetric: h[k] = h[25-k].
  function automatic int lpf_coef(input int k);
    int m;
    m = (k < S2_TAPS / 2) ? k : S2_TAPS - 1 - k;
    case (m)
      0:  return 101;
      1:  return 136;
      2:  return 221;
      3:  return 366;
      4:  return 572;
      5:  return 835;
      6:  return 1142;
      7:  return 1475;
      8:  return 1809;
      9:  return 2119;
      10: return 2379;
      11: return 2566;
      default: return 2663;
    endcase
  endfunction

  // Round half up at bit SHIFT and saturate to a signed 16-bit result.
  function automatic sample_t round_sat(input acc_t acc, input int shift);
    logic signed [ACC_W:0] t;
    t = ((ACC_W+1)'(acc) + ((ACC_W+1)'(1) <<< (shift - 1))) >>> shift;
    if (t > (ACC_W+1)'(32767))       return sample_t'(16'sh7fff);
    else if (t < -(ACC_W+1)'(32768)) return sample_t'(16'sh8000);
    else                             return sample_t'(t[DATA_W-1:0]);
  endfunction

endpackage
