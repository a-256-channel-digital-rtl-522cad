// tb_frequency_sweep: measures the frequency response of the whole design,
// input to result memory, at its default size.
//
// Channel c carries a sine of c x 0.625 Hz (0 to 159.4 Hz, the whole band up to
// the 160 SPS sampling rate) with amplitude 6000 codes and a per-channel phase,
// so one run sweeps 256 frequencies at once. After the filters have filled, a
// reader on its own clock samples every channel's result for 2.5 s of system
// time and keeps the peak magnitude. The expected amplitude at each frequency
// is 4 x 6000 x |H1(f)| x |H2(f)|, with H1 the 22-tap stage-1 response at
// 160 SPS and H2 the 26-tap stage-2 response at 40 SPS (taps derived here from
// their definitions; the decimated output of a sine is a sine of the same
// amplitude). Checked for every channel: the peak does not exceed the expected
// amplitude plus rounding; where the output is large and the aliased
// frequency is sampled at enough phases, the peak reaches the expected value.
// Counted and required: channels on the 20 Hz notches (peak within rounding of
// zero), channels in the 1 Hz passband, stopband channels, and the image band
// at 159.4 Hz, which passes because it folds back to near DC.
// A table of expected and measured gains is printed every 10 Hz.
module tb_frequency_sweep;
  localparam int NCH = 256, CLK_DIV = 250, ADC_LAT = 40;
  localparam int SETTLE_FRAMES = 140, MEASURE_FRAMES = 400;
  localparam int T1 = 22, T2 = 26;
  localparam real PI = 3.14159265358979, AMP = 6000.0, DF = 0.625;

  logic clk = 0, rst_n = 0, ccs_clk = 0;
  logic ready, adc_convert, adc_valid = 0, overrun;
  logic [7:0] mux_addr, ccs_addr = 0, result_ch;
  logic signed [13:0] adc_data = 0;
  logic frame_tick, decim_tick, result_tick;
  logic ccs_rd = 0;
  logic signed [15:0] ccs_data;

  daq_filter_top dut (
    .clk, .rst_n, .ready, .mux_addr, .adc_convert, .adc_valid, .adc_data, .overrun,
    .frame_tick, .decim_tick, .result_tick, .result_ch,
    .ccs_clk, .ccs_rd, .ccs_addr, .ccs_data);

  always #49 clk = ~clk;
  always #150 ccs_clk = ~ccs_clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int c1 [T1], c2 [T2];
  int nsamp [NCH];
  real phi [NCH];
  int peak [NCH];
  int nread [NCH];
  int frames = 0;
  bit measuring = 0;
  int n_notch = 0, n_pass = 0, n_stop = 0, n_image = 0, n_lower = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%s", msg);
    end
  endtask

  function automatic real mag(input real f, input real fs, input int n, input int taps []);
    real re = 0.0, im = 0.0, s = 0.0;
    for (int k = 0; k < n; k++) begin
      re += taps[k] * $cos(2.0 * PI * f * k / fs);
      im -= taps[k] * $sin(2.0 * PI * f * k / fs);
      s += taps[k];
    end
    return $sqrt(re * re + im * im) / s;
  endfunction

  function automatic int gcd(input int a, input int b);
    while (b != 0) begin int t = a % b; a = b; b = t; end
    return a;
  endfunction

  initial begin
    repeat ((SETTLE_FRAMES + MEASURE_FRAMES + 4) * NCH * CLK_DIV + 50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader: at each conversion, read the channel half a frame away
  bit rd_req = 0;
  logic [7:0] rd_addr;
  always @(posedge ccs_clk) begin : reader
    static int phase = 0;
    ccs_rd <= 1'b0;
    case (phase)
      0: if (rd_req) begin ccs_rd <= 1'b1; ccs_addr <= rd_addr; phase = 1; end
      1: phase = 2;
      default: begin
        if (measuring) begin
          automatic int v = (ccs_data < 0) ? -int'(ccs_data) : int'(ccs_data);
          if (v > peak[rd_addr]) peak[rd_addr] = v;
          nread[rd_addr]++;
        end
        rd_req = 0;
        phase = 0;
      end
    endcase
  end

  // ADC model
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (frame_tick) frames++;
      if (adc_convert) begin
        automatic int ch = int'(mux_addr);
        automatic real t = real'(nsamp[ch]) / 160.0 + real'(ch) / 40960.0;
        automatic real v = AMP * $sin(2.0 * PI * DF * ch * t + phi[ch]);
        automatic int x = $rtoi(v >= 0 ? v + 0.5 : v - 0.5);
        nsamp[ch]++;
        if (!rd_req) begin rd_addr = 8'((ch + NCH / 2) % NCH); rd_req = 1; end
        fork
          begin
            repeat (ADC_LAT) @(posedge clk);
            adc_valid <= 1'b1;
            adc_data  <= 14'(x);
            @(posedge clk);
            adc_valid <= 1'b0;
          end
        join_none
      end
    end
  end

  initial begin
    int b2 [15];
    real h [T2];
    real hs = 0.0;
    int qs = 0, d, dlo;
    // stage-1 taps: three cascaded 8-point boxcars
    foreach (b2[i]) b2[i] = 0;
    foreach (c1[i]) c1[i] = 0;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) b2[i + j]++;
    for (int i = 0; i < 15; i++) for (int j = 0; j < 8; j++) c1[i + j] += b2[i];
    // stage-2 taps: Hamming-windowed sinc, 1 Hz at 40 SPS, Q15, sum 32768
    for (int n = 0; n < T2; n++) begin
      automatic real t = 2.0 / 40.0 * (n - 12.5);
      h[n] = 2.0 / 40.0 * $sin(PI * t) / (PI * t) * (0.54 - 0.46 * $cos(2.0 * PI * n / 25.0));
      hs += h[n];
    end
    for (int n = 0; n < T2; n++) begin c2[n] = $rtoi(h[n] / hs * 32768.0 + 0.5); qs += c2[n]; end
    d = 32768 - qs;
    dlo = (d >= 0) ? d / 2 : -((-d + 1) / 2);
    c2[12] += dlo;
    c2[13] += d - dlo;
    foreach (nsamp[c]) begin
      nsamp[c] = 0; peak[c] = 0; nread[c] = 0;
      phi[c] = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
    end

    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (ready);
    wait (frames == SETTLE_FRAMES);
    measuring = 1;
    wait (frames == SETTLE_FRAMES + MEASURE_FRAMES);
    measuring = 0;

    for (int c = 0; c < NCH; c++) begin
      automatic real f = DF * c;
      automatic real g = mag(f, 160.0, T1, c1) * mag(f, 40.0, T2, c2);
      automatic real e = 4.0 * AMP * g * ((c == 0) ? ((phi[c] > PI) ? -$sin(phi[c]) : $sin(phi[c])) : 1.0);
      automatic int m = c % 64;                         // alias at 40 SPS, in 0.625 Hz steps
      automatic int phases = (m == 0) ? 1 : 64 / gcd(m, 64);
      check(nread[c] > 50, $sformatf("ch %0d read only %0d times", c, nread[c]));
      check(real'(peak[c]) <= e + 4.0,
            $sformatf("%6.3f Hz: peak %0d above expected %0.1f", f, peak[c], e));
      if (e >= 200.0 && phases >= 4) begin
        check(real'(peak[c]) >= e * $cos(PI / phases) - 4.0,
              $sformatf("%6.3f Hz: peak %0d below expected %0.1f", f, peak[c], e));
        n_lower++;
      end
      if (c % 32 == 0 && c > 0) begin n_notch++; check(peak[c] <= 4, $sformatf("%0.1f Hz notch leaks %0d", f, peak[c])); end
      if (f > 0.0 && f <= 1.0) n_pass++;
      if (f >= 6.0 && f <= 154.0) n_stop++;
      if (f >= 159.0) begin
        n_image++;
        check(real'(peak[c]) > 0.5 * 4.0 * AMP, $sformatf("%0.1f Hz image band not passed (%0d)", f, peak[c]));
      end
      if (c % 16 == 0 || c == 1 || c == 255)
        $display("%7.3f Hz  expected %8.1f  measured %6d  (%6.1f dB)", f, e, peak[c],
                 20.0 * $log10((real'(peak[c]) + 0.5) / (4.0 * AMP)));
    end
    check(n_notch == 7 && n_pass > 0 && n_stop > 200 && n_image > 0 && n_lower >= 5,
          $sformatf("coverage: notch %0d pass %0d stop %0d image %0d lower %0d",
                    n_notch, n_pass, n_stop, n_image, n_lower));
    check(!overrun, "sample overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
