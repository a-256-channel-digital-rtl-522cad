// tb_lowpass_filter: checks the second filter stage at its default size
// (256 channels, 26 taps, one output per input sample at 40 SPS).
// The reference taps are derived here from their definition: a Hamming-windowed
// sinc with a 1 Hz cutoff at 40 SPS, normalised to unit gain, rounded to Q15,
// with the two centre taps corrected so the taps sum to 32768. A reference
// model with per-channel history gives every expected output (round half up
// after a divide by 32768, saturation to 16 bits). Channels carry DC, DC plus
// a 10 Hz tone, DC plus a 0.25 Hz tone, random full-range codes or the extreme
// codes. Checked: each output's channel and value; latency of exactly
// TAPS + 3 cycles; unit DC gain once the history is full; the 10 Hz tone
// attenuated by at least 45 dB; the -3 dB point between 1 and 1.3 Hz.
module tb_lowpass_filter;
  localparam int NCH = 256, TAPS = 26, FRAMES = 60;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic init_done, in_valid = 0, in_ready, out_valid, compute_start;
  logic [7:0] in_ch = 0, out_ch;
  logic signed [15:0] in_data = 0;
  logic signed [15:0] out_data;
  int checks = 0, failures = 0;
  longint cyc = 0;

  int coef [TAPS];
  int hist [NCH][TAPS];
  int exp_y [$], exp_ch [$], exp_n [$];
  longint exp_due [$];
  int n_out = 0, dc_checks = 0, stop_checks = 0;

  lowpass_filter dut (
    .clk, .rst_n, .init_done, .in_valid, .in_ready, .in_ch, .in_data,
    .out_valid, .out_ch, .out_data, .compute_start);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s", cyc, msg);
    end
  endtask

  function automatic int dc_of(input int ch);
    return (ch * 211) % 30000 - 15000;
  endfunction

  function automatic int sample_of(input int ch, input int n);
    real v;
    v = real'(dc_of(ch));
    case (ch % 5)
      0: ;
      1: v += 10000.0 * $sin(2.0 * PI * 10.0 * n / 40.0 + ch);
      2: v += 8000.0 * $sin(2.0 * PI * 0.25 * n / 40.0);
      3: v = real'($urandom_range(0, 65535)) - 32768.0;
      default: v = (ch % 10 == 4) ? 32767.0 : -32768.0;
    endcase
    if (v > 32767.0) v = 32767.0;
    if (v < -32768.0) v = -32768.0;
    return $rtoi(v >= 0 ? v + 0.5 : v - 0.5);
  endfunction

  function automatic int round_sat16(input longint acc, input int shift);
    longint t = (acc + (longint'(1) << (shift - 1))) >>> shift;
    if (t > 32767) return 32767;
    if (t < -32768) return -32768;
    return int'(t);
  endfunction

  // gain of the reference taps at f Hz (fs = 40 Hz)
  function automatic real gain_at(input real f);
    real re = 0.0, im = 0.0;
    for (int k = 0; k < TAPS; k++) begin
      re += coef[k] * $cos(2.0 * PI * f * k / 40.0);
      im -= coef[k] * $sin(2.0 * PI * f * k / 40.0);
    end
    return $sqrt(re * re + im * im) / 32768.0;
  endfunction

  initial begin
    repeat (FRAMES * NCH * 40 + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (out_valid && rst_n) begin
      n_out++;
      if (exp_y.size() == 0) check(0, "unexpected output");
      else begin
        automatic int ey = exp_y.pop_front();
        automatic int ec = exp_ch.pop_front();
        automatic int en = exp_n.pop_front();
        automatic longint due = exp_due.pop_front();
        check(int'(out_ch) == ec && int'(out_data) == ey,
              $sformatf("out ch %0d y %0d expected ch %0d y %0d", out_ch, out_data, ec, ey));
        check(cyc == due, $sformatf("latency off by %0d", cyc - due));
        if (en >= TAPS && ec % 5 == 0) begin
          dc_checks++;
          check(int'(out_data) == dc_of(ec), $sformatf("ch %0d DC %0d became %0d", ec, dc_of(ec), out_data));
        end
        if (en >= TAPS && ec % 5 == 1) begin
          stop_checks++;
          check(out_data - dc_of(ec) <= 58 && dc_of(ec) - out_data <= 58,
                $sformatf("ch %0d 10 Hz not rejected: %0d vs %0d", ec, out_data, dc_of(ec)));
        end
      end
    end
  end

  initial begin
    real h [TAPS];
    real hs = 0.0;
    int qs = 0, d;
    for (int n = 0; n < TAPS; n++) begin
      automatic real t = 2.0 * 1.0 / 40.0 * (n - 12.5);
      h[n] = 2.0 * 1.0 / 40.0 * $sin(PI * t) / (PI * t) * (0.54 - 0.46 * $cos(2.0 * PI * n / 25.0));
      hs += h[n];
    end
    for (int n = 0; n < TAPS; n++) begin
      coef[n] = $rtoi(h[n] / hs * 32768.0 + 0.5);
      qs += coef[n];
    end
    d = 32768 - qs;
    coef[12] += (d >= 0) ? d / 2 : -((-d + 1) / 2);
    coef[13] += d - ((d >= 0) ? d / 2 : -((-d + 1) / 2));
    check(gain_at(1.0) > 0.7071 && gain_at(1.3) < 0.7071,
          $sformatf("-3 dB point outside 1..1.3 Hz (%f, %f)", gain_at(1.0), gain_at(1.3)));
    foreach (hist[c, k]) hist[c][k] = 0;

    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    for (int n = 0; n < FRAMES; n++) begin
      for (int c = 0; c < NCH; c++) begin
        automatic int x = sample_of(c, n);
        automatic longint acc = 0;
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        repeat ($urandom_range(0, 2)) @(negedge clk);
        in_valid = 1; in_ch = 8'(c); in_data = 16'(x);
        @(posedge clk);
        for (int k = TAPS - 1; k > 0; k--) hist[c][k] = hist[c][k - 1];
        hist[c][0] = x;
        for (int k = 0; k < TAPS; k++) acc += longint'(coef[k]) * hist[c][k];
        exp_y.push_back(round_sat16(acc, 15));
        exp_ch.push_back(c);
        exp_n.push_back(n);
        exp_due.push_back(cyc + TAPS + 3);
        #1 in_valid = 0;
      end
    end
    repeat (100) @(posedge clk);
    check(exp_y.size() == 0, $sformatf("%0d outputs missing", exp_y.size()));
    check(n_out == FRAMES * NCH, $sformatf("%0d outputs, expected %0d", n_out, FRAMES * NCH));
    check(dc_checks > 1000 && stop_checks > 1000, "DC gain or stopband never checked");
    $display("outputs=%0d dc_checks=%0d stop_checks=%0d", n_out, dc_checks, stop_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
