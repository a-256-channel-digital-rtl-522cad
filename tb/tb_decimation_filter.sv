// tb_decimation_filter: checks the first filter stage at its default size
// (256 channels, 22 taps, decimation by 4).
// Frames of 256 channel samples are fed with random gaps. Channels carry a DC
// level plus 60 Hz, 180 Hz or 20 Hz tones sampled at 160 SPS, random codes, or
// the extreme codes +8191/-8192. A reference model built here (taps from an
// explicit convolution of three length-8 boxcars, history per channel, round
// half up after a divide by 128, saturation to 16 bits) gives the expected
// output of every fourth frame. Checked: each output's channel and value, no
// outputs for the three skipped frames, latency of exactly TAPS + 3 cycles from
// acceptance, and that the 60 Hz and 180 Hz tones (the second aliases to 20 Hz)
// vanish from the output, leaving 4 x the DC code within the input rounding.
module tb_decimation_filter;
  localparam int NCH = 256, TAPS = 22, DEC = 4, FRAMES = 120;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic init_done, in_valid = 0, in_ready, out_valid, compute_start;
  logic [7:0] in_ch = 0, out_ch;
  logic signed [13:0] in_data = 0;
  logic signed [15:0] out_data;
  int checks = 0, failures = 0;
  longint cyc = 0;

  int coef [TAPS];
  int hist [NCH][TAPS];
  int exp_y [$], exp_ch [$];
  longint exp_due [$];
  int n_out = 0, n_computes = 0, notch_checks = 0;

  decimation_filter dut (
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
    return (ch * 53) % 4000 - 2000;
  endfunction

  function automatic int sample_of(input int ch, input int n);
    real v;
    int kind = ch % 6;
    v = real'(dc_of(ch));
    case (kind)
      0: v += 3000.0 * $sin(2.0 * PI * 60.0 * n / 160.0 + ch);
      1: v += 3000.0 * $sin(2.0 * PI * 180.0 * n / 160.0 + ch);
      2: v += 2000.0 * $sin(2.0 * PI * 20.0 * n / 160.0 + ch);
      3: v = real'($urandom_range(0, 16383)) - 8192.0;
      4: v = (ch % 12 == 4) ? 8191.0 : -8192.0;
      default: v += 500.0 * $sin(2.0 * PI * 0.5 * n / 160.0);
    endcase
    if (v > 8191.0) v = 8191.0;
    if (v < -8192.0) v = -8192.0;
    return $rtoi(v >= 0 ? v + 0.5 : v - 0.5);
  endfunction

  function automatic int round_sat16(input longint acc, input int shift);
    longint t = (acc + (longint'(1) << (shift - 1))) >>> shift;
    if (t > 32767) return 32767;
    if (t < -32768) return -32768;
    return int'(t);
  endfunction

  initial begin
    repeat (FRAMES * NCH * 40 + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) begin
    if (compute_start && rst_n) n_computes++;
    if (out_valid && rst_n) begin
      n_out++;
      if (exp_y.size() == 0) check(0, "unexpected output");
      else begin
        automatic int ey = exp_y.pop_front();
        automatic int ec = exp_ch.pop_front();
        automatic longint due = exp_due.pop_front();
        check(int'(out_ch) == ec && int'(out_data) == ey,
              $sformatf("out ch %0d y %0d expected ch %0d y %0d", out_ch, out_data, ec, ey));
        check(cyc == due, $sformatf("latency off by %0d", cyc - due));
        if (ec % 6 <= 1 && (n_out / NCH) >= 6) begin
          notch_checks++;
          check(out_data - 4 * dc_of(ec) <= 3 && 4 * dc_of(ec) - out_data <= 3,
                $sformatf("ch %0d tone not removed: %0d vs %0d", ec, out_data, 4 * dc_of(ec)));
        end
      end
    end
  end

  initial begin
    // taps: boxcar * boxcar * boxcar
    int b2 [15];
    foreach (b2[i]) b2[i] = 0;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) b2[i + j]++;
    foreach (coef[i]) coef[i] = 0;
    for (int i = 0; i < 15; i++) for (int j = 0; j < 8; j++) coef[i + j] += b2[i];
    foreach (hist[c, k]) hist[c][k] = 0;

    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    check(in_ready, "not ready after clearing");
    for (int n = 0; n < FRAMES; n++) begin
      for (int c = 0; c < NCH; c++) begin
        automatic int x = sample_of(c, n);
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        repeat ($urandom_range(0, 2)) @(negedge clk);
        in_valid = 1; in_ch = 8'(c); in_data = 14'(x);
        @(posedge clk);
        for (int k = TAPS - 1; k > 0; k--) hist[c][k] = hist[c][k - 1];
        hist[c][0] = x;
        if (n % DEC == DEC - 1) begin
          automatic longint acc = 0;
          for (int k = 0; k < TAPS; k++) acc += longint'(coef[k]) * hist[c][k];
          exp_y.push_back(round_sat16(acc, 7));
          exp_ch.push_back(c);
          exp_due.push_back(cyc + TAPS + 3);
        end
        #1 in_valid = 0;
      end
    end
    repeat (100) @(posedge clk);
    check(exp_y.size() == 0, $sformatf("%0d outputs missing", exp_y.size()));
    check(n_out == FRAMES / DEC * NCH, $sformatf("%0d outputs, expected %0d", n_out, FRAMES / DEC * NCH));
    check(n_computes == n_out, "compute_start count differs from outputs");
    check(notch_checks > 1000, "tone rejection never checked");
    check(coef[10] == 48 && coef[0] == 1, "reference taps");
    $display("outputs=%0d notch_checks=%0d", n_out, notch_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
