// tb_daq_filter_top: end-to-end test of the 256-channel acquisition filter at
// its default size (256 channels, 10.24 MHz clock, 250 clocks per conversion).
//
// An ADC model answers each convert pulse 40 cycles later with the code of the
// channel on mux_addr at that moment. Each channel carries a DC level plus one
// of: a 60 Hz tone (mains), a 180 Hz tone (aliases to 20 Hz at 160 SPS), a
// 0.1 Hz tone (in band), a 10 Hz tone (above the 1 Hz band), random noise, or
// nothing; channel time is frame/160 s + channel/40960 s. A bit-exact reference
// of both filter stages built here predicts every channel's latest result. A
// control-system reader on its own clock reads, at each conversion, the channel
// half a frame away and compares it with the prediction.
//
// Checked: every read value; the first-stage output count (one frame in four),
// the result rate (each channel rewritten every 256 000 clocks, 40 SPS) and a
// constant sample-to-result latency; 60 Hz, 180 Hz and 10 Hz removed from the
// settled outputs (4 x DC within a few codes); no overrun; a busy fraction of
// the filter engines below 25 % of the clock cycles. Each mechanism (frame
// scan, decimated compute, skipped frame, result write, reader access, tone
// rejection) is counted and must have happened.
module tb_daq_filter_top;
  import daq_filter_pkg::*;
  localparam int NCH = 256, CLK_DIV = 250, ADC_LAT = 40, FRAMES = 150;
  localparam int T1 = 22, T2 = 26;
  localparam real PI = 3.14159265358979;

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

  always #49 clk = ~clk;        // ~10.2 MHz
  always #150 ccs_clk = ~ccs_clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int c1 [T1], c2 [T2];
  int h1 [NCH][T1], h2 [NCH][T2];
  int nsamp [NCH];
  int ref_y [NCH];
  bit ref_ok [NCH];
  longint conv_cyc [NCH], last_result [NCH];
  longint latency = -1;
  int frames = 0, decims = 0, skipped = 0, results = 0, reads = 0, rejections = 0;
  int rate_checks = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s", cyc, msg);
    end
  endtask

  function automatic int dc_of(input int ch);
    return (ch * 61) % 6000 - 3000;
  endfunction

  function automatic int code_of(input int ch, input int n);
    real t = real'(n) / 160.0 + real'(ch) / 40960.0;
    real v = real'(dc_of(ch));
    case (ch % 6)
      0: v += 2000.0 * $sin(2.0 * PI * 60.0 * t);
      1: v += 2000.0 * $sin(2.0 * PI * 180.0 * t + 1.0);
      2: v += 1500.0 * $sin(2.0 * PI * 0.1 * t);
      3: v += 500.0 * $sin(2.0 * PI * 10.0 * t);
      4: v += real'($urandom_range(0, 200)) - 100.0;
      default: ;
    endcase
    return $rtoi(v >= 0 ? v + 0.5 : v - 0.5);
  endfunction

  function automatic int rnd(input longint acc, input int shift);
    longint t = (acc + (longint'(1) << (shift - 1))) >>> shift;
    if (t > 32767) return 32767;
    if (t < -32768) return -32768;
    return int'(t);
  endfunction

  // reference model of both stages for one new sample
  function automatic void model(input int ch, input int x);
    longint a1 = 0, a2 = 0;
    int n = nsamp[ch];
    for (int k = T1 - 1; k > 0; k--) h1[ch][k] = h1[ch][k - 1];
    h1[ch][0] = x;
    if (n % 4 == 3) begin
      for (int k = 0; k < T1; k++) a1 += longint'(c1[k]) * h1[ch][k];
      for (int k = T2 - 1; k > 0; k--) h2[ch][k] = h2[ch][k - 1];
      h2[ch][0] = rnd(a1, 7);
      for (int k = 0; k < T2; k++) a2 += longint'(c2[k]) * h2[ch][k];
      ref_y[ch] = rnd(a2, 15);
      ref_ok[ch] = 1;
    end
    nsamp[ch] = n + 1;
  endfunction

  initial begin
    repeat (FRAMES * NCH * CLK_DIV + 50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // control-system reader
  logic [7:0] rd_q_addr;
  int rd_q_exp;
  bit rd_req = 0, rd_settled = 0;
  always @(posedge ccs_clk) begin : reader
    static int phase = 0;
    ccs_rd <= 1'b0;
    case (phase)
      0: if (rd_req) begin ccs_rd <= 1'b1; ccs_addr <= rd_q_addr; phase = 1; end
      1: phase = 2;
      default: begin
        reads++;
        check(ccs_data == 16'(rd_q_exp),
              $sformatf("read ch %0d got %0d expected %0d", rd_q_addr, ccs_data, rd_q_exp));
        if (rd_settled && (int'(rd_q_addr) % 6 != 2) && (int'(rd_q_addr) % 6 != 4)) begin
          rejections++;
          check(ccs_data - 4 * dc_of(rd_q_addr) <= 12 && 4 * dc_of(rd_q_addr) - ccs_data <= 12,
                $sformatf("ch %0d tone left in output: %0d vs %0d", rd_q_addr, ccs_data, 4 * dc_of(rd_q_addr)));
        end
        rd_req = 0;
        phase = 0;
      end
    endcase
  end

  // ADC model, reference and monitors
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (overrun) failures++;
      if (frame_tick) begin
        frames++;
        if (frames % 4 != 0) skipped++;
      end
      if (decim_tick) decims++;
      if (result_tick) begin
        automatic int ch = int'(result_ch);
        results++;
        if (last_result[ch] >= 0) begin
          rate_checks++;
          check(cyc - last_result[ch] == 4 * NCH * CLK_DIV,
                $sformatf("ch %0d result spacing %0d", ch, cyc - last_result[ch]));
        end
        last_result[ch] = cyc;
        if (latency < 0) latency = cyc - conv_cyc[ch];
        else check(cyc - conv_cyc[ch] == latency, "sample-to-result latency varies");
      end
      if (adc_convert) begin
        automatic int ch = int'(mux_addr);
        automatic int x = code_of(ch, nsamp[ch]);
        automatic int other = (ch + NCH / 2) % NCH;
        conv_cyc[ch] = cyc;
        model(ch, x);
        if (ref_ok[other] && !rd_req) begin
          rd_q_addr = 8'(other);
          rd_q_exp = ref_y[other];
          rd_settled = nsamp[other] >= 4 * (T2 + 2) + T1;
          rd_req = 1;
        end
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
    for (int k = 0; k < T1; k++) c1[k] = boxcar_ref(k);
    for (int k = 0; k < T2; k++) c2[k] = lpf_ref(k);
    foreach (h1[c, k]) h1[c][k] = 0;
    foreach (h2[c, k]) h2[c][k] = 0;
    foreach (nsamp[c]) begin nsamp[c] = 0; ref_ok[c] = 0; last_result[c] = -1; end
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (ready);
    wait (frames == FRAMES);
    repeat (NCH * CLK_DIV) @(posedge clk);
    begin
      real busy;
      busy = real'(frames * NCH * 1 + decims * (T1 + 3) + results * (T2 + 3)) / real'(frames * NCH * CLK_DIV);
      $display("frames=%0d decimated=%0d skipped_frames=%0d results=%0d reads=%0d rejections=%0d latency=%0d busy=%0.2f%%",
               frames, decims, skipped, results, reads, rejections, latency, 100.0 * busy);
      check(busy < 0.25, "filter engines busy more than 25% of the time");
    end
    check(frames > 0, "no frame scanned");
    check(!overrun, "sample overrun");
    check(decims == (frames / 4) * NCH || decims == (frames / 4) * NCH + NCH, "decimated output count");
    check(skipped > 0, "no frame skipped by the decimation");
    check(results == decims, "result count differs from decimated count");
    check(rate_checks > 1000, "result rate never checked");
    check(reads > 1000, "too few reader accesses");
    check(rejections > 1000, "tone rejection never checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent tap definitions
  function automatic int boxcar_ref(input int k);
    int a [8], b [15], c [22];
    foreach (a[i]) a[i] = 1;
    foreach (b[i]) b[i] = 0;
    foreach (c[i]) c[i] = 0;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) b[i + j] += a[i] * a[j];
    for (int i = 0; i < 15; i++) for (int j = 0; j < 8; j++) c[i + j] += b[i];
    return c[k];
  endfunction

  function automatic int lpf_ref(input int k);
    real h [26];
    real hs = 0.0;
    int q [26];
    int qs = 0, d, dlo;
    for (int n = 0; n < 26; n++) begin
      automatic real t = 2.0 / 40.0 * (n - 12.5);
      h[n] = 2.0 / 40.0 * $sin(PI * t) / (PI * t) * (0.54 - 0.46 * $cos(2.0 * PI * n / 25.0));
      hs += h[n];
    end
    for (int n = 0; n < 26; n++) begin q[n] = $rtoi(h[n] / hs * 32768.0 + 0.5); qs += q[n]; end
    d = 32768 - qs;
    dlo = (d >= 0) ? d / 2 : -((-d + 1) / 2);
    q[12] += dlo;
    q[13] += d - dlo;
    return q[k];
  endfunction
endmodule
