// tb_mux_sequencer: checks the multiplexer scan at its default size (256
// channels, 250 clocks per conversion, 50 clocks of settling).
// A small ADC model answers each convert pulse 30 cycles later with a code
// made from the channel number and a conversion count. The testbench checks
// that nothing converts before enable; that conversions are exactly CLK_DIV
// cycles apart (256 x 160 SPS at 10.24 MHz) and visit channels 0..255 in
// order; that the address has been stable SETTLE + 1 cycles at each convert;
// that every code is handed on once with the right channel tag under a random
// smp_ready; that frame_start marks channel 0; and, at the end, that holding
// smp_ready low makes the overrun flag rise.
module tb_mux_sequencer;
  localparam int NCH = 256, CLK_DIV = 250, SETTLE = 50, ADC_LAT = 30;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [7:0] mux_addr;
  logic adc_convert, adc_valid = 0;
  logic signed [13:0] adc_data = 0;
  logic smp_valid, smp_ready = 1;
  logic [7:0] smp_ch;
  logic signed [13:0] smp_data;
  logic frame_start, overrun;
  int checks = 0, failures = 0;
  longint cyc = 0, last_conv = -1, last_addr_change = 0;
  int nconv = 0, exp_ch = 0, frames = 0, delivered = 0;
  logic [7:0] prev_addr = 0;
  int q_ch[$];
  logic signed [13:0] q_code[$];
  bit hold_ready = 0;

  mux_sequencer dut (
    .clk, .rst_n, .enable, .mux_addr, .adc_convert, .adc_valid, .adc_data,
    .smp_valid, .smp_ready, .smp_ch, .smp_data, .frame_start, .overrun);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s", cyc, msg);
    end
  endtask

  function automatic logic signed [13:0] code_of(input int ch, input int n);
    return 14'((ch * 37 + n * 11) % 16384 - 8192);
  endfunction

  initial begin
    repeat (4 * NCH * CLK_DIV) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC model
  always @(posedge clk) begin
    cyc <= cyc + 1;
    adc_valid <= 1'b0;
    if (mux_addr != prev_addr) last_addr_change <= cyc;
    prev_addr <= mux_addr;
    if (adc_convert) begin
      automatic int ch = int'(mux_addr);
      check(enable, "convert while disabled");
      check(ch == exp_ch, $sformatf("converted channel %0d expected %0d", ch, exp_ch));
      check(cyc - last_addr_change == SETTLE + 1 || nconv == 0,
            $sformatf("address stable %0d cycles", cyc - last_addr_change));
      if (last_conv >= 0)
        check(cyc - last_conv == CLK_DIV, $sformatf("conversion spacing %0d", cyc - last_conv));
      check(frame_start == (ch == 0), "frame_start wrong");
      if (ch == 0) frames++;
      last_conv <= cyc;
      exp_ch = (exp_ch + 1) % NCH;
      q_ch.push_back(ch);
      q_code.push_back(code_of(ch, nconv));
      nconv++;
      fork
        begin
          automatic logic signed [13:0] c = code_of(ch, nconv - 1);
          repeat (ADC_LAT) @(posedge clk);
          adc_valid <= 1'b1;
          adc_data  <= c;
        end
      join_none
    end
    if (smp_valid && smp_ready) begin
      automatic int ech = q_ch.pop_front();
      automatic logic signed [13:0] ecode = q_code.pop_front();
      check(int'(smp_ch) == ech && smp_data == ecode,
            $sformatf("sample ch %0d code %0d expected ch %0d code %0d", smp_ch, smp_data, ech, ecode));
      delivered++;
    end
    smp_ready <= hold_ready ? 1'b0 : ($urandom_range(0, 3) != 0);
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (1000) @(posedge clk);
    check(nconv == 0, "conversions before enable");
    @(negedge clk) enable = 1;
    wait (frames == 3);
    repeat (CLK_DIV) @(posedge clk);
    check(!overrun, "overrun with a ready consumer");
    check(delivered >= 2 * NCH, $sformatf("only %0d samples delivered", delivered));
    hold_ready = 1;
    repeat (3 * CLK_DIV) @(posedge clk);
    check(overrun, "overrun not flagged");
    $display("conversions=%0d delivered=%0d frames=%0d", nconv, delivered, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
