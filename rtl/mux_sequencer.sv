// mux_sequencer: scans the 256-channel analog multiplexer and feeds the ADC
// codes, tagged with their channel, to the filter.
//
// A period counter divides the system clock by CLK_DIV; each period handles one
// channel, so with the default 10.24 MHz clock and CLK_DIV = 250 the ADC runs
// at 40 960 conversions/s, 256 channels x 160 samples/s. At the start of a
// period mux_addr moves to the next channel (low 4 bits select the first 16:1
// stage, high 4 bits the second); SETTLE cycles later adc_convert pulses for
// one cycle and the channel number is latched. When the ADC answers with
// adc_valid the code is held on smp_data with smp_ch until the filter takes it
// (smp_valid/smp_ready handshake). A code that arrives while the previous one
// is still held sets the sticky overrun flag and replaces it. Channels run
// 0..NCH-1 and wrap; frame_start pulses when channel 0 is converted.
//
// The channel count, the two 16:1 stages and the rate of 256 x 160 SPS follow
// the source description. The clock, divider, settling delay, address split
// and handshake are this design's choices. enable holds the scan at channel 0
// until the filters have cleared their memories.
module mux_sequencer #(
  parameter int NCH     = 256,
  parameter int CLK_DIV = 250,
  parameter int SETTLE  = 50,
  parameter int ADC_W   = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  output logic [$clog2(NCH)-1:0]  mux_addr,
  output logic                    adc_convert,
  input  logic                    adc_valid,
  input  logic signed [ADC_W-1:0] adc_data,
  output logic                    smp_valid,
  input  logic                    smp_ready,
  output logic [$clog2(NCH)-1:0]  smp_ch,
  output logic signed [ADC_W-1:0] smp_data,
  output logic                    frame_start,
  output logic                    overrun
);
  localparam int CW = $clog2(NCH);
  localparam int DW = $clog2(CLK_DIV);

  logic [DW-1:0] cnt;
  logic [CW-1:0] conv_ch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      mux_addr    <= '0;
      conv_ch     <= '0;
      adc_convert <= 1'b0;
      frame_start <= 1'b0;
      smp_valid   <= 1'b0;
      smp_ch      <= '0;
      smp_data    <= '0;
      overrun     <= 1'b0;
    end else begin
      adc_convert <= 1'b0;
      frame_start <= 1'b0;
      if (enable) begin
        if (int'(cnt) == CLK_DIV - 1) begin
          cnt      <= '0;
          mux_addr <= (int'(mux_addr) == NCH - 1) ? '0 : mux_addr + 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
        if (int'(cnt) == SETTLE) begin
          adc_convert <= 1'b1;
          conv_ch     <= mux_addr;
          frame_start <= (mux_addr == '0);
        end
      end
      if (smp_valid && smp_ready) smp_valid <= 1'b0;
      if (adc_valid) begin
        if (smp_valid && !smp_ready) overrun <= 1'b1;
        smp_valid <= 1'b1;
        smp_ch    <= conv_ch;
        smp_data  <= adc_data;
      end
    end
  end

  initial assert (SETTLE < CLK_DIV) else $error("settling delay longer than the period");
endmodule
