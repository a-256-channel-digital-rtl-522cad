// daq_filter_top: 256-channel data acquisition front end with a shared
// two-stage digital anti-alias filter.
//
// One ADC behind a two-level 16:1 analog multiplexer samples each of 256
// channels at 160 samples/s. Rather than an analog anti-alias filter per
// channel, one filter engine serves all channels: a decimating first stage
// (three cascaded 8-point moving averages, 22 taps, computed for one frame in
// four, 160 -> 40 SPS) notches 60 Hz and its harmonics, and a 26-tap 1 Hz
// lowpass at 40 SPS limits the bandwidth to suit a control system that reads
// about 3 values/s. The newest 16-bit value of every channel sits in a
// dual-port memory that the control system reads at its own clock.
//
// Data flow: mux_sequencer -> decimation_filter -> lowpass_filter ->
// result_dpram. Each stage has its own history memory and multiplier; each
// filtered sample takes 25 (stage 1) or 29 (stage 2) cycles, far below the
// CLK_DIV cycles between ADC samples, so neither stage ever holds up the next.
// After reset both stages clear their memories (8192 cycles) before ready goes
// high and scanning starts.
//
// Ports: mux_addr drives the multiplexer select lines (low nibble first stage,
// high nibble second stage); adc_convert/adc_valid/adc_data talk to the ADC;
// ccs_clk/ccs_rd/ccs_addr/ccs_data form the control system's read port, with
// data one ccs_clk edge after ccs_rd. frame_tick, decim_tick, result_tick and
// result_ch are status strobes for monitoring: a new frame, a first-stage
// output being computed, and a final value written to the result memory. The structure, rates, tap counts and
// widths follow the source description; the clocking, handshakes and memory
// organisation are this design's choices.
module daq_filter_top
  import daq_filter_pkg::*;
#(
  parameter int NCH     = NUM_CH,
  parameter int CLK_DIV = 250,
  parameter int SETTLE  = 50
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    ready,
  output logic [$clog2(NCH)-1:0]  mux_addr,
  output logic                    adc_convert,
  input  logic                    adc_valid,
  input  logic signed [ADC_W-1:0] adc_data,
  output logic                    overrun,
  output logic                    frame_tick,   // channel 0 conversion started
  output logic                    decim_tick,   // a stage-1 output is being computed
  output logic                    result_tick,  // a final value is written for result_ch
  output logic [$clog2(NCH)-1:0]  result_ch,
  input  logic                    ccs_clk,
  input  logic                    ccs_rd,
  input  logic [$clog2(NCH)-1:0]  ccs_addr,
  output logic signed [15:0]      ccs_data
);
  localparam int CW = $clog2(NCH);

  logic          s1_init, s2_init;
  logic          smp_valid, smp_ready, frame_start;
  logic [CW-1:0] smp_ch;
  logic signed [ADC_W-1:0] smp_data;

  logic          d_valid, d_ready, d_start;
  logic [CW-1:0] d_ch;
  logic signed [15:0] d_data;

  logic          y_valid;
  logic [CW-1:0] y_ch;
  logic signed [15:0] y_data;

  assign ready       = s1_init && s2_init;
  assign frame_tick  = frame_start;
  assign decim_tick  = d_start;
  assign result_tick = y_valid;
  assign result_ch   = y_ch;

  mux_sequencer #(.NCH(NCH), .CLK_DIV(CLK_DIV), .SETTLE(SETTLE), .ADC_W(ADC_W)) u_seq (
    .clk, .rst_n, .enable(ready),
    .mux_addr, .adc_convert, .adc_valid, .adc_data,
    .smp_valid, .smp_ready, .smp_ch, .smp_data,
    .frame_start, .overrun
  );

  decimation_filter #(.NCH(NCH)) u_decim (
    .clk, .rst_n, .init_done(s1_init),
    .in_valid(smp_valid), .in_ready(smp_ready), .in_ch(smp_ch), .in_data(smp_data),
    .out_valid(d_valid), .out_ch(d_ch), .out_data(d_data), .compute_start(d_start)
  );

  lowpass_filter #(.NCH(NCH)) u_lpf (
    .clk, .rst_n, .init_done(s2_init),
    .in_valid(d_valid), .in_ready(d_ready), .in_ch(d_ch), .in_data(d_data),
    .out_valid(y_valid), .out_ch(y_ch), .out_data(y_data), .compute_start()
  );

  result_dpram #(.NCH(NCH), .W(16)) u_out (
    .clk_a(clk), .we_a(y_valid), .addr_a(y_ch), .din_a(y_data),
    .clk_b(ccs_clk), .en_b(ccs_rd), .addr_b(ccs_addr), .dout_b(ccs_data)
  );

  // The first stage emits one-cycle results; the second stage must be free.
  assert property (@(posedge clk) disable iff (!rst_n) d_valid |-> d_ready)
    else $error("second stage busy when a decimated sample arrived");

  initial assert (CLK_DIV >= S2_TAPS + 8) else $error("sample period shorter than a filter pass");
endmodule
