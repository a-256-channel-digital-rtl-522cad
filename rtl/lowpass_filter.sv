// lowpass_filter: second filter stage, 1 Hz lowpass at 40 SPS, 256 channels.
//
// A 26-tap FIR run on every decimated sample of every channel; its output is
// the final 16-bit channel value. The length, sample rate and cutoff follow the
// source description. The tap values are this design's own (the description
// gives none): a Hamming-windowed sinc in Q15 whose taps sum to 32768, so the
// DC gain is exactly 1 (see daq_filter_pkg). Half the filter length times the
// 25 ms sample interval gives a group delay of 0.3125 s.
//
// Interface and timing as fir_stage: a result is ready 29 cycles after a
// sample is accepted.
module lowpass_filter
  import daq_filter_pkg::*;
#(
  parameter int NCH  = NUM_CH,
  parameter int TAPS = S2_TAPS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic                   init_done,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [$clog2(NCH)-1:0] in_ch,
  input  logic signed [15:0]     in_data,
  output logic                   out_valid,
  output logic [$clog2(NCH)-1:0] out_ch,
  output logic signed [15:0]     out_data,
  output logic                   compute_start
);
  fir_stage #(
    .STAGE(2), .TAPS(TAPS), .DEC(S2_DEC), .SHIFT(S2_SHIFT), .IN_W(DATA_W),
    .NCH(NCH), .HIST_LOG2(HIST_AW)
  ) u_stage (.*);

  initial assert (TAPS == S2_TAPS) else $error("tap table is built for 26 taps");
endmodule
