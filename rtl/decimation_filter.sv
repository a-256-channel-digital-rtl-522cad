// decimation_filter: first filter stage, 160 SPS in, 40 SPS out, 256 channels.
//
// The stage is three cascaded 8-point moving averages, realised as the
// equivalent 22-tap FIR with integer taps 1 3 6 10 15 21 28 36 42 46 48 48 46
// 42 36 28 21 15 10 6 3 1 (sum 512). Its nulls at every multiple of 20 Hz
// remove 60 Hz mains pickup and its harmonics and protect the 40 SPS second
// stage from aliasing. Only one frame in four is filtered, since the second
// stage uses only every fourth output; all samples still enter the history.
// Input is the 14-bit ADC code; output is 16 bits, 4 x the input code at DC,
// rounded from a 32-bit sum. The tap set, decimation factor and widths follow
// the source description; the scaling to 16 bits is this design's choice.
//
// Interface and timing as fir_stage: a filtered sample is ready 25 cycles after
// it is accepted, a sample of a skipped frame takes one cycle.
module decimation_filter
  import daq_filter_pkg::*;
#(
  parameter int NCH    = NUM_CH,
  parameter int MA_LEN = S1_MA_LEN,
  parameter int TAPS   = 3 * (MA_LEN - 1) + 1,
  parameter int DEC    = S1_DEC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    init_done,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [$clog2(NCH)-1:0]  in_ch,
  input  logic signed [ADC_W-1:0] in_data,
  output logic                    out_valid,
  output logic [$clog2(NCH)-1:0]  out_ch,
  output logic signed [15:0]      out_data,
  output logic                    compute_start
);
  fir_stage #(
    .STAGE(1), .TAPS(TAPS), .DEC(DEC), .SHIFT(S1_SHIFT), .IN_W(ADC_W),
    .NCH(NCH), .HIST_LOG2(HIST_AW)
  ) u_stage (.*);

  initial assert (MA_LEN == S1_MA_LEN) else $error("tap table is built for 8-point averages");
endmodule
