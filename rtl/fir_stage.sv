// fir_stage: one channel-multiplexed FIR filter stage, shared by all channels.
//
// Samples arrive one at a time, tagged with their channel, in channel order
// 0..NCH-1 (one "frame"), frame after frame. Each sample is written into a
// per-channel circular history held in a sample_ram at address {slot, channel};
// all channels share one slot pointer, which advances after channel NCH-1. A
// frame counter picks one frame in DEC: for the samples of that frame the stage
// reads the TAPS newest samples of the channel, newest first, multiplies each by
// its tap in one mac_unit and rounds the 32-bit sum to 16 bits (round half up at
// bit SHIFT, then saturate). Outputs of the other DEC-1 frames are never
// computed, which is the decimation. STAGE selects the tap set of the package:
// 1 for three cascaded moving averages, 2 for the 1 Hz lowpass.
//
// After reset the stage first clears its whole history memory (2**HIST_LOG2 x
// NCH cycles, in_ready low, init_done low), so the filters start from rest.
//
// Timing: in_valid/in_ready is a valid-ready handshake. A sample of a
// non-computed frame takes one cycle. A computed sample takes TAPS + 3 cycles
// from acceptance to the one-cycle out_valid pulse, and in_ready stays low
// meanwhile. The tap sets, widths and decimation follow the source description;
// the memory layout, the single shared multiplier and the handshake are this
// design's choices.
module fir_stage
  import daq_filter_pkg::*;
#(
  parameter int STAGE     = 1,
  parameter int TAPS      = S1_TAPS,
  parameter int DEC       = S1_DEC,
  parameter int SHIFT     = S1_SHIFT,
  parameter int IN_W      = ADC_W,
  parameter int NCH       = NUM_CH,
  parameter int HIST_LOG2 = HIST_AW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic                   init_done,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [$clog2(NCH)-1:0] in_ch,
  input  logic signed [IN_W-1:0] in_data,
  output logic                   out_valid,
  output logic [$clog2(NCH)-1:0] out_ch,
  output logic signed [15:0]     out_data,
  output logic                   compute_start  // pulse: a computed sample was accepted
);
  localparam int CW = $clog2(NCH);
  localparam int AW = HIST_LOG2 + CW;
  localparam int KW = $clog2(TAPS + 1);
  localparam int PW = (DEC > 1) ? $clog2(DEC) : 1;

  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_RUN, S_FINISH} state_t;
  state_t state;

  logic [AW-1:0]        clr_addr;
  logic [HIST_LOG2-1:0] wp;       // slot of the current frame
  logic [PW-1:0]        phase;    // frame counter modulo DEC
  logic [HIST_LOG2-1:0] base;     // slot of the sample being filtered
  logic [CW-1:0]        ch_r;
  logic [KW-1:0]        k;        // tap whose sample is being read
  logic                 mac_v, mac_last;
  logic [KW-1:0]        mac_k;
  logic                 done_v;

  // memory ports
  logic                 we, rd_en;
  logic [AW-1:0]        waddr, raddr;
  logic [IN_W-1:0]      wdata, rdata;

  logic signed [31:0]   acc;
  logic signed [15:0]   coef;
  logic                 accept;

  assign in_ready  = (state == S_IDLE);
  assign init_done = (state != S_CLEAR);
  assign accept    = in_valid && in_ready;

  always_comb begin
    we    = 1'b0;
    waddr = {wp, in_ch};
    wdata = in_data;
    if (state == S_CLEAR) begin
      we    = 1'b1;
      waddr = clr_addr;
      wdata = '0;
    end else if (accept) begin
      we = 1'b1;
    end
  end

  assign rd_en = (state == S_RUN);
  assign raddr = {base - HIST_LOG2'(k), ch_r};

  sample_ram #(.W(IN_W), .AW(AW)) u_hist (
    .clk, .we, .waddr, .wdata, .rd_en, .raddr, .rdata
  );

  always_comb begin
    if (STAGE == 1) coef = 16'(boxcar3_coef(int'(mac_k), S1_MA_LEN));
    else            coef = 16'(lpf_coef(int'(mac_k)));
  end

  mac_unit #(.ACC_W(32)) u_mac (
    .clk, .rst_n,
    .en (mac_v),
    .clr(mac_k == '0),
    .a  (16'(signed'(rdata))),
    .b  (coef),
    .acc
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_CLEAR;
      clr_addr  <= '0;
      wp        <= '0;
      phase     <= '0;
      base      <= '0;
      ch_r      <= '0;
      k         <= '0;
      mac_v     <= 1'b0;
      mac_last  <= 1'b0;
      mac_k     <= '0;
      done_v    <= 1'b0;
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_data  <= '0;
      compute_start <= 1'b0;
    end else begin
      out_valid     <= 1'b0;
      compute_start <= 1'b0;
      mac_v         <= (state == S_RUN);
      mac_k         <= k;
      mac_last      <= (state == S_RUN) && (k == KW'(TAPS - 1));
      done_v        <= mac_last;
      unique case (state)
        S_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (&clr_addr) state <= S_IDLE;
        end
        S_IDLE: if (accept) begin
          base <= wp;
          ch_r <= in_ch;
          k    <= '0;
          if (int'(in_ch) == NCH - 1) begin
            wp    <= wp + 1'b1;
            phase <= (int'(phase) == DEC - 1) ? '0 : phase + 1'b1;
          end
          if (int'(phase) == DEC - 1) begin
            state         <= S_RUN;
            compute_start <= 1'b1;
          end
        end
        S_RUN: begin
          k <= k + 1'b1;
          if (k == KW'(TAPS - 1)) state <= S_FINISH;
        end
        S_FINISH: if (done_v) begin
          out_valid <= 1'b1;
          out_ch    <= ch_r;
          out_data  <= round_sat(acc, SHIFT);
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (TAPS <= 2 ** HIST_LOG2) else $error("history shorter than the filter");
endmodule
