// result_dpram: dual-port memory that hands the filtered values to the control
// system.
//
// One word per channel. Port A, in the filter clock domain, writes the newest
// second-stage output of a channel at the channel's address. Port B, in the
// reader's own clock domain, reads any channel at any time: dout_b holds the
// word one clock_b edge after en_b. The two ports share nothing but the array,
// so the reader never stalls the filter. A read of a word in the cycle it is
// written may return either value; the description does not say how the reader
// avoids that, so no interlock is built. A dual-port memory as the hand-over
// point follows the source description; the one-word-per-channel layout and
// the clocking are this design's choice.
module result_dpram #(
  parameter int NCH = 256,
  parameter int W   = 16
) (
  input  logic                   clk_a,
  input  logic                   we_a,
  input  logic [$clog2(NCH)-1:0] addr_a,
  input  logic [W-1:0]           din_a,
  input  logic                   clk_b,
  input  logic                   en_b,
  input  logic [$clog2(NCH)-1:0] addr_b,
  output logic [W-1:0]           dout_b
);
  logic [W-1:0] mem [NCH];

  always_ff @(posedge clk_a) if (we_a) mem[addr_a] <= din_a;

  always_ff @(posedge clk_b) if (en_b) dout_b <= mem[addr_b];
endmodule
