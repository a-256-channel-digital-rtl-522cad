// sample_ram: data memory holding the sample history of one filter stage.
//
// A simple single-clock memory with one write port and one synchronous read
// port. The filter stages address it as {slot, channel}: each channel owns
// 2**(AW - channel bits) history slots, used as a circular buffer, so 32 slots
// x 256 channels gives AW = 13. A read returns the word on the clock edge after
// rd_en; a read and a write of the same address in one cycle returns the old
// word. The source description puts ADC data and intermediate results in one
// external data memory; giving each stage a memory of its own is this design's
// choice, so that the two stages can work at the same time.
module sample_ram #(
  parameter int W  = 16,
  parameter int AW = 13
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          rd_en,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd_en) rdata <= mem[raddr];
  end
endmodule
