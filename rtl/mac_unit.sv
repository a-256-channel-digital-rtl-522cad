// mac_unit: signed multiply-accumulate used by both filter stages.
//
// Each enabled cycle multiplies two signed 16-bit operands into a 32-bit product
// and either loads it (clr = 1, first tap) or adds it to the accumulator. The
// accumulator is ACC_W bits wide and wraps on overflow; with the tap sets used
// here it cannot overflow. The result is visible on acc the cycle after the last
// enabled cycle. The 32-bit intermediate width follows the source description;
// the load-on-clear interface is this design's choice.
module mac_unit #(
  parameter int ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic signed [15:0]      a,
  input  logic signed [15:0]      b,
  output logic signed [ACC_W-1:0] acc
);
  logic signed [31:0] prod;

  always_comb prod = a * b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (en)  acc <= clr ? ACC_W'(prod) : acc + ACC_W'(prod);
  end
endmodule
