// tb_mac_unit: checks the multiply-accumulate unit against a software sum.
// Random signed 16-bit operand streams of random length are accumulated; the
// first element of each stream loads the accumulator (clr). Idle cycles with
// en low must leave the accumulator unchanged. Extreme operands (-32768) are
// included.
module tb_mac_unit;
  logic clk = 0, rst_n = 0;
  logic en = 0, clr = 0;
  logic signed [15:0] a = 0, b = 0;
  logic signed [31:0] acc;
  int checks = 0, failures = 0;
  longint model;

  mac_unit dut (.clk, .rst_n, .en, .clr, .a, .b, .acc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int s = 0; s < 300; s++) begin
      int len;
      len = 1 + $urandom_range(0, 30);
      model = 0;
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        en  = 1;
        clr = (i == 0);
        if (s % 10 == 0) begin
          a = -16'sd32768;
          b = (i % 2) ? -16'sd32768 : 16'sd32767;
        end else begin
          a = $signed(16'($urandom));
          b = $signed(16'($urandom_range(0, 2663)));
        end
        model = (i == 0) ? longint'(a) * longint'(b) : model + longint'(a) * longint'(b);
      end
      @(negedge clk);
      en = 0;
      checks++;
      if (acc !== 32'(model)) begin
        failures++;
        $display("stream %0d: acc %0d expected %0d", s, acc, 32'(model));
      end
      a = 16'sd1234; b = 16'sd99;
      @(negedge clk);
      checks++;
      if (acc !== 32'(model)) begin
        failures++;
        $display("stream %0d: acc changed while disabled", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
