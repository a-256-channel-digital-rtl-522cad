// tb_result_dpram: checks the dual-port result memory with unrelated clocks on
// its two ports. The writer fills all 256 words and then keeps rewriting
// random channels; the reader, on its own clock, reads random channels at
// least a few cycles after their last write and compares with a shadow copy.
module tb_result_dpram;
  localparam int NCH = 256;
  logic clk_a = 0, clk_b = 0;
  logic we_a = 0, en_b = 0;
  logic [7:0] addr_a = 0, addr_b = 0;
  logic [15:0] din_a = 0, dout_b;
  logic [15:0] shadow [NCH];
  int last_write [NCH];
  int cyc_a = 0;
  int checks = 0, failures = 0;
  bit writer_done = 0;

  result_dpram dut (.clk_a, .we_a, .addr_a, .din_a, .clk_b, .en_b, .addr_b, .dout_b);

  always #5 clk_a = ~clk_a;
  always #7 clk_b = ~clk_b;
  always @(posedge clk_a) cyc_a++;

  initial begin
    repeat (100000) @(posedge clk_a);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    for (int i = 0; i < NCH; i++) begin
      @(negedge clk_a);
      we_a = 1; addr_a = 8'(i); din_a = 16'($urandom);
      shadow[i] = din_a; last_write[i] = cyc_a;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk_a);
      we_a = ($urandom_range(0, 3) == 0);
      addr_a = 8'($urandom);
      din_a = 16'($urandom);
      if (we_a) begin shadow[addr_a] = din_a; last_write[addr_a] = cyc_a; end
    end
    @(negedge clk_a); we_a = 0;
    writer_done = 1;
  end

  // reader
  initial begin
    wait (cyc_a > NCH + 2);
    while (!writer_done) begin
      logic [7:0] a;
      logic [15:0] exp;
      int wcyc;
      @(negedge clk_b);
      a = 8'($urandom);
      en_b = 1; addr_b = a;
      exp = shadow[a]; wcyc = last_write[a];
      @(posedge clk_b); #1;
      en_b = 0;
      // skip reads that raced with a write of the same word
      if (cyc_a - wcyc > 3 && last_write[a] == wcyc) begin
        checks++;
        if (dout_b !== exp) begin
          failures++;
          if (failures < 10) $display("ch %0d read %h expected %h", a, dout_b, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
