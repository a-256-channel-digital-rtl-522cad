// tb_sample_ram: checks the history memory. Random words are written to random
// addresses of a full-size (13-bit address) memory and read back against a
// shadow array; a read of an address in the cycle it is written must return the
// old word, and rdata must hold while rd_en is low.
module tb_sample_ram;
  localparam int W = 16, AW = 13;
  logic clk = 0;
  logic we = 0, rd_en = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] shadow [2**AW];
  int checks = 0, failures = 0;

  sample_ram dut (.clk, .we, .waddr, .wdata, .rd_en, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = W'($urandom); shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 20000; n++) begin
      logic [W-1:0] exp;
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1);
      waddr = AW'($urandom);
      wdata = W'($urandom);
      rd_en = 1;
      raddr = (n % 7 == 0) ? waddr : AW'($urandom);
      exp = shadow[raddr];
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp) begin
        failures++;
        if (failures < 10) $display("read %0h got %0h expected %0h", raddr, rdata, exp);
      end
      if (n % 50 == 0) begin
        @(negedge clk); we = 0; rd_en = 0; raddr = raddr + 1'b1;
        @(posedge clk); #1;
        checks++;
        if (rdata !== exp) begin failures++; $display("rdata changed with rd_en low"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
