// tb_delay_line: random bits in, the same bits out 10 cycles later; zeros
// after a clear.
module tb_delay_line;
  import bsconv_pkg::*;
  logic clk = 1'b0;
  logic clr, din, dout;
  logic hist[$];
  int checks = 0, failures = 0;

  delay_line dut (.clk(clk), .clr(clr), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; din = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    for (int i = 0; i < SLOT; i++) hist.push_front(1'b0);
    for (int c = 0; c < 500; c++) begin
      checks++;
      if (dout !== hist[SLOT-1]) begin
        failures++;
        if (failures < 10) $display("cycle %0d: dout=%b expected %b", c, dout, hist[SLOT-1]);
      end
      din = 1'($urandom);
      hist.push_front(din);
      void'(hist.pop_back());
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
