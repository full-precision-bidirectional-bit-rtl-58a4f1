// tb_weight_mem: loads random sign-magnitude weights and checks the loop.
//
// Each weight is shifted in LSB first (sign last) during 8 load cycles, with
// random bits on the data line before and after. From the third cycle after
// the last load cycle, y must repeat the 7 magnitude bits followed by three
// zeros every 10 cycles, and sign must hold the sign bit, while the data line
// keeps toggling.
module tb_weight_mem;
  import bsconv_pkg::*;
  logic clk = 1'b0;
  logic load, din, y, sign;
  int checks = 0, failures = 0;

  weight_mem dut (.clk(clk), .load(load), .din(din), .y(y), .sign(sign));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] w;
    load = 0; din = 0;
    @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      w = 8'($urandom);
      if (n == 0) w = 8'hFF;
      if (n == 1) w = 8'h7F;
      if (n == 2) w = 8'h80;
      repeat ($urandom_range(0, 5)) begin din = 1'($urandom); @(negedge clk); end
      for (int i = 0; i < NBITS; i++) begin
        load = 1'b1; din = w[i];
        @(negedge clk);
      end
      load = 1'b0;
      // cycle T+1 now (T = last load cycle); magnitude bit 0 arrives at T+3
      din = 1'($urandom);
      @(negedge clk);
      din = 1'($urandom);
      @(negedge clk);
      for (int c = 0; c < 4 * SLOT; c++) begin
        int pos;
        pos = c % SLOT;
        checks++;
        if (y !== ((pos < NBITS - 1) ? w[pos] : 1'b0) || sign !== w[NBITS-1]) begin
          failures++;
          if (failures < 10) $display("weight %h pos %0d: y=%b sign=%b", w, pos, y, sign);
        end
        din = 1'($urandom);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
