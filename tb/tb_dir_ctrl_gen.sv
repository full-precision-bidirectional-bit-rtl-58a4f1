// tb_dir_ctrl_gen: checks the direction generator against its closed form.
//
// toward0 is driven as the control unit drives it (high in phases 9..18 of
// the 20-cycle period); after a clear the output must be, in phase p,
// dir[j] = 1 exactly for j <= p < 2N+1-j. A second clear in mid-period must
// restart the pattern.
module tb_dir_ctrl_gen;
  import bsconv_pkg::*;
  localparam int N = NBITS;
  logic clk = 1'b0;
  logic clr, toward0;
  logic [N-1:0] dir, exp_dir;
  int checks = 0, failures = 0;

  dir_ctrl_gen dut (.clk(clk), .clr(clr), .toward0(toward0), .dir(dir));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int ncyc);
    for (int cyc = 0; cyc < ncyc; cyc++) begin
      int ph;
      ph = cyc % PERIOD;
      for (int j = 0; j < N; j++) exp_dir[j] = (ph >= j) && (ph < 2 * N + 1 - j);
      checks++;
      if (dir !== exp_dir) begin
        failures++;
        if (failures < 10) $display("phase %0d: dir=%b expected %b", ph, dir, exp_dir);
      end
      toward0 = (ph >= SLOT - 1) && (ph <= 2 * SLOT - 2);
      @(negedge clk);
    end
  endtask

  initial begin
    clr = 1'b1; toward0 = 1'b0;
    @(negedge clk);
    clr = 1'b0;
    run(5 * PERIOD + 7);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    run(3 * PERIOD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
