// tb_conv_ctrl: checks every control signal against its phase schedule.
//
// After sync the cycle count gives the phase p (mod 20). Expected, from the
// multiplier and pipeline timing: lat_en[j] in phases j and 17-j;
// dir[j] for j <= p < 17-j; lat_rst in phases 8 and 18; left product window
// in phases 1..16, left word starts in phases 1 and 2; the right channel the
// same shifted by 10. A second sync in mid-period must restart the schedule.
module tb_conv_ctrl;
  import bsconv_pkg::*;
  logic clk = 1'b0;
  logic sync;
  ctrl_t ctrl, exp_c;
  int checks = 0, failures = 0;

  conv_ctrl dut (.clk(clk), .sync(sync), .ctrl(ctrl));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit inwin(int p, int start, int len);
    return ((p - start + PERIOD) % PERIOD) < len;
  endfunction

  task automatic run(input int ncyc);
    for (int cyc = 0; cyc < ncyc; cyc++) begin
      int p;
      p = cyc % PERIOD;
      for (int j = 0; j < NBITS; j++) begin
        exp_c.lat_en[j] = (p == j) || (p == 2 * NBITS + 1 - j);
        exp_c.dir[j]    = (p >= j) && (p < 2 * NBITS + 1 - j);
      end
      exp_c.lat_rst       = (p == NBITS) || (p == NBITS + SLOT);
      exp_c.left.pw       = inwin(p, 1, PROD);
      exp_c.left.ws_conv  = (p == 1);
      exp_c.left.ws_add   = (p == 2);
      exp_c.right.pw      = inwin(p, SLOT + 1, PROD);
      exp_c.right.ws_conv = (p == SLOT + 1);
      exp_c.right.ws_add  = (p == SLOT + 2);
      checks++;
      if (ctrl !== exp_c) begin
        failures++;
        if (failures < 10) $display("phase %0d: ctrl=%h expected %h", p, ctrl, exp_c);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    sync = 1'b1;
    @(negedge clk);
    @(negedge clk);
    sync = 1'b0;
    run(4 * PERIOD + 13);
    sync = 1'b1;
    @(negedge clk);
    sync = 1'b0;
    run(3 * PERIOD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
