// tb_latch_ctrl_bus: checks the latching bus with random pulses.
//
// Reference: lat_en[j] is in_left delayed by j cycles OR in_right delayed by
// N-1-j cycles (inputs before the clear count as zero). Random pulses on both
// inputs, then the regular pattern of the convolver (pulses at phases 0 and
// 10), for which lat_en[j] must be high exactly in phases j and 2N+1-j.
module tb_latch_ctrl_bus;
  import bsconv_pkg::*;
  localparam int N = NBITS;
  logic clk = 1'b0;
  logic clr, in_l, in_r;
  logic [N-1:0] lat_en, exp_en;
  logic hl[$], hr[$];
  int checks = 0, failures = 0;

  latch_ctrl_bus dut (.clk(clk), .clr(clr), .in_left(in_l), .in_right(in_r), .lat_en(lat_en));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; in_l = 0; in_r = 0;
    @(negedge clk);
    clr = 1'b0;
    for (int i = 0; i < N; i++) begin hl.push_front(1'b0); hr.push_front(1'b0); end
    for (int cyc = 0; cyc < 600; cyc++) begin
      int ph;
      ph = cyc % PERIOD;
      if (cyc < 400) begin
        in_l = ($urandom_range(0, 3) == 0);
        in_r = ($urandom_range(0, 3) == 0);
      end else begin
        in_l = (ph == 0);
        in_r = (ph == SLOT);
      end
      hl.push_front(in_l); hr.push_front(in_r);
      void'(hl.pop_back()); void'(hr.pop_back());
      #1;
      for (int j = 0; j < N; j++) exp_en[j] = hl[j] | hr[N - 1 - j];
      checks++;
      if (lat_en !== exp_en) begin
        failures++;
        if (failures < 10) $display("cycle %0d: lat_en=%b expected %b", cyc, lat_en, exp_en);
      end
      if (cyc >= 400 + PERIOD) begin
        for (int j = 0; j < N; j++) exp_en[j] = (ph == j) || (ph == 2 * N + 1 - j);
        checks++;
        if (lat_en !== exp_en) failures++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
