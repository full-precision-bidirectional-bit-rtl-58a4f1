// tb_bs_mult_section: random-stimulus test of one multiplier section.
//
// Drives every input of the section at random (clear, latching, latch reset,
// direction, neighbour sums, bus bits) and compares both registered sum
// outputs each cycle with an arithmetic model kept in integers: latch value,
// partial product, neighbour selection and (3,2) addition with carry.
module tb_bs_mult_section;
  logic clk = 1'b0;
  logic clr, x, y, lat_en, lat_rst, dir, sal, sar, sbl, sbr, sa, sb;
  int checks = 0, failures = 0;

  bs_mult_section dut (
    .clk(clk), .clr(clr), .x(x), .y(y), .lat_en(lat_en), .lat_rst(lat_rst), .dir(dir),
    .sa_from_left(sal), .sa_from_right(sar), .sb_from_left(sbl), .sb_from_right(sbr),
    .sa(sa), .sb(sb));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mxl, myl, mca, mcb, msa, msb;  // model state
  int pa, pb, ia, ib, t;

  initial begin
    {clr, x, y, lat_en, lat_rst, dir, sal, sar, sbl, sbr} = '0;
    clr = 1'b1;
    @(negedge clk);
    @(negedge clk);
    mxl = 0; myl = 0; mca = 0; mcb = 0; msa = 0; msb = 0;
    for (int n = 0; n < 3000; n++) begin
      // check the outputs of the previous cycle
      checks++;
      if (sa !== msa[0] || sb !== msb[0]) begin
        failures++;
        if (failures < 10) $display("cycle %0d: sa=%b sb=%b expected %0d %0d", n, sa, sb, msa, msb);
      end
      clr     = ($urandom_range(0, 99) == 0);
      x       = 1'($urandom);
      y       = 1'($urandom);
      lat_en  = ($urandom_range(0, 3) == 0);
      lat_rst = ($urandom_range(0, 5) == 0);
      dir     = 1'($urandom);
      {sal, sar, sbl, sbr} = 4'($urandom);
      #1;
      // model of this cycle
      if (clr) begin
        mxl = 0; myl = 0; mca = 0; mcb = 0; msa = 0; msb = 0;
      end else begin
        pa = (lat_en ? int'(x) : (lat_rst ? 0 : mxl)) * int'(y);
        pb = (lat_rst ? 0 : myl) * int'(x);
        ia = dir ? int'(sar) : int'(sal);
        ib = dir ? int'(sbr) : int'(sbl);
        t = pa + ia + mca; msa = t % 2; mca = t / 2;
        t = pb + ib + mcb; msb = t % 2; mcb = t / 2;
        mxl = lat_en ? int'(x) : (lat_rst ? 0 : mxl);
        myl = lat_en ? int'(y) : (lat_rst ? 0 : myl);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
