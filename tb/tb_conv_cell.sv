// tb_conv_cell: one basic cell driven by the control unit.
//
// For each of several weights (including +127, -127 and -0): sync, load the
// weight in cycles 0..7 (LSB first, sign last), then send one random pixel
// per 10-cycle slot from slot 1 on, with random bits in the two padding
// positions. Random 20-bit partial sums enter on vin_l (even slots) and
// vin_r (odd slots) LSB first from cycle 10*s+2; the same-cycle outputs must
// carry vin + w*p[s] (w signed), modulo 2^20. The data line output must be
// the input delayed by 10 cycles.
module tb_conv_cell;
  import bsconv_pkg::*;
  localparam int NS = 24;
  logic clk = 1'b0;
  logic sync, load, din, dout, vin_l, vin_r, vout_l, vout_r;
  ctrl_t ctrl;
  int checks = 0, failures = 0, n_left = 0, n_right = 0, n_neg = 0;
  int px[NS], vin_w[NS], got[NS];
  logic hist[$];

  conv_ctrl u_ctrl (.clk(clk), .sync(sync), .ctrl(ctrl));
  conv_cell dut (.clk(clk), .clr(sync), .load(load), .din(din), .dout(dout), .ctrl(ctrl),
                 .vin_l(vin_l), .vin_r(vin_r), .vout_l(vout_l), .vout_r(vout_r));

  always #5 clk = ~clk;

  initial begin
    repeat (8 * (NS + 4) * SLOT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_weight(input logic [7:0] w);
    int wv;
    wv = (w[7] ? -1 : 1) * int'(w[6:0]);
    for (int s = 0; s < NS; s++) begin
      px[s] = $urandom_range(0, 255);
      if (s == 1) px[s] = 255;
      vin_w[s] = $urandom_range(0, (1 << WORD) - 1);
      got[s] = 0;
    end
    sync = 1'b1; load = 1'b0;
    @(negedge clk);
    sync = 1'b0;
    hist.delete();
    for (int i = 0; i < SLOT; i++) hist.push_front(1'b0);
    for (int cyc = 0; cyc < (NS + 1) * SLOT; cyc++) begin
      int s, pos, u;
      // outputs (combinational in vin, so vin is set first)
      u = cyc - 2;
      vin_l = 1'b0; vin_r = 1'b0;
      if (u >= 0) begin
        s = u / SLOT;
        pos = u - SLOT * s;
        // a word spans 20 cycles; window s occupies cycles 10s+2 .. 10s+21
        for (int t = 0; t < 2; t++) begin
          int ss, ii;
          ss = s - t;
          ii = pos + t * SLOT;
          if (ss >= 1 && ss < NS) begin
            if (ss % 2 == 0) vin_l = 1'(vin_w[ss] >> ii);
            else             vin_r = 1'(vin_w[ss] >> ii);
          end
        end
      end
      // inputs
      s = cyc / SLOT; pos = cyc % SLOT;
      load = (cyc < NBITS);
      if (load) din = w[cyc];
      else if (pos < NBITS && s < NS) din = 1'(px[s] >> pos);
      else din = 1'($urandom);
      #1;
      if (u >= 0) begin
        s = u / SLOT;
        pos = u - SLOT * s;
        for (int t = 0; t < 2; t++) begin
          int ss, ii;
          ss = s - t;
          ii = pos + t * SLOT;
          if (ss >= 1 && ss < NS) begin
            got[ss] |= int'((ss % 2 == 0) ? vout_l : vout_r) << ii;
            if (ii == WORD - 1) begin
              int e;
              e = (vin_w[ss] + wv * px[ss]) & ((1 << WORD) - 1);
              checks++;
              if (ss % 2 == 0) n_left++; else n_right++;
              if (wv < 0) n_neg++;
              if (got[ss] != e) begin
                failures++;
                if (failures < 10) $display("w=%0d slot %0d p=%0d: got %h expected %h", wv, ss, px[ss], got[ss], e);
              end
            end
          end
        end
      end
      checks++;
      if (dout !== hist[SLOT-1]) failures++;
      hist.push_front(din);
      void'(hist.pop_back());
      @(negedge clk);
    end
  endtask

  initial begin
    sync = 1'b1; load = 1'b0; din = 1'b0; vin_l = 0; vin_r = 0;
    @(negedge clk);
    run_weight(8'h7F);
    run_weight(8'hFF);
    run_weight(8'h80);
    run_weight(8'h00);
    for (int n = 0; n < 4; n++) run_weight(8'($urandom));
    if (n_left == 0 || n_right == 0 || n_neg == 0) failures++;
    $display("left words %0d, right words %0d, negative-weight words %0d", n_left, n_right, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
