// tb_add_conv_unit: word-level test of the addition/conversion unit.
//
// Words follow the left-channel schedule of a 20-cycle period: product bit k
// (k = 0..15) is driven on za/zb in phase k+1, split at random between the
// two halves so that z' + z'' = P; outside the product window the halves
// carry random bits, which must be ignored. The partial sum V from above
// enters LSB first from phase 2, and bit i of the result is read in phase
// i+2. Expected result: V + P (sign 0) or V - P (sign 1), modulo 2^20.
module tb_add_conv_unit;
  import bsconv_pkg::*;
  localparam int NW = 150;
  logic clk = 1'b0;
  logic clr, za, zb, sign, pw, ws_conv, ws_add, vin, vout;
  int checks = 0, failures = 0, negs = 0;
  int pa[NW], pb[NW], vv[NW];
  bit sg[NW];
  int got[NW];

  add_conv_unit dut (.clk(clk), .clr(clr), .za(za), .zb(zb), .sign(sign), .pw(pw),
                     .ws_conv(ws_conv), .ws_add(ws_add), .vin(vin), .vout(vout));

  always #5 clk = ~clk;

  initial begin
    repeat (NW * PERIOD + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < NW; m++) begin
      int p;
      p = $urandom_range(0, 255 * 127);
      if (m < 2) p = 255 * 127;
      pa[m] = $urandom_range(0, p);
      pb[m] = p - pa[m];
      vv[m] = $urandom_range(0, (1 << WORD) - 1);
      sg[m] = 1'($urandom);
      if (m == 1) begin sg[m] = 1; vv[m] = 0; end
      got[m] = 0;
    end
    clr = 1'b1; {za, zb, sign, pw, ws_conv, ws_add, vin} = '0;
    @(negedge clk);
    clr = 1'b0;
    for (int cyc = 0; cyc < (NW + 1) * PERIOD; cyc++) begin
      int ph, m, k, i, wm;
      ph = cyc % PERIOD;
      m  = cyc / PERIOD;
      // inputs of this cycle
      pw      = (ph >= 1) && (ph <= PROD);
      ws_conv = (ph == 1);
      ws_add  = (ph == 2);
      k = ph - 1;
      if (pw && m < NW) begin
        za = 1'(pa[m] >> k);
        zb = 1'(pb[m] >> k);
      end else begin
        za = 1'($urandom);
        zb = 1'($urandom);
      end
      if (ph == 1 && m < NW) sign = sg[m];
      i = cyc - 2;
      wm = (i >= 0) ? i / PERIOD : NW;
      vin = (wm < NW) ? 1'(vv[wm] >> (i % PERIOD)) : 1'b0;
      #1;
      // output of this cycle (vout depends on vin): bit i of word wm
      i  = cyc - 2;
      if (i >= 0) begin
        wm = i / PERIOD; i = i % PERIOD;
        if (wm < NW) begin
          got[wm] |= int'(vout) << i;
          if (i == WORD - 1) begin
            int e;
            e = (vv[wm] + (sg[wm] ? -(pa[wm] + pb[wm]) : (pa[wm] + pb[wm]))) & ((1 << WORD) - 1);
            checks++;
            if (sg[wm]) negs++;
            if (got[wm] != e) begin
              failures++;
              if (failures < 10) $display("word %0d: got %h expected %h", wm, got[wm], e);
            end
          end
        end
      end
      @(negedge clk);
    end
    if (negs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
