// tb_bs_mult: product test of the bidirectional bit-serial multiplier.
//
// The control signals are generated here from their closed form (section j
// latches in phases j and 2N+1-j, works forward in phases j .. 2N-j, latch
// reset in phases N and N+SLOT of the 20-cycle period), independent of the
// control unit. A new multiplication starts every SLOT cycles, alternately
// forward and backward, with random 8-bit X and 7-bit Y (extremes included).
// Bit k of the z' and z'' halves is read on the left pins k+1 cycles after a
// forward start and on the right pins k+1 cycles after a backward start;
// their sum over k = 0..15 must equal X*Y. One product per SLOT cycles is
// checked, which is the multiplier's throughput.
module tb_bs_mult;
  import bsconv_pkg::*;
  localparam int N = NBITS;
  localparam int NMUL = 200;

  logic clk = 1'b0;
  logic clr, x, y, lat_rst, la, lb, ra, rb;
  logic [N-1:0] lat_en, dir;
  int checks = 0, failures = 0;
  int xv[NMUL], yv[NMUL];
  longint acc[NMUL];
  int fwd_done = 0, bwd_done = 0;

  bs_mult dut (.clk(clk), .clr(clr), .x(x), .y(y), .lat_en(lat_en), .lat_rst(lat_rst), .dir(dir),
               .left_a(la), .left_b(lb), .right_a(ra), .right_b(rb));

  always #5 clk = ~clk;

  initial begin
    repeat (NMUL * SLOT + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < NMUL; m++) begin
      xv[m] = $urandom_range(0, 255);
      yv[m] = $urandom_range(0, 127);
      acc[m] = 0;
    end
    xv[0] = 255; yv[0] = 127;
    xv[1] = 255; yv[1] = 127;
    xv[2] = 0;   yv[2] = 127;
    xv[3] = 255; yv[3] = 0;
    clr = 1'b1; x = 0; y = 0; lat_en = '0; dir = '0; lat_rst = 0;
    @(negedge clk);
    @(negedge clk);
    clr = 1'b0;
    for (int cyc = 0; cyc < NMUL * SLOT + 2 * PERIOD; cyc++) begin
      int ph, m, k, pos;
      ph = cyc % PERIOD;
      // outputs of this cycle: bit k of multiplication m appears at start+k+1
      for (int side = 0; side < 2; side++) begin
        k = cyc - 1 - side * SLOT;
        if (k >= 0) begin
          m = 2 * (k / PERIOD) + side;
          k = k % PERIOD;
          if (m < NMUL && k < 2 * N) begin
            acc[m] += (longint'(side ? ra : la) + longint'(side ? rb : lb)) << k;
            if (k == 2 * N - 1) begin
              checks++;
              if (side) bwd_done++; else fwd_done++;
              if (acc[m] != longint'(xv[m]) * yv[m]) begin
                failures++;
                if (failures < 10) $display("mult %0d: %0d*%0d gave %0d", m, xv[m], yv[m], acc[m]);
              end
            end
          end
        end
      end
      // inputs of this cycle
      m = cyc / SLOT;
      pos = cyc % SLOT;
      if (m < NMUL && pos < N) begin
        x = 1'(xv[m] >> pos);
        y = 1'(yv[m] >> pos);
      end else begin
        x = 1'($urandom);   // padding positions are don't-care
        y = 1'b0;
      end
      for (int j = 0; j < N; j++) begin
        lat_en[j] = (ph == j) || (ph == 2 * N + 1 - j);
        dir[j]    = (ph >= j) && (ph < 2 * N + 1 - j);
      end
      lat_rst = (ph == N) || (ph == N + SLOT);
      @(negedge clk);
    end
    if (fwd_done == 0 || bwd_done == 0) failures++;
    $display("forward products %0d, backward products %0d", fwd_done, bwd_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
