// tb_frame_workload: convolves a synthetic TV picture with a 3x3 kernel.
//
// The convolver sees an image as bands of three adjacent lines fed in
// parallel on its three row inputs; the line buffering that produces the
// bands belongs to the host system. This testbench plays that system: for
// output line y it streams lines y, y+1, y+2 of a W-pixel picture, one pixel
// per 10-cycle slot, band after band without gaps or restarts. Every window
// whose three columns lie in the same band (W-2 per band) is read from the
// output pins and compared with the convolution computed here. The picture
// is a deterministic pattern with noise; the kernel is a Laplacian-like
// high-pass filter with negative and positive weights.
// W = LINES = 512 is a full standard (non-interlaced) TV frame: 510 bands of
// 510 checked output pixels each.
module tb_frame_workload;
  import bsconv_pkg::*;
  localparam int W     = 512;
  localparam int LINES = 512;    // picture lines (bands = LINES-2)
  localparam int LAT   = 4;

  logic clk = 1'b0;
  logic sync, load, out_left, out_right;
  logic [2:0] row_in;
  int checks = 0, failures = 0, n_left = 0, n_right = 0;
  int img[LINES][W];
  int w[3][3] = '{'{-1, -2, -1}, '{-2, 12, -2}, '{-1, -2, -1}};
  int got[2];

  bs_convolver dut (.clk(clk), .sync(sync), .load(load), .row_in(row_in),
                    .out_left(out_left), .out_right(out_right));

  always #5 clk = ~clk;

  initial begin
    repeat ((LINES - 2) * W * SLOT + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pixel of the stream: global slot g -> band g / W, column g % W
  function automatic int pix(int r, int g);
    if (g < 0) return 0;
    return img[g / W + r][g % W];
  endfunction

  initial begin
    int nslots, s0;
    for (int y = 0; y < LINES; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = (((x / 16 + y / 4) % 2) ? 200 : 40) + $urandom_range(0, 55);
    sync = 1'b1; load = 1'b0; row_in = '0;
    @(negedge clk);
    sync = 1'b0;
    s0 = 3;
    nslots = (LINES - 2) * W;
    got[0] = 0; got[1] = 0;
    for (int cyc = 0; cyc < (s0 + nslots) * SLOT + LAT + WORD; cyc++) begin
      int s, pos;
      s = cyc / SLOT; pos = cyc % SLOT;
      load = (cyc < 2 * SLOT + NBITS);
      for (int r = 0; r < 3; r++) begin
        if (load) begin
          int v;
          v = w[r][2 - s];
          row_in[r] = (pos < NBITS) ? ((pos == 7) ? (v < 0) : 1'(((v < 0) ? -v : v) >> pos)) : 1'b0;
        end else if (s >= s0 && s < s0 + nslots && pos < NBITS) row_in[r] = 1'(pix(r, s - s0) >> pos);
        else row_in[r] = 1'b0;
      end
      #1;
      for (int side = 0; side < 2; side++) begin
        int u, ws, i, g;
        u = cyc - LAT - side * SLOT;
        if (u >= 0) begin
          ws = 2 * (u / PERIOD) + side;
          i = u % PERIOD;
          if (i == 0) got[side] = 0;
          got[side] |= int'(side ? out_right : out_left) << i;
          g = ws - s0;   // stream slot of the newest pixel of the window
          if (i == WORD - 1 && g >= 0 && g < nslots && g % W >= 2) begin
            int e, v;
            e = 0;
            for (int r = 0; r < 3; r++)
              for (int c = 0; c < 3; c++) e += w[r][c] * pix(r, g - c);
            v = (got[side] << (32 - WORD)) >>> (32 - WORD);
            checks++;
            if (side) n_right++; else n_left++;
            if (v != e) begin
              failures++;
              if (failures < 10) $display("band %0d x %0d: got %0d expected %0d", g / W, g % W, v, e);
            end
          end
        end
      end
      @(negedge clk);
    end
    if (n_left == 0 || n_right == 0) failures++;
    $display("output pixels checked: %0d (left %0d, right %0d)", checks, n_left, n_right);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
