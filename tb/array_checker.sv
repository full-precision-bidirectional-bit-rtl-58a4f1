// array_checker: drives one bs_convolver of a given size and checks it.
//
// Used by tb_enlarged_array. After sync it loads a kernel (random, or all
// -127 with saturated pixels for the extreme result), streams random pixels
// and compares every window R[s] = sum w[r][c]*p_r[s-c] whose pixels were
// all streamed with an integer model. Bit i of R[s] is expected on out_left
// (even s) or out_right (odd s) in cycle 10*s + 2 + max(COLS-1, 1) + i. Reports its
// counts and raises done when all runs are over.
module array_checker
  import bsconv_pkg::*;
#(
  parameter int ROWS = 4,
  parameter int COLS = 4
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_left,
  output int   n_right,
  output int   n_ext
);
  localparam int LAT  = 2 + ((COLS > 1) ? COLS - 1 : 1);
  localparam int MAXS = 64;
  localparam int EXT  = ROWS * COLS * 255 * 127;

  logic sync, load, out_left, out_right;
  logic [ROWS-1:0] row_in;
  int w[ROWS][COLS];
  int px[ROWS][MAXS];
  int got[2];

  bs_convolver #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .sync(sync), .load(load), .row_in(row_in),
    .out_left(out_left), .out_right(out_right));

  task automatic run(input bit extreme, input int nslots);
    int s0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        w[r][c] = extreme ? -127 : $urandom_range(0, 254) - 127;
    s0 = COLS;
    for (int r = 0; r < ROWS; r++)
      for (int s = 0; s < MAXS; s++)
        px[r][s] = (s < s0) ? 0 : (extreme ? 255 : $urandom_range(0, 255));
    sync = 1'b1; load = 1'b0;
    @(negedge clk);
    sync = 1'b0;
    for (int cyc = 0; cyc < (s0 + nslots) * SLOT + LAT + WORD; cyc++) begin
      int s, pos;
      s = cyc / SLOT; pos = cyc % SLOT;
      load = (cyc < SLOT * (COLS - 1) + NBITS);
      for (int r = 0; r < ROWS; r++) begin
        if (load) begin
          int v;
          v = w[r][COLS - 1 - s];
          row_in[r] = (pos == NBITS - 1) ? (v < 0) :
                      (pos < NBITS) ? 1'(((v < 0) ? -v : v) >> pos) : 1'($urandom);
        end else if (s >= s0 && s < s0 + nslots && pos < NBITS) row_in[r] = 1'(px[r][s] >> pos);
        else row_in[r] = 1'($urandom);
      end
      #1;
      for (int side = 0; side < 2; side++) begin
        int u, ws, i;
        u = cyc - LAT - side * SLOT;
        if (u >= 0) begin
          ws = 2 * (u / PERIOD) + side;
          i = u % PERIOD;
          if (i == 0) got[side] = 0;
          got[side] |= int'(side ? out_right : out_left) << i;
          if (i == WORD - 1 && ws >= s0 + COLS - 1 && ws < s0 + nslots) begin
            int e, g;
            e = 0;
            for (int r = 0; r < ROWS; r++)
              for (int c = 0; c < COLS; c++) e += w[r][c] * px[r][ws - c];
            g = (got[side] << (32 - WORD)) >>> (32 - WORD);
            checks++;
            if (side) n_right++; else n_left++;
            if (e == -EXT) n_ext++;
            if (g != e) begin
              failures++;
              if (failures < 10) $display("%0dx%0d window %0d: got %0d expected %0d", ROWS, COLS, ws, g, e);
            end
          end
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0; n_left = 0; n_right = 0; n_ext = 0;
    sync = 1'b1; load = 1'b0; row_in = '0;
    @(negedge clk);
    run(1'b0, 30);
    run(1'b1, 6);
    run(1'b0, 30);
    done = 1'b1;
  end
endmodule
