// bs_convolver: full-precision bidirectional bit-serial convolver (top).
//
// Convolves an image, scanned as ROWS pixel rows in parallel, with a ROWS x
// COLS kernel of 8-bit sign-magnitude weights. Pixels are 8-bit unsigned and
// enter bit-serially, one pixel per row every SLOT (10) cycles: bits 0..7 LSB
// first in slot positions 0..7, positions 8 and 9 ignored. Each row's data
// line passes through its COLS cells, delayed one slot per cell, so in slot s
// cell (r,c) multiplies pixel s-c of row r by weight w[r][c]. The products of
// a column are summed down the column and the columns are summed in the
// addition units, giving one full-precision 20-bit two's-complement result
//     R[s] = sum_{r,c} w[r][c] * p_r[s-c]
// every 10 cycles. Results of even slots (counted from sync) come out on
// out_left, those of odd slots on out_right, each LSB first.
//
// Timing: the cycle after sync is high is cycle 0 (start of slot 0). Bit i of
// R[s] is on its output pin in cycle 10*s + 4 + i (i = 0..19) for the default
// 3 columns, so a convolution takes 24 cycles from its first input bit to its
// last output bit. In general the offset is 2 + max(COLS-1, 1).
//
// Kernel loading: hold load high for 10*(COLS-1)+8 cycles starting at a
// slot boundary (for example cycles 0..27 after sync). During it each row
// input carries the weights of its cells, last column first, one per slot,
// 8 bits LSB first with the sign last. Results resume with the first window
// whose pixels were all sent after loading. The kernel is kept across sync;
// it stays aligned with the restarted control period when the sync cycle
// falls a whole number of slots (multiple of 10 cycles) after the previous
// restart, since the weight loops keep circulating.
//
// Pins follow the convolver: three data inputs, two outputs, two control
// pins (load, sync). The word format, load protocol and sync behaviour are
// this design's choices. Results wrap modulo 2^20 only if more than 16
// cells are used.
module bs_convolver
  import bsconv_pkg::*;
#(
  parameter int unsigned ROWS = 3,
  parameter int unsigned COLS = 3
) (
  input  logic            clk,
  input  logic            sync,
  input  logic            load,
  input  logic [ROWS-1:0] row_in,
  output logic            out_left,
  output logic            out_right
);

  ctrl_t ctrl;

  conv_ctrl u_ctrl (
    .clk (clk),
    .sync(sync),
    .ctrl(ctrl)
  );

  // data[r][c]: data line at the input of cell (r,c); column COLS is the
  // end of the row
  logic [ROWS-1:0][COLS:0] data;
  // vl/vr[r][c]: partial sums entering cell (r,c) from above; row ROWS is the
  // foot of the column
  logic [ROWS:0][COLS-1:0] vl, vr;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign data[r][0] = row_in[r];
    for (genvar c = 0; c < COLS; c++) begin : g_col
      conv_cell u_cell (
        .clk   (clk),
        .clr   (sync),
        .load  (load),
        .din   (data[r][c]),
        .dout  (data[r][c+1]),
        .ctrl  (ctrl),
        .vin_l (vl[r][c]),
        .vin_r (vr[r][c]),
        .vout_l(vl[r+1][c]),
        .vout_r(vr[r+1][c])
      );
    end
  end

  assign vl[0] = '0;
  assign vr[0] = '0;

  out_adder #(.COLS(COLS)) u_add_l (
    .clk(clk),
    .clr(sync),
    .ws (ctrl.left.ws_add),
    .col(vl[ROWS]),
    .sum(out_left)
  );

  out_adder #(.COLS(COLS)) u_add_r (
    .clk(clk),
    .clr(sync),
    .ws (ctrl.right.ws_add),
    .col(vr[ROWS]),
    .sum(out_right)
  );

endmodule
