// conv_cell: basic cell of the convolver array.
//
// One cell multiplies the pixel on its data input line by its stored kernel
// weight and adds the signed product to the partial sums passing down its
// column. It holds:
//   - weight_mem: the weight, loaded from the data line while load is high;
//   - bs_mult: the bidirectional multiplier, X = data line, Y = weight;
//   - delay_line: the data line delayed by one slot for the next cell;
//   - two add_conv_unit: "left" for forward products (leaving multiplier
//     section 0) and "right" for backward products (leaving section N-1).
// All timing comes from the shared control bundle. The partial sum on
// vout_l/vout_r is combinational from vin_l/vin_r (see add_conv_unit), so the
// cells of a column add in the same cycle. The block partition follows the
// convolver's basic cell.
module conv_cell
  import bsconv_pkg::*;
(
  input  logic  clk,
  input  logic  clr,
  input  logic  load,
  input  logic  din,
  output logic  dout,
  input  ctrl_t ctrl,
  input  logic  vin_l,
  input  logic  vin_r,
  output logic  vout_l,
  output logic  vout_r
);

  logic y, sign;
  logic left_a, left_b, right_a, right_b;

  weight_mem u_mem (
    .clk (clk),
    .load(load),
    .din (din),
    .y   (y),
    .sign(sign)
  );

  bs_mult #(.N(NBITS)) u_mult (
    .clk    (clk),
    .clr    (clr),
    .x      (din),
    .y      (y),
    .lat_en (ctrl.lat_en),
    .lat_rst(ctrl.lat_rst),
    .dir    (ctrl.dir),
    .left_a (left_a),
    .left_b (left_b),
    .right_a(right_a),
    .right_b(right_b)
  );

  delay_line #(.LEN(SLOT)) u_delay (
    .clk (clk),
    .clr (clr),
    .din (din),
    .dout(dout)
  );

  add_conv_unit u_acu_l (
    .clk    (clk),
    .clr    (clr),
    .za     (left_a),
    .zb     (left_b),
    .sign   (sign),
    .pw     (ctrl.left.pw),
    .ws_conv(ctrl.left.ws_conv),
    .ws_add (ctrl.left.ws_add),
    .vin    (vin_l),
    .vout   (vout_l)
  );

  add_conv_unit u_acu_r (
    .clk    (clk),
    .clr    (clr),
    .za     (right_a),
    .zb     (right_b),
    .sign   (sign),
    .pw     (ctrl.right.pw),
    .ws_conv(ctrl.right.ws_conv),
    .ws_add (ctrl.right.ws_add),
    .vin    (vin_r),
    .vout   (vout_r)
  );

endmodule
