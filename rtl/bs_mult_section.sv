// bs_mult_section: one section of the bidirectional bit-serial multiplier.
//
// A section holds two halves that work in parallel. The z' half multiplies the
// latched x_j by the bit on the Y bus; the z'' half multiplies the latched y_j
// by the bit on the X bus. Each half adds its partial product to the partial
// sum arriving from a neighbour section and to its own carry from the previous
// cycle in a (3,2) full adder; sum and carry are registered. The neighbour is
// chosen by the direction select: dir=1 takes the sum of the right neighbour
// (section j+1), so sums travel toward section 0 (forward multiplication);
// dir=0 takes the left neighbour (backward multiplication).
//
// Timing: in the cycle lat_en is high the section captures x and y. The z'
// half uses the bus value of x in that same cycle (bypass), so it forms
// x_j*y_k for k >= j; the z'' half uses only the stored y_j, so it forms
// y_j*x_k for k > j. lat_rst gates the stored bits to zero in its cycle and
// clears them at its end, after which the section only passes sums on.
//
// The latch/AND/full-adder/direction-multiplexer structure follows the
// convolver's multiplier cell; latches are modelled as flip-flops, and clr
// (a synchronous clear of all state) is this design's addition.
module bs_mult_section (
  input  logic clk,
  input  logic clr,
  input  logic x,
  input  logic y,
  input  logic lat_en,
  input  logic lat_rst,
  input  logic dir,
  input  logic sa_from_left,
  input  logic sa_from_right,
  input  logic sb_from_left,
  input  logic sb_from_right,
  output logic sa,
  output logic sb
);

  logic xl_q, yl_q;   // operand latches
  logic ca_q, cb_q;   // carry registers of the two full adders
  logic sa_q, sb_q;   // sum registers

  logic xl_g, yl_g, x_op, ppa, ppb, ina, inb;

  always_comb begin
    xl_g = xl_q & ~lat_rst;
    yl_g = yl_q & ~lat_rst;
    x_op = lat_en ? x : xl_g;          // bypass in the latching cycle
    ppa  = x_op & y;                   // z' partial product
    ppb  = yl_g & x;                   // z'' partial product
    ina  = dir ? sa_from_right : sa_from_left;
    inb  = dir ? sb_from_right : sb_from_left;
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      xl_q <= 1'b0;
      yl_q <= 1'b0;
      ca_q <= 1'b0;
      cb_q <= 1'b0;
      sa_q <= 1'b0;
      sb_q <= 1'b0;
    end else begin
      xl_q <= lat_en ? x : xl_g;
      yl_q <= lat_en ? y : yl_g;
      {ca_q, sa_q} <= {1'b0, ppa} + {1'b0, ina} + {1'b0, ca_q};
      {cb_q, sb_q} <= {1'b0, ppb} + {1'b0, inb} + {1'b0, cb_q};
    end
  end

  assign sa = sa_q;
  assign sb = sb_q;

endmodule
