// bsconv_pkg: constants and the control bundle shared by the bit-serial
// convolver.
//
// Word sizes follow the convolver's fixed bit-serial format: 8-bit unsigned
// pixels and 8-bit sign-magnitude weights, a 10-cycle slot per operand (eight
// data bits plus two padding bits), a 20-cycle control period holding one
// forward and one backward multiplication, and 20-bit two's-complement results.
// These numbers tie the multiplier timing together and are therefore package
// constants rather than module parameters; only the array size (rows and
// columns) is a parameter of the top.
//
// ctrl_t is the bundle the control unit broadcasts to every basic cell. The
// "left" channel belongs to multiplications started in even slots (their
// partial sums travel toward section 0 and leave on the left), the "right"
// channel to those started in odd slots.
package bsconv_pkg;

  localparam int unsigned NBITS  = 8;          // operand width = multiplier sections
  localparam int unsigned SLOT   = NBITS + 2;  // cycles between multiplications
  localparam int unsigned PERIOD = 2 * SLOT;   // control period (ring counter length)
  localparam int unsigned WORD   = PERIOD;     // result width in bits
  localparam int unsigned PROD   = 2 * NBITS;  // product bits taken from the multiplier

  // Strobes of one output channel (left or right).
  typedef struct packed {
    logic pw;       // product window: multiplier output bits 0..PROD-1 at the converter
    logic ws_conv;  // word start (bit 0) at the converter
    logic ws_add;   // word start (bit 0) at the cell adders and the first output adder
  } chan_ctrl_t;

  typedef struct packed {
    logic [NBITS-1:0] lat_en;   // latching signal per multiplier section
    logic [NBITS-1:0] dir;      // 1: section works for the forward multiplication
    logic             lat_rst;  // clears all multiplier latches
    chan_ctrl_t       left;
    chan_ctrl_t       right;
  } ctrl_t;

endpackage
