// weight_mem: kernel-weight memory of a basic cell.
//
// Holds one 8-bit sign-magnitude weight. While load is high the data input
// line shifts into a sign register followed by NBITS-1 magnitude registers;
// a weight sent LSB first therefore leaves its sign (the 8th bit) in the
// sign register. At the same time zeros are shifted into the SLOT-NBITS+1
// return registers. With load low the sign register holds and the magnitude
// registers plus the return registers form a SLOT-bit ring: the magnitude
// with a zero MSB and two more zero bits circulates and is presented to the
// multiplier LSB first, one full weight every SLOT cycles.
//
// Timing: the multiplier tap sits after the second return register, so if
// load falls after cycle T (last loading cycle), magnitude bit 0 is on y in
// cycle T+3 and again every SLOT cycles. There is no reset; the weight is
// kept until the next load. Structure and tap position follow the
// convolver's memory unit; the LSB-first, sign-last bit order is this
// design's choice.
module weight_mem #(
  parameter int unsigned NBITS = bsconv_pkg::NBITS,
  parameter int unsigned SLOT  = bsconv_pkg::SLOT
) (
  input  logic clk,
  input  logic load,
  input  logic din,
  output logic y,
  output logic sign
);

  localparam int unsigned MAG = NBITS - 1;  // magnitude registers

  logic            sign_q;
  logic [SLOT-1:0] ring_q;  // [0..MAG-1] magnitude chain, [MAG..SLOT-1] return path

  always_ff @(posedge clk) begin
    sign_q <= load ? din : sign_q;
    ring_q[0] <= load ? sign_q : ring_q[SLOT-1];
    for (int unsigned i = 1; i < SLOT; i++) begin
      if (i == MAG) ring_q[i] <= load ? 1'b0 : ring_q[i-1];
      else          ring_q[i] <= ring_q[i-1];
    end
  end

  assign y    = ring_q[MAG + 1];
  assign sign = sign_q;

endmodule
