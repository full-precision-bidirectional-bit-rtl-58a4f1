// delay_line: delay unit between neighbouring basic cells of a row.
//
// A LEN-bit shift register on the data input line: dout is din delayed by LEN
// clock cycles, one pixel slot, so the next cell works on the previous pixel
// of the row. clr (synchronous clear) is this design's addition; the 10-bit
// length follows the convolver.
module delay_line #(
  parameter int unsigned LEN = bsconv_pkg::SLOT
) (
  input  logic clk,
  input  logic clr,
  input  logic din,
  output logic dout
);

  logic [LEN-1:0] sr_q;

  always_ff @(posedge clk) begin
    if (clr) sr_q <= '0;
    else     sr_q <= {sr_q[LEN-2:0], din};
  end

  assign dout = sr_q[LEN-1];

endmodule
