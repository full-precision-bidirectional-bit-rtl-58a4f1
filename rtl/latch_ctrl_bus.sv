// latch_ctrl_bus: latching-signal bus of the multiplier.
//
// Two (N-1)-stage shift registers run in opposite directions and their taps
// are OR-ed per section. A one-cycle pulse on in_left reaches section j after
// j cycles (section 0 in the same cycle); a pulse on in_right reaches section
// N-1-j after j cycles. Section j therefore latches operand bit j of a
// forward multiplication, and section N-1-j operand bit j of a backward one.
//
// The dual shift register with OR-ed outputs follows the convolver's control
// bus; clr (synchronous clear) is this design's addition.
module latch_ctrl_bus #(
  parameter int unsigned N = bsconv_pkg::NBITS
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         in_left,
  input  logic         in_right,
  output logic [N-1:0] lat_en
);

  logic [N-1:1] l_q;  // l_q[j]: pulse from the left, j cycles old
  logic [N-2:0] r_q;  // r_q[j]: pulse from the right, N-1-j cycles old
  logic [N-1:0] l_all, r_all;

  always_comb begin
    l_all = {l_q[N-1:1], in_left};
    r_all = {in_right, r_q[N-2:0]};
    lat_en = l_all | r_all;
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      l_q <= '0;
      r_q <= '0;
    end else begin
      l_q <= l_all[N-2:0];
      r_q <= r_all[N-1:1];
    end
  end

endmodule
