// dir_ctrl_gen: direction-control signal generator of the multiplier.
//
// An N-bit bidirectional shift register; bit j drives the direction
// multiplexers of multiplier section j (1 = forward, sums move toward
// section 0). While toward0 is low the register shifts away from section 0
// with a 1 entering at section 0, so a wave of 1s claims the sections one per
// cycle as a forward multiplication starts there. While toward0 is high it
// shifts toward section 0 with a 0 entering at section N-1, handing the
// sections one per cycle to the backward multiplication as they become free.
// toward0 comes from the control counter and is the same for every stage.
//
// clr loads the state of phase 0 of the control period (only section 0
// forward). The bidirectional register with constant inputs at its two ends
// follows the convolver's generator; the clear value is this design's choice.
module dir_ctrl_gen #(
  parameter int unsigned N = bsconv_pkg::NBITS
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         toward0,
  output logic [N-1:0] dir
);

  logic [N-1:0] d_q;

  always_ff @(posedge clk) begin
    if (clr)          d_q <= N'(1);
    else if (toward0) d_q <= {1'b0, d_q[N-1:1]};
    else              d_q <= {d_q[N-2:0], 1'b1};
  end

  assign dir = d_q;

  // the forward sections always form one run starting at section 0
  a_thermometer: assert property (@(posedge clk) disable iff (clr) ((d_q + 1'b1) & d_q) == '0)
    else $error("direction register is not a run of ones from section 0");

endmodule
