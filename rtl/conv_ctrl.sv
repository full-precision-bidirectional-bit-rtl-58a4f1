// conv_ctrl: central control unit of the convolver.
//
// A one-hot ring counter of PERIOD (20) bits marks the phase of the control
// period; one forward multiplication starts at phase 0 and one backward
// multiplication at phase SLOT (10). Combinational decoding of the ring
// produces:
//   - the left/right inputs of the latching bus (phases 0 and SLOT),
//   - the shift direction of the direction generator (toward section 0 during
//     phases SLOT-1 .. 2*SLOT-2),
//   - the latch reset (phase NBITS of each multiplication: 8 and 18),
//   - per output channel, the product window and word-start strobes of the
//     addition/conversion units and the output adders.
// The latching bus and the direction generator are part of this unit.
//
// sync is synchronous: the cycle after sync is high is phase 0, and the
// latching bus and direction generator restart from their phase-0 state.
// The ring counter, decoding and the two sub-blocks follow the convolver's
// control unit; the decoded phases come from the multiplier timing and the
// pipeline depth of this design (product bit k at the converter in cycle
// k+1, at the cell adders in cycle k+2).
module conv_ctrl
  import bsconv_pkg::*;
(
  input  logic  clk,
  input  logic  sync,
  output ctrl_t ctrl
);

  logic [PERIOD-1:0] ring_q;
  logic              toward0;
  logic [NBITS-1:0]  lat_en, dir;

  always_ff @(posedge clk) begin
    if (sync) ring_q <= PERIOD'(1);
    else      ring_q <= {ring_q[PERIOD-2:0], ring_q[PERIOD-1]};
  end

  // the ring must carry exactly one phase marker once restarted
  a_ring_onehot: assert property (@(posedge clk) disable iff (sync) $onehot(ring_q))
    else $error("control ring counter is not one-hot");

  // OR of ring bits start .. start+len-1 (modulo PERIOD)
  function automatic logic window(input logic [PERIOD-1:0] r, input int unsigned start,
                                  input int unsigned len);
    logic acc;
    acc = 1'b0;
    for (int unsigned i = 0; i < len; i++) acc |= r[(start + i) % PERIOD];
    return acc;
  endfunction

  assign toward0 = window(ring_q, SLOT - 1, SLOT);

  latch_ctrl_bus #(.N(NBITS)) u_latch_bus (
    .clk     (clk),
    .clr     (sync),
    .in_left (ring_q[0]),
    .in_right(ring_q[SLOT]),
    .lat_en  (lat_en)
  );

  dir_ctrl_gen #(.N(NBITS)) u_dir_gen (
    .clk    (clk),
    .clr    (sync),
    .toward0(toward0),
    .dir    (dir)
  );

  always_comb begin
    ctrl.lat_en        = lat_en;
    ctrl.dir           = dir;
    ctrl.lat_rst       = ring_q[NBITS] | ring_q[NBITS + SLOT];
    ctrl.left.pw       = window(ring_q, 1, PROD);
    ctrl.left.ws_conv  = ring_q[1];
    ctrl.left.ws_add   = ring_q[2];
    ctrl.right.pw      = window(ring_q, SLOT + 1, PROD);
    ctrl.right.ws_conv = ring_q[SLOT + 1];
    ctrl.right.ws_add  = ring_q[SLOT + 2];
  end

endmodule
