// add_conv_unit: addition and representation conversion unit of a cell.
//
// Three bit-serial adders merged into one unit, LSB first:
//   1. the multiplier's external adder: p = z' + z''; inputs are forced to
//      zero outside the product window pw (product bits 0..PROD-1), so the
//      bits that follow a product out of the end section are not taken;
//   2. the representation converter: one channel inverts p and adds one
//      (carry preset to 1 at the word start), the other passes p; the weight
//      sign selects, giving +/-(pixel*|weight|) in two's complement; beyond
//      the window the inverted zeros form the sign extension to WORD bits;
//   3. the cell adder: vout = converted product + vin, the partial sum from
//      the cell above.
// ws_conv marks bit 0 at stages 1-2 and clears their carries; ws_add marks
// bit 0 at stage 3, one cycle later. One register separates stage 2 from
// stage 3; vout is combinational from that register, vin and the carry, so a
// column of cells adds within one cycle. Carries out of the top bit are
// dropped (modulo 2^WORD).
// The inverter/add-one/bypass/multiplexer structure and the merging follow
// the convolver; the window masking and register placement are this
// design's choices.
module add_conv_unit (
  input  logic clk,
  input  logic clr,
  input  logic za,
  input  logic zb,
  input  logic sign,
  input  logic pw,
  input  logic ws_conv,
  input  logic ws_add,
  input  logic vin,
  output logic vout
);

  logic c1_q, c2_q, c3_q, conv_q;
  logic a, b, c1, p, c1_n, inv, c2, neg, c2_n, q, c3, c3_n;

  always_comb begin
    a    = za & pw;
    b    = zb & pw;
    c1   = ws_conv ? 1'b0 : c1_q;
    p    = a ^ b ^ c1;
    c1_n = (a & b) | (a & c1) | (b & c1);
    inv  = ~p;
    c2   = ws_conv ? 1'b1 : c2_q;
    neg  = inv ^ c2;
    c2_n = inv & c2;
    q    = sign ? neg : p;
    c3   = ws_add ? 1'b0 : c3_q;
    vout = conv_q ^ vin ^ c3;
    c3_n = (conv_q & vin) | (conv_q & c3) | (vin & c3);
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      c1_q   <= 1'b0;
      c2_q   <= 1'b0;
      c3_q   <= 1'b0;
      conv_q <= 1'b0;
    end else begin
      c1_q   <= c1_n;
      c2_q   <= c2_n;
      c3_q   <= c3_n;
      conv_q <= q;
    end
  end

endmodule
