// bs_mult: bidirectional bit-serial multiplier of N sections.
//
// Operands arrive LSB first on the single-bit X and Y buses. A forward
// multiplication latches x_j,y_j into section j in its cycle j and its
// partial sums flow toward section 0; the z' and z'' product halves leave
// section 0 one bit per cycle, bit k one cycle after cycle k (left_a,
// left_b). A backward multiplication started SLOT cycles later uses the
// sections in mirror order (section N-1 plays section 0) and its halves leave
// section N-1 (right_a, right_b). Because section j becomes free at cycle
// 2N+1-j of a forward multiplication, exactly when the backward one needs
// it, both run at once and every section is busy all the time.
//
// The two halves must still be added (z = z' + z''); that adder sits in the
// addition/conversion unit. Section structure and the direction multiplexers
// on the sum lines follow the convolver's multiplier; the zero fed into the
// missing neighbour inputs of the end sections is this design's choice.
// Correct results need y < 2^(N-1) (the weight magnitude has a zero MSB),
// which keeps each half below 2^(2N-1) so no bit is still in flight in a
// section when its direction switches.
module bs_mult #(
  parameter int unsigned N = bsconv_pkg::NBITS
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         x,
  input  logic         y,
  input  logic [N-1:0] lat_en,
  input  logic         lat_rst,
  input  logic [N-1:0] dir,
  output logic         left_a,
  output logic         left_b,
  output logic         right_a,
  output logic         right_b
);

  logic [N-1:0] sa, sb;
  logic [N+1:0] sa_ext, sb_ext;   // with a zero at each end

  assign sa_ext = {1'b0, sa, 1'b0};
  assign sb_ext = {1'b0, sb, 1'b0};

  for (genvar j = 0; j < N; j++) begin : g_sec
    bs_mult_section u_sec (
      .clk          (clk),
      .clr          (clr),
      .x            (x),
      .y            (y),
      .lat_en       (lat_en[j]),
      .lat_rst      (lat_rst),
      .dir          (dir[j]),
      .sa_from_left (sa_ext[j]),
      .sa_from_right(sa_ext[j+2]),
      .sb_from_left (sb_ext[j]),
      .sb_from_right(sb_ext[j+2]),
      .sa           (sa[j]),
      .sb           (sb[j])
    );
  end

  assign left_a  = sa[0];
  assign left_b  = sb[0];
  assign right_a = sa[N-1];
  assign right_b = sb[N-1];

endmodule
