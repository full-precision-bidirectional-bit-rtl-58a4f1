// tb_enlarged_array: the convolver at other array sizes.
//
// The array is built from identical cells, so its size is a parameter. This
// testbench checks a 4x4 array, the largest whose worst-case result
// (16*255*127 = 518160) still fits 20-bit two's complement, including that
// extreme, and a 2x1 array, whose single column takes the one-register path
// of the output adder. Each size must produce checked results on both
// output pins.
module tb_enlarged_array;
  logic clk = 1'b0;
  logic done_a, done_b;
  int ca, fa, la, ra, ea, cb, fb, lb, rb, eb;
  int checks, failures;

  array_checker #(.ROWS(4), .COLS(4)) u_a (
    .clk(clk), .done(done_a), .checks(ca), .failures(fa), .n_left(la), .n_right(ra), .n_ext(ea));
  array_checker #(.ROWS(2), .COLS(1)) u_b (
    .clk(clk), .done(done_b), .checks(cb), .failures(fb), .n_left(lb), .n_right(rb), .n_ext(eb));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb, fa + fb + 1);
    $finish;
  end

  initial begin
    wait (done_a && done_b);
    checks = ca + cb;
    failures = fa + fb;
    if (la == 0 || ra == 0 || lb == 0 || rb == 0) failures++;
    if (ea == 0 || eb == 0) failures++;
    $display("4x4: %0d results (extreme %0d); 2x1: %0d results (extreme %0d)", ca, ea, cb, eb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
