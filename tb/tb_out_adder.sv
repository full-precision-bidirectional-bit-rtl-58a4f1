// tb_out_adder: adds three random 20-bit column words, back to back.
//
// Column bits enter LSB first with ws on bit 0; bit i of the sum must appear
// COLS-1 = 2 cycles after bit i of the columns, and equal the sum modulo 2^20.
module tb_out_adder;
  import bsconv_pkg::*;
  localparam int COLS = 3;
  localparam int NW = 200;
  localparam int LAT = COLS - 1;
  logic clk = 1'b0;
  logic clr, ws, sum;
  logic [COLS-1:0] col;
  int checks = 0, failures = 0;
  int cw[NW][COLS];
  int got[NW];

  out_adder #(.COLS(COLS)) dut (.clk(clk), .clr(clr), .ws(ws), .col(col), .sum(sum));

  always #5 clk = ~clk;

  initial begin
    repeat (NW * WORD + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < NW; m++) begin
      for (int c = 0; c < COLS; c++) cw[m][c] = $urandom_range(0, (1 << WORD) - 1);
      got[m] = 0;
    end
    for (int c = 0; c < COLS; c++) cw[0][c] = (1 << WORD) - 1;
    clr = 1'b1; ws = 0; col = '0;
    @(negedge clk);
    clr = 1'b0;
    for (int cyc = 0; cyc < (NW + 1) * WORD; cyc++) begin
      int m, i;
      i = cyc - LAT;
      if (i >= 0 && i / WORD < NW) begin
        m = i / WORD; i = i % WORD;
        got[m] |= int'(sum) << i;
        if (i == WORD - 1) begin
          int e;
          e = 0;
          for (int c = 0; c < COLS; c++) e += cw[m][c];
          e &= (1 << WORD) - 1;
          checks++;
          if (got[m] != e) begin
            failures++;
            if (failures < 10) $display("word %0d: got %h expected %h", m, got[m], e);
          end
        end
      end
      m = cyc / WORD; i = cyc % WORD;
      ws = (i == 0);
      for (int c = 0; c < COLS; c++) col[c] = (m < NW) ? 1'(cw[m][c] >> i) : 1'b0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
