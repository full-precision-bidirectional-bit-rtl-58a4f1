// tb_bs_convolver: end-to-end test of the 3x3 convolver at its default size.
//
// Each run restarts the chip with sync, optionally loads a kernel (load high
// in cycles 0..27, each row sending the weights of columns 2, 1, 0 in slots
// 0, 1, 2), then streams random 8-bit pixels on the three rows, one per
// 10-cycle slot, with random bits in the two padding positions. Every window
// R[s] = sum_{r,c} w[r][c] * p_r[s-c] whose pixels are all known is read
// from out_left (even s) or out_right (odd s), bit i in cycle 10*s + 4 + i,
// and compared with the value computed here in integers.
//
// Runs: (A) random kernel; (B) sync without reload, a whole number of slots
// after the previous sync, so the kernel must survive sync and the cleared delay lines must act as zero pixels; (C) all
// weights -127 and (D) all +127 with saturated pixels, the extreme results
// +/-291465 that need all 20 bits; (E) a second random kernel.
// Counted mechanisms: left and right results (forward and backward
// multiplications), kernel loads, negative weights, negative and positive
// results, extreme results, reuse of a kernel after sync.
module tb_bs_convolver;
  import bsconv_pkg::*;
  localparam int ROWS = 3;
  localparam int COLS = 3;
  localparam int LAT  = 2 + COLS - 1;   // cycles from bit i in to bit i out
  localparam int MAXS = 64;

  logic clk = 1'b0;
  logic sync, load, out_left, out_right;
  logic [ROWS-1:0] row_in;
  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_load = 0, n_negw = 0, n_negr = 0, n_posr = 0, n_ext = 0, n_kept = 0;
  int w[ROWS][COLS];          // signed weight value
  logic [7:0] wcode[ROWS][COLS];
  int px[ROWS][MAXS];
  int got_l[MAXS], got_r[MAXS];

  bs_convolver dut (.clk(clk), .sync(sync), .load(load), .row_in(row_in),
                    .out_left(out_left), .out_right(out_right));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] enc(int v);
    return v < 0 ? {1'b1, 7'(-v)} : {1'b0, 7'(v)};
  endfunction

  // kmode: 0 random, 1 all -127, 2 all +127; pmode: 0 random, 1 all 255
  task automatic run(input bit do_load, input int kmode, input int pmode, input int nslots);
    int s0, sfirst, ncyc;
    if (do_load) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          case (kmode)
            1: w[r][c] = -127;
            2: w[r][c] = 127;
            default: w[r][c] = $urandom_range(0, 254) - 127;
          endcase
          wcode[r][c] = enc(w[r][c]);
          if (kmode == 0 && r == 1 && c == 1) begin w[r][c] = 0; wcode[r][c] = 8'h80; end  // minus zero
          if (kmode == 0 && r == 0 && c == 0) begin w[r][c] = -127; wcode[r][c] = 8'hFF; end
          if (w[r][c] < 0) n_negw++;
        end
      n_load++;
      s0 = COLS;                       // pixels start after the load slots
      sfirst = s0 + COLS - 1;          // first window with only streamed pixels
    end else begin
      n_kept++;
      s0 = 0;
      sfirst = 0;                      // delay lines were cleared by sync
    end
    for (int r = 0; r < ROWS; r++)
      for (int s = 0; s < MAXS; s++)
        px[r][s] = (s < s0) ? 0 : ((pmode == 1) ? 255 : $urandom_range(0, 255));
    for (int s = 0; s < MAXS; s++) begin got_l[s] = 0; got_r[s] = 0; end

    sync = 1'b1; load = 1'b0;
    @(negedge clk);
    sync = 1'b0;
    // the run plus the next sync cycle last a whole number of slots, so the
    // circulating weights stay aligned with the restarted control period
    ncyc = ((s0 + nslots) * SLOT + LAT + WORD + SLOT) / SLOT * SLOT - 1;
    for (int cyc = 0; cyc < ncyc; cyc++) begin
      int s, pos;
      s = cyc / SLOT; pos = cyc % SLOT;
      load = do_load && (cyc < SLOT * (COLS - 1) + NBITS);
      for (int r = 0; r < ROWS; r++) begin
        if (load) row_in[r] = (pos < NBITS) ? wcode[r][COLS - 1 - s][pos] : 1'($urandom);
        else if (s >= s0 && s < s0 + nslots && pos < NBITS) row_in[r] = 1'(px[r][s] >> pos);
        else row_in[r] = 1'($urandom);
      end
      #1;
      // outputs: out_left carries R[s] for even s, out_right for odd s
      for (int side = 0; side < 2; side++) begin
        int u, ws, i;
        u = cyc - LAT - side * SLOT;
        if (u >= 0) begin
          ws = 2 * (u / PERIOD) + side;
          i = u % PERIOD;
          if (ws >= sfirst && ws < s0 + nslots) begin
            if (side == 0) got_l[ws] |= int'(out_left) << i;
            else           got_r[ws] |= int'(out_right) << i;
            if (i == WORD - 1) begin
              int e, g;
              e = 0;
              for (int r = 0; r < ROWS; r++)
                for (int c = 0; c < COLS; c++)
                  if (ws - c >= 0) e += w[r][c] * px[r][ws - c];
              g = (side == 0) ? got_l[ws] : got_r[ws];
              g = (g << (32 - WORD)) >>> (32 - WORD);   // sign-extend 20 bits
              checks++;
              if (side == 0) n_left++; else n_right++;
              if (e < 0) n_negr++;
              if (e > 0) n_posr++;
              if (e == 9 * 255 * 127 || e == -9 * 255 * 127) n_ext++;
              if (g != e) begin
                failures++;
                if (failures < 10) $display("window %0d (%s): got %0d expected %0d", ws, side ? "right" : "left", g, e);
              end
            end
          end
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    sync = 1'b1; load = 1'b0; row_in = '0;
    @(negedge clk);
    run(1, 0, 0, 40);   // A
    run(0, 0, 0, 30);   // B
    run(1, 1, 1, 8);    // C
    run(1, 2, 1, 8);    // D
    run(1, 0, 0, 40);   // E
    $display("left %0d right %0d loads %0d neg_weights %0d neg_results %0d pos_results %0d extreme %0d kept %0d",
             n_left, n_right, n_load, n_negw, n_negr, n_posr, n_ext, n_kept);
    if (n_left == 0)  begin failures++; $display("no left result"); end
    if (n_right == 0) begin failures++; $display("no right result"); end
    if (n_load == 0)  begin failures++; $display("no kernel load"); end
    if (n_negw == 0)  begin failures++; $display("no negative weight"); end
    if (n_negr == 0)  begin failures++; $display("no negative result"); end
    if (n_posr == 0)  begin failures++; $display("no positive result"); end
    if (n_ext < 2)    begin failures++; $display("extremes not reached"); end
    if (n_kept == 0)  begin failures++; $display("no kernel reuse after sync"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
