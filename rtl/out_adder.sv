// out_adder: addition unit at the foot of the array.
//
// Adds COLS bit-serial column streams (LSB first) into one output stream.
// Stage k (k = 1 .. COLS-1) is a registered bit-serial full adder that adds
// the running sum to column k; column k is first delayed by k-1 cycles so it
// lines up with the running sum. The word start ws (bit 0 at the first
// stage) is delayed along with the data and clears each stage's carry.
// sum is registered: bit i of the result appears COLS-1 cycles after bit i of
// the columns (one cycle when COLS = 1). Carries out of the word's top bit
// are dropped. The unit's place in the array follows the convolver; its
// inner structure is this design's.
module out_adder #(
  parameter int unsigned COLS = 3
) (
  input  logic            clk,
  input  logic            clr,
  input  logic            ws,
  input  logic [COLS-1:0] col,
  output logic            sum
);

  if (COLS == 1) begin : g_one
    logic s_q;
    always_ff @(posedge clk) begin
      if (clr) s_q <= 1'b0;
      else     s_q <= col[0];
    end
    assign sum = s_q;
  end else begin : g_chain
    // dly_q[k][d]: column k delayed by d+1 cycles
    logic [COLS-1:0][COLS-1:0] dly_q;
    logic [COLS-1:0]           s_q, c_q, ws_q;
    logic [COLS-1:0]           s_in, col_al, ws_st, c_in, s_n, c_n;

    always_comb begin
      s_in  = '0;
      col_al = '0;
      ws_st = '0;
      c_in  = '0;
      s_n   = '0;
      c_n   = '0;
      for (int unsigned k = 1; k < COLS; k++) begin
        s_in[k]   = (k == 1) ? col[0] : s_q[k-1];
        col_al[k] = (k == 1) ? col[1] : dly_q[k][k-2];
        ws_st[k]  = (k == 1) ? ws : ws_q[k-1];
        c_in[k]   = ws_st[k] ? 1'b0 : c_q[k];
        s_n[k]    = s_in[k] ^ col_al[k] ^ c_in[k];
        c_n[k]    = (s_in[k] & col_al[k]) | (s_in[k] & c_in[k]) | (col_al[k] & c_in[k]);
      end
    end

    always_ff @(posedge clk) begin
      if (clr) begin
        dly_q <= '0;
        s_q   <= '0;
        c_q   <= '0;
        ws_q  <= '0;
      end else begin
        for (int unsigned k = 1; k < COLS; k++) begin
          s_q[k]  <= s_n[k];
          c_q[k]  <= c_n[k];
          ws_q[k] <= ws_st[k];
          dly_q[k][0] <= col[k];
          for (int unsigned d = 1; d < COLS; d++) dly_q[k][d] <= dly_q[k][d-1];
        end
      end
    end

    assign sum = s_q[COLS-1];
  end

endmodule
