// state_mem1 - significance and sign state of every sample of the block,
// with a 6x3 context window around the current stripe column.
//
// Each sample has two state bits: its significance and a copy of its sign
// (the sign memory itself offers no window).  For stripe 'stripe' and column
// 'col' the window holds rows -1..4 relative to the stripe top and columns
// col-1..col+1; positions outside the block read as insignificant.  The
// sign output of an insignificant position is forced to 0.  One sample of
// the current column is made significant per cycle ('set_en', row
// 'set_row', sign 'set_sign').  'clear' zeroes all significance bits, as at
// the start of each code-block.  Window reads are combinational; writes and
// clears take effect at the clock edge.
//
// Stored as one word of four bits per stripe column, so the window is nine
// word reads; the two bits per sample and the 6x3 window follow the
// document, the storage layout is this design's choice.
module state_mem1 #(
  parameter int BLK_W = 32,
  parameter int BLK_H = 32,
  localparam int NSTRIPES = (BLK_H + 3) / 4,
  localparam int XW = $clog2(BLK_W),
  localparam int SW = (NSTRIPES > 1) ? $clog2(NSTRIPES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic [SW-1:0] stripe,
  input  logic [XW-1:0] col,
  output logic [2:0]    win_sig [6],   // [row -1..4][col -1..+1]
  output logic [2:0]    win_sgn [6],
  input  logic          set_en,
  input  logic [1:0]    set_row,
  input  logic          set_sign
);
  localparam int DEPTH = NSTRIPES * BLK_W;
  logic [3:0] sig_q [DEPTH];
  logic [3:0] sgn_q [DEPTH];

  function automatic int addr(input int s, input int x);
    return s * BLK_W + x;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) sig_q[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < DEPTH; i++) sig_q[i] <= '0;
    end else if (set_en) begin
      sig_q[addr(int'(stripe), int'(col))][set_row] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (set_en) sgn_q[addr(int'(stripe), int'(col))][set_row] <= set_sign;
  end

  always_comb begin
    for (int r = 0; r < 6; r++) begin
      win_sig[r] = '0;
      win_sgn[r] = '0;
    end
    for (int dx = 0; dx < 3; dx++) begin
      if (int'(col) + dx - 1 >= 0 && int'(col) + dx - 1 < BLK_W) begin
        // stripe above: its bottom row
        if (stripe != '0) begin
          win_sig[0][dx] = sig_q[addr(int'(stripe) - 1, int'(col) + dx - 1)][3];
          win_sgn[0][dx] = sig_q[addr(int'(stripe) - 1, int'(col) + dx - 1)][3] & sgn_q[addr(int'(stripe) - 1, int'(col) + dx - 1)][3];
        end
        for (int r = 0; r < 4; r++) begin
          win_sig[r+1][dx] = sig_q[addr(int'(stripe), int'(col) + dx - 1)][r];
          win_sgn[r+1][dx] = sig_q[addr(int'(stripe), int'(col) + dx - 1)][r] & sgn_q[addr(int'(stripe), int'(col) + dx - 1)][r];
        end
        // stripe below: its top row
        if (int'(stripe) < NSTRIPES - 1) begin
          win_sig[5][dx] = sig_q[addr(int'(stripe) + 1, int'(col) + dx - 1)][0];
          win_sgn[5][dx] = sig_q[addr(int'(stripe) + 1, int'(col) + dx - 1)][0] & sgn_q[addr(int'(stripe) + 1, int'(col) + dx - 1)][0];
        end
      end
    end
  end
endmodule
