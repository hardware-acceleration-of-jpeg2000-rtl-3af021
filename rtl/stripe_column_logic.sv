// stripe_column_logic - coding-pass controller of the embedded block coder.
//
// Runs the bit-plane coding passes over a code-block and produces the binary
// symbols, each with its context label, for the MQ encoder.  Bit-planes are
// coded from the most significant non-zero plane down to plane 0; the first
// plane has only a cleanup pass, later planes have significance propagation
// (SP), magnitude refinement (MR) and cleanup (CU) passes in that order.
// Each pass visits the block in stripe order: stripes four rows high, top
// to bottom; within a stripe, columns left to right; within a column,
// rows top to bottom.
//
// For the current column the controller sees the four plane bits and sign
// bits (data memories), the 6x3 significance/sign window (state memory 1)
// and the visited/refined bits (state memory 2).  Each cycle it codes the
// next member sample of the current pass at or below the row pointer: a
// zero-coding symbol (SP, CU), a refinement symbol (MR), or in the following
// cycle the sign of a sample that has just become significant.  A cleanup
// column whose four samples and whole window are insignificant is coded in
// run mode: one run symbol, and if the run is broken two uniform symbols
// giving the row of the first 1 followed by that sample's sign.  A column
// with no (further) members costs one cycle, so a column takes a variable
// number of cycles.  State memory bits are written in the cycle a symbol is
// issued.  Symbols leave on a valid/ready handshake; the controller holds
// while sym_ready is low.
//
// With 'decode' set at start the same scan decodes instead: each symbol's
// value comes back from the MQ decoder on dec_bit in the cycle it is
// requested (the next step depends on it), the run position is assembled
// from the two uniform symbols, and dec_wr_sig / dec_wr_ref tell the block
// coder to store a sample that became significant or a refinement 1 bit.
//
// 'start' begins a block with the given number of magnitude planes and
// subband orientation; coding stops after 'max_passes' passes (0: all
// passes).  'done' pulses once the last pass is finished.  The pass rules,
// the context labels and the column-by-column operation follow the
// document; one sample step per cycle and the handshake are this design's
// choice.  BLK_H must be a multiple of four.
module stripe_column_logic
  import jp2k_pkg::*;
#(
  parameter int BLK_W    = 32,
  parameter int BLK_H    = 32,
  parameter int MAG_BITS = 8,
  localparam int NSTRIPES = (BLK_H + 3) / 4,
  localparam int XW = $clog2(BLK_W),
  localparam int SW = (NSTRIPES > 1) ? $clog2(NSTRIPES) : 1,
  localparam int PW = $clog2(MAG_BITS + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           decode,
  input  subband_e       orient,
  input  logic [PW-1:0]  num_planes,
  input  logic [7:0]     max_passes,
  output logic           busy,
  output logic           done,
  output logic [7:0]     passes_coded,
  // column address and current plane
  output logic [SW-1:0]  stripe,
  output logic [XW-1:0]  col,
  output logic [PW-1:0]  plane,
  // data memories (current plane bit and sign of the four samples)
  input  logic [3:0]     mag_bits,
  input  logic [3:0]     sign_bits,
  // state memory 1
  input  logic [2:0]     win_sig [6],
  input  logic [2:0]     win_sgn [6],
  output logic           sm1_set_en,
  output logic [1:0]     sm1_set_row,
  output logic           sm1_set_sign,
  // state memory 2
  input  logic [3:0]     visited,
  input  logic [3:0]     refined,
  output logic           sm2_set_visited,
  output logic           sm2_set_refined,
  output logic [1:0]     sm2_set_row,
  output logic           sm2_clear_visited,
  // symbols to the MQ coder
  output logic           sym_valid,
  output mq_sym_t        sym,
  input  logic           sym_ready,
  // decoding: the symbol decoded for the current request, and the sample
  // updates it implies (becomes significant / gets a refinement 1 bit)
  input  logic           dec_bit,
  output logic           dec_wr_sig,
  output logic           dec_wr_ref,
  output logic [1:0]     dec_wr_row
);
  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_SIGN, S_RUN1, S_RUN2} state_e;

  state_e        state_q;
  pass_e         pass_q;
  logic [SW-1:0] stripe_q;
  logic [XW-1:0] col_q;
  logic [2:0]    row_q;
  logic [1:0]    pos_q;
  logic [PW-1:0] plane_q;
  logic [7:0]    passes_q, max_q;
  subband_e      orient_q;
  logic          dec_q;

  assign stripe       = stripe_q;
  assign col          = col_q;
  assign plane        = plane_q;
  assign busy         = (state_q != S_IDLE);
  assign passes_coded = passes_q;

  // ---- neighbourhood of each of the four rows --------------------------
  logic [1:0]       h_cnt [4];
  logic [1:0]       v_cnt [4];
  logic [2:0]       d_cnt [4];
  logic [3:0]       any_nb, sig_col, member;
  logic [CX_W-1:0]  zc_cx [4];
  logic [CX_W-1:0]  mr_cx [4];
  logic [CX_W-1:0]  sc_cx [4];
  logic [3:0]       sc_x;

  logic signed [2:0] hs [4];
  logic signed [2:0] vs [4];
  logic signed [1:0] hc [4];
  logic signed [1:0] vc [4];
  logic [CX_W:0]     scr [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      sig_col[i] = win_sig[i+1][1];
      h_cnt[i] = 2'(win_sig[i+1][0]) + 2'(win_sig[i+1][2]);
      v_cnt[i] = 2'(win_sig[i][1])   + 2'(win_sig[i+2][1]);
      d_cnt[i] = 3'(win_sig[i][0]) + 3'(win_sig[i][2]) + 3'(win_sig[i+2][0]) + 3'(win_sig[i+2][2]);
      any_nb[i] = (h_cnt[i] != 0) || (v_cnt[i] != 0) || (d_cnt[i] != 0);
      zc_cx[i] = zc_context(h_cnt[i], v_cnt[i], d_cnt[i], orient_q);
      mr_cx[i] = mr_context(refined[i], any_nb[i]);
      // sign contributions: +1 for a significant positive, -1 for negative
      hs[i] = 3'(signed'({1'b0, win_sig[i+1][0] & ~win_sgn[i+1][0]})) - 3'(signed'({1'b0, win_sgn[i+1][0]}))
         + 3'(signed'({1'b0, win_sig[i+1][2] & ~win_sgn[i+1][2]})) - 3'(signed'({1'b0, win_sgn[i+1][2]}));
      vs[i] = 3'(signed'({1'b0, win_sig[i][1] & ~win_sgn[i][1]}))     - 3'(signed'({1'b0, win_sgn[i][1]}))
         + 3'(signed'({1'b0, win_sig[i+2][1] & ~win_sgn[i+2][1]})) - 3'(signed'({1'b0, win_sgn[i+2][1]}));
      hc[i] = (hs[i] > 0) ? 2'sd1 : (hs[i] < 0) ? -2'sd1 : 2'sd0;
      vc[i] = (vs[i] > 0) ? 2'sd1 : (vs[i] < 0) ? -2'sd1 : 2'sd0;
      scr[i] = sc_context(hc[i], vc[i]);
      sc_cx[i] = scr[i][CX_W:1];
      sc_x[i]  = scr[i][0];
      case (pass_q)
        PASS_SP: member[i] = !sig_col[i] && !visited[i] && any_nb[i];
        PASS_MR: member[i] = sig_col[i] && !visited[i];
        default: member[i] = !sig_col[i] && !visited[i];
      endcase
    end
  end

  // run mode: whole window insignificant and nothing coded yet this plane
  logic run_ok;
  always_comb begin
    run_ok = (visited == 4'b0);
    for (int r = 0; r < 6; r++) if (win_sig[r] != 3'b0) run_ok = 1'b0;
  end

  // first member at or below the row pointer
  logic       found;
  logic [1:0] m;
  always_comb begin
    found = 1'b0;
    m     = 2'd0;
    for (int i = 3; i >= 0; i--)
      if (member[i] && 3'(i) >= row_q) begin found = 1'b1; m = 2'(i); end
  end

  logic [1:0] first_one;
  always_comb begin
    first_one = 2'd0;
    for (int i = 3; i >= 0; i--) if (mag_bits[i]) first_one = 2'(i);
  end

  // symbol values: taken from the sample memories when encoding and from
  // the MQ decoder when decoding
  logic run_hit, code_bit, sign_val;
  assign run_hit  = dec_q ? dec_bit : |mag_bits;
  assign code_bit = dec_q ? dec_bit : mag_bits[m];
  assign sign_val = dec_q ? (dec_bit ^ sc_x[pos_q]) : sign_bits[pos_q];

  // ---- per-cycle action ---------------------------------------------------
  typedef enum logic [2:0] {A_NONE, A_RUN, A_CODE, A_SIGN, A_POS1, A_POS2} act_e;
  act_e act;
  logic advance;   // move to the next column after this cycle

  always_comb begin
    act = A_NONE;
    advance = 1'b0;
    case (state_q)
      S_SCAN: begin
        if (pass_q == PASS_CU && row_q == 3'd0 && run_ok) act = A_RUN;
        else if (found) act = A_CODE;
        else advance = 1'b1;
      end
      S_SIGN: act = A_SIGN;
      S_RUN1: act = A_POS1;
      S_RUN2: act = A_POS2;
      default: ;
    endcase
  end

  always_comb begin
    sym_valid = 1'b0;
    sym       = '0;
    case (act)
      A_RUN:  begin sym_valid = 1'b1; sym.cx = CX_RL;  sym.d = run_hit; end
      A_POS1: begin sym_valid = 1'b1; sym.cx = CX_UNI; sym.d = pos_q[1]; end
      A_POS2: begin sym_valid = 1'b1; sym.cx = CX_UNI; sym.d = pos_q[0]; end
      A_SIGN: begin sym_valid = 1'b1; sym.cx = sc_cx[pos_q]; sym.d = sign_bits[pos_q] ^ sc_x[pos_q]; end
      A_CODE: begin
        sym_valid = 1'b1;
        sym.cx = (pass_q == PASS_MR) ? mr_cx[m] : zc_cx[m];
        sym.d  = code_bit;
      end
      default: ;
    endcase
  end

  logic step;      // this cycle's action takes effect
  assign step = busy && (!sym_valid || sym_ready);

  assign sm1_set_en        = step && (act == A_SIGN);
  assign sm1_set_row       = pos_q;
  assign sm1_set_sign      = sign_val;
  assign sm2_set_visited   = step && (act == A_CODE) && (pass_q == PASS_SP);
  assign sm2_set_refined   = step && (act == A_CODE) && (pass_q == PASS_MR);
  assign sm2_set_row       = m;
  assign dec_wr_sig        = dec_q && step && (act == A_SIGN);
  assign dec_wr_ref        = dec_q && step && (act == A_CODE) && (pass_q == PASS_MR) && dec_bit;
  assign dec_wr_row        = (act == A_SIGN) ? pos_q : m;

  // end of pass bookkeeping
  logic last_col, pass_end, last_pass;
  assign last_col  = (int'(col_q) == BLK_W - 1) && (int'(stripe_q) == NSTRIPES - 1);
  logic col_end;
  always_comb begin
    col_end = 1'b0;
    case (act)
      A_NONE: col_end = advance;
      A_RUN:  col_end = !run_hit;
      A_CODE: col_end = (m == 2'd3) && !((pass_q != PASS_MR) && code_bit);
      A_SIGN: col_end = (pos_q == 2'd3);
      default: col_end = 1'b0;
    endcase
  end
  assign pass_end  = step && col_end && last_col;
  assign last_pass = ((pass_q == PASS_CU) && (plane_q == '0)) ||
                     ((max_q != 8'd0) && (passes_q + 8'd1 == max_q));
  assign sm2_clear_visited = pass_end && (pass_q == PASS_CU);
  assign done = pass_end && last_pass;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE; pass_q <= PASS_CU; stripe_q <= '0; col_q <= '0; row_q <= '0;
      pos_q <= '0; plane_q <= '0; passes_q <= '0; max_q <= '0; orient_q <= SB_LL;
      dec_q <= 1'b0;
    end else if (state_q == S_IDLE) begin
      if (start) begin
        passes_q <= '0;
        max_q    <= max_passes;
        orient_q <= orient;
        dec_q    <= decode;
        stripe_q <= '0; col_q <= '0; row_q <= '0;
        pass_q   <= PASS_CU;
        plane_q  <= num_planes - PW'(1);
        state_q  <= (num_planes != '0) ? S_SCAN : S_IDLE;
      end
    end else if (step) begin
      case (act)
        A_RUN:  if (run_hit) begin pos_q <= dec_q ? 2'd0 : first_one; state_q <= S_RUN1; end
        A_POS1: begin if (dec_q) pos_q[1] <= dec_bit; state_q <= S_RUN2; end
        A_POS2: begin if (dec_q) pos_q[0] <= dec_bit; state_q <= S_SIGN; end
        A_SIGN: begin state_q <= S_SCAN; row_q <= 3'(pos_q) + 3'd1; end
        A_CODE: begin
          if (pass_q != PASS_MR && code_bit) begin pos_q <= m; state_q <= S_SIGN; end
          else row_q <= 3'(m) + 3'd1;
        end
        default: ;
      endcase
      if (col_end) begin
        state_q <= S_SCAN;
        row_q   <= '0;
        if (int'(col_q) == BLK_W - 1) begin
          col_q <= '0;
          if (int'(stripe_q) == NSTRIPES - 1) begin
            stripe_q <= '0;
            passes_q <= passes_q + 8'd1;
            if (last_pass) state_q <= S_IDLE;
            else begin
              case (pass_q)
                PASS_SP: pass_q <= PASS_MR;
                PASS_MR: pass_q <= PASS_CU;
                default: begin pass_q <= PASS_SP; plane_q <= plane_q - PW'(1); end
              endcase
            end
          end else stripe_q <= stripe_q + SW'(1);
        end else col_q <= col_q + XW'(1);
      end
    end
  end

  initial assert (BLK_H % 4 == 0) else $error("BLK_H must be a multiple of 4");
endmodule
