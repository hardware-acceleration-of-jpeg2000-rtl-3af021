// block_coder - embedded block coder (encoder and decoder) for one JPEG2000
// code-block.
//
// Samples of a BLK_W x BLK_H code-block arrive in sign-magnitude form, one
// per cycle, on the load port and are stored in the sign memory (data
// memory 1) and the magnitude memory (data memory 2, MAG_BITS planes).  The
// OR of all loaded magnitudes gives the most significant non-zero plane.  A
// 'start' pulse clears the two state memories, returns the MQ context state
// file to its initial state, restarts the MQ encoder and lets the stripe
// column logic run the coding passes from that plane down.  Its symbols pass
// through a small FIFO to the MQ encoder, whose codeword bytes leave on the
// cw_* handshake.  After the last pass the encoder's codeword is terminated
// (flushed) and 'done' pulses; 'zero_planes' then gives the number of
// all-zero most significant planes that were skipped and 'passes_coded' the
// number of coding passes in the codeword.  A block with no non-zero sample
// codes no pass and produces an empty codeword.
//
// A start with 'decode' set decodes instead: the codeword bytes arrive on
// the cwi_* handshake (0xFF after the last one), 'dec_zero_planes' and
// 'max_passes' give the block's skipped planes and the number of passes in
// the codeword, and the same pass controller requests each symbol from the
// MQ decoder, which shares the context state file.  The symbol FIFO is not
// used: the controller's next step depends on the decoded value, so
// decoding runs one symbol per cycle in lock step.  Decoded samples are
// written into the data memories (magnitude 2^plane when a sample becomes
// significant, plus each refinement 1 bit) and read out while idle on the
// rd_* port; samples that never became significant read as zero.  Planes
// below the last decoded pass read as zero bits (no reconstruction offset
// is added).
//
// Structure (two data memories, two state memories, stripe column logic, MQ
// coder with its state file) follows the document's block coder
// architecture, which serves both encoding and decoding.  Load format,
// handshakes and the start/done protocol are this design's choices.
// Samples must not be loaded while the coder is busy.
module block_coder
  import jp2k_pkg::*;
#(
  parameter int BLK_W    = 32,
  parameter int BLK_H    = 32,
  parameter int MAG_BITS = 8,
  parameter int SYM_FIFO_DEPTH = 4,
  localparam int NSTRIPES = (BLK_H + 3) / 4,
  localparam int XW = $clog2(BLK_W),
  localparam int YW = $clog2(BLK_H),
  localparam int SW = (NSTRIPES > 1) ? $clog2(NSTRIPES) : 1,
  localparam int PW = $clog2(MAG_BITS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // sample load port
  input  logic                ld_en,
  input  logic [XW-1:0]       ld_x,
  input  logic [YW-1:0]       ld_y,
  input  logic                ld_sign,
  input  logic [MAG_BITS-1:0] ld_mag,
  // control
  input  logic                start,
  input  logic                decode,
  input  logic [PW-1:0]       dec_zero_planes,
  input  subband_e            orient,
  input  logic [7:0]          max_passes,
  output logic                busy,
  output logic                done,
  output logic [PW-1:0]       zero_planes,
  output logic [7:0]          passes_coded,
  // codeword bytes
  output logic                cw_valid,
  output logic [7:0]          cw_byte,
  input  logic                cw_ready,
  // codeword bytes in (decoding); 0xFF must follow the last byte
  input  logic                cwi_valid,
  input  logic [7:0]          cwi_byte,
  output logic                cwi_ready,
  // sample read-out while idle (decoded samples)
  input  logic [XW-1:0]       rd_x,
  input  logic [YW-1:0]       rd_y,
  output logic                rd_sign,
  output logic [MAG_BITS-1:0] rd_mag
);
  typedef enum logic [1:0] {B_IDLE, B_CODE, B_FLUSH, B_WAIT} bstate_e;
  bstate_e state_q;

  // ---- magnitude range of the loaded block ----------------------------------
  logic [MAG_BITS-1:0] mag_or_q;
  logic [PW-1:0]       num_planes, np_q;
  always_comb begin
    num_planes = '0;
    for (int i = 0; i < MAG_BITS; i++) if (mag_or_q[i]) num_planes = PW'(i + 1);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mag_or_q <= '0;
    else if (start && state_q == B_IDLE) mag_or_q <= '0;
    else if (ld_en) mag_or_q <= mag_or_q | ld_mag;
  end

  logic go, dec_q;
  assign go = start && (state_q == B_IDLE);

  // ---- memories ---------------------------------------------------------------
  logic [SW-1:0]       stripe;
  logic [XW-1:0]       col;
  logic [PW-1:0]       plane;
  logic [0:0]          sgn_rd [4];
  logic [MAG_BITS-1:0] mag_rd [4];
  logic [3:0]          mag_bits, sign_bits;
  logic                scl_busy;
  logic                dec_wr_sig, dec_wr_ref;
  logic [1:0]          dec_wr_row;
  logic                sm1_set_sign;

  // memory column address: the pass controller's while it runs, else the
  // read-out address
  logic [SW-1:0]       m_stripe;
  logic [XW-1:0]       m_col;
  assign m_stripe = scl_busy ? stripe : SW'(rd_y >> 2);
  assign m_col    = scl_busy ? col : rd_x;

  // write port: sample loading, or decoded samples
  logic                w1_en, w2_en;
  logic [XW-1:0]       w_x;
  logic [YW-1:0]       w_y;
  logic                w1_data;
  logic [MAG_BITS-1:0] w2_data, plane_bit;
  assign plane_bit = MAG_BITS'(1) << plane;
  assign w1_en   = ld_en || dec_wr_sig;
  assign w2_en   = ld_en || dec_wr_sig || dec_wr_ref;
  assign w_x     = ld_en ? ld_x : col;
  assign w_y     = ld_en ? ld_y : YW'(32'(stripe) * 4 + 32'(dec_wr_row));
  assign w1_data = ld_en ? ld_sign : sm1_set_sign;
  assign w2_data = ld_en ? ld_mag : dec_wr_sig ? plane_bit : (mag_rd[dec_wr_row] | plane_bit);

  data_mem #(.BLK_W(BLK_W), .BLK_H(BLK_H), .WIDTH(1)) u_data_mem1 (
    .clk, .wr_en(w1_en), .wr_x(w_x), .wr_y(w_y), .wr_data(w1_data),
    .rd_stripe(m_stripe), .rd_col(m_col), .rd_data(sgn_rd));

  data_mem #(.BLK_W(BLK_W), .BLK_H(BLK_H), .WIDTH(MAG_BITS)) u_data_mem2 (
    .clk, .wr_en(w2_en), .wr_x(w_x), .wr_y(w_y), .wr_data(w2_data),
    .rd_stripe(m_stripe), .rd_col(m_col), .rd_data(mag_rd));

  // data memory 2 presents the current bit-plane of the column
  logic [MAG_BITS-1:0] mag_sh [4];
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      sign_bits[i] = sgn_rd[i][0];
      mag_sh[i]    = mag_rd[i] >> plane;
      mag_bits[i]  = mag_sh[i][0];
    end
  end

  logic [2:0] win_sig [6];
  logic [2:0] win_sgn [6];
  logic       sm1_set_en;
  logic [1:0] sm1_set_row;
  logic [3:0] visited, refined;
  logic       sm2_set_visited, sm2_set_refined, sm2_clear_visited;
  logic [1:0] sm2_set_row;

  state_mem1 #(.BLK_W(BLK_W), .BLK_H(BLK_H)) u_state_mem1 (
    .clk, .rst_n, .clear(go), .stripe(m_stripe), .col(m_col), .win_sig, .win_sgn,
    .set_en(sm1_set_en), .set_row(sm1_set_row), .set_sign(sm1_set_sign));

  state_mem2 #(.BLK_W(BLK_W), .BLK_H(BLK_H)) u_state_mem2 (
    .clk, .rst_n, .clear(go), .clear_visited(sm2_clear_visited), .stripe, .col,
    .visited, .refined, .set_visited(sm2_set_visited), .set_refined(sm2_set_refined),
    .set_row(sm2_set_row));

  // ---- pass controller ----------------------------------------------------------
  logic    scl_done;
  logic    sym_valid, sym_ready, f_in_ready, dec_ready, dec_bit;
  mq_sym_t sym;
  logic [PW-1:0] start_planes;

  // planes to process: from the samples when encoding, from the host when
  // decoding
  assign start_planes = !decode ? num_planes :
                        (dec_zero_planes >= PW'(MAG_BITS)) ? '0 : PW'(MAG_BITS) - dec_zero_planes;

  stripe_column_logic #(.BLK_W(BLK_W), .BLK_H(BLK_H), .MAG_BITS(MAG_BITS)) u_scl (
    .clk, .rst_n, .start(go), .decode, .orient, .num_planes(start_planes), .max_passes,
    .busy(scl_busy), .done(scl_done), .passes_coded,
    .stripe, .col, .plane, .mag_bits, .sign_bits, .win_sig, .win_sgn,
    .sm1_set_en, .sm1_set_row, .sm1_set_sign,
    .visited, .refined, .sm2_set_visited, .sm2_set_refined, .sm2_set_row, .sm2_clear_visited,
    .sym_valid, .sym, .sym_ready,
    .dec_bit, .dec_wr_sig, .dec_wr_ref, .dec_wr_row);
  assign sym_ready = dec_q ? dec_ready : f_in_ready;

  // ---- buffer and MQ coder -----------------------------------------------------------
  logic    q_valid, q_ready, q_empty;
  mq_sym_t q_sym;

  sync_fifo #(.T(mq_sym_t), .DEPTH(SYM_FIFO_DEPTH)) u_sym_fifo (
    .clk, .rst_n, .clear(go), .in_valid(sym_valid && !dec_q), .in_ready(f_in_ready), .in_data(sym),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_sym), .empty(q_empty));

  logic [CX_W-1:0]  ctx_rd_cx, ctx_wr_cx;
  logic [IDX_W-1:0] ctx_rd_index, ctx_wr_index;
  logic             ctx_rd_mps, ctx_wr_en, ctx_wr_mps;
  logic             flush_req, flush_done;
  logic [CX_W-1:0]  e_rd_cx, e_wr_cx, d_rd_cx, d_wr_cx;
  logic [IDX_W-1:0] e_wr_index, d_wr_index;
  logic             e_wr_en, e_wr_mps, d_wr_en, d_wr_mps;

  // the state file serves the encoder or the decoder
  assign ctx_rd_cx    = dec_q ? d_rd_cx : e_rd_cx;
  assign ctx_wr_en    = dec_q ? d_wr_en : e_wr_en;
  assign ctx_wr_cx    = dec_q ? d_wr_cx : e_wr_cx;
  assign ctx_wr_index = dec_q ? d_wr_index : e_wr_index;
  assign ctx_wr_mps   = dec_q ? d_wr_mps : e_wr_mps;

  mq_context_file u_state_file (
    .clk, .rst_n, .init(go), .rd_cx(ctx_rd_cx), .rd_index(ctx_rd_index), .rd_mps(ctx_rd_mps),
    .wr_en(ctx_wr_en), .wr_cx(ctx_wr_cx), .wr_index(ctx_wr_index), .wr_mps(ctx_wr_mps));

  mq_encoder u_mq (
    .clk, .rst_n, .init(go),
    .sym_valid(q_valid), .sym_ready(q_ready), .sym(q_sym),
    .flush_req, .flush_done,
    .ctx_rd_cx(e_rd_cx), .ctx_rd_index, .ctx_rd_mps,
    .ctx_wr_en(e_wr_en), .ctx_wr_cx(e_wr_cx), .ctx_wr_index(e_wr_index), .ctx_wr_mps(e_wr_mps),
    .byte_valid(cw_valid), .byte_data(cw_byte), .byte_ready(cw_ready));

  mq_decoder u_mq_dec (
    .clk, .rst_n, .init(go && decode),
    .req_valid(sym_valid && dec_q), .req_cx(sym.cx), .req_ready(dec_ready), .dec_bit,
    .in_valid(cwi_valid), .in_byte(cwi_byte), .in_ready(cwi_ready),
    .ctx_rd_cx(d_rd_cx), .ctx_rd_index, .ctx_rd_mps,
    .ctx_wr_en(d_wr_en), .ctx_wr_cx(d_wr_cx), .ctx_wr_index(d_wr_index), .ctx_wr_mps(d_wr_mps));

  // read-out: a sample never found significant reads as zero
  logic rd_sig;
  assign rd_sig  = win_sig[32'(rd_y[1:0]) + 1][1];
  assign rd_sign = rd_sig && sgn_rd[rd_y[1:0]][0];
  assign rd_mag  = rd_sig ? mag_rd[rd_y[1:0]] : '0;

  // ---- block sequencing --------------------------------------------------------
  assign flush_req = (state_q == B_FLUSH) && q_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= B_IDLE;
      np_q    <= '0;
      dec_q   <= 1'b0;
    end else begin
      case (state_q)
        B_IDLE:  if (go) begin
                   np_q    <= start_planes;
                   dec_q   <= decode;
                   state_q <= (start_planes != '0) ? B_CODE : B_WAIT;
                 end
        B_CODE:  if (scl_done) state_q <= dec_q ? B_WAIT : B_FLUSH;
        B_FLUSH: if (flush_done) state_q <= B_WAIT;
        default: state_q <= B_IDLE;
      endcase
    end
  end

  assign busy        = (state_q != B_IDLE) || scl_busy;
  assign done        = (state_q == B_WAIT);
  assign zero_planes = PW'(MAG_BITS) - np_q;
endmodule
