// mq_decoder - MQ arithmetic decoder of JPEG2000.
//
// The inverse of mq_encoder: given the same sequence of context labels it
// recovers the symbols from the codeword.  A (16 bits) is the interval
// length; C (32 bits) holds the codeword bits still to be matched, its top
// half compared against the LPS sub-interval Qe of the requested context.
// A value below Qe decodes the LPS sub-interval (with the conditional
// exchange applied as in the encoder), otherwise Qe is removed from C and
// the MPS is decoded.  When A falls below 0x8000 both registers shift left
// until A's MSB is set, and the context's probability state is updated
// exactly as the encoder updated it.  Every 8 shifts a new codeword byte is
// added into C; after a 0xFF byte the next byte is added 7 bits lower (the
// stuffed bit), and a 0xFF followed by a byte above 0x8F (a marker, or the
// end of the codeword) is not consumed: 1 bits are fed instead.
//
// Interface: 'init' starts a new codeword; the decoder first reads two
// bytes.  Codeword bytes arrive on in_valid/in_byte/in_ready; the source
// must supply 0xFF after the last codeword byte.  A decode request is a
// context label on req_cx with req_valid; when req_ready is high the
// decoded symbol is on dec_bit in the same cycle (combinationally from the
// registers and the context file).  Like the encoder, a decision takes one
// cycle plus one per byte boundary its renormalisation crosses.
//
// The document states only that the decoder performs a sequence of
// operations similar to the encoder; the procedure is the one of the
// JPEG2000 standard, and the cycle structure mirrors mq_encoder.
module mq_decoder
  import jp2k_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  // decode requests
  input  logic             req_valid,
  input  logic [CX_W-1:0]  req_cx,
  output logic             req_ready,
  output logic             dec_bit,
  // codeword bytes
  input  logic             in_valid,
  input  logic [7:0]       in_byte,
  output logic             in_ready,
  // context state file
  output logic [CX_W-1:0]  ctx_rd_cx,
  input  logic [IDX_W-1:0] ctx_rd_index,
  input  logic             ctx_rd_mps,
  output logic             ctx_wr_en,
  output logic [CX_W-1:0]  ctx_wr_cx,
  output logic [IDX_W-1:0] ctx_wr_index,
  output logic             ctx_wr_mps
);
  typedef enum logic [2:0] {S_OFF, S_INIT1, S_INIT2, S_IDLE, S_RENORM} state_e;

  typedef struct packed {
    logic [15:0] a;
    logic [31:0] c;
    logic [3:0]  ct;
    logic [7:0]  b;
    logic [3:0]  n;
    logic        take;   // a byte is consumed this cycle
  } regs_t;

  state_e      state_q;
  logic [15:0] a_q;
  logic [31:0] c_q;
  logic [3:0]  ct_q, n_q;
  logic [7:0]  b_q;

  // BYTEIN: bring the next byte into C (needs the next byte visible)
  function automatic regs_t byte_in(input regs_t r, input logic [7:0] nb);
    regs_t o;
    o = r;
    if (r.b == 8'hFF) begin
      if (nb > 8'h8F) begin
        o.c  = r.c + 32'hFF00;
        o.ct = 4'd8;
      end else begin
        o.take = 1'b1;
        o.b  = nb;
        o.c  = r.c + {15'd0, nb, 9'd0};
        o.ct = 4'd7;
      end
    end else begin
      o.take = 1'b1;
      o.b  = nb;
      o.c  = r.c + {16'd0, nb, 8'd0};
      o.ct = 4'd8;
    end
    return o;
  endfunction

  // One renormalisation step: refill if needed, then shift up to CT bits.
  function automatic regs_t shift_step(input regs_t r, input logic [7:0] nb);
    regs_t o;
    logic [3:0] s;
    o = r;
    if (o.n != 0 && o.ct == 0) o = byte_in(o, nb);
    s = (o.n < o.ct) ? o.n : o.ct;
    o.a  = o.a << s;
    o.c  = o.c << s;
    o.ct = o.ct - s;
    o.n  = o.n - s;
    return o;
  endfunction

  function automatic logic [3:0] lead_zeros(input logic [15:0] a);
    logic [3:0] z;
    z = 4'd15;
    for (int i = 0; i < 16; i++)
      if (a[i]) z = 4'(15 - i);
    return z;
  endfunction

  qe_entry_t   e;
  regs_t       cur, nxt;
  logic        take_req, commit;
  logic [15:0] a1;

  assign ctx_rd_cx = req_cx;
  assign e         = qe_lookup(ctx_rd_index);
  assign req_ready = (state_q == S_IDLE) && (ct_q != 4'd0 || in_valid);
  assign take_req  = req_valid && req_ready;

  always_comb begin
    cur       = '0;
    cur.a     = a_q;
    cur.c     = c_q;
    cur.ct    = ct_q;
    cur.b     = b_q;
    cur.n     = n_q;
    nxt       = cur;
    a1        = '0;
    dec_bit   = ctx_rd_mps;
    ctx_wr_en    = 1'b0;
    ctx_wr_cx    = req_cx;
    ctx_wr_index = ctx_rd_index;
    ctx_wr_mps   = ctx_rd_mps;
    case (state_q)
      S_INIT1: begin
        nxt.take = 1'b1;
        nxt.b    = in_byte;
        nxt.c    = {8'd0, in_byte, 16'd0};
        nxt.ct   = 4'd0;
      end
      S_INIT2: begin
        nxt    = byte_in(cur, in_byte);
        nxt.c  = nxt.c << 7;
        nxt.ct = nxt.ct - 4'd7;
        nxt.a  = 16'h8000;
      end
      S_IDLE: if (take_req) begin
        a1 = a_q - e.qe;
        if (c_q[31:16] < e.qe) begin
          // lower sub-interval
          nxt.a = e.qe;
          if (a1 < e.qe) begin
            dec_bit = ctx_rd_mps;                  // exchanged: MPS
            ctx_wr_index = e.nmps;
          end else begin
            dec_bit = ~ctx_rd_mps;                 // LPS
            ctx_wr_index = e.nlps;
            ctx_wr_mps   = ctx_rd_mps ^ e.sw;
          end
          ctx_wr_en = 1'b1;
        end else begin
          nxt.c = c_q - {e.qe, 16'd0};
          nxt.a = a1;
          if (!a1[15]) begin
            if (a1 < e.qe) begin
              dec_bit = ~ctx_rd_mps;               // exchanged: LPS
              ctx_wr_index = e.nlps;
              ctx_wr_mps   = ctx_rd_mps ^ e.sw;
            end else begin
              dec_bit = ctx_rd_mps;
              ctx_wr_index = e.nmps;
            end
            ctx_wr_en = 1'b1;
          end
        end
        nxt.n = lead_zeros(nxt.a);
        nxt   = shift_step(nxt, in_byte);
      end
      S_RENORM: nxt = shift_step(cur, in_byte);
      default: ;
    endcase
  end

  // a step that has to read a byte waits until one is offered
  always_comb begin
    case (state_q)
      S_IDLE:   commit = take_req;
      S_RENORM: commit = (ct_q != 4'd0) || in_valid;
      S_INIT1,
      S_INIT2:  commit = in_valid;
      default:  commit = 1'b0;
    endcase
  end
  assign in_ready = commit && nxt.take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_OFF;
      a_q <= 16'h8000; c_q <= '0; ct_q <= '0; b_q <= '0; n_q <= '0;
    end else if (init) begin
      state_q <= S_INIT1;
      a_q <= 16'h8000; c_q <= '0; ct_q <= '0; b_q <= '0; n_q <= '0;
    end else if (commit) begin
      a_q  <= nxt.a;
      c_q  <= nxt.c;
      ct_q <= nxt.ct;
      b_q  <= nxt.b;
      n_q  <= nxt.n;
      case (state_q)
        S_INIT1: state_q <= S_INIT2;
        S_INIT2: state_q <= S_IDLE;
        default: state_q <= (nxt.n != 0) ? S_RENORM : S_IDLE;
      endcase
    end
  end
endmodule
