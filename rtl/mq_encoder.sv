// mq_encoder - MQ arithmetic encoder of JPEG2000.
//
// Codes one binary symbol with its context label per clock cycle.  The
// interval length A (16 bits) and the lower bound C (28 bits) are held in
// registers.  For each symbol the LPS probability Qe of its context is read
// from the context state file; the MPS takes the upper sub-interval
// (A <- A - Qe, C <- C + Qe) and the LPS the lower one (A <- Qe), with the
// conditional exchange applied when the MPS sub-interval would be the smaller
// one.  When A falls below 0x8000 both registers are shifted left until its
// MSB is set again and the context's probability state is updated (MPS or
// LPS transition of the standard table).  Every 8 shifts (7 after a 0xFF
// byte, bit stuffing) a byte moves from C to the byte buffer B; the byte held
// in B is released only when the next one is produced, because a carry out of
// C may still increment it.  A flush request codes the termination of the
// standard (set C to the value with most trailing ones inside the interval,
// push out two bytes, drop a final 0xFF).
//
// Timing: the renormalisation shift is done as one barrel shift up to the
// next byte boundary, so a symbol normally takes one cycle; it takes one more
// cycle for each byte boundary the shift crosses (at most two).  sym_ready
// is low during those cycles, during a flush, and while byte_ready is low.
// byte_valid/byte_data is a one-cycle strobe, only issued when byte_ready
// is high.  flush_done pulses in the cycle the last byte is issued.
//
// The register widths, the coding rules and the update-on-renormalisation
// follow the document; the multi-cycle barrel shift is this design's choice.
module mq_encoder
  import jp2k_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,        // start a new codeword
  // symbol input
  input  logic             sym_valid,
  output logic             sym_ready,
  input  mq_sym_t          sym,
  input  logic             flush_req,   // terminate the codeword (accepted when idle)
  output logic             flush_done,
  // context state file
  output logic [CX_W-1:0]  ctx_rd_cx,
  input  logic [IDX_W-1:0] ctx_rd_index,
  input  logic             ctx_rd_mps,
  output logic             ctx_wr_en,
  output logic [CX_W-1:0]  ctx_wr_cx,
  output logic [IDX_W-1:0] ctx_wr_index,
  output logic             ctx_wr_mps,
  // codeword bytes
  output logic             byte_valid,
  output logic [7:0]       byte_data,
  input  logic             byte_ready
);
  typedef enum logic [2:0] {S_IDLE, S_RENORM, S_FLUSH1, S_FLUSH2, S_FLUSH3} state_e;

  // Working copy of the coder registers, C widened so that shifts of the
  // flush procedure cannot lose bits before the byte-out masks them.
  typedef struct packed {
    logic [15:0] a;
    logic [39:0] c;
    logic [3:0]  ct;
    logic [7:0]  b;
    logic        first;   // B still holds the placeholder byte
    logic [3:0]  n;       // shifts still owed to renormalisation
    logic        emit;
    logic [7:0]  ebyte;
  } regs_t;

  state_e      state_q;
  logic [15:0] a_q;
  logic [27:0] c_q;
  logic [3:0]  ct_q, n_q;
  logic [7:0]  b_q;
  logic        first_q;

  // BYTEOUT procedure: move the next byte from C into B and release the old B.
  function automatic regs_t byte_out(input regs_t r);
    regs_t o;
    o = r;
    if (r.b == 8'hFF) begin
      o.emit = !r.first; o.ebyte = r.b;
      o.b  = r.c[27:20];
      o.c  = {20'd0, r.c[19:0]};
      o.ct = 4'd7;
    end else if (r.c[39:27] == '0) begin
      o.emit = !r.first; o.ebyte = r.b;
      o.b  = r.c[26:19];
      o.c  = {21'd0, r.c[18:0]};
      o.ct = 4'd8;
    end else begin
      // carry into the buffered byte
      o.emit = !r.first; o.ebyte = r.b + 8'd1;
      if (r.b + 8'd1 == 8'hFF) begin
        o.b  = {1'b0, r.c[26:20]};   // carry bit removed, 7 bits follow a 0xFF
        o.c  = {20'd0, r.c[19:0]};
        o.ct = 4'd7;
      end else begin
        o.b  = r.c[26:19];
        o.c  = {21'd0, r.c[18:0]};
        o.ct = 4'd8;
      end
    end
    o.first = 1'b0;
    return o;
  endfunction

  // One renormalisation step: shift up to the next byte boundary.
  function automatic regs_t shift_step(input regs_t r);
    regs_t o;
    logic [3:0] s;
    o = r;
    s = (r.n < r.ct) ? r.n : r.ct;
    o.a  = r.a << s;
    o.c  = r.c << s;
    o.ct = r.ct - s;
    o.n  = r.n - s;
    if (s != 0 && o.ct == 4'd0) o = byte_out(o);
    return o;
  endfunction

  function automatic logic [3:0] lead_zeros(input logic [15:0] a);
    logic [3:0] z;
    z = 4'd15;
    for (int i = 0; i < 16; i++)
      if (a[i]) z = 4'(15 - i);
    return z;
  endfunction

  qe_entry_t e;
  regs_t     cur, nxt;
  logic      commit;
  logic      take_sym;

  assign ctx_rd_cx = sym.cx;
  assign e         = qe_lookup(ctx_rd_index);
  assign sym_ready = (state_q == S_IDLE) && byte_ready;
  assign take_sym  = sym_valid && sym_ready;

  logic [39:0] tempc;
  logic [15:0] a1;

  always_comb begin
    tempc     = '0;
    a1        = '0;
    cur       = '0;
    cur.a     = a_q;
    cur.c     = {12'd0, c_q};
    cur.ct    = ct_q;
    cur.b     = b_q;
    cur.first = first_q;
    cur.n     = n_q;
    nxt       = cur;
    ctx_wr_en    = 1'b0;
    ctx_wr_cx    = sym.cx;
    ctx_wr_index = ctx_rd_index;
    ctx_wr_mps   = ctx_rd_mps;
    case (state_q)
      S_IDLE: if (take_sym) begin
        a1 = a_q - e.qe;
        if (sym.d == ctx_rd_mps) begin
          if (a1[15]) begin
            nxt.a = a1;
            nxt.c = cur.c + 40'(e.qe);
          end else begin
            if (a1 < e.qe) nxt.a = e.qe;                       // conditional exchange
            else begin nxt.a = a1; nxt.c = cur.c + 40'(e.qe); end
            ctx_wr_en    = 1'b1;
            ctx_wr_index = e.nmps;
          end
        end else begin
          if (a1 < e.qe) begin nxt.a = a1; nxt.c = cur.c + 40'(e.qe); end   // conditional exchange
          else nxt.a = e.qe;
          ctx_wr_en    = 1'b1;
          ctx_wr_index = e.nlps;
          ctx_wr_mps   = ctx_rd_mps ^ e.sw;
        end
        nxt.n = lead_zeros(nxt.a);
        nxt   = shift_step(nxt);
      end
      S_RENORM: nxt = shift_step(cur);
      S_FLUSH1: begin
        tempc = cur.c + 40'(cur.a);
        nxt.c = cur.c | 40'h0_0000_FFFF;
        if (nxt.c >= tempc) nxt.c = nxt.c - 40'h8000;
        nxt.c = nxt.c << cur.ct;
        nxt   = byte_out(nxt);
      end
      S_FLUSH2: begin
        nxt.c = cur.c << cur.ct;
        nxt   = byte_out(nxt);
      end
      S_FLUSH3: begin
        nxt.emit  = !cur.first && (cur.b != 8'hFF);
        nxt.ebyte = cur.b;
      end
      default: ;
    endcase
  end

  // A step that produces a byte waits for the byte sink.
  assign commit     = (state_q == S_IDLE) ? take_sym : ((state_q != S_IDLE) && byte_ready);
  assign byte_valid = commit && nxt.emit;
  assign byte_data  = nxt.ebyte;
  assign flush_done = commit && (state_q == S_FLUSH3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      a_q <= 16'h8000; c_q <= '0; ct_q <= 4'd12; b_q <= '0; first_q <= 1'b1; n_q <= '0;
    end else if (init) begin
      state_q <= S_IDLE;
      a_q <= 16'h8000; c_q <= '0; ct_q <= 4'd12; b_q <= '0; first_q <= 1'b1; n_q <= '0;
    end else if (state_q == S_IDLE && !take_sym) begin
      if (flush_req) state_q <= S_FLUSH1;
    end else if (commit) begin
      a_q     <= nxt.a;
      c_q     <= nxt.c[27:0];
      ct_q    <= nxt.ct;
      b_q     <= nxt.b;
      first_q <= nxt.first;
      n_q     <= nxt.n;
      case (state_q)
        S_IDLE, S_RENORM: state_q <= (nxt.n != 0) ? S_RENORM : S_IDLE;
        S_FLUSH1:         state_q <= S_FLUSH2;
        S_FLUSH2:         state_q <= S_FLUSH3;
        default:          state_q <= S_IDLE;
      endcase
    end
  end

  // A renormalisation always ends with the MSB of A set.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state_q == S_IDLE) |-> a_q[15]);
endmodule
