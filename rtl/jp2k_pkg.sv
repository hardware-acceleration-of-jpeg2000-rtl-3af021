// jp2k_pkg - types, constants and small pure functions shared by the
// JPEG2000 block coder.
//
// Context labels follow the usual JPEG2000 numbering: 0..8 significance
// (zero coding), 9..13 sign coding, 14..16 magnitude refinement, 17 the
// cleanup run-length context and 18 the non-adaptive uniform context,
// 19 labels in all.  The probability table is the 47-state MQ table of the
// JPEG2000 standard: each state has a 16-bit LPS probability estimate Qe,
// a next state after an MPS renormalisation, a next state after an LPS and
// a flag that swaps the MPS sense on an LPS.  The context functions are the
// standard's zero-coding, sign-coding and refinement rules, written as
// combinational functions of the neighbour significance counts.  The bus
// request/response structs are used by the DMA units and the arbiter.
package jp2k_pkg;

  localparam int NUM_CX  = 19;
  localparam int CX_W    = 5;
  localparam int IDX_W   = 6;
  localparam logic [CX_W-1:0] CX_RL  = 5'd17;
  localparam logic [CX_W-1:0] CX_UNI = 5'd18;

  // Subband orientation of the code-block (selects the zero-coding table).
  typedef enum logic [1:0] {SB_LL = 2'd0, SB_HL = 2'd1, SB_LH = 2'd2, SB_HH = 2'd3} subband_e;

  // Coding passes.
  typedef enum logic [1:0] {PASS_SP = 2'd0, PASS_MR = 2'd1, PASS_CU = 2'd2} pass_e;

  // One binary symbol with its context label.
  typedef struct packed {
    logic [CX_W-1:0] cx;
    logic            d;
  } mq_sym_t;

  // Simple memory bus used by the DMA units towards the system bus bridge:
  // the master holds 'valid' with its address (bytes, word aligned), 'we'
  // and 'wdata' until the slave answers with 'ack'; read data comes with it.
  typedef struct packed {
    logic        valid;
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] rdata;
  } bus_rsp_t;

  // One entry of the probability state table.
  typedef struct packed {
    logic [15:0]      qe;
    logic [IDX_W-1:0] nmps;
    logic [IDX_W-1:0] nlps;
    logic             sw;
  } qe_entry_t;

  function automatic qe_entry_t qe_lookup(input logic [IDX_W-1:0] idx);
    qe_entry_t e;
    case (idx)
      6'd0 : e = '{16'h5601,  6'd1,  6'd1, 1'b1};
      6'd1 : e = '{16'h3401,  6'd2,  6'd6, 1'b0};
      6'd2 : e = '{16'h1801,  6'd3,  6'd9, 1'b0};
      6'd3 : e = '{16'h0AC1,  6'd4, 6'd12, 1'b0};
      6'd4 : e = '{16'h0521,  6'd5, 6'd29, 1'b0};
      6'd5 : e = '{16'h0221, 6'd38, 6'd33, 1'b0};
      6'd6 : e = '{16'h5601,  6'd7,  6'd6, 1'b1};
      6'd7 : e = '{16'h5401,  6'd8, 6'd14, 1'b0};
      6'd8 : e = '{16'h4801,  6'd9, 6'd14, 1'b0};
      6'd9 : e = '{16'h3801, 6'd10, 6'd14, 1'b0};
      6'd10: e = '{16'h3001, 6'd11, 6'd17, 1'b0};
      6'd11: e = '{16'h2401, 6'd12, 6'd18, 1'b0};
      6'd12: e = '{16'h1C01, 6'd13, 6'd20, 1'b0};
      6'd13: e = '{16'h1601, 6'd29, 6'd21, 1'b0};
      6'd14: e = '{16'h5601, 6'd15, 6'd14, 1'b1};
      6'd15: e = '{16'h5401, 6'd16, 6'd14, 1'b0};
      6'd16: e = '{16'h5101, 6'd17, 6'd15, 1'b0};
      6'd17: e = '{16'h4801, 6'd18, 6'd16, 1'b0};
      6'd18: e = '{16'h3801, 6'd19, 6'd17, 1'b0};
      6'd19: e = '{16'h3401, 6'd20, 6'd18, 1'b0};
      6'd20: e = '{16'h3001, 6'd21, 6'd19, 1'b0};
      6'd21: e = '{16'h2801, 6'd22, 6'd19, 1'b0};
      6'd22: e = '{16'h2401, 6'd23, 6'd20, 1'b0};
      6'd23: e = '{16'h2201, 6'd24, 6'd21, 1'b0};
      6'd24: e = '{16'h1C01, 6'd25, 6'd22, 1'b0};
      6'd25: e = '{16'h1801, 6'd26, 6'd23, 1'b0};
      6'd26: e = '{16'h1601, 6'd27, 6'd24, 1'b0};
      6'd27: e = '{16'h1401, 6'd28, 6'd25, 1'b0};
      6'd28: e = '{16'h1201, 6'd29, 6'd26, 1'b0};
      6'd29: e = '{16'h1101, 6'd30, 6'd27, 1'b0};
      6'd30: e = '{16'h0AC1, 6'd31, 6'd28, 1'b0};
      6'd31: e = '{16'h09C1, 6'd32, 6'd29, 1'b0};
      6'd32: e = '{16'h08A1, 6'd33, 6'd30, 1'b0};
      6'd33: e = '{16'h0521, 6'd34, 6'd31, 1'b0};
      6'd34: e = '{16'h0441, 6'd35, 6'd32, 1'b0};
      6'd35: e = '{16'h02A1, 6'd36, 6'd33, 1'b0};
      6'd36: e = '{16'h0221, 6'd37, 6'd34, 1'b0};
      6'd37: e = '{16'h0141, 6'd38, 6'd35, 1'b0};
      6'd38: e = '{16'h0111, 6'd39, 6'd36, 1'b0};
      6'd39: e = '{16'h0085, 6'd40, 6'd37, 1'b0};
      6'd40: e = '{16'h0049, 6'd41, 6'd38, 1'b0};
      6'd41: e = '{16'h0025, 6'd42, 6'd39, 1'b0};
      6'd42: e = '{16'h0015, 6'd43, 6'd40, 1'b0};
      6'd43: e = '{16'h0009, 6'd44, 6'd41, 1'b0};
      6'd44: e = '{16'h0005, 6'd45, 6'd42, 1'b0};
      6'd45: e = '{16'h0001, 6'd45, 6'd43, 1'b0};
      default: e = '{16'h5601, 6'd46, 6'd46, 1'b0};  // 46: uniform state
    endcase
    return e;
  endfunction

  // Initial probability state of each context at the start of a code-block.
  function automatic logic [IDX_W-1:0] cx_init_index(input int cx);
    if (cx == 0)            return 6'd4;
    else if (cx == int'(CX_RL))  return 6'd3;
    else if (cx == int'(CX_UNI)) return 6'd46;
    else                    return 6'd0;
  endfunction

  // Zero-coding context from the horizontal (0..2), vertical (0..2) and
  // diagonal (0..4) significant-neighbour counts.
  function automatic logic [CX_W-1:0] zc_context(input logic [1:0] h_in, input logic [1:0] v_in,
                                                 input logic [2:0] d, input subband_e sb);
    logic [1:0] h, v;
    logic [2:0] hv;
    logic [CX_W-1:0] c;
    // HL (horizontally high-pass) blocks swap the roles of H and V.
    h = (sb == SB_HL) ? v_in : h_in;
    v = (sb == SB_HL) ? h_in : v_in;
    hv = {1'b0, h_in} + {1'b0, v_in};
    if (sb == SB_HH) begin
      if (d >= 3'd3)      c = 5'd8;
      else if (d == 3'd2) c = (hv >= 3'd1) ? 5'd7 : 5'd6;
      else if (d == 3'd1) c = (hv >= 3'd2) ? 5'd5 : (hv == 3'd1) ? 5'd4 : 5'd3;
      else                c = (hv >= 3'd2) ? 5'd2 : (hv == 3'd1) ? 5'd1 : 5'd0;
    end else begin
      if (h == 2'd2)      c = 5'd8;
      else if (h == 2'd1) c = (v != 2'd0) ? 5'd7 : (d != 3'd0) ? 5'd6 : 5'd5;
      else if (v == 2'd2) c = 5'd4;
      else if (v == 2'd1) c = 5'd3;
      else                c = (d >= 3'd2) ? 5'd2 : (d == 3'd1) ? 5'd1 : 5'd0;
    end
    return c;
  endfunction

  // Sign-coding context and XOR bit.  hc and vc are the clamped horizontal
  // and vertical sign contributions, -1..1, as two's complement 2-bit values.
  function automatic logic [CX_W:0] sc_context(input logic signed [1:0] hc, input logic signed [1:0] vc);
    logic [CX_W-1:0] c;
    logic x;
    logic signed [1:0] h, v;
    // Mirror negative horizontal contributions (and a zero H with negative V).
    x = (hc < 0) || (hc == 0 && vc < 0);
    h = x ? -hc : hc;
    v = x ? -vc : vc;
    if (h == 2'sd1) c = (v == 2'sd1) ? 5'd13 : (v == 2'sd0) ? 5'd12 : 5'd11;
    else            c = (v == 2'sd0) ? 5'd9 : 5'd10;
    return {c, x};
  endfunction

  // Magnitude refinement context.
  function automatic logic [CX_W-1:0] mr_context(input logic refined_before, input logic any_neighbour);
    if (refined_before) return 5'd16;
    return any_neighbour ? 5'd15 : 5'd14;
  endfunction

endpackage
