// coder_channel - one coder of the accelerator's array with its DMA units.
//
// A start runs three phases: the block DMA copies the code-block from
// system memory into the block coder (the coder is idle meanwhile), then
// the block coder codes it while the codeword DMA stores the bytes it
// produces, and finally the codeword DMA writes its last partial word.
// 'done' pulses at the end; 'length', 'zero_planes' and 'passes' then
// describe the codeword.  The two DMA units have separate bus ports.
//
// A start with 'decode' set runs the other direction: the block coder
// decodes the 'cw_length'-byte codeword at src_addr (fetched by
// codeword_fetch on the codeword port), given its zero-plane count and
// number of passes, and sample_store then writes the decoded block to
// dst_addr on the block port.  'length' then reports cw_length.
//
// The split into block DMA, block coder and codeword DMA follows the
// document; the phase sequencing is this design's.
module coder_channel
  import jp2k_pkg::*;
#(
  parameter int BLK_W    = 32,
  parameter int BLK_H    = 32,
  parameter int MAG_BITS = 8,
  localparam int PW = $clog2(MAG_BITS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          decode,
  input  logic [PW-1:0] dec_zero_planes,
  input  logic [31:0]   cw_length,
  input  subband_e      orient,
  input  logic [7:0]    max_passes,
  input  logic [31:0]   src_addr,
  input  logic [31:0]   dst_addr,
  output logic          busy,
  output logic          done,
  output logic [31:0]   length,
  output logic [PW-1:0] zero_planes,
  output logic [7:0]    passes,
  output bus_req_t      blk_req,
  input  bus_rsp_t      blk_rsp,
  output bus_req_t      cw_req,
  input  bus_rsp_t      cw_rsp
);
  localparam int XW = $clog2(BLK_W);
  localparam int YW = $clog2(BLK_H);

  typedef enum logic [2:0] {C_IDLE, C_LOAD, C_CODE, C_DEC, C_STORE} cstate_e;
  cstate_e state_q;

  logic                ld_en, ld_sign;
  logic [XW-1:0]       ld_x;
  logic [YW-1:0]       ld_y;
  logic [MAG_BITS-1:0] ld_mag;
  logic                dma_busy, dma_done;
  logic                bc_busy, bc_done, cw_valid, cw_ready;
  logic [7:0]          cw_byte;
  logic                cwd_busy, cwd_done;
  logic                go;
  subband_e            orient_q;
  logic [7:0]          maxp_q;
  logic [31:0]         dst_q, len_q, cwd_count;
  logic                dec_q, enc_go, dec_go;
  logic                cf_busy, cwi_valid, cwi_ready;
  logic [7:0]          cwi_byte;
  logic                st_busy, st_done, rd_sign;
  logic [XW-1:0]       rd_x;
  logic [YW-1:0]       rd_y;
  logic [MAG_BITS-1:0] rd_mag;
  bus_req_t            bd_req, cwd_req, cf_req, st_req;
  bus_rsp_t            bd_rsp, cwd_rsp, cf_rsp, st_rsp;

  assign go     = start && (state_q == C_IDLE);
  assign enc_go = go && !decode;
  assign dec_go = go && decode;

  block_dma #(.BLK_W(BLK_W), .BLK_H(BLK_H), .MAG_BITS(MAG_BITS)) u_block_dma (
    .clk, .rst_n, .start(enc_go), .src_addr, .busy(dma_busy), .done(dma_done),
    .bus_req(bd_req), .bus_rsp(bd_rsp), .ld_en, .ld_x, .ld_y, .ld_sign, .ld_mag);

  block_coder #(.BLK_W(BLK_W), .BLK_H(BLK_H), .MAG_BITS(MAG_BITS)) u_block_coder (
    .clk, .rst_n, .ld_en, .ld_x, .ld_y, .ld_sign, .ld_mag,
    .start(dma_done || dec_go), .decode(dec_go), .dec_zero_planes,
    .orient(dec_go ? orient : orient_q), .max_passes(dec_go ? max_passes : maxp_q),
    .busy(bc_busy), .done(bc_done),
    .zero_planes, .passes_coded(passes), .cw_valid, .cw_byte, .cw_ready,
    .cwi_valid, .cwi_byte, .cwi_ready, .rd_x, .rd_y, .rd_sign, .rd_mag);

  codeword_dma u_codeword_dma (
    .clk, .rst_n, .start(dma_done), .dst_addr(dst_q), .finish(bc_done && !dec_q), .busy(cwd_busy),
    .done(cwd_done), .byte_count(cwd_count), .in_valid(cw_valid), .in_ready(cw_ready),
    .in_byte(cw_byte), .bus_req(cwd_req), .bus_rsp(cwd_rsp));

  codeword_fetch u_codeword_fetch (
    .clk, .rst_n, .start(dec_go), .src_addr, .length(cw_length), .stop(bc_done && dec_q),
    .busy(cf_busy), .out_valid(cwi_valid), .out_byte(cwi_byte), .out_ready(cwi_ready),
    .bus_req(cf_req), .bus_rsp(cf_rsp));

  sample_store #(.BLK_W(BLK_W), .BLK_H(BLK_H), .MAG_BITS(MAG_BITS)) u_sample_store (
    .clk, .rst_n, .start(bc_done && dec_q), .dst_addr(dst_q), .busy(st_busy), .done(st_done),
    .rd_x, .rd_y, .rd_sign, .rd_mag, .bus_req(st_req), .bus_rsp(st_rsp));

  // each bus port serves the unit of the current direction; the other
  // unit is idle and sees no acknowledge
  assign blk_req = dec_q ? st_req : bd_req;
  assign cw_req  = dec_q ? cf_req : cwd_req;
  always_comb begin
    bd_rsp = blk_rsp; st_rsp = blk_rsp; cwd_rsp = cw_rsp; cf_rsp = cw_rsp;
    if (dec_q) begin bd_rsp.ack = 1'b0; cwd_rsp.ack = 1'b0; end
    else begin st_rsp.ack = 1'b0; cf_rsp.ack = 1'b0; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= C_IDLE; orient_q <= SB_LL; maxp_q <= '0; dst_q <= '0;
      dec_q <= 1'b0; len_q <= '0;
    end else begin
      case (state_q)
        C_IDLE: if (go) begin
                  state_q <= decode ? C_DEC : C_LOAD;
                  orient_q <= orient; maxp_q <= max_passes; dst_q <= dst_addr;
                  dec_q <= decode; len_q <= cw_length;
                end
        C_LOAD:  if (dma_done) state_q <= C_CODE;
        C_CODE:  if (cwd_done) state_q <= C_IDLE;
        C_DEC:   if (bc_done) state_q <= C_STORE;
        default: if (st_done) state_q <= C_IDLE;
      endcase
    end
  end

  assign busy   = (state_q != C_IDLE) || dma_busy || bc_busy || cwd_busy || cf_busy || st_busy;
  assign done   = cwd_done || st_done;
  assign length = dec_q ? len_q : cwd_count;
endmodule
