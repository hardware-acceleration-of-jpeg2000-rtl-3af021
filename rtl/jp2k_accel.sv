// jp2k_accel - JPEG2000 block-coding accelerator: an array of embedded
// block coders controlled through a register file and fed by DMA.
//
// The processor writes a channel's sample and codeword addresses, its
// subband orientation and pass limit into the register file and starts it.
// The channel's block DMA then copies the code-block from system memory
// into the coder, the coder runs the bit-plane passes and MQ-encodes them,
// and the codeword DMA writes the codeword back to system memory; the
// processor polls the channel's status for completion, codeword length,
// skipped zero planes and number of passes.  A channel can also decode:
// its codeword fetch unit reads a codeword, the coder decodes it with the
// given zero-plane and pass counts, and its sample store unit writes the
// decoded block back to system memory.  The channels work
// concurrently; their 2*NUM_CODERS DMA masters share the one bus master
// port (the PLD-to-processor bridge) through a round-robin arbiter.  The
// host port is the slave side of the processor-to-PLD bridge.
//
// Bus bridges, processor, SDRAM and on-chip SRAM are outside this module:
// the host port and the memory port are plain request/acknowledge buses
// (see jp2k_pkg::bus_req_t and register_file).  Defaults: four coders (the
// number the bus bandwidth can keep busy), 32x32 code-blocks, sign plus
// 8 magnitude bits per sample.
module jp2k_accel
  import jp2k_pkg::*;
#(
  parameter int NUM_CODERS = 4,
  parameter int BLK_W      = 32,
  parameter int BLK_H      = 32,
  parameter int MAG_BITS   = 8,
  localparam int AW = $clog2(NUM_CODERS * 8),
  localparam int PW = $clog2(MAG_BITS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host (memory-mapped register) port
  input  logic          host_sel,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  logic [31:0]   host_wdata,
  output logic [31:0]   host_rdata,
  output logic          host_ack,
  // system memory master port
  output bus_req_t      mem_req,
  input  bus_rsp_t      mem_rsp
);
  logic          ch_start      [NUM_CODERS];
  logic [1:0]    ch_orient     [NUM_CODERS];
  logic          ch_decode     [NUM_CODERS];
  logic [PW-1:0] ch_dec_zp     [NUM_CODERS];
  logic [31:0]   ch_cw_length  [NUM_CODERS];
  logic [7:0]    ch_max_passes [NUM_CODERS];
  logic [31:0]   ch_src        [NUM_CODERS];
  logic [31:0]   ch_dst        [NUM_CODERS];
  logic          ch_busy       [NUM_CODERS];
  logic          ch_done       [NUM_CODERS];
  logic [PW-1:0] ch_zero_planes[NUM_CODERS];
  logic [7:0]    ch_passes     [NUM_CODERS];
  logic [31:0]   ch_length     [NUM_CODERS];
  bus_req_t      m_req [2*NUM_CODERS];
  bus_rsp_t      m_rsp [2*NUM_CODERS];

  register_file #(.NUM_CODERS(NUM_CODERS), .PW(PW)) u_register_file (
    .clk, .rst_n, .host_sel, .host_we, .host_addr, .host_wdata, .host_rdata, .host_ack,
    .ch_start, .ch_orient, .ch_decode, .ch_dec_zp, .ch_cw_length, .ch_max_passes, .ch_src, .ch_dst,
    .ch_busy, .ch_done, .ch_zero_planes, .ch_passes, .ch_length);

  for (genvar c = 0; c < NUM_CODERS; c++) begin : g_coder
    coder_channel #(.BLK_W(BLK_W), .BLK_H(BLK_H), .MAG_BITS(MAG_BITS)) u_channel (
      .clk, .rst_n, .start(ch_start[c]), .decode(ch_decode[c]), .dec_zero_planes(ch_dec_zp[c]),
      .cw_length(ch_cw_length[c]), .orient(subband_e'(ch_orient[c])),
      .max_passes(ch_max_passes[c]), .src_addr(ch_src[c]), .dst_addr(ch_dst[c]),
      .busy(ch_busy[c]), .done(ch_done[c]), .length(ch_length[c]),
      .zero_planes(ch_zero_planes[c]), .passes(ch_passes[c]),
      .blk_req(m_req[2*c]), .blk_rsp(m_rsp[2*c]),
      .cw_req(m_req[2*c+1]), .cw_rsp(m_rsp[2*c+1]));
  end

  bus_arbiter #(.N(2 * NUM_CODERS)) u_bus_arbiter (
    .clk, .rst_n, .m_req, .m_rsp, .s_req(mem_req), .s_rsp(mem_rsp));
endmodule
