// block_dma - fetches one code-block of samples from system memory and
// loads it into a block coder's data memories.
//
// On 'start' it reads BLK_W*BLK_H consecutive 32-bit words from 'src_addr'
// (row-major order, one sample per word, two's complement) and converts
// each to sign-magnitude: the sign is bit 31, the magnitude is the absolute
// value, limited to MAG_BITS bits (larger values saturate).  Each sample is
// written to the coder in the cycle its bus read is acknowledged, so with
// an always-ready bus it moves one sample per cycle.  'done' pulses after
// the last sample.  The bus protocol is the request/acknowledge of
// jp2k_pkg::bus_req_t.
//
// The document names this unit and its job (samples from system memory to
// the coders, by DMA, while the coder waits); the sample format and the
// single outstanding read are this design's choices.
module block_dma
  import jp2k_pkg::*;
#(
  parameter int BLK_W    = 32,
  parameter int BLK_H    = 32,
  parameter int MAG_BITS = 8,
  localparam int XW = $clog2(BLK_W),
  localparam int YW = $clog2(BLK_H)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [31:0]         src_addr,
  output logic                busy,
  output logic                done,
  output bus_req_t            bus_req,
  input  bus_rsp_t            bus_rsp,
  output logic                ld_en,
  output logic [XW-1:0]       ld_x,
  output logic [YW-1:0]       ld_y,
  output logic                ld_sign,
  output logic [MAG_BITS-1:0] ld_mag
);
  logic          busy_q;
  logic [31:0]   addr_q;
  logic [XW-1:0] x_q;
  logic [YW-1:0] y_q;
  logic          last;

  assign busy          = busy_q;
  assign bus_req.valid = busy_q;
  assign bus_req.we    = 1'b0;
  assign bus_req.addr  = addr_q;
  assign bus_req.wdata = '0;
  assign last = (int'(x_q) == BLK_W - 1) && (int'(y_q) == BLK_H - 1);

  // two's complement to sign-magnitude
  logic [31:0] absval;
  assign absval  = bus_rsp.rdata[31] ? (~bus_rsp.rdata + 32'd1) : bus_rsp.rdata;
  assign ld_en   = busy_q && bus_rsp.ack;
  assign ld_x    = x_q;
  assign ld_y    = y_q;
  assign ld_sign = bus_rsp.rdata[31];
  assign ld_mag  = (absval > 32'((1 << MAG_BITS) - 1)) ? '1 : absval[MAG_BITS-1:0];
  assign done    = busy_q && bus_rsp.ack && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0; addr_q <= '0; x_q <= '0; y_q <= '0;
    end else if (!busy_q) begin
      if (start) begin
        busy_q <= 1'b1; addr_q <= src_addr; x_q <= '0; y_q <= '0;
      end
    end else if (bus_rsp.ack) begin
      addr_q <= addr_q + 32'd4;
      if (last) busy_q <= 1'b0;
      if (int'(x_q) == BLK_W - 1) begin
        x_q <= '0;
        y_q <= y_q + YW'(1);
      end else x_q <= x_q + XW'(1);
    end
  end
endmodule
