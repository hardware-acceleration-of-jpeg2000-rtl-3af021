// sample_store - writes a decoded code-block back to system memory.
//
// The decode-direction counterpart of block_dma.  On 'start' it walks the
// BLK_W x BLK_H block in row-major order, reads each sample from the
// block coder's read-out port (sign-magnitude) and writes it as a 32-bit
// two's complement word to consecutive word addresses from 'dst_addr', the
// format block_dma reads.  One sample per bus acknowledge; 'done' pulses
// with the last acknowledge.
//
// The document has the DMA units move sample blocks between system memory
// and the coders; the format and the single outstanding write are this
// design's choices.
module sample_store
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
  input  logic [31:0]         dst_addr,
  output logic                busy,
  output logic                done,
  output logic [XW-1:0]       rd_x,
  output logic [YW-1:0]       rd_y,
  input  logic                rd_sign,
  input  logic [MAG_BITS-1:0] rd_mag,
  output bus_req_t            bus_req,
  input  bus_rsp_t            bus_rsp
);
  logic          busy_q;
  logic [31:0]   addr_q;
  logic [XW-1:0] x_q;
  logic [YW-1:0] y_q;
  logic          last;
  logic [31:0]   mag32;

  assign mag32         = 32'(rd_mag);
  assign busy          = busy_q;
  assign rd_x          = x_q;
  assign rd_y          = y_q;
  assign bus_req.valid = busy_q;
  assign bus_req.we    = 1'b1;
  assign bus_req.addr  = addr_q;
  assign bus_req.wdata = rd_sign ? (~mag32 + 32'd1) : mag32;
  assign last = (int'(x_q) == BLK_W - 1) && (int'(y_q) == BLK_H - 1);
  assign done = busy_q && bus_rsp.ack && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0; addr_q <= '0; x_q <= '0; y_q <= '0;
    end else if (!busy_q) begin
      if (start) begin
        busy_q <= 1'b1; addr_q <= dst_addr; x_q <= '0; y_q <= '0;
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
