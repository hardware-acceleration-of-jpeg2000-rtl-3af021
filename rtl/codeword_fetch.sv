// codeword_fetch - reads a codeword from system memory for decoding.
//
// The decode-direction counterpart of codeword_dma.  On 'start' it reads
// the 'length'-byte codeword at 'src_addr' (word aligned) one 32-bit word
// at a time and offers its bytes, little-endian (bits 7:0 first), on the
// out_* handshake.  After the last codeword byte it offers 0xFF for as
// long as the decoder asks, which the MQ decoder treats as the end of the
// codeword.  'stop' (the decoder has finished) ends the transfer; 'busy'
// falls once no bus read is outstanding.  A read request, once raised, is
// held until acknowledged.
//
// The document has the DMA units move codewords between system memory and
// the coders; the byte order matches codeword_dma, and the 0xFF fill and
// single-word buffer are this design's choices.
module codeword_fetch
  import jp2k_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] src_addr,
  input  logic [31:0] length,
  input  logic        stop,
  output logic        busy,
  output logic        out_valid,
  output logic [7:0]  out_byte,
  input  logic        out_ready,
  output bus_req_t    bus_req,
  input  bus_rsp_t    bus_rsp
);
  logic        busy_q, stop_q, have_q, req_q;
  logic [31:0] base_q, len_q, idx_q, word_q;
  logic        in_cw;

  assign in_cw = (idx_q < len_q);

  assign bus_req.valid = req_q;
  assign bus_req.we    = 1'b0;
  assign bus_req.addr  = base_q + {idx_q[31:2], 2'b00};
  assign bus_req.wdata = '0;

  assign out_valid = busy_q && !stop_q && (!in_cw || have_q);
  assign out_byte  = !in_cw ? 8'hFF : word_q[8*idx_q[1:0] +: 8];
  assign busy      = busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0; stop_q <= 1'b0; have_q <= 1'b0; req_q <= 1'b0;
      base_q <= '0; len_q <= '0; idx_q <= '0; word_q <= '0;
    end else if (!busy_q) begin
      if (start) begin
        busy_q <= 1'b1; stop_q <= 1'b0; have_q <= 1'b0; req_q <= 1'b0;
        base_q <= src_addr; len_q <= length; idx_q <= '0;
      end
    end else begin
      if (stop) stop_q <= 1'b1;
      if (req_q) begin
        if (bus_rsp.ack) begin
          req_q  <= 1'b0;
          have_q <= 1'b1;
          word_q <= bus_rsp.rdata;
        end
      end else if (!have_q && in_cw && !stop_q && !stop) begin
        req_q <= 1'b1;
      end
      if (out_valid && out_ready) begin
        idx_q <= idx_q + 32'd1;
        if (idx_q[1:0] == 2'd3) have_q <= 1'b0;
      end
      if ((stop_q || stop) && (!req_q || bus_rsp.ack)) busy_q <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) req_q && !bus_rsp.ack |=> req_q)
    else $error("read request dropped before acknowledge");
endmodule
