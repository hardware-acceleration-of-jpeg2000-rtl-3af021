// codeword_dma - stores a coder's codeword bytes in system memory.
//
// After 'start' (destination 'dst_addr') bytes arriving on the byte
// handshake are queued in a small FIFO and packed little-endian into 32-bit
// words (first byte in bits 7:0); every full word is written to the next
// word address.  When 'finish' has been seen (the coder has issued its last
// byte) and the FIFO is empty, a partly filled last word is written with
// zero padding, 'done' pulses and 'byte_count' holds the codeword length.
// One word per bus acknowledge, so the bus side moves 32 bits per cycle
// while bytes are available.
//
// The document names this unit and its 32-bit-per-cycle rate; packing
// order, padding and the FIFO are this design's choices.
module codeword_dma
  import jp2k_pkg::*;
#(
  parameter int FIFO_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] dst_addr,
  input  logic        finish,
  output logic        busy,
  output logic        done,
  output logic [31:0] byte_count,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_byte,
  output bus_req_t    bus_req,
  input  bus_rsp_t    bus_rsp
);
  logic        busy_q, fin_q;
  logic [31:0] addr_q, count_q, word_q;
  logic [2:0]  fill_q;
  logic        f_valid, f_empty, f_pop;
  logic [7:0]  f_byte;
  logic        writing;

  sync_fifo #(.T(logic [7:0]), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clear(start && !busy_q), .in_valid, .in_ready, .in_data(in_byte),
    .out_valid(f_valid), .out_ready(f_pop), .out_data(f_byte), .empty(f_empty));

  // a word goes out when full, or partly filled at the end of the codeword
  assign writing = busy_q && ((fill_q == 3'd4) || (fin_q && f_empty && fill_q != 3'd0));
  assign f_pop   = busy_q && (fill_q != 3'd4) && !writing;

  assign bus_req.valid = writing;
  assign bus_req.we    = 1'b1;
  assign bus_req.addr  = addr_q;
  assign bus_req.wdata = word_q;

  assign busy       = busy_q;
  assign byte_count = count_q;
  assign done       = busy_q && fin_q && f_empty && (fill_q == 3'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0; fin_q <= 1'b0; addr_q <= '0; count_q <= '0; word_q <= '0; fill_q <= '0;
    end else if (!busy_q) begin
      if (start) begin
        busy_q <= 1'b1; fin_q <= 1'b0; addr_q <= dst_addr; count_q <= '0; word_q <= '0; fill_q <= '0;
      end
    end else begin
      if (finish) fin_q <= 1'b1;
      if (writing) begin
        if (bus_rsp.ack) begin
          addr_q <= addr_q + 32'd4;
          fill_q <= '0;
          word_q <= '0;
        end
      end else if (f_pop && f_valid) begin
        word_q[8*fill_q[1:0] +: 8] <= f_byte;
        fill_q  <= fill_q + 3'd1;
        count_q <= count_q + 32'd1;
      end
      if (done) busy_q <= 1'b0;
    end
  end
endmodule
