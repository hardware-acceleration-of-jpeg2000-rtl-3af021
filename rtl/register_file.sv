// register_file - memory-mapped control and status registers of the
// accelerator, reached by the processor through the stripe-to-PLD bridge.
//
// Each coder channel c owns eight 32-bit words starting at word index 8*c:
//   +0 CTRL    write: bit 0 start (pulse, not stored), bits 2:1 subband
//              orientation (0 LL, 1 HL, 2 LH, 3 HH), bit 3 decode, bits
//              15:8 maximum number of coding passes (0: all; when
//              decoding: the passes in the codeword), bits 20:16 skipped
//              zero bit-planes (decoding); read: the stored fields
//   +1 SRC     byte address of the code-block samples (decoding: of the
//              codeword)
//   +2 DST     byte address for the codeword (decoding: for the samples)
//   +3 STATUS  read: bit 0 busy, bit 1 done (set when the channel finishes,
//              cleared by the next start), bits 7:4 skipped zero bit-planes,
//              bits 15:8 coding passes in the codeword
//   +4 LENGTH  read: codeword length in bytes; write: length of the
//              codeword to decode
// Other words read as zero.  A host access is a one-cycle 'host_sel' with
// 'host_we'; 'host_rdata' is registered and valid in the following cycle,
// when 'host_ack' is high.  A start written to a busy channel is ignored;
// a start takes the other CTRL fields written with it.
//
// The document says only that the processor controls the coders through a
// register file by memory-mapped I/O; this register map is this design's.
module register_file #(
  parameter int NUM_CODERS = 4,
  parameter int PW         = 4,
  localparam int AW = $clog2(NUM_CODERS * 8)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host port
  input  logic          host_sel,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  logic [31:0]   host_wdata,
  output logic [31:0]   host_rdata,
  output logic          host_ack,
  // per-channel control
  output logic          ch_start      [NUM_CODERS],
  output logic [1:0]    ch_orient     [NUM_CODERS],
  output logic          ch_decode     [NUM_CODERS],
  output logic [PW-1:0] ch_dec_zp     [NUM_CODERS],
  output logic [31:0]   ch_cw_length  [NUM_CODERS],
  output logic [7:0]    ch_max_passes [NUM_CODERS],
  output logic [31:0]   ch_src        [NUM_CODERS],
  output logic [31:0]   ch_dst        [NUM_CODERS],
  input  logic          ch_busy       [NUM_CODERS],
  input  logic          ch_done       [NUM_CODERS],
  input  logic [PW-1:0] ch_zero_planes[NUM_CODERS],
  input  logic [7:0]    ch_passes     [NUM_CODERS],
  input  logic [31:0]   ch_length     [NUM_CODERS]
);
  logic [1:0]  orient_q [NUM_CODERS];
  logic [7:0]  maxp_q   [NUM_CODERS];
  logic [31:0] src_q    [NUM_CODERS];
  logic [31:0] dst_q    [NUM_CODERS];
  logic        done_q   [NUM_CODERS];
  logic        dec_q    [NUM_CODERS];
  logic [4:0]  zp_q     [NUM_CODERS];
  logic [31:0] len_q    [NUM_CODERS];

  int ch, rg;
  assign ch = int'(host_addr) / 8;
  assign rg = int'(host_addr) % 8;

  // a CTRL write that starts a channel also passes its own fields on
  logic ctrl_wr [NUM_CODERS];
  always_comb begin
    for (int c = 0; c < NUM_CODERS; c++) begin
      ctrl_wr[c]       = host_sel && host_we && (ch == c) && (rg == 0);
      ch_start[c]      = ctrl_wr[c] && host_wdata[0] && !ch_busy[c];
      ch_orient[c]     = ctrl_wr[c] ? host_wdata[2:1] : orient_q[c];
      ch_decode[c]     = ctrl_wr[c] ? host_wdata[3] : dec_q[c];
      ch_dec_zp[c]     = PW'(ctrl_wr[c] ? host_wdata[20:16] : zp_q[c]);
      ch_cw_length[c]  = len_q[c];
      ch_max_passes[c] = ctrl_wr[c] ? host_wdata[15:8] : maxp_q[c];
      ch_src[c]        = src_q[c];
      ch_dst[c]        = dst_q[c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CODERS; c++) begin
        orient_q[c] <= '0; maxp_q[c] <= '0; src_q[c] <= '0; dst_q[c] <= '0; done_q[c] <= 1'b0;
        dec_q[c] <= 1'b0; zp_q[c] <= '0; len_q[c] <= '0;
      end
      host_rdata <= '0;
      host_ack   <= 1'b0;
    end else begin
      host_ack <= host_sel;
      for (int c = 0; c < NUM_CODERS; c++) begin
        if (ch_done[c]) done_q[c] <= 1'b1;
        if (ch_start[c]) done_q[c] <= 1'b0;
      end
      if (host_sel && host_we && ch < NUM_CODERS) begin
        case (rg)
          0: begin
               orient_q[ch] <= host_wdata[2:1];
               dec_q[ch]    <= host_wdata[3];
               maxp_q[ch]   <= host_wdata[15:8];
               zp_q[ch]     <= host_wdata[20:16];
             end
          1: src_q[ch] <= host_wdata;
          2: dst_q[ch] <= host_wdata;
          4: len_q[ch] <= host_wdata;
          default: ;
        endcase
      end
      if (host_sel && !host_we) begin
        host_rdata <= '0;
        if (ch < NUM_CODERS) begin
          case (rg)
            0: host_rdata <= {11'd0, zp_q[ch], maxp_q[ch], 4'd0, dec_q[ch], orient_q[ch], 1'b0};
            1: host_rdata <= src_q[ch];
            2: host_rdata <= dst_q[ch];
            3: host_rdata <= {16'd0, ch_passes[ch], 4'(ch_zero_planes[ch]), 2'd0, done_q[ch], ch_busy[ch]};
            4: host_rdata <= ch_length[ch];
            default: ;
          endcase
        end
      end
    end
  end
endmodule
