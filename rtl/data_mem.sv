// data_mem - code-block sample memory read one stripe column at a time.
//
// The block is BLK_W samples wide and BLK_H high and is scanned in stripes
// four rows high.  The memory is split into four banks, one per row within a
// stripe, each holding one WIDTH-bit word per stripe column, so that a read
// returns the four samples of column 'rd_col' in stripe 'rd_stripe' at once.
// Writes store one sample at (wr_x, wr_y), as a DMA unit delivers them.
// Reads are combinational; writes take effect at the clock edge.
//
// The block coder uses two of these: one WIDTH=1 instance for the sign
// plane (Data Memory 1) and one holding all magnitude bit-planes of a sample
// (Data Memory 2), from which the coder selects the current plane.  The
// split into sign and magnitude memories and the column-at-a-time output
// follow the document; the four-bank layout is this design's choice.
module data_mem #(
  parameter int BLK_W = 32,
  parameter int BLK_H = 32,
  parameter int WIDTH = 8,
  localparam int NSTRIPES = (BLK_H + 3) / 4,
  localparam int XW = $clog2(BLK_W),
  localparam int YW = $clog2(BLK_H),
  localparam int SW = (NSTRIPES > 1) ? $clog2(NSTRIPES) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [XW-1:0]    wr_x,
  input  logic [YW-1:0]    wr_y,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [SW-1:0]    rd_stripe,
  input  logic [XW-1:0]    rd_col,
  output logic [WIDTH-1:0] rd_data [4]
);
  localparam int DEPTH = NSTRIPES * BLK_W;

  logic [WIDTH-1:0] bank0 [DEPTH];
  logic [WIDTH-1:0] bank1 [DEPTH];
  logic [WIDTH-1:0] bank2 [DEPTH];
  logic [WIDTH-1:0] bank3 [DEPTH];

  logic [$clog2(DEPTH)-1:0] wa, ra;
  assign wa = ($clog2(DEPTH))'(32'(wr_y >> 2) * BLK_W + 32'(wr_x));
  assign ra = ($clog2(DEPTH))'(32'(rd_stripe) * BLK_W + 32'(rd_col));

  always_ff @(posedge clk) begin
    if (wr_en) begin
      case (wr_y[1:0])
        2'd0: bank0[wa] <= wr_data;
        2'd1: bank1[wa] <= wr_data;
        2'd2: bank2[wa] <= wr_data;
        default: bank3[wa] <= wr_data;
      endcase
    end
  end

  assign rd_data[0] = bank0[ra];
  assign rd_data[1] = bank1[ra];
  assign rd_data[2] = bank2[ra];
  assign rd_data[3] = bank3[ra];
endmodule
