// state_mem2 - per-sample pass-membership and refinement state, read and
// written for the current stripe column only.
//
// Two bits per sample: 'visited' marks a sample already coded in the
// significance propagation pass of the current bit-plane (so that the
// magnitude refinement and cleanup passes skip it), and 'refined' marks a
// sample that was significant in an earlier bit-plane and has therefore
// already had a refinement bit coded (it selects the refinement context).
// Reads of the four samples of column 'col' in stripe 'stripe' are
// combinational; 'set_visited' / 'set_refined' set one row's bit at the clock
// edge.  'clear_visited' empties the membership bits at the end of a
// bit-plane; 'clear' empties both at the start of a code-block.
//
// The two bits and the current-column-only interface follow the document;
// reading its "significance from the previous plane" as the refinement
// history bit is this design's interpretation.
module state_mem2 #(
  parameter int BLK_W = 32,
  parameter int BLK_H = 32,
  localparam int NSTRIPES = (BLK_H + 3) / 4,
  localparam int XW = $clog2(BLK_W),
  localparam int SW = (NSTRIPES > 1) ? $clog2(NSTRIPES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          clear_visited,
  input  logic [SW-1:0] stripe,
  input  logic [XW-1:0] col,
  output logic [3:0]    visited,
  output logic [3:0]    refined,
  input  logic          set_visited,
  input  logic          set_refined,
  input  logic [1:0]    set_row
);
  localparam int DEPTH = NSTRIPES * BLK_W;
  logic [3:0] vis_q [DEPTH];
  logic [3:0] ref_q [DEPTH];
  int a;
  assign a = int'(stripe) * BLK_W + int'(col);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin vis_q[i] <= '0; ref_q[i] <= '0; end
    end else if (clear) begin
      for (int i = 0; i < DEPTH; i++) begin vis_q[i] <= '0; ref_q[i] <= '0; end
    end else begin
      if (clear_visited) for (int i = 0; i < DEPTH; i++) vis_q[i] <= '0;
      else if (set_visited) vis_q[a][set_row] <= 1'b1;
      if (set_refined) ref_q[a][set_row] <= 1'b1;
    end
  end

  assign visited = vis_q[a];
  assign refined = ref_q[a];
endmodule
