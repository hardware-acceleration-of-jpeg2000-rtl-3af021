// mq_context_file - the MQ coder's context state file.
//
// Holds, for each of the 19 context labels, the index (0..46) into the
// probability state table and the current most-probable-symbol value.  Read
// is combinational, so the coder can fetch the state of a context, code the
// symbol and write back the new state in the same clock cycle.  A write
// updates one context.  'init' returns every context to its JPEG2000 start
// state (context 0 to state 4, the run context to 3, the uniform context to
// 46, all others to 0, MPS 0); it is pulsed at the start of each code-block
// so that encoder and decoder begin from the same estimates.
//
// The document gives the file's contents (47x2 states per context, 19
// labels, prescribed transition table); the register organisation is this
// design's choice.
module mq_context_file
  import jp2k_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic [CX_W-1:0]  rd_cx,
  output logic [IDX_W-1:0] rd_index,
  output logic             rd_mps,
  input  logic             wr_en,
  input  logic [CX_W-1:0]  wr_cx,
  input  logic [IDX_W-1:0] wr_index,
  input  logic             wr_mps
);
  logic [IDX_W-1:0] index_q [NUM_CX];
  logic             mps_q   [NUM_CX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CX; i++) begin
        index_q[i] <= cx_init_index(i);
        mps_q[i]   <= 1'b0;
      end
    end else if (init) begin
      for (int i = 0; i < NUM_CX; i++) begin
        index_q[i] <= cx_init_index(i);
        mps_q[i]   <= 1'b0;
      end
    end else if (wr_en && int'(wr_cx) < NUM_CX) begin
      index_q[wr_cx] <= wr_index;
      mps_q[wr_cx]   <= wr_mps;
    end
  end

  always_comb begin
    if (int'(rd_cx) < NUM_CX) begin
      rd_index = index_q[rd_cx];
      rd_mps   = mps_q[rd_cx];
    end else begin
      rd_index = '0;
      rd_mps   = 1'b0;
    end
  end
endmodule
