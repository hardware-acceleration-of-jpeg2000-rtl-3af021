// sync_fifo - small synchronous first-in first-out buffer.
//
// Holds up to DEPTH entries of type T.  Writing with in_valid while
// in_ready is high stores an entry; out_valid/out_data present the oldest
// entry, removed when out_ready is high.  Both sides use a valid/ready
// handshake and may transfer in the same cycle.  'clear' empties it.  Used
// to decouple the coding-pass controller from the MQ encoder (which stalls
// while renormalising) and to buffer codeword bytes before the bus.
module sync_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic empty
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  T             mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic [AW:0]   cnt_q;
  logic          push, pop;

  assign in_ready  = (int'(cnt_q) < DEPTH);
  assign out_valid = (cnt_q != '0);
  assign empty     = (cnt_q == '0);
  assign out_data  = mem[rd_q];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q <= '0; wr_q <= '0; cnt_q <= '0;
    end else if (clear) begin
      rd_q <= '0; wr_q <= '0; cnt_q <= '0;
    end else begin
      if (push) wr_q <= inc(wr_q);
      if (pop)  rd_q <= inc(rd_q);
      cnt_q <= cnt_q + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) if (push) mem[wr_q] <= in_data;

endmodule
