// bus_arbiter - shares one system-bus master port among N DMA masters.
//
// Round-robin: when the port is free the first requesting master after the
// last one served is granted, and keeps the grant until its request is
// acknowledged.  The granted request is passed to the slave unchanged and
// the acknowledge and read data are routed back to it only; the other
// masters see no acknowledge.  A grant decision costs no cycle.
//
// The document shows the coders reaching system memory over the bus bridges
// but gives no arbitration scheme; round-robin is this design's choice.
module bus_arbiter
  import jp2k_pkg::*;
#(
  parameter int N = 8,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req [N],
  output bus_rsp_t m_rsp [N],
  output bus_req_t s_req,
  input  bus_rsp_t s_rsp
);
  logic [IW-1:0] last_q, owner_q, pick, sel;
  logic          locked_q, any;

  always_comb begin
    pick = last_q;
    any  = 1'b0;
    for (int k = N; k >= 1; k--)
      if (m_req[(int'(last_q) + k) % N].valid) begin
        pick = IW'((int'(last_q) + k) % N);
        any  = 1'b1;
      end
  end

  assign sel   = locked_q ? owner_q : pick;
  assign s_req = (locked_q || any) ? m_req[sel] : '0;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      m_rsp[i].rdata = s_rsp.rdata;
      m_rsp[i].ack   = s_rsp.ack && s_req.valid && (sel == IW'(i));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q <= IW'(N - 1); owner_q <= '0; locked_q <= 1'b0;
    end else if (s_req.valid) begin
      if (s_rsp.ack) begin
        locked_q <= 1'b0;
        last_q   <= sel;
      end else begin
        locked_q <= 1'b1;
        owner_q  <= sel;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   locked_q |-> m_req[owner_q].valid);
endmodule
