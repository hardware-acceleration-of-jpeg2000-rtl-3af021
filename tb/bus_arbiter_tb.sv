// bus_arbiter_tb - four masters issue random read and write requests
// (each held until acknowledged) to a behavioural memory that acknowledges
// at random.  Checks that every request is served exactly once and reaches
// memory unchanged, that reads return the right data to the right master,
// that a master keeps the grant while waiting, that no master goes unserved
// while others are served repeatedly (round-robin), and that the arbiter
// adds no idle cycle when the memory always acknowledges.
module bus_arbiter_tb;
  import jp2k_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t m_req [N];
  bus_rsp_t m_rsp [N];
  bus_req_t s_req;
  bus_rsp_t s_rsp;
  bus_arbiter #(.N(N)) dut (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp);

  logic [31:0] mem [int];
  logic ack_en;
  bit   ack_all = 0;
  always @(negedge clk) ack_en <= ack_all ? 1'b1 : 1'($urandom_range(0, 1));
  assign s_rsp.ack = s_req.valid && ack_en;
  assign s_rsp.rdata = mem.exists(int'(s_req.addr)) ? mem[int'(s_req.addr)] : 32'(s_req.addr) ^ 32'hA5A5_0000;
  always @(posedge clk) if (s_req.valid && s_rsp.ack && s_req.we) mem[int'(s_req.addr)] = s_req.wdata;

  int checks = 0, failures = 0;
  int served [N], max_wait;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // master i: its own address range, writes then reads back
  task automatic master(int i, int n);
    for (int k = 0; k < n; k++) begin
      int wait_c;
      logic [31:0] a, d;
      a = 32'(i * 'h1000 + k);
      d = $urandom;
      m_req[i] = '{valid: 1'b1, we: 1'b1, addr: a, wdata: d};
      wait_c = 0;
      @(posedge clk);
      while (!m_rsp[i].ack) begin wait_c++; @(posedge clk); end
      if (wait_c > max_wait) max_wait = wait_c;
      #1 m_req[i] = '{valid: 1'b1, we: 1'b0, addr: a, wdata: 32'd0};
      @(posedge clk);
      while (!m_rsp[i].ack) @(posedge clk);
      chk(m_rsp[i].rdata == d, $sformatf("master %0d read %h expected %h", i, m_rsp[i].rdata, d));
      served[i]++;
      #1 m_req[i] = '0;
    end
  endtask

  // the granted master must hold a request; only it may be acknowledged
  always @(posedge clk) if (rst_n) begin
    int acks;
    acks = 0;
    for (int i = 0; i < N; i++) if (m_rsp[i].ack) begin
      acks++;
      checks++;
      if (!m_req[i].valid || s_req != m_req[i]) begin failures++; $display("FAIL ack to master %0d without its request", i); end
    end
    checks++;
    if (acks != int'(s_rsp.ack)) begin failures++; $display("FAIL %0d acks for one", acks); end
  end

  initial begin
    int busy_c;
    foreach (m_req[i]) m_req[i] = '0;
    max_wait = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      master(0, 50); master(1, 50); master(2, 50); master(3, 50);
    join
    foreach (served[i]) chk(served[i] == 50, "all requests served");
    chk(max_wait < 40, $sformatf("longest wait %0d cycles", max_wait));
    // throughput: two masters, memory always ready: one transfer per cycle
    ack_all = 1;
    @(negedge clk);
    busy_c = 0;
    fork
      master(0, 20); master(1, 20);
      begin repeat (100) begin @(posedge clk); if (s_req.valid && s_rsp.ack) busy_c++; end end
    join
    chk(busy_c >= 80, $sformatf("%0d transfers in 100 cycles", busy_c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
