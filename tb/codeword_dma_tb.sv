// codeword_dma_tb - streams random codewords of several lengths (including
// lengths that leave a partial last word, and zero) into the codeword DMA
// with random gaps, lets a behavioural memory acknowledge at random, and
// checks every stored byte (little-endian packing), the zero padding of
// the last word, the byte count and the done pulse.
module codeword_dma_tb;
  import jp2k_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, finish = 0, busy, done, in_valid = 0, in_ready;
  logic [31:0] dst_addr = 0, byte_count;
  logic [7:0] in_byte = 0;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;
  codeword_dma dut (.*);

  logic [31:0] mem [int];
  logic ack_en;
  always @(negedge clk) ack_en <= 1'($urandom_range(0, 2) != 0);
  assign bus_rsp.ack = bus_req.valid && ack_en;
  assign bus_rsp.rdata = '0;
  always @(posedge clk) if (bus_req.valid && bus_rsp.ack && bus_req.we) mem[int'(bus_req.addr >> 2)] = bus_req.wdata;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic run(int n, int base);
    byte unsigned b [$];
    int dones;
    mem.delete();
    for (int i = 0; i < n; i++) b.push_back(8'($urandom));
    @(negedge clk) begin start = 1; dst_addr = 32'(base); end
    @(negedge clk) start = 0;
    foreach (b[i]) begin
      in_valid = 1; in_byte = b[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk) in_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    finish = 1;
    @(negedge clk) finish = 0;
    dones = 0;
    while (busy) begin @(posedge clk); if (done) dones++; @(negedge clk); end
    chk(dones == 1, "one done pulse");
    chk(int'(byte_count) == n, $sformatf("byte count %0d expected %0d", byte_count, n));
    chk(mem.size() == (n + 3) / 4, $sformatf("%0d words written for %0d bytes", mem.size(), n));
    for (int i = 0; i < ((n + 3) / 4) * 4; i++) begin
      logic [31:0] w;
      w = mem.exists(base / 4 + i / 4) ? mem[base / 4 + i / 4] : 32'hFFFF_FFFF;
      chk(w[8*(i%4) +: 8] == ((i < n) ? b[i] : 8'h00), $sformatf("byte %0d", i));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1, 'h100);
    run(4, 'h200);
    run(0, 'h300);
    run(203, 'h1000);
    run(64, 'h2000);
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
