// sample_store_tb - serves the unit's read-out port from a behavioural
// block of sign-magnitude samples (including the largest magnitude and
// negative zero, which must be stored as 0), acknowledges its writes at
// random, and checks that every sample lands as a two's complement word
// at its row-major address, that nothing else is written, and that 'done'
// pulses once, with the last write.  With an always-acknowledging bus it
// also checks the rate of one sample per cycle.
module sample_store_tb;
  import jp2k_pkg::*;
  localparam int W = 16, H = 8, MB = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, rd_sign;
  logic [31:0] dst_addr;
  logic [3:0] rd_x;
  logic [2:0] rd_y;
  logic [MB-1:0] rd_mag;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;

  sample_store #(.BLK_W(W), .BLK_H(H), .MAG_BITS(MB)) dut (.*);

  int sgn [H][W], mag [H][W];
  assign rd_sign = 1'(sgn[rd_y][rd_x]);
  assign rd_mag  = MB'(mag[rd_y][rd_x]);

  logic [31:0] mem [int];
  int ack_pct;
  logic ack_en;
  always @(negedge clk) ack_en <= ($urandom_range(0, 99) < ack_pct);
  assign bus_rsp.ack   = bus_req.valid && ack_en;
  assign bus_rsp.rdata = '0;
  int writes = 0, reads = 0, dones = 0;
  always @(posedge clk) if (bus_rsp.ack) begin
    if (bus_req.we) begin mem[int'(bus_req.addr >> 2)] = bus_req.wdata; writes++; end
    else reads++;
  end
  always @(posedge clk) if (done) begin
    dones++;
    if (!(bus_rsp.ack && bus_req.addr == dst_addr + 4 * (W * H - 1))) dones += 100;
  end

  int checks = 0, failures = 0;

  task automatic run(int pct);
    int cyc;
    ack_pct = pct;
    mem.delete(); writes = 0; reads = 0; dones = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        sgn[y][x] = $urandom_range(0, 1);
        mag[y][x] = ($urandom_range(0, 5) == 0) ? 0 : ($urandom_range(0, 5) == 0) ? 255 : $urandom_range(0, 255);
      end
    dst_addr = 32'h8000 + 32'h100 * $urandom_range(0, 7);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int a, e;
        a = int'(dst_addr >> 2) + y * W + x;
        e = sgn[y][x] ? -mag[y][x] : mag[y][x];
        checks++;
        if (!mem.exists(a) || int'(mem[a]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) got %0d expected %0d", x, y,
                                      mem.exists(a) ? int'(mem[a]) : -99999, e);
        end
      end
    checks++;
    if (writes != W * H || reads != 0) begin failures++; $display("FAIL %0d writes %0d reads", writes, reads); end
    checks++;
    if (dones != 1) begin failures++; $display("FAIL done pulses/placement %0d", dones); end
    if (pct == 100) begin
      checks++;
      if (cyc > W * H + 2) begin failures++; $display("FAIL rate: %0d cycles", cyc); end
    end
  endtask

  initial begin
    start = 0; dst_addr = 0; ack_pct = 100;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(100);
    run(30);
    run(70);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
