// block_dma_tb - a behavioural memory holds a 32x32 block of two's
// complement words, some beyond the 8-bit magnitude range; the DMA loads
// it and the testbench checks every (x, y, sign, magnitude) it delivers,
// including saturation, the done pulse, and, with a memory that always
// acknowledges, the rate of one sample per cycle.  A second run uses a
// memory that acknowledges at random.
module block_dma_tb;
  import jp2k_pkg::*;
  localparam int W = 32, H = 32, MB = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, ld_en, ld_sign;
  logic [31:0] src_addr = 0;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;
  logic [4:0] ld_x, ld_y;
  logic [MB-1:0] ld_mag;
  block_dma #(.BLK_W(W), .BLK_H(H), .MAG_BITS(MB)) dut (.*);

  int mem [int];
  bit ack_all;
  logic ack_en;
  always @(negedge clk) ack_en <= ack_all ? 1'b1 : 1'($urandom_range(0, 1));
  always_comb begin
    bus_rsp.ack = bus_req.valid && ack_en;
    bus_rsp.rdata = mem.exists(int'(bus_req.addr >> 2)) ? 32'(mem[int'(bus_req.addr >> 2)]) : 32'd0;
  end

  int checks = 0, failures = 0, loads, dones;
  int exp_s [H][W], exp_m [H][W];
  always @(posedge clk) if (rst_n) begin
    if (ld_en) begin
      loads++;
      checks++;
      if (ld_sign != 1'(exp_s[ld_y][ld_x]) || int'(ld_mag) != exp_m[ld_y][ld_x]) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) got %0d/%0d", ld_y, ld_x, ld_sign, ld_mag);
      end
    end
    if (done) dones++;
  end

  task automatic run(int base, bit all);
    int cyc;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = $urandom_range(0, 300) - 150;
        if (x == 3) v = -1000;
        mem[base / 4 + y * W + x] = v;
        exp_s[y][x] = (v < 0);
        exp_m[y][x] = (v < 0) ? -v : v;
        if (exp_m[y][x] > 255) exp_m[y][x] = 255;
      end
    ack_all = all; loads = 0; dones = 0;
    @(negedge clk) begin start = 1; src_addr = 32'(base); end
    @(negedge clk) start = 0;
    cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
    checks++; if (loads != W * H) begin failures++; $display("FAIL %0d loads", loads); end
    checks++; if (dones != 1) begin failures++; $display("FAIL %0d done pulses", dones); end
    if (all) begin
      checks++;
      if (cyc > W * H + 1) begin failures++; $display("FAIL %0d cycles", cyc); end
    end
    $display("%0d samples in %0d cycles", loads, cyc);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run('h4000, 1);
    run('h8000, 0);
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
