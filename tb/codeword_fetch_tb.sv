// codeword_fetch_tb - places codewords of several lengths (including 0
// and lengths that end mid-word) in a behavioural memory that acknowledges
// at random, fetches them with a byte sink that also stalls at random, and
// checks the byte stream: the codeword bytes in order, then only 0xFF.
// The 'stop' input arrives at random times, sometimes while a read is
// outstanding; the unit must then finish that read (the bus rule) and go
// idle, and a following start must work.
module codeword_fetch_tb;
  import jp2k_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, stop, busy, out_valid, out_ready;
  logic [31:0] src_addr, length;
  logic [7:0] out_byte;
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;

  codeword_fetch dut (.*);

  logic [31:0] mem [int];
  logic ack_en, held;
  always @(negedge clk) begin
    ack_en <= ($urandom_range(0, 2) == 0);
    out_ready <= ($urandom_range(0, 3) != 0);
  end
  assign bus_rsp.ack   = bus_req.valid && ack_en;
  assign bus_rsp.rdata = mem.exists(int'(bus_req.addr >> 2)) ? mem[int'(bus_req.addr >> 2)] : 32'hBAD0_BAD0;

  int checks = 0, failures = 0, dropped = 0, stop_pending = 0;
  // a request, once raised, stays until acknowledged
  always @(posedge clk) if (rst_n) begin
    if (held && !bus_req.valid) dropped++;
    held <= bus_req.valid && !bus_rsp.ack;
  end

  byte unsigned got [$];
  always @(posedge clk) if (out_valid && out_ready) got.push_back(out_byte);

  task automatic run(int len, int extra);
    int base;
    byte unsigned cw [$];
    base = 'h4000 + 'h1000 * $urandom_range(0, 15);
    for (int i = 0; i < len; i++) cw.push_back(byte'($urandom));
    for (int w = 0; w < (len + 3) / 4 + 1; w++) mem[(base >> 2) + w] = $urandom;
    for (int i = 0; i < len; i++) mem[(base >> 2) + i / 4][8 * (i % 4) +: 8] = cw[i];
    got.delete();
    @(negedge clk); start = 1; src_addr = 32'(base); length = 32'(len);
    @(negedge clk); start = 0;
    while (got.size() < len + extra) @(negedge clk);
    // mid-codeword stops wait for the next read to be raised
    if (extra < 0) while (!bus_req.valid) @(negedge clk);
    // stop, possibly while a read is pending
    if (bus_req.valid) stop_pending++;
    stop = 1;
    @(negedge clk); stop = 0;
    while (busy) @(negedge clk);
    checks++;
    if (got.size() < len + extra) begin failures++; $display("FAIL short stream"); end
    for (int i = 0; i < got.size(); i++) begin
      checks++;
      if (got[i] != ((i < len) ? cw[i] : 8'hFF)) begin
        failures++;
        if (failures < 10) $display("FAIL len %0d byte %0d got %02x expected %02x", len, i, got[i],
                                    (i < len) ? cw[i] : 8'hFF);
      end
    end
  endtask

  initial begin
    start = 0; stop = 0; src_addr = 0; length = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 5);
    run(1, 3);
    run(7, 2);
    run(64, 6);
    for (int k = 0; k < 20; k++) run($urandom_range(1, 300), $urandom_range(0, 6));
    // stop in the middle of a codeword, with reads still to come
    for (int k = 0; k < 10; k++) run(200, -$urandom_range(10, 190));
    checks++;
    if (dropped != 0) begin failures++; $display("FAIL read request dropped %0d times", dropped); end
    checks++;
    if (stop_pending == 0) begin failures++; $display("FAIL stop never met a pending read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
