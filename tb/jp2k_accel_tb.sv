// jp2k_accel_tb - end-to-end test of the accelerator at its default size
// (four coders, 32x32 blocks, 8 magnitude bits).
//
// A behavioural system memory answers the accelerator's bus port,
// acknowledging each request only on some cycles so that DMA transfers
// stall and the four channels contend for the bus.  The test writes
// code-blocks (two's complement words) into memory, programs every channel
// through the register file, starts them together, polls their status,
// and then compares each codeword in memory, its length, zero-plane and
// pass counts with the software reference.  Two rounds are run, covering
// sparse blocks (run mode), dense blocks, an all-zero block, each subband
// orientation, truncation and saturation of out-of-range samples.  It
// counts how often each mechanism happened and fails if one never did:
// bus contention, bus wait states, run-mode columns, broken runs,
// significance propagation, refinement, truncated codewords, symbol FIFO
// back-pressure from the MQ encoder and codeword back-pressure.
//
// After each encoding round the four codewords are decoded again, all four
// channels at once, from the memory the accelerator wrote them to, and
// the decoded blocks it writes back are compared with the original
// samples: exactly for complete codewords, down to the last coded plane
// for truncated ones.  Decoding waiting for codeword bytes from the bus is
// counted as a further mechanism.
module jp2k_accel_tb;
  import jp2k_pkg::*;
  import jp2k_ref_pkg::*;

  localparam int NC = 4, W = 32, H = 32, MB = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        host_sel, host_we, host_ack;
  logic [4:0]  host_addr;
  logic [31:0] host_wdata, host_rdata;
  bus_req_t    mem_req;
  bus_rsp_t    mem_rsp;

  jp2k_accel dut (.clk, .rst_n, .host_sel, .host_we, .host_addr, .host_wdata, .host_rdata,
                  .host_ack, .mem_req, .mem_rsp);

  // ---- behavioural system memory -------------------------------------------
  logic [31:0] mem [int];
  logic        ack_en;
  int          ack_pct = 60;
  always @(negedge clk) ack_en <= ($urandom_range(0, 99) < ack_pct);
  always_comb begin
    mem_rsp.ack   = mem_req.valid && ack_en;
    mem_rsp.rdata = (mem_req.valid && mem.exists(int'(mem_req.addr >> 2))) ? mem[int'(mem_req.addr >> 2)] : 32'd0;
  end
  always @(posedge clk) if (mem_req.valid && mem_rsp.ack && mem_req.we) mem[int'(mem_req.addr >> 2)] = mem_req.wdata;

  // ---- mechanism counters --------------------------------------------------
  int n_contend = 0, n_wait = 0, n_symstall = 0, n_cwstall = 0, n_bytewait = 0;
  always @(posedge clk) if (rst_n) begin
    int nreq;
    nreq = 0;
    for (int i = 0; i < 2 * NC; i++) nreq += int'(dut.m_req[i].valid);
    if (nreq > 1) n_contend++;
    if (mem_req.valid && !mem_rsp.ack) n_wait++;
    if (dut.g_coder[0].u_channel.u_block_coder.dec_q && dut.g_coder[0].u_channel.u_block_coder.busy &&
        !dut.g_coder[0].u_channel.cwi_valid) n_bytewait++;
    if (dut.g_coder[0].u_channel.u_block_coder.sym_valid && !dut.g_coder[0].u_channel.u_block_coder.sym_ready) n_symstall++;
    if (dut.g_coder[0].u_channel.u_block_coder.busy && !dut.g_coder[0].u_channel.u_block_coder.cw_ready) n_cwstall++;
    if (dut.g_coder[1].u_channel.u_block_coder.busy && !dut.g_coder[1].u_channel.u_block_coder.cw_ready) n_cwstall++;
    if (dut.g_coder[2].u_channel.u_block_coder.busy && !dut.g_coder[2].u_channel.u_block_coder.cw_ready) n_cwstall++;
    if (dut.g_coder[3].u_channel.u_block_coder.busy && !dut.g_coder[3].u_channel.u_block_coder.cw_ready) n_cwstall++;
  end

  int checks = 0, failures = 0;
  int n_runs = 0, n_breaks = 0, n_sp = 0, n_mr = 0, n_trunc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic host_write(int a, logic [31:0] d);
    @(negedge clk); host_sel = 1; host_we = 1; host_addr = 5'(a); host_wdata = d;
    @(negedge clk); host_sel = 0; host_we = 0;
  endtask

  task automatic host_read(int a, output logic [31:0] d);
    @(negedge clk); host_sel = 1; host_we = 0; host_addr = 5'(a);
    @(negedge clk); host_sel = 0;
    d = host_rdata;
    checks++;
    if (!host_ack) begin failures++; $display("FAIL no host ack"); end
  endtask

  // the last round's blocks and codewords, for decoding
  int          r_sg [NC][][];
  int          r_mg [NC][][];
  int          r_len [NC], r_zp [NC], r_np [NC], r_maxp [NC];

  // decode the last round's codewords on all channels at once
  task automatic decode_round();
    logic [31:0] st;
    for (int c = 0; c < NC; c++) begin
      host_write(8 * c + 1, 32'h10_0000 * (c + 1));
      host_write(8 * c + 2, 32'h80_0000 + 32'h1_0000 * c);
      host_write(8 * c + 4, 32'(r_len[c]));
    end
    for (int c = 0; c < NC; c++)
      host_write(8 * c + 0, {11'd0, 5'(r_zp[c]), 8'(r_np[c]), 4'd0, 1'b1, 2'(c), 1'b1});
    for (int c = 0; c < NC; c++) begin
      do host_read(8 * c + 3, st); while (!st[1]);
    end
    for (int c = 0; c < NC; c++) begin
      int lp, mask0, mask1, bad, np;
      np = MB - r_zp[c];
      lp = (np == 0) ? MB : np - 1 - (r_np[c] + 1) / 3;
      mask0 = 'hFF & ~((1 << lp) - 1);
      mask1 = 'hFF & ~((2 << lp) - 1);
      bad = 0;
      host_read(8 * c + 3, st);
      check(int'(st[15:8]) == r_np[c] || np == 0, $sformatf("ch%0d decoded passes %0d expected %0d", c, st[15:8], r_np[c]));
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int wa, v, m0, m1;
          wa = ((32'h80_0000 + 32'h1_0000 * c) >> 2) + y * W + x;
          v  = mem.exists(wa) ? int'(mem[wa]) : 32'h7FFF_FFFF;
          m0 = r_mg[c][y][x] & mask0;
          m1 = r_mg[c][y][x] & mask1;
          checks++;
          if (!(v == (r_sg[c][y][x] ? -m0 : m0) || (r_maxp[c] != 0 && v == (r_sg[c][y][x] ? -m1 : m1)))) begin
            failures++;
            if (bad++ < 5) $display("FAIL ch%0d decoded (%0d,%0d) = %0d, sample %s%0d", c, x, y, v,
                                    r_sg[c][y][x] ? "-" : "", r_mg[c][y][x]);
          end
        end
      $display("t=%0t channel %0d decoded %0d bytes, %0d passes", $time, c, r_len[c], r_np[c]);
    end
  endtask

  // one round: four blocks on four channels at once
  task automatic round(int dens [NC], int maxmag [NC], int maxp [NC]);
    int sg [NC][][];
    int mg [NC][][];
    byte unsigned exp_bytes [NC][$];
    int exp_zp [NC], exp_np [NC];
    logic [31:0] st;
    int cycles;
    for (int c = 0; c < NC; c++) begin
      ebcot_model e;
      mq_model m;
      int src, o;
      src = 'h1_0000 * (c + 1);
      sg[c] = new[H]; mg[c] = new[H];
      for (int y = 0; y < H; y++) begin
        sg[c][y] = new[W]; mg[c][y] = new[W];
        for (int x = 0; x < W; x++) begin
          int v;
          v = ($urandom_range(0, 99) < dens[c]) ? $urandom_range(0, maxmag[c]) : 0;
          if ($urandom_range(0, 1)) v = -v;
          mem[(src >> 2) + y * W + x] = 32'(v);
          sg[c][y][x] = (v < 0);
          mg[c][y][x] = (v < 0) ? -v : v;
          if (mg[c][y][x] > 255) mg[c][y][x] = 255;   // the DMA saturates
        end
      end
      o = c;
      e = new(W, H, o);
      e.run(sg[c], mg[c], maxp[c]);
      m = new();
      foreach (e.sym[i]) m.encode(e.sym[i] / 2, e.sym[i] % 2);
      if (e.sym.size() > 0) m.flush();
      exp_bytes[c] = m.out;
      exp_zp[c] = MB - e.nplanes;
      exp_np[c] = e.passes;
      r_sg[c] = sg[c]; r_mg[c] = mg[c];
      r_len[c] = m.out.size(); r_zp[c] = MB - e.nplanes; r_np[c] = e.passes; r_maxp[c] = maxp[c];
      n_runs += e.runs; n_breaks += e.run_breaks; n_sp += e.sym_sp; n_mr += e.sym_mr;
      if (maxp[c] != 0 && e.passes == maxp[c] && e.passes < 3 * e.nplanes - 2) n_trunc++;
      host_write(8 * c + 1, 32'(src));
      host_write(8 * c + 2, 32'h10_0000 * (c + 1));
      host_write(8 * c + 0, {16'd0, 8'(maxp[c]), 5'd0, 2'(o), 1'b0});
    end
    // start all channels
    for (int c = 0; c < NC; c++) host_write(8 * c + 0, {16'd0, 8'(maxp[c]), 5'd0, 2'(c), 1'b1});
    cycles = 0;
    for (int c = 0; c < NC; c++) begin
      do begin host_read(8 * c + 3, st); cycles++; end while (!st[1]);
    end
    for (int c = 0; c < NC; c++) begin
      logic [31:0] len;
      host_read(8 * c + 3, st);
      host_read(8 * c + 4, len);
      check(int'(len) == exp_bytes[c].size(), $sformatf("ch%0d length %0d expected %0d", c, len, exp_bytes[c].size()));
      check(int'(st[7:4]) == exp_zp[c], $sformatf("ch%0d zero planes %0d expected %0d", c, st[7:4], exp_zp[c]));
      check(int'(st[15:8]) == exp_np[c] || exp_zp[c] == MB, $sformatf("ch%0d passes %0d expected %0d", c, st[15:8], exp_np[c]));
      for (int i = 0; i < exp_bytes[c].size(); i++) begin
        logic [31:0] wd;
        int wa;
        wa = ('h10_0000 * (c + 1) >> 2) + i / 4;
        wd = mem.exists(wa) ? mem[wa] : 32'hDEAD_BEEF;
        check(wd[8*(i%4) +: 8] == exp_bytes[c][i],
              $sformatf("ch%0d byte %0d got %02x expected %02x", c, i, wd[8*(i%4) +: 8], exp_bytes[c][i]));
      end
      $display("t=%0t channel %0d: %0d bytes, %0d zero planes, %0d passes", $time, c, exp_bytes[c].size(), exp_zp[c], exp_np[c]);
    end
  endtask

  initial begin
    host_sel = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    round('{3, 100, 50, 0}, '{255, 400, 40, 0}, '{0, 0, 0, 0});
    decode_round();
    // slow the memory once the blocks are loaded: codeword writes back up
    fork begin repeat (7500) @(posedge clk); ack_pct = 3; end join_none
    round('{70, 10, 90, 30}, '{255, 255, 255, 60}, '{5, 0, 1, 0});
    ack_pct = 60;
    decode_round();
    $display("mechanisms: contention=%0d waits=%0d symstall=%0d cwstall=%0d bytewait=%0d runs=%0d breaks=%0d sp=%0d mr=%0d trunc=%0d",
             n_contend, n_wait, n_symstall, n_cwstall, n_bytewait, n_runs, n_breaks, n_sp, n_mr, n_trunc);
    check(n_bytewait > 0, "decoder never waited for codeword bytes");
    check(n_contend > 0, "no bus contention");
    check(n_wait > 0, "no bus wait state");
    check(n_symstall > 0, "no symbol back-pressure");
    check(n_cwstall > 0, "no codeword back-pressure");
    check(n_runs > 0 && n_breaks > 0, "no run mode / broken run");
    check(n_sp > 0 && n_mr > 0, "no SP or MR symbols");
    check(n_trunc > 0, "no truncated codeword");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (900000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
