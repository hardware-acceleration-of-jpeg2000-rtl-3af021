// mq_encoder_tb - drives random symbol streams (skewed towards each
// context's MPS so that long MPS runs, LPS renormalisations, carries and
// 0xFF stuffing all occur) through the MQ encoder and its context file and
// compares every codeword byte with the software reference.  Runs several
// codewords, some with random byte back-pressure.  With the byte sink always
// ready it also checks the rate: at most one cycle per symbol plus one per
// codeword byte plus the flush.
module mq_encoder_tb;
  import jp2k_pkg::*;
  import jp2k_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init, sym_valid, sym_ready, flush_req, flush_done;
  mq_sym_t sym;
  logic [CX_W-1:0] ctx_rd_cx, ctx_wr_cx;
  logic [IDX_W-1:0] ctx_rd_index, ctx_wr_index;
  logic ctx_rd_mps, ctx_wr_en, ctx_wr_mps;
  logic byte_valid, byte_ready;
  logic [7:0] byte_data;

  mq_context_file u_cf (.clk, .rst_n, .init, .rd_cx(ctx_rd_cx), .rd_index(ctx_rd_index),
    .rd_mps(ctx_rd_mps), .wr_en(ctx_wr_en), .wr_cx(ctx_wr_cx), .wr_index(ctx_wr_index), .wr_mps(ctx_wr_mps));
  mq_encoder dut (.clk, .rst_n, .init, .sym_valid, .sym_ready, .sym, .flush_req, .flush_done,
    .ctx_rd_cx, .ctx_rd_index, .ctx_rd_mps, .ctx_wr_en, .ctx_wr_cx, .ctx_wr_index, .ctx_wr_mps,
    .byte_valid, .byte_data, .byte_ready);

  int checks = 0, failures = 0;
  byte unsigned got [$];
  logic bp_mode = 0;

  always @(posedge clk) if (rst_n && byte_valid && byte_ready) got.push_back(byte_data);
  always @(negedge clk) byte_ready <= bp_mode ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic run_codeword(int n, int skew, bit bp);
    mq_model m;
    int cx [$], d [$];
    int cyc;
    m = new();
    bp_mode = bp;
    for (int i = 0; i < n; i++) begin
      int c, v;
      c = $urandom_range(0, 18);
      v = ($urandom_range(0, 99) < skew) ? 0 : 1;
      if (c == 3) v = $urandom_range(0, 1);  // one context near 50 %
      cx.push_back(c); d.push_back(v);
      m.encode(c, v);
    end
    m.flush();
    got.delete();
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    cyc = 0;
    for (int i = 0; i < n; i++) begin
      sym_valid = 1; sym.cx = 5'(cx[i]); sym.d = d[i][0];
      @(posedge clk); cyc++;
      while (!sym_ready) begin @(posedge clk); cyc++; end
      #1;
    end
    sym_valid = 0;
    flush_req = 1;
    do begin @(posedge clk); cyc++; end while (!flush_done);
    #1 flush_req = 0;
    @(posedge clk);
    checks++;
    if (got.size() != m.out.size()) begin
      failures++;
      $display("FAIL length: got %0d bytes, expected %0d", got.size(), m.out.size());
    end
    for (int i = 0; i < got.size() && i < m.out.size(); i++) begin
      checks++;
      if (got[i] != m.out[i]) begin
        failures++;
        if (failures < 10) $display("FAIL byte %0d: got %02x expected %02x", i, got[i], m.out[i]);
      end
    end
    if (!bp) begin
      checks++;
      if (cyc > n + m.out.size() + 6) begin
        failures++;
        $display("FAIL rate: %0d cycles for %0d symbols and %0d bytes", cyc, n, m.out.size());
      end
      $display("codeword: %0d symbols, %0d bytes, %0d cycles", n, m.out.size(), cyc);
    end
  endtask

  initial begin
    init = 0; sym_valid = 0; flush_req = 0; sym = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_codeword(1, 50, 0);
    run_codeword(40, 50, 0);
    run_codeword(3000, 90, 0);
    run_codeword(3000, 99, 0);
    run_codeword(3000, 60, 1);
    for (int k = 0; k < 6; k++) run_codeword($urandom_range(10, 2000), $urandom_range(50, 99), k[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
