// mq_decoder_tb - encodes random symbol streams (skewed towards each
// context's MPS, one context near 50 %) with the software reference
// encoder, then feeds the codeword bytes, followed by 0xFF fill, to the
// MQ decoder and its context file, requesting the same context sequence.
// Every decoded symbol must equal the encoded one.  Some codewords are fed
// with random gaps in the byte stream and random gaps between requests.
// Without gaps it also checks the rate: at most one cycle per symbol plus
// one per codeword byte plus a few for start-up.
module mq_decoder_tb;
  import jp2k_pkg::*;
  import jp2k_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init, req_valid, req_ready, dec_bit;
  logic [CX_W-1:0] req_cx;
  logic in_valid, in_ready;
  logic [7:0] in_byte;
  logic [CX_W-1:0] ctx_rd_cx, ctx_wr_cx;
  logic [IDX_W-1:0] ctx_rd_index, ctx_wr_index;
  logic ctx_rd_mps, ctx_wr_en, ctx_wr_mps;

  mq_context_file u_cf (.clk, .rst_n, .init, .rd_cx(ctx_rd_cx), .rd_index(ctx_rd_index),
    .rd_mps(ctx_rd_mps), .wr_en(ctx_wr_en), .wr_cx(ctx_wr_cx), .wr_index(ctx_wr_index), .wr_mps(ctx_wr_mps));
  mq_decoder dut (.clk, .rst_n, .init, .req_valid, .req_cx, .req_ready, .dec_bit,
    .in_valid, .in_byte, .in_ready,
    .ctx_rd_cx, .ctx_rd_index, .ctx_rd_mps, .ctx_wr_en, .ctx_wr_cx, .ctx_wr_index, .ctx_wr_mps);

  int checks = 0, failures = 0;
  byte unsigned cw [$];
  int rd_ptr;
  logic gaps = 0;

  // byte source: codeword, then 0xFF for ever
  always @(negedge clk) in_valid <= gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
  assign in_byte = (rd_ptr < cw.size()) ? cw[rd_ptr] : 8'hFF;
  always @(posedge clk) if (in_valid && in_ready) rd_ptr <= rd_ptr + 1;

  task automatic run_codeword(int n, int skew, bit g);
    mq_model m;
    int cx [$], d [$];
    int cyc;
    m = new();
    gaps = g;
    for (int i = 0; i < n; i++) begin
      int c, v;
      c = $urandom_range(0, 18);
      v = ($urandom_range(0, 99) < skew) ? 0 : 1;
      if (c == 3) v = $urandom_range(0, 1);
      cx.push_back(c); d.push_back(v);
      m.encode(c, v);
    end
    m.flush();
    cw = m.out;
    rd_ptr = 0;
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    cyc = 0;
    for (int i = 0; i < n; i++) begin
      if (g) while ($urandom_range(0, 3) == 0) begin @(negedge clk); cyc++; end
      req_valid = 1; req_cx = 5'(cx[i]);
      #1;
      while (!req_ready) begin @(negedge clk); cyc++; #1; end
      checks++;
      if (dec_bit !== d[i][0]) begin
        failures++;
        if (failures < 10) $display("FAIL symbol %0d of %0d (cx %0d): got %b expected %0d", i, n, cx[i], dec_bit, d[i]);
      end
      @(negedge clk); cyc++;
      req_valid = 0;
    end
    if (!g) begin
      checks++;
      if (cyc > n + cw.size() + 6) begin
        failures++;
        $display("FAIL rate: %0d cycles for %0d symbols and %0d bytes", cyc, n, cw.size());
      end
      $display("codeword: %0d symbols, %0d bytes, %0d cycles", n, cw.size(), cyc);
    end
  endtask

  initial begin
    init = 0; req_valid = 0; req_cx = '0;
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
