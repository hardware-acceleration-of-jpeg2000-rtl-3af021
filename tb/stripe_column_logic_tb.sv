// stripe_column_logic_tb - runs the pass controller against behavioural
// data and state memories held in the testbench and compares its symbol
// stream (context label and bit, in order) with the software reference of
// the three coding passes.  The symbol sink stalls at random in most runs.
// With the sink always ready it also checks the cycle budget: one cycle
// per symbol plus at most one per stripe column per pass.  (Decoding
// mode is exercised with the real memories and MQ decoder in
// block_coder_tb; here it is off, and its write strobes must stay low.)
module stripe_column_logic_tb;
  import jp2k_pkg::*;
  import jp2k_ref_pkg::*;
  localparam int W = 32, H = 32, MB = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done;
  subband_e orient = SB_LL;
  logic [3:0] num_planes = 0, plane;
  logic [7:0] max_passes = 0, passes_coded;
  logic [2:0] stripe;
  logic [4:0] col;
  logic [3:0] mag_bits, sign_bits, visited, refined;
  logic [2:0] win_sig [6];
  logic [2:0] win_sgn [6];
  logic sm1_set_en, sm1_set_sign, sm2_set_visited, sm2_set_refined, sm2_clear_visited;
  logic [1:0] sm1_set_row, sm2_set_row;
  logic sym_valid, sym_ready;
  mq_sym_t sym;
  logic decode = 0, dec_bit = 0, dec_wr_sig, dec_wr_ref;
  logic [1:0] dec_wr_row;

  stripe_column_logic #(.BLK_W(W), .BLK_H(H), .MAG_BITS(MB)) dut (.*);

  int dec_strobes = 0;
  always @(posedge clk) if (dec_wr_sig || dec_wr_ref) dec_strobes++;

  // behavioural memories (padded by one sample on every side)
  int mg [H][W], sn [H][W];
  bit sg [H+2][W+2], ss [H+2][W+2], vs [H+2][W+2], rf [H+2][W+2];

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      mag_bits[r]  = 1'((mg[4*stripe+r][col] >> plane) & 1);
      sign_bits[r] = 1'(sn[4*stripe+r][col]);
      visited[r]   = vs[4*stripe+r+1][col+1];
      refined[r]   = rf[4*stripe+r+1][col+1];
    end
    for (int r = 0; r < 6; r++)
      for (int d = 0; d < 3; d++) begin
        win_sig[r][d] = sg[4*stripe+r][col+d];
        win_sgn[r][d] = sg[4*stripe+r][col+d] & ss[4*stripe+r][col+d];
      end
  end
  always @(posedge clk) begin
    if (sm1_set_en) begin sg[4*stripe+sm1_set_row+1][col+1] <= 1; ss[4*stripe+sm1_set_row+1][col+1] <= sm1_set_sign; end
    if (sm2_set_visited) vs[4*stripe+sm2_set_row+1][col+1] <= 1;
    if (sm2_set_refined) rf[4*stripe+sm2_set_row+1][col+1] <= 1;
    if (sm2_clear_visited) foreach (vs[i, j]) vs[i][j] <= 0;
  end

  int checks = 0, failures = 0;
  int got [$];
  bit stall_mode;
  always @(negedge clk) sym_ready <= stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
  always @(posedge clk) if (sym_valid && sym_ready) got.push_back(int'(sym.cx) * 2 + int'(sym.d));

  task automatic run_block(int dens, int maxmag, int o, int maxp, bit stall);
    ebcot_model e;
    int s_in [][];
    int m_in [][];
    int cyc;
    s_in = new[H]; m_in = new[H];
    foreach (s_in[y]) begin s_in[y] = new[W]; m_in[y] = new[W]; end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        sn[y][x] = $urandom_range(0, 1);
        mg[y][x] = ($urandom_range(0, 99) < dens) ? $urandom_range(0, maxmag) : 0;
        s_in[y][x] = sn[y][x]; m_in[y][x] = mg[y][x];
      end
    foreach (sg[i, j]) begin sg[i][j] = 0; ss[i][j] = 0; vs[i][j] = 0; rf[i][j] = 0; end
    e = new(W, H, o);
    e.run(s_in, m_in, maxp);
    got.delete();
    stall_mode = stall;
    @(negedge clk);
    orient = subband_e'(o); num_planes = 4'(e.nplanes); max_passes = 8'(maxp); start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (busy) begin @(negedge clk); cyc++; end
    checks++;
    if (got.size() != e.sym.size()) begin
      failures++; $display("FAIL %0d symbols, expected %0d", got.size(), e.sym.size());
    end
    for (int i = 0; i < got.size() && i < e.sym.size(); i++) begin
      checks++;
      if (got[i] != e.sym[i]) begin
        failures++;
        if (failures < 10) $display("FAIL symbol %0d: cx %0d d %0d, expected cx %0d d %0d", i, got[i]/2, got[i]%2, e.sym[i]/2, e.sym[i]%2);
      end
    end
    checks++;
    if (int'(passes_coded) != e.passes) begin failures++; $display("FAIL passes %0d expected %0d", passes_coded, e.passes); end
    if (!stall) begin
      checks++;
      if (cyc > e.sym.size() + e.passes * (W * H / 4) + 2) begin
        failures++; $display("FAIL cycle budget: %0d cycles", cyc);
      end
    end
    $display("block: %0d symbols, %0d passes, %0d cycles", e.sym.size(), e.passes, cyc);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_block(5, 255, 0, 0, 0);
    run_block(100, 255, 1, 0, 1);
    run_block(50, 31, 2, 0, 1);
    run_block(30, 255, 3, 0, 0);
    run_block(60, 255, 0, 4, 1);
    checks++;
    if (dec_strobes != 0) begin failures++; $display("FAIL decode strobes while encoding"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
