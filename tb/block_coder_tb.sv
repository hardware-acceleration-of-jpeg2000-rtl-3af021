// block_coder_tb - loads random code-blocks into the block coder, codes
// them and compares the codeword byte for byte with the software reference
// (coding passes followed by MQ encoding).  The blocks cover all four
// subband orientations, sparse blocks (cleanup run mode, broken runs),
// dense blocks, an all-zero block, small magnitudes (skipped zero planes)
// and truncation after a given number of passes.  Also checks the
// reported zero-plane and pass counts.
//
// Each codeword is then decoded by the same block coder, after the sample
// memories have been overwritten with random data, and the decoded samples
// are read out: a complete codeword must give back every sample exactly;
// a truncated one must give each magnitude's bits down to the last coded
// plane (or the one above, for samples that pass did not reach) with the
// right sign, and zero elsewhere.  The codeword bytes are offered with
// random gaps, followed by 0xFF fill.
module block_coder_tb;
  import jp2k_pkg::*;
  import jp2k_ref_pkg::*;

  localparam int W = 32, H = 32, MB = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_en, ld_sign, start, busy, done, cw_valid, cw_ready;
  logic [4:0] ld_x, ld_y;
  logic [MB-1:0] ld_mag;
  subband_e orient;
  logic [7:0] max_passes, passes_coded;
  logic [3:0] zero_planes;
  logic [7:0] cw_byte;
  logic decode, cwi_valid, cwi_ready, rd_sign;
  logic [3:0] dec_zero_planes;
  logic [7:0] cwi_byte;
  logic [4:0] rd_x, rd_y;
  logic [MB-1:0] rd_mag;

  block_coder dut (.clk, .rst_n, .ld_en, .ld_x, .ld_y, .ld_sign, .ld_mag, .start, .decode,
    .dec_zero_planes, .orient,
    .max_passes, .busy, .done, .zero_planes, .passes_coded, .cw_valid, .cw_byte, .cw_ready,
    .cwi_valid, .cwi_byte, .cwi_ready, .rd_x, .rd_y, .rd_sign, .rd_mag);

  // codeword source for decoding
  byte unsigned cwin [$];
  int cw_ptr = 0;
  always @(negedge clk) cwi_valid <= ($urandom_range(0, 5) != 0);
  assign cwi_byte = (cw_ptr < cwin.size()) ? cwin[cw_ptr] : 8'hFF;
  always @(posedge clk) if (cwi_valid && cwi_ready) cw_ptr <= cw_ptr + 1;

  int checks = 0, failures = 0;
  int n_runs = 0, n_breaks = 0, n_sp = 0, n_mr = 0, n_trunc = 0;
  byte unsigned got [$];
  always @(posedge clk) if (rst_n && cw_valid && cw_ready) got.push_back(cw_byte);
  always @(negedge clk) cw_ready <= ($urandom_range(0, 7) != 0);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic code_block(int density, int maxmag, int o, int maxp);
    int sg [][];
    int mg [][];
    ebcot_model e;
    mq_model m;
    int cyc;
    sg = new[H]; mg = new[H];
    foreach (sg[y]) begin sg[y] = new[W]; mg[y] = new[W]; end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        sg[y][x] = $urandom_range(0, 1);
        mg[y][x] = ($urandom_range(0, 99) < density) ? $urandom_range(0, maxmag) : 0;
        // smooth-ish: fade magnitudes towards the right edge
        if (x > 24 && density > 50) mg[y][x] = mg[y][x] >> 3;
      end
    e = new(W, H, o);
    e.run(sg, mg, maxp);
    m = new();
    foreach (e.sym[i]) m.encode(e.sym[i] / 2, e.sym[i] % 2);
    if (e.sym.size() > 0) m.flush();
    n_runs += e.runs; n_breaks += e.run_breaks; n_sp += e.sym_sp; n_mr += e.sym_mr;
    if (maxp != 0 && e.passes == maxp && e.passes < 3 * e.nplanes - 2) n_trunc++;
    // load
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        ld_en = 1; ld_x = 5'(x); ld_y = 5'(y); ld_sign = sg[y][x][0]; ld_mag = MB'(mg[y][x]);
      end
    @(negedge clk) ld_en = 0;
    got.delete();
    orient = subband_e'(o); max_passes = 8'(maxp); start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    check(got.size() == m.out.size(), $sformatf("length got %0d expected %0d", got.size(), m.out.size()));
    for (int i = 0; i < got.size() && i < m.out.size(); i++)
      check(got[i] == m.out[i], $sformatf("byte %0d got %02x expected %02x", i, got[i], m.out[i]));
    check(int'(zero_planes) == MB - e.nplanes, $sformatf("zero planes %0d expected %0d", zero_planes, MB - e.nplanes));
    check(int'(passes_coded) == e.passes || e.nplanes == 0, $sformatf("passes %0d expected %0d", passes_coded, e.passes));
    $display("block o=%0d dens=%0d planes=%0d passes=%0d symbols=%0d bytes=%0d cycles=%0d (%.2f samples/cycle)",
             o, density, e.nplanes, e.passes, e.sym.size(), m.out.size(), cyc, real'(W*H)/real'(cyc));
    decode_block(sg, mg, o, MB - e.nplanes, e.nplanes, e.passes, maxp, m.out);
  endtask

  task automatic decode_block(int sg [][], int mg [][], int o, int zp, int np, int passes, int maxp,
                              byte unsigned cw [$]);
    int cyc, lp, mask0, mask1, bad;
    // scramble the sample memories
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        ld_en = 1; ld_x = 5'(x); ld_y = 5'(y); ld_sign = 1'($urandom); ld_mag = MB'($urandom);
      end
    @(negedge clk) ld_en = 0;
    cwin = cw; cw_ptr = 0;
    orient = subband_e'(o); max_passes = 8'(maxp); dec_zero_planes = 4'(zp); decode = 1; start = 1;
    @(negedge clk) start = 0; decode = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    check(int'(passes_coded) == passes || np == 0, $sformatf("decode passes %0d expected %0d", passes_coded, passes));
    // lowest plane reached by the last pass
    lp = (np == 0) ? MB : np - 1 - (passes + 1) / 3;
    mask0 = 'hFF & ~((1 << lp) - 1);
    mask1 = 'hFF & ~((2 << lp) - 1);
    bad = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        rd_x = 5'(x); rd_y = 5'(y);
        #1;
        checks++;
        if (!((int'(rd_mag) == (mg[y][x] & mask0)) ||
              (maxp != 0 && int'(rd_mag) == (mg[y][x] & mask1))) ||
            (rd_mag != 0 && int'(rd_sign) != sg[y][x]) || (rd_mag == 0 && rd_sign)) begin
          failures++;
          if (bad++ < 5) $display("FAIL decoded (%0d,%0d): %0d/%0d expected %0d/%0d",
                                  x, y, rd_sign, rd_mag, sg[y][x], mg[y][x]);
        end
      end
    $display("  decoded in %0d cycles (%.2f samples/cycle), %0d bytes read", cyc, real'(W*H)/real'(cyc), cw_ptr);
  endtask

  initial begin
    ld_en = 0; start = 0; decode = 0; dec_zero_planes = 0; rd_x = 0; rd_y = 0; orient = SB_LL; max_passes = 0; ld_x = 0; ld_y = 0; ld_sign = 0; ld_mag = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    code_block(0, 0, 0, 0);        // all zero
    code_block(3, 255, 0, 0);      // sparse, run mode
    code_block(100, 255, 1, 0);    // dense HL
    code_block(60, 15, 2, 0);      // small magnitudes LH
    code_block(40, 255, 3, 0);     // HH
    code_block(80, 255, 0, 7);     // truncated after 7 passes
    code_block(20, 100, 1, 1);     // only the first cleanup pass
    check(n_runs > 0 && n_breaks > 0 && n_sp > 0 && n_mr > 0 && n_trunc > 0,
          $sformatf("mechanisms runs=%0d breaks=%0d sp=%0d mr=%0d trunc=%0d", n_runs, n_breaks, n_sp, n_mr, n_trunc));
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
