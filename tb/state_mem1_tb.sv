// state_mem1_tb - makes random samples significant with random signs and
// checks the 6x3 significance and sign windows of every stripe column
// against a padded shadow array (positions outside the block insignificant),
// then checks that 'clear' empties the memory.
module state_mem1_tb;
  localparam int W = 16, H = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, set_en = 0, set_sign = 0;
  logic [1:0] stripe = 0, set_row = 0;
  logic [3:0] col = 0;
  logic [2:0] win_sig [6];
  logic [2:0] win_sgn [6];
  state_mem1 #(.BLK_W(W), .BLK_H(H)) dut (.clk, .rst_n, .clear, .stripe, .col, .win_sig, .win_sgn,
                                          .set_en, .set_row, .set_sign);
  int checks = 0, failures = 0;
  int sg [H+2][W+2], sn [H+2][W+2];

  task automatic check_all();
    for (int s = 0; s < H / 4; s++)
      for (int x = 0; x < W; x++) begin
        stripe = 2'(s); col = 4'(x); #1;
        for (int r = 0; r < 6; r++)
          for (int d = 0; d < 3; d++) begin
            int yy, xx;
            yy = 4 * s + r; xx = x + d;   // padded coordinates
            checks++;
            if (win_sig[r][d] != 1'(sg[yy][xx]) || win_sgn[r][d] != 1'(sg[yy][xx] & sn[yy][xx])) begin
              failures++;
              if (failures < 10) $display("FAIL s%0d x%0d r%0d d%0d", s, x, r, d);
            end
          end
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all();
    for (int k = 0; k < 120; k++) begin
      @(negedge clk);
      stripe = 2'($urandom_range(0, H/4-1)); col = 4'($urandom_range(0, W-1));
      set_row = 2'($urandom); set_sign = 1'($urandom); set_en = 1;
      sg[4*stripe + set_row + 1][col + 1] = 1;
      sn[4*stripe + set_row + 1][col + 1] = set_sign;
      @(negedge clk) set_en = 0;
    end
    check_all();
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    foreach (sg[i, j]) sg[i][j] = 0;
    check_all();
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
