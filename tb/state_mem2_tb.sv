// state_mem2_tb - sets random visited and refined bits and reads every
// column back against a shadow copy; checks that 'clear_visited' empties
// only the visited bits and 'clear' both.
module state_mem2_tb;
  localparam int W = 16, H = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, clear_visited = 0, set_visited = 0, set_refined = 0;
  logic [1:0] stripe = 0, set_row = 0;
  logic [3:0] col = 0, visited, refined;
  state_mem2 #(.BLK_W(W), .BLK_H(H)) dut (.clk, .rst_n, .clear, .clear_visited, .stripe, .col,
    .visited, .refined, .set_visited, .set_refined, .set_row);
  int checks = 0, failures = 0;
  bit v [H][W], rf [H][W];

  task automatic check_all();
    for (int s = 0; s < H / 4; s++)
      for (int x = 0; x < W; x++) begin
        stripe = 2'(s); col = 4'(x); #1;
        for (int r = 0; r < 4; r++) begin
          checks++;
          if (visited[r] != v[4*s+r][x] || refined[r] != rf[4*s+r][x]) begin
            failures++;
            if (failures < 10) $display("FAIL s%0d x%0d r%0d", s, x, r);
          end
        end
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 150; k++) begin
      @(negedge clk);
      stripe = 2'($urandom); col = 4'($urandom); set_row = 2'($urandom);
      set_visited = 1'($urandom); set_refined = 1'($urandom);
      if (set_visited) v[4*stripe+set_row][col] = 1;
      if (set_refined) rf[4*stripe+set_row][col] = 1;
      @(negedge clk) begin set_visited = 0; set_refined = 0; end
    end
    check_all();
    @(negedge clk) clear_visited = 1;
    @(negedge clk) clear_visited = 0;
    foreach (v[i, j]) v[i][j] = 0;
    check_all();
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    foreach (rf[i, j]) rf[i][j] = 0;
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
