// data_mem_tb - writes a random 32x32 block of 8-bit samples in random
// order and reads every stripe column back, comparing the four rows of
// each column with the written values.
module data_mem_tb;
  localparam int W = 32, H = 32, WD = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [4:0] wr_x = 0, wr_y = 0, rd_col = 0;
  logic [2:0] rd_stripe = 0;
  logic [WD-1:0] wr_data = 0;
  logic [WD-1:0] rd_data [4];
  data_mem #(.BLK_W(W), .BLK_H(H), .WIDTH(WD)) dut (.clk, .wr_en, .wr_x, .wr_y, .wr_data, .rd_stripe, .rd_col, .rd_data);

  int checks = 0, failures = 0;
  int ref_m [H][W];
  int order [W*H];

  initial begin
    foreach (order[i]) order[i] = i;
    order.shuffle();
    foreach (order[i]) begin
      @(negedge clk);
      wr_en = 1; wr_x = 5'(order[i] % W); wr_y = 5'(order[i] / W); wr_data = WD'($urandom);
      ref_m[wr_y][wr_x] = int'(wr_data);
    end
    @(negedge clk) wr_en = 0;
    for (int s = 0; s < H / 4; s++)
      for (int x = 0; x < W; x++) begin
        rd_stripe = 3'(s); rd_col = 5'(x); #1;
        for (int r = 0; r < 4; r++) begin
          checks++;
          if (int'(rd_data[r]) != ref_m[4*s+r][x]) begin
            failures++;
            if (failures < 10) $display("FAIL (%0d,%0d) got %0d expected %0d", 4*s+r, x, rd_data[r], ref_m[4*s+r][x]);
          end
        end
      end
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
