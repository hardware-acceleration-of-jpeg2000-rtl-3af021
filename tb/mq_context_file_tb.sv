// mq_context_file_tb - checks the start state of all 19 contexts after
// reset and after 'init', and random writes read back through the
// combinational read port against a shadow copy.
module mq_context_file_tb;
  import jp2k_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, rd_mps, wr_en = 0, wr_mps = 0;
  logic [4:0] rd_cx = 0, wr_cx = 0;
  logic [5:0] rd_index, wr_index = 0;
  mq_context_file dut (.clk, .rst_n, .init, .rd_cx, .rd_index, .rd_mps, .wr_en, .wr_cx, .wr_index, .wr_mps);

  int checks = 0, failures = 0;
  int sh_i [19], sh_m [19];

  task automatic expect_start();
    for (int c = 0; c < 19; c++) begin
      int e;
      e = (c == 0) ? 4 : (c == 17) ? 3 : (c == 18) ? 46 : 0;
      rd_cx = 5'(c); #1;
      checks++;
      if (rd_index != 6'(e) || rd_mps != 0) begin
        failures++; $display("FAIL start state cx %0d: %0d/%0d", c, rd_index, rd_mps);
      end
      sh_i[c] = e; sh_m[c] = 0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_start();
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      wr_en = 1; wr_cx = 5'($urandom_range(0, 18)); wr_index = 6'($urandom_range(0, 46)); wr_mps = 1'($urandom);
      sh_i[wr_cx] = wr_index; sh_m[wr_cx] = wr_mps;
      @(negedge clk); wr_en = 0;
      rd_cx = 5'($urandom_range(0, 18)); #1;
      checks++;
      if (rd_index != 6'(sh_i[rd_cx]) || rd_mps != 1'(sh_m[rd_cx])) begin
        failures++; $display("FAIL read cx %0d", rd_cx);
      end
    end
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    expect_start();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
