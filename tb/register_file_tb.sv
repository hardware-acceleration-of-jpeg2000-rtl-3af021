// register_file_tb - writes and reads back the control registers of each
// channel, checks the one-cycle start pulse (and that a busy channel
// ignores it), the sticky done bit cleared by the next start, the status
// and length fields, the host acknowledge and unmapped words reading 0.
module register_file_tb;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic host_sel = 0, host_we = 0, host_ack;
  logic [4:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic ch_start [NC];
  logic [1:0] ch_orient [NC];
  logic [7:0] ch_max_passes [NC];
  logic [31:0] ch_src [NC], ch_dst [NC];
  logic ch_busy [NC], ch_done [NC];
  logic [3:0] ch_zero_planes [NC];
  logic [7:0] ch_passes [NC];
  logic [31:0] ch_length [NC];
  logic ch_decode [NC];
  logic [3:0] ch_dec_zp [NC];
  logic [31:0] ch_cw_length [NC];
  register_file #(.NUM_CODERS(NC), .PW(4)) dut (.*);

  int checks = 0, failures = 0, starts [NC];
  always @(posedge clk) for (int c = 0; c < NC; c++) if (ch_start[c]) starts[c]++;
  // fields seen by a channel at its start
  logic [1:0] st_orient; logic st_decode; logic [3:0] st_zp; logic [7:0] st_maxp;
  always @(posedge clk) if (ch_start[2]) begin
    st_orient = ch_orient[2]; st_decode = ch_decode[2]; st_zp = ch_dec_zp[2]; st_maxp = ch_max_passes[2];
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); host_sel = 1; host_we = 1; host_addr = 5'(a); host_wdata = d;
    @(negedge clk); host_sel = 0; host_we = 0;
  endtask
  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); host_sel = 1; host_we = 0; host_addr = 5'(a);
    @(negedge clk); host_sel = 0;
    chk(host_ack, "ack");
    d = host_rdata;
  endtask

  initial begin
    logic [31:0] d;
    for (int c = 0; c < NC; c++) begin
      ch_busy[c] = 0; ch_done[c] = 0; ch_zero_planes[c] = 4'(c); ch_passes[c] = 8'(10 + c);
      ch_length[c] = 32'(1000 * c + 7); starts[c] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++) begin
      wr(8*c+1, 32'h1000_0000 + c); wr(8*c+2, 32'h2000_0000 + c);
      wr(8*c+0, {16'd0, 8'(3 + c), 5'd0, 2'(c), 1'b0});
    end
    for (int c = 0; c < NC; c++) begin
      rd(8*c+1, d); chk(d == 32'h1000_0000 + c, "src");
      rd(8*c+2, d); chk(d == 32'h2000_0000 + c, "dst");
      rd(8*c+0, d); chk(d == {16'd0, 8'(3 + c), 5'd0, 2'(c), 1'b0}, "ctrl");
      chk(ch_src[c] == 32'h1000_0000 + c && ch_dst[c] == 32'h2000_0000 + c, "outputs");
      chk(ch_orient[c] == 2'(c) && ch_max_passes[c] == 8'(3 + c), "fields");
      rd(8*c+4, d); chk(d == 32'(1000 * c + 7), "length");
      rd(8*c+6, d); chk(d == 0, "unmapped");
    end
    chk(starts[1] == 0, "no start yet");
    wr(8*1+0, 32'h1);
    chk(starts[1] == 1 && starts[0] == 0 && starts[2] == 0, "one start pulse on channel 1");
    ch_busy[1] = 1;
    wr(8*1+0, 32'h1);
    chk(starts[1] == 1, "busy channel ignores start");
    rd(8*1+3, d); chk(d[0] == 1 && d[1] == 0, "busy status");
    @(negedge clk) begin ch_done[1] = 1; ch_busy[1] = 0; end
    @(negedge clk) ch_done[1] = 0;
    rd(8*1+3, d);
    chk(d == {16'd0, 8'd11, 4'd1, 2'd0, 1'b1, 1'b0}, $sformatf("done status %h", d));
    rd(8*1+3, d); chk(d[1] == 1, "done sticky");
    wr(8*1+0, 32'h1);
    rd(8*1+3, d); chk(d[1] == 0, "done cleared by start");
    // decoding fields, codeword length, and fields written with the start
    wr(8*2+4, 32'd1234);
    chk(ch_cw_length[2] == 32'd1234, "codeword length output");
    wr(8*2+0, {11'd0, 5'd6, 8'd17, 4'd0, 1'b1, 2'd3, 1'b0});
    rd(8*2+0, d); chk(d == {11'd0, 5'd6, 8'd17, 4'd0, 1'b1, 2'd3, 1'b0}, $sformatf("decode ctrl %h", d));
    chk(ch_decode[2] == 1 && ch_dec_zp[2] == 4'd6, "decode outputs");
    wr(8*2+0, {11'd0, 5'd2, 8'd9, 4'd0, 1'b0, 2'd1, 1'b1});
    chk(starts[2] == 1, "start on channel 2");
    chk(st_orient == 2'd1 && st_decode == 0 && st_zp == 4'd2 && st_maxp == 8'd9,
        "start uses the fields written with it");
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
