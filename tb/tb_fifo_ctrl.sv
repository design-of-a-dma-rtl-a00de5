// tb_fifo_ctrl: self-checking test of fifo_ctrl (two FIFO sets, row by row).
//
// Writes rows of ROW_W words, alternating wr_sel per row, and reads rows of
// 2*ROW_W pixels, alternating rd_sel per line, as the DMA and VGA sides do.
// The pixels read must follow the written rows in order, lower half first.
// Checks that a write goes only to the selected set (free32/count16 of the
// other set unchanged) and that both head outputs show their own set.
module tb_fifo_ctrl;
  localparam int D32 = 16, D16 = 32, ROW_W = 8;
  logic clk = 0, rst_n = 0, clear = 0;
  logic wr_valid = 0, wr_sel = 0, rd_sel = 0, rd_pop = 0;
  logic [31:0] wr_data = '0;
  logic [1:0][$clog2(D32):0] free32;
  logic [15:0] rd_data, f_ff_out_data_16, s_ff_out_data_16;
  logic rd_empty;
  logic [1:0][$clog2(D16):0] count16;
  logic [15:0] exp_q[2][$];
  int checks = 0, failures = 0;

  fifo_ctrl #(.DEPTH32(D32), .DEPTH16(D16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer: rows alternate between the sets
  initial begin
    int row = 0;
    wait (rst_n);
    while (row < 60) begin
      @(negedge clk);
      wr_valid = 0;
      if (free32[wr_sel] >= ROW_W) begin
        for (int w = 0; w < ROW_W; w++) begin
          wr_valid = 1;
          wr_data  = {8'(row), 8'(w), 16'($urandom)};
          exp_q[wr_sel].push_back(wr_data[15:0]);
          exp_q[wr_sel].push_back(wr_data[31:16]);
          @(negedge clk);
        end
        wr_valid = 0;
        wr_sel   = !wr_sel;
        row++;
      end
    end
    wr_valid = 0;
  end

  initial begin
    int line = 0, px = 0;
    logic [$clog2(D32):0] other_free;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (line < 60) begin
      @(negedge clk);
      rd_pop = 0;
      check(f_ff_out_data_16 == dut.g_set[0].u_set.pix_data, "head 0");
      if (!rd_empty && ($urandom % 3 != 0)) begin
        check(rd_data == exp_q[rd_sel][0],
              $sformatf("line %0d px %0d: %h exp %h", line, px, rd_data, exp_q[rd_sel][0]));
        void'(exp_q[rd_sel].pop_front());
        rd_pop = 1;
        px++;
        if (px == 2 * ROW_W) begin px = 0; line++; end
      end
      other_free = free32[!wr_sel];
      @(posedge clk);
      #1;
      if (wr_valid) check(free32[!wr_sel] >= other_free, "write reached the other set");
      if (rd_pop && px == 0) rd_sel = !rd_sel;
    end
    check(rd_empty && count16[0] == 0 && count16[1] == 0, "all rows read");
    check(s_ff_out_data_16 == dut.g_set[1].u_set.pix_data, "head 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
