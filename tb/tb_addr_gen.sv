// tb_addr_gen: self-checking test of addr_gen with 32-byte rows (8 words)
// and 16-word FIFOs.
//
// The testbench plays the read control unit (random cmd_ready), the bus
// (words owed, drained at random; bus_quiet when none) and the two 32-bit
// FIFOs (filled by requested words of the row's set, drained slowly at
// random). Checks, for burst counts 4, 2 and 1: the exact address sequence
// (rows back to back, frames back to back, wrap to base), burst count on
// every command, row-to-set alternation, that a FIFO is never
// over-committed and that a row never starts while words are owed; the run
// end after num_frames frames with loop off; with loop on, the wrap to the
// base address and the end at a frame boundary after stop_req.
module tb_addr_gen;
  import dma_pkg::*;
  localparam int ROWB = 32, D32 = 16, ROWW = ROWB / 4;
  logic clk = 0, rst_n = 0, start = 0, stop_req = 0, bus_quiet, cmd_valid, cmd_ready = 0;
  logic row_set, active;
  dma_cfg_t cfg;
  logic [1:0][$clog2(D32):0] free32;
  logic [31:0] cmd_addr;
  logic [2:0] cmd_burst;
  int fill[2], owed = 0, checks = 0, failures = 0, n_blocked = 0;
  logic [31:0] exp_addr[$];

  addr_gen #(.ROW_BYTES(ROWB), .DEPTH32(D32)) dut (.*);
  always #5 clk = ~clk;

  assign bus_quiet = (owed == 0);
  assign free32[0] = ($clog2(D32)+1)'(D32 - fill[0]);
  assign free32[1] = ($clog2(D32)+1)'(D32 - fill[1]);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus, FIFO and read-control stand-ins
  int words_in_row = 0, row_count = 0;
  logic cur_set = 0;
  always @(posedge clk) begin
    if (dut.state == 2'd1 && owed == 0 && free32[dut.row_set] < ROWW) n_blocked++;
    if (owed > 0 && ($urandom % 2 == 0)) owed <= owed - 1;
    for (int s = 0; s < 2; s++) if (fill[s] > 0 && ($urandom % 8 == 0)) fill[s] <= fill[s] - 1;
    if (cmd_valid && cmd_ready) begin
      if (words_in_row == 0) check(owed == 0, "row started while words were owed");
      check(cmd_burst == cfg.burst, "burst count");
      check(row_set == cur_set, "row set");
      if (exp_addr.size() > 0) begin
        check(cmd_addr == exp_addr[0], $sformatf("address %0h exp %0h", cmd_addr, exp_addr[0]));
        void'(exp_addr.pop_front());
      end else check(0, $sformatf("unexpected command at %0h", cmd_addr));
      owed <= owed + int'(cmd_burst);
      fill[row_set] <= fill[row_set] + int'(cmd_burst);
      check(fill[row_set] + int'(cmd_burst) <= D32, "FIFO over-committed");
      words_in_row = words_in_row + int'(cmd_burst);
      if (words_in_row == ROWW) begin words_in_row = 0; cur_set = !cur_set; row_count++; end
    end
  end
  always @(negedge clk) cmd_ready = ($urandom % 3 != 0);

  task automatic expect_frames(input logic [31:0] base, input int f0, input int nf, input int rows, input int b);
    for (int f = f0; f < f0 + nf; f++)
      for (int r = 0; r < rows; r++)
        for (int w = 0; w < ROWW; w += b) exp_addr.push_back(base + 32'(f * rows * ROWB + r * ROWB + w * 4));
  endtask

  task automatic run_and_wait();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    check(active, "active after start");
    wait (!active);
    wait (owed == 0);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    fill[0] = 0; fill[1] = 0;
    cfg = '{base_addr: 32'h0000_1000, img_size: 32'(3 * ROWB), num_frames: 16'd2, burst: 3'd4, loop: 1'b0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 4; b >= 1; b /= 2) begin
      cfg.burst = 3'(b);
      cur_set = 0;
      expect_frames(cfg.base_addr, 0, 2, 3, b);
      run_and_wait();
      check(exp_addr.size() == 0, $sformatf("burst %0d: all %0d commands issued", b, 2 * 3 * ROWW / b));
    end
    // loop on: frames 0,1,0,1,... then stop at the end of a frame
    cfg.burst = 3'd4; cfg.loop = 1; cur_set = 0; row_count = 0;
    cfg.base_addr = 32'h0002_0000;
    expect_frames(cfg.base_addr, 0, 2, 3, 4);
    expect_frames(cfg.base_addr, 0, 1, 3, 4);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (row_count == 7);   // inside the wrapped frame 0
    stop_req = 1;
    wait (!active);
    stop_req = 0;
    check(row_count == 9, $sformatf("stopped at frame end after %0d rows", row_count));
    check(exp_addr.size() == 0, "wrap to base address");
    check(n_blocked > 0, "row start was held for FIFO space");
    $display("blocked cycles %0d", n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
