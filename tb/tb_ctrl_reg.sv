// tb_ctrl_reg: self-checking test of ctrl_reg, the Avalon MM slave register.
//
// Checks reset values, write/read-back of every register with the
// one-cycle read latency, base address word alignment, rounding of the
// burst count to 1/2/4, NUM_FRAMES 0 read as 1, the start pulse from a CTRL
// write and from the push-button input (ignored while busy), the stop
// request (set only while busy, dropped when the run ends), the sticky
// underflow flag with its write-1-to-clear, and the frame counter.
module tb_ctrl_reg;
  import dma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] avs_address = '0;
  logic avs_write = 0, avs_read = 0, ext_start = 0, busy = 0, underflow = 0, frame_shown = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic start, stop_req;
  dma_cfg_t cfg;
  int checks = 0, failures = 0, n_start = 0;

  ctrl_reg dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (start) n_start++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); avs_address = 3'(a); avs_writedata = d; avs_write = 1;
    @(negedge clk); avs_write = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); avs_address = 3'(a); avs_read = 1;
    @(negedge clk); avs_read = 0; d = avs_readdata;   // one cycle latency
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    rd(REG_IMG_SIZE, d);   check(d == 32'd614400, "reset image size = one 640x480x2 frame");
    rd(REG_BURST, d);      check(d == 4, "reset burst count 4");
    rd(REG_NUM_FRAMES, d); check(d == 1, "reset frames 1");
    rd(REG_CTRL, d);       check(d == 32'b0010, "reset CTRL: loop on, idle");
    wr(REG_BASE, 32'h0012_3457);      rd(REG_BASE, d);       check(d == 32'h0012_3454, "base word aligned");
    wr(REG_IMG_SIZE, 32'd2560);       rd(REG_IMG_SIZE, d);   check(d == 2560, "image size");
    wr(REG_NUM_FRAMES, 32'd3);        rd(REG_NUM_FRAMES, d); check(d == 3, "frames");
    wr(REG_NUM_FRAMES, 32'd0);        rd(REG_NUM_FRAMES, d); check(d == 1, "0 frames reads as 1");
    for (int b = 0; b < 8; b++) begin
      wr(REG_BURST, b); rd(REG_BURST, d);
      check(d == ((b >= 4) ? 4 : (b >= 2) ? 2 : 1), $sformatf("burst %0d -> %0d", b, d));
      check(cfg.burst == 3'(d), "cfg.burst follows register");
    end
    wr(REG_CTRL, 32'b0000); check(!cfg.loop, "loop off");
    check(n_start == 0, "no start from config writes");
    // start by register write
    @(negedge clk); avs_address = REG_CTRL; avs_writedata = 32'b0011; avs_write = 1;
    #1 check(start, "start pulse in the write cycle");
    @(negedge clk); avs_write = 0;
    check(n_start == 1 && cfg.loop, "one start, loop set");
    busy = 1;
    wr(REG_CTRL, 32'b0011); check(n_start == 1, "start ignored while busy");
    @(negedge clk); ext_start = 1; @(negedge clk); ext_start = 0;
    check(n_start == 1, "button ignored while busy");
    rd(REG_CTRL, d); check(d[CTRL_START] && !d[CTRL_STOP], "busy reads back");
    wr(REG_CTRL, 32'b0110); check(stop_req, "stop request while busy");
    rd(REG_CTRL, d); check(d[CTRL_STOP], "stop pending reads back");
    @(negedge clk); busy = 0; @(negedge clk);
    check(!stop_req, "stop request dropped after the run");
    wr(REG_CTRL, 32'b0100); check(!stop_req, "stop ignored while idle");
    @(negedge clk); ext_start = 1; #1 check(start, "button start"); @(negedge clk); ext_start = 0;
    check(n_start == 2, "button gave one start");
    // underflow and frame counter
    @(negedge clk); underflow = 1; @(negedge clk); underflow = 0;
    rd(REG_CTRL, d); check(d[CTRL_UFLOW], "underflow sticky");
    wr(REG_CTRL, 32'b1000); rd(REG_CTRL, d); check(!d[CTRL_UFLOW], "underflow cleared");
    repeat (5) begin @(negedge clk); frame_shown = 1; @(negedge clk); frame_shown = 0; end
    rd(REG_FRAMES_OUT, d); check(d == 5, $sformatf("frames shown %0d", d));
    @(negedge clk); ext_start = 1; @(negedge clk); ext_start = 0;
    rd(REG_FRAMES_OUT, d); check(d == 0, "frame counter cleared by start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
