// tb_dma_controller_full: dma_controller at its default sizes (640x480 at
// 60 Hz, 2048-byte FIFOs, 50 MHz clock with a pixel every second clock)
// showing two whole frames stored back to back in SDRAM.
//
// The host sets base address, 2 frames, burst count 4 and loop off, and
// starts. The SDRAM controller model waits 5000 clocks for initialisation
// and stalls at random. Every accepted read must be a burst of four at the
// next 16-byte address, 80 per 1280-byte row, with four data words each. Every one of the 2 x 307200 visible pixels is
// compared with the stored image; the VGA checker verifies the 800-slot line
// and 525-line frame (hsync 96 slots, vsync 2 lines). The frame period must
// be 840000 clocks = 16.8 ms at 50 MHz, the 60 Hz rate. No pixel may be
// lost (underflow flag clear) and the run must end by itself.
module tb_dma_controller_full;
  import dma_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [2:0] avs_address = '0;
  logic avs_write = 0, avs_read = 0, ext_start = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic [31:0] m_read_address, m_read_data;
  logic m_read_read, m_read_waitrequest, m_read_datavalid;
  logic [2:0] m_read_burstcnt;
  logic pix_en, h_sync_out, v_sync_out, video_on, busy, underflow;
  logic [4:0] red, blue;
  logic [5:0] green;

  dma_controller dut (.*);

  sdram_model #(.INIT_CYCLES(5000), .LATENCY(5), .GAP_PCT(5), .STALL_PCT(10)) mem (
    .clk, .rst_n, .address(m_read_address), .read(m_read_read),
    .burstcount(m_read_burstcnt), .waitrequest(m_read_waitrequest), .readdata(m_read_data),
    .readdatavalid(m_read_datavalid));

  localparam logic [31:0] BASE = 32'h0010_0000;
  vga_monitor mon (
    .clk, .rst_n, .pix_en, .video_on, .red, .green, .blue, .h_sync_out, .v_sync_out,
    .base(BASE), .img_size(640 * 480 * 2), .num_frames(2), .check_en(1'b1), .restart(1'b0));

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0, n_uflow = 0;
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
    @(negedge clk); avs_read = 0; d = avs_readdata;
  endtask
  task automatic finish_tb();
    checks += mon.checks;
    failures += mon.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    finish_tb();
  end

  longint cyc = 0, vfall[$];
  logic vs_q = 1;
  int n_cmd = 0, n_beats = 0;
  logic [31:0] next_addr = BASE;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && m_read_read && !m_read_waitrequest) begin
      check(m_read_address == next_addr && m_read_burstcnt == 3'd4,
            $sformatf("command %0d: address %0d burst %0d, expected %0d burst 4",
                      n_cmd, m_read_address, m_read_burstcnt, next_addr));
      next_addr = m_read_address + 32'd16;
      n_cmd++;
    end
    if (rst_n && m_read_datavalid) n_beats++;
    if (underflow) n_uflow++;
    if (rst_n && !v_sync_out && vs_q) vfall.push_back(cyc);
    vs_q = v_sync_out;
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(REG_BASE, BASE);
    wr(REG_NUM_FRAMES, 2);
    wr(REG_BURST, 4);
    wr(REG_CTRL, 32'b0001);   // start, loop off
    @(negedge clk);
    check(busy, "busy after start");
    wait (!busy);
    check(mon.frames == 2, $sformatf("frames shown %0d", mon.frames));
    check(mon.pixels == 2 * 640 * 480, $sformatf("pixels shown %0d", mon.pixels));
    check(n_uflow == 0, $sformatf("lost pixels %0d", n_uflow));
    check(mem.n_init_stall_cycles > 0, "waited for SDRAM initialisation");
    check(n_cmd == 2 * 480 * 80, $sformatf("bursts %0d, expected 80 per 1280-byte row", n_cmd));
    check(n_beats == 4 * n_cmd, "four words per burst");
    check(vfall.size() == 2, $sformatf("two vsync pulses, got %0d", vfall.size()));
    if (vfall.size() == 2)
      check(vfall[1] - vfall[0] == 840000, $sformatf("frame period %0d clocks", vfall[1] - vfall[0]));
    rd(REG_FRAMES_OUT, d); check(d == 2, "frame counter");
    rd(REG_CTRL, d);       check(!d[CTRL_UFLOW], "underflow flag clear");
    $display("frame period %0d clocks, stalls %0d", (vfall.size() == 2) ? vfall[1] - vfall[0] : 0,
             mem.n_stall_cycles);
    finish_tb();
  end
endmodule
