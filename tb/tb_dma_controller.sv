// tb_dma_controller: end-to-end test of dma_controller with a reduced screen
// (32x6 visible pixels, short porches) and reduced FIFOs (32 words / 64
// pixels per set), against the SDRAM controller model and the VGA checker.
//
// Runs, each configured over the Avalon slave like a host would:
//  1. burst 4, 2 frames, loop off: every visible pixel of both frames is
//     compared, the run must end by itself, no underflow;
//  2. burst 2, started by the push-button input, 1 frame;
//  3. burst 1, 3 frames, loop on: after 4 frames (so the sequence wrapped
//     to the base address) a stop request ends the run at a frame end;
//  4. the bus is throttled (waitrequest forced high most of the time) so the
//     FIFOs run dry: the underflow flag must be set, then cleared by a write.
// Mechanisms counted, each must occur at least once: SDRAM initialisation
// wait, waitrequest stall, FIFO-space hold of a row, FIFO set switch on the
// VGA side, each burst count 1/2/4, loop wrap, stop at frame end, button
// start, underflow. The frame counter register is checked after each run.
module tb_dma_controller;
  import dma_pkg::*;
  import tb_pkg::*;
  localparam int HA = 32, HF = 2, HS = 4, HB = 2, VA = 6, VF = 1, VS = 1, VB = 2;
  localparam int D32 = 32, D16 = 64, ROWB = 2 * HA, IMG = ROWB * VA;

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
  logic mem_wr, throttle = 0;

  dma_controller #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
                   .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB),
                   .CLKS_PER_PIXEL(2), .DEPTH32(D32), .DEPTH16(D16)) dut (.*);

  sdram_model #(.INIT_CYCLES(100), .LATENCY(4), .GAP_PCT(10), .STALL_PCT(15)) mem (
    .clk, .rst_n, .address(m_read_address), .read(m_read_read && !throttle),
    .burstcount(m_read_burstcnt), .waitrequest(mem_wr), .readdata(m_read_data),
    .readdatavalid(m_read_datavalid));
  assign m_read_waitrequest = mem_wr || throttle;

  logic [31:0] base = '0;
  int nframes = 1;
  logic check_en = 1, restart = 0;
  vga_monitor #(.H_ACTIVE(HA), .H_TOTAL(HA + HF + HS + HB), .H_SYNC(HS),
                .V_ACTIVE(VA), .V_TOTAL(VA + VF + VS + VB), .V_SYNC(VS)) mon (
    .clk, .rst_n, .pix_en, .video_on, .red, .green, .blue, .h_sync_out, .v_sync_out,
    .base, .img_size(IMG), .num_frames(nframes), .check_en, .restart);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    finish_tb();
  end

  // mechanism counters
  int n_space_hold = 0, n_set_switch = 0, n_uflow = 0, n_wrap = 0;
  int n_burst[5];
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dma_ctrl.u_addr_gen.state == 2'd1 && dut.u_dma_ctrl.bus_quiet &&
        dut.free32[dut.u_dma_ctrl.u_addr_gen.row_set] < D32'(HA / 2)) n_space_hold++;
    if (dut.u_vga_ctrl.last_vis) n_set_switch++;
    if (underflow) n_uflow++;
    if (m_read_read && !m_read_waitrequest) begin
      n_burst[m_read_burstcnt]++;
      if (m_read_address == base && dut.u_dma_ctrl.u_addr_gen.frame_off == 0 &&
          mon.frames > 0) n_wrap++;
    end
  end

  task automatic start_run(input logic [31:0] b, input int nf, input int burst, input bit loop,
                           input bit by_button);
    base = b; nframes = nf;
    wr(REG_BASE, b);
    wr(REG_NUM_FRAMES, nf);
    wr(REG_BURST, burst);
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    if (by_button) begin
      wr(REG_CTRL, {30'd0, loop, 1'b0});
      @(negedge clk); ext_start = 1; @(negedge clk); ext_start = 0;
    end else wr(REG_CTRL, {30'd0, loop, 1'b1});
    @(negedge clk);
    check(busy, "busy after start");
  endtask

  initial begin
    logic [31:0] d;
    foreach (n_burst[i]) n_burst[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(REG_IMG_SIZE, IMG);
    // 1: two frames, burst 4
    start_run(32'h0000_1000, 2, 4, 0, 0);
    wait (!busy);
    check(mon.frames == 2, $sformatf("run 1: frames shown %0d", mon.frames));
    rd(REG_FRAMES_OUT, d); check(d == 2, "run 1: frame counter");
    rd(REG_CTRL, d);       check(!d[CTRL_UFLOW] && !d[CTRL_START], "run 1: idle, no underflow");
    // 2: button start, burst 2, one frame
    start_run(32'h0004_0000, 1, 2, 0, 1);
    wait (!busy);
    check(mon.frames == 1, $sformatf("run 2: frames shown %0d", mon.frames));
    // 3: loop over 3 frames, burst 1, stop after the wrap
    start_run(32'h0008_0000, 3, 1, 1, 0);
    wait (mon.frames == 4);
    wr(REG_CTRL, 32'b0110);
    rd(REG_CTRL, d); check(d[CTRL_STOP], "run 3: stop pending");
    wait (!busy);
    check(mon.frames >= 5 && mon.frames <= 6, $sformatf("run 3: stopped after %0d frames", mon.frames));
    rd(REG_FRAMES_OUT, d); check(d == 32'(mon.frames), "run 3: frame counter");
    rd(REG_CTRL, d); check(!d[CTRL_UFLOW], "run 3: no underflow");
    check(n_uflow == 0, "no underflow in runs 1-3");
    // 4: starve the FIFOs
    check_en = 0;
    start_run(32'h000C_0000, 1, 4, 0, 0);
    fork
      forever begin @(negedge clk); throttle = ($urandom % 100) < 97; end
    join_none
    wait (!busy);
    disable fork;
    throttle = 0;
    rd(REG_CTRL, d); check(d[CTRL_UFLOW], "run 4: underflow flag set");
    wr(REG_CTRL, 32'b1000);
    rd(REG_CTRL, d); check(!d[CTRL_UFLOW], "run 4: underflow flag cleared");
    // mechanisms
    $display("init wait %0d, stalls %0d, space holds %0d, set switches %0d, bursts 1/2/4 %0d/%0d/%0d, wraps %0d, underflows %0d",
             mem.n_init_stall_cycles, mem.n_stall_cycles, n_space_hold, n_set_switch,
             n_burst[1], n_burst[2], n_burst[4], n_wrap, n_uflow);
    check(mem.n_init_stall_cycles > 0, "SDRAM initialisation wait happened");
    check(mem.n_stall_cycles > mem.n_init_stall_cycles, "waitrequest stalls happened");
    check(n_space_hold > 0, "row held for FIFO space");
    check(n_set_switch > 0, "FIFO set switch happened");
    check(n_burst[1] > 0 && n_burst[2] > 0 && n_burst[4] > 0, "all burst counts used");
    check(n_wrap > 0, "frame sequence wrapped to base");
    check(n_uflow > 0, "underflow provoked");
    check(mon.pixels > 0, "pixels shown");
    finish_tb();
  end
endmodule
