// tb_dma_ctrl: self-checking test of dma_ctrl (control register, address
// generation, read control and data transfer together) against the SDRAM
// controller model, with 32-byte rows and 16-word FIFOs modelled by
// counters that drain at random.
//
// The host configures the slave (base, image size of 3 rows, 2 frames,
// burst count 4, loop off) and starts. Checks: no command is accepted while
// the SDRAM is still initialising; each accepted address is 16 above the
// previous one within the run, as in the burst-of-four reads; the stream
// carries exactly the 48 words of the two frames, in address order, with the
// FIFO select switching every row; the FIFO models never overflow; busy
// falls once all data has arrived. The run is repeated with burst count 2.
module tb_dma_ctrl;
  import dma_pkg::*;
  import tb_pkg::*;
  localparam int ROWB = 32, D32 = 16, ROWW = 8;
  logic clk = 0, rst_n = 0;
  logic [2:0] avs_address = '0;
  logic avs_write = 0, avs_read = 0, ext_start = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic [31:0] m_read_address, m_read_data;
  logic m_read_read, m_read_waitrequest, m_read_datavalid;
  logic [2:0] m_read_burstcnt;
  logic source_stream_valid, source_stream_sel;
  logic [31:0] source_stream_data;
  logic [1:0][$clog2(D32):0] free32;
  logic vga_running = 0, underflow = 0, frame_shown = 0;
  logic start, dma_active, data_pending, busy;
  int fill[2], checks = 0, failures = 0;

  dma_ctrl #(.ROW_BYTES(ROWB), .DEPTH32(D32), .IMG_SIZE_RST(32'(ROWB * 3))) dut (.*);
  sdram_model #(.INIT_CYCLES(60), .LATENCY(3), .GAP_PCT(10), .STALL_PCT(20)) mem (
    .clk, .rst_n, .address(m_read_address), .read(m_read_read), .burstcount(m_read_burstcnt),
    .waitrequest(m_read_waitrequest), .readdata(m_read_data), .readdatavalid(m_read_datavalid));
  always #5 clk = ~clk;

  assign free32[0] = ($clog2(D32)+1)'(D32 - fill[0]);
  assign free32[1] = ($clog2(D32)+1)'(D32 - fill[1]);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); avs_address = 3'(a); avs_writedata = d; avs_write = 1;
    @(negedge clk); avs_write = 0;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO models and stream checker
  int nword = 0, ncmd = 0;
  logic [31:0] base, last_addr;
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < 2; s++) if (fill[s] > 0 && ($urandom % 6 == 0)) fill[s] <= fill[s] - 1;
    if (source_stream_valid) begin
      check(source_stream_data == pattern(base + 32'(4 * nword)),
            $sformatf("word %0d: %h exp %h", nword, source_stream_data, pattern(base + 32'(4 * nword))));
      check(source_stream_sel == 1'((nword / ROWW) % 2), "FIFO select by row");
      check(fill[source_stream_sel] < D32, "FIFO overflow");
      fill[source_stream_sel] <= fill[source_stream_sel] + 1;
      nword++;
    end
    if (m_read_read && !m_read_waitrequest) begin
      check(mem.init_cnt >= 60, "command during SDRAM initialisation");
      if (ncmd > 0) check(m_read_address == last_addr + 32'(4 * m_read_burstcnt), "address step");
      last_addr = m_read_address;
      ncmd++;
    end
  end

  initial begin
    fill[0] = 0; fill[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    base = 32'h0000_0400;
    wr(REG_BASE, base);
    wr(REG_NUM_FRAMES, 2);
    wr(REG_BURST, 4);
    wr(REG_CTRL, 32'b0001);   // start, loop off
    @(negedge clk);
    check(busy, "busy after start");
    wait (!busy);
    check(nword == 2 * 3 * ROWW, $sformatf("words streamed %0d", nword));
    check(ncmd == 2 * 3 * ROWW / 4, $sformatf("commands %0d", ncmd));
    check(mem.n_init_stall_cycles > 0, "waited for SDRAM initialisation");
    // second run, burst count 2, other base
    nword = 0; ncmd = 0;
    base = 32'h0001_0000;
    wr(REG_BASE, base);
    wr(REG_BURST, 2);
    wr(REG_CTRL, 32'b0001);
    wait (!busy);
    check(nword == 2 * 3 * ROWW, "words streamed, burst 2");
    check(ncmd == 2 * 3 * ROWW / 2, "commands, burst 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
