// tb_read_ctrl: self-checking test of read_ctrl against the SDRAM
// controller model.
//
// Phase 1 (slave with an initialisation wait, random stalls and data gaps):
// 200 commands with random addresses and burst counts 1/2/4 must each
// appear on the bus exactly once and in order, be held while waitrequest is
// high, and produce exactly the requested number of data beats; bus_quiet
// must be low while any beat is owed and high at the end.
// Phase 2 (no stalls, no gaps): 64 back-to-back bursts of four must finish
// in 4 clocks per burst plus the latency, i.e. one 16-byte burst accepted
// every 4 clocks with read kept high.
module tb_read_ctrl;
  import dma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, bus_quiet;
  logic [31:0] cmd_addr = '0, m_read_address, rdata;
  logic [2:0] cmd_burst = 3'd4, m_read_burstcnt;
  logic m_read_read, wr1, dv1, wr2, dv2, m_read_waitrequest, m_read_datavalid;
  logic [31:0] rd1, rd2;
  logic phase2 = 0;
  int checks = 0, failures = 0;

  read_ctrl dut (.*);
  sdram_model #(.INIT_CYCLES(30), .LATENCY(3), .GAP_PCT(20), .STALL_PCT(30)) slow (
    .clk, .rst_n(rst_n && !phase2), .address(m_read_address), .read(m_read_read && !phase2),
    .burstcount(m_read_burstcnt), .waitrequest(wr1), .readdata(rd1), .readdatavalid(dv1));
  sdram_model #(.INIT_CYCLES(0), .LATENCY(2)) fast (
    .clk, .rst_n(rst_n && phase2), .address(m_read_address), .read(m_read_read && phase2),
    .burstcount(m_read_burstcnt), .waitrequest(wr2), .readdata(rd2), .readdatavalid(dv2));
  assign m_read_waitrequest = phase2 ? wr2 : wr1;
  assign m_read_datavalid   = phase2 ? dv2 : dv1;
  assign rdata              = phase2 ? rd2 : rd1;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus monitor
  logic [34:0] exp_cmd[$];
  int beats_exp = 0, beats_got = 0, n_wait = 0;
  logic held = 0;
  logic [31:0] held_addr;
  always @(posedge clk) if (rst_n) begin
    if (held) check(m_read_read && m_read_address == held_addr, "command held while waitrequest high");
    held = m_read_read && m_read_waitrequest;
    held_addr = m_read_address;
    if (m_read_read && m_read_waitrequest) n_wait++;
    if (m_read_read && !m_read_waitrequest) begin
      if (exp_cmd.size() > 0) begin
        check({m_read_burstcnt, m_read_address} == exp_cmd[0], "command order/content");
        void'(exp_cmd.pop_front());
      end else check(0, "extra command");
      beats_exp += int'(m_read_burstcnt);
    end
    if (m_read_datavalid) begin
      beats_got++;
      check(!bus_quiet, "bus_quiet low while beats are owed");
    end
  end

  task automatic issue(input logic [31:0] a, input logic [2:0] b);
    @(negedge clk);
    cmd_valid = 1; cmd_addr = a; cmd_burst = b;
    exp_cmd.push_back({b, a});
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(bus_quiet, "quiet after reset");
    for (int i = 0; i < 200; i++) begin
      logic [2:0] b;
      b = 3'(1 << ($urandom % 3));
      issue({$urandom, 4'b0000} & 32'h00FF_FFF0, b);
      repeat ($urandom % 3) @(negedge clk);
    end
    wait (bus_quiet);
    repeat (10) @(negedge clk);
    check(exp_cmd.size() == 0, "all commands seen on the bus");
    check(beats_got == beats_exp, $sformatf("beats %0d exp %0d", beats_got, beats_exp));
    check(n_wait > 0, "waitrequest stalls happened");
    // phase 2: throughput with a slave that never stalls except during a burst
    phase2 = 1;
    @(negedge clk);
    beats_got = 0; beats_exp = 0;
    t0 = $time / 10;
    fork
      for (int i = 0; i < 64; i++) begin
        cmd_valid = 1; cmd_addr = 32'(16 * i); cmd_burst = 3'd4;
        exp_cmd.push_back({3'd4, 32'(16 * i)});
        @(posedge clk);
        while (!cmd_ready) @(posedge clk);
        #1;
      end
    join
    cmd_valid = 0;
    wait (bus_quiet);
    t1 = $time / 10;
    check(beats_got == 256, "256 beats");
    check(t1 - t0 <= 4 * 64 + 6, $sformatf("64 bursts of 4 took %0d clocks", t1 - t0));
    $display("64 bursts of 4 words: %0d clocks", t1 - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
