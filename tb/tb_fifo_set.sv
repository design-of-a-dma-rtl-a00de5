// tb_fifo_set: self-checking test of fifo_set (32-bit FIFO -> 16-bit FIFO).
//
// Pushes random 32-bit words while free32 allows and pops pixels at random.
// Every pixel popped must be the next half-word of the pushed stream, lower
// half first. Also checks that free32 reports the 32-bit FIFO space, that
// the splitter moves one pixel per clock when the 16-bit FIFO has room, and
// that clear empties both FIFOs.
module tb_fifo_set;
  localparam int D32 = 8, D16 = 16;
  logic clk = 0, rst_n = 0, clear = 0;
  logic ff_in_push = 0, pix_pop = 0;
  logic [31:0] ff_in_data = '0;
  logic [$clog2(D32):0] free32;
  logic [15:0] pix_data;
  logic pix_empty;
  logic [$clog2(D16):0] count16;
  logic [15:0] exp_q[$];
  int checks = 0, failures = 0, cyc;

  fifo_set #(.DEPTH32(D32), .DEPTH16(D16)) dut (.*);
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

  initial begin
    int popped = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Splitter rate: push 4 words into an empty set, no pops; 8 clocks after
    // the first word is stored all 8 pixels must be in the 16-bit FIFO.
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      ff_in_push = 1; ff_in_data = 32'h1000_0000 * (i + 1) + 32'h0000_1111 * i;
      exp_q.push_back(ff_in_data[15:0]); exp_q.push_back(ff_in_data[31:16]);
    end
    @(negedge clk); ff_in_push = 0;
    repeat (5) @(negedge clk);
    check(count16 == 8, $sformatf("8 pixels after 8 clocks, got %0d", count16));
    check(free32 == D32, "32-bit FIFO drained");
    // random traffic
    for (cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      if (!pix_empty && exp_q.size() > 0) check(pix_data == exp_q[0],
          $sformatf("pixel %h exp %h", pix_data, exp_q[0]));
      ff_in_push = (free32 > 0) && ($urandom % 3 == 0);
      ff_in_data = $urandom;
      pix_pop    = !pix_empty && ($urandom % 2 == 0);
      if (ff_in_push) begin exp_q.push_back(ff_in_data[15:0]); exp_q.push_back(ff_in_data[31:16]); end
      if (pix_pop) begin void'(exp_q.pop_front()); popped++; end
    end
    @(negedge clk); ff_in_push = 0; pix_pop = 0;
    check(popped > 5000, "enough pixels went through");
    // clear
    ff_in_push = 1; ff_in_data = 32'hDEAD_BEEF;
    @(negedge clk); ff_in_push = 0; clear = 1;
    @(negedge clk); clear = 0;
    check(pix_empty && count16 == 0 && free32 == D32, "clear empties both FIFOs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
