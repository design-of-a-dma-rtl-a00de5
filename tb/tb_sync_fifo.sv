// tb_sync_fifo: self-checking test of sync_fifo.
//
// Random push/pop traffic (including pushes while full, pops while empty
// suppressed by the driver, and a synchronous clear) against a queue
// reference model. Checks the head word, count, free, full and empty every
// cycle. A 16-deep, 16-bit instance keeps full and empty frequent.
module tb_sync_fifo;
  localparam int W = 16, D = 16;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic full, empty;
  logic [$clog2(D):0] count, free;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0, cyc = 0, n_full = 0, n_empty = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // compare state before this cycle's operation
      check(count == ($clog2(D)+1)'(model.size()), "count");
      check(free == ($clog2(D)+1)'(D - model.size()), "free");
      check(full == (model.size() == D), "full");
      check(empty == (model.size() == 0), "empty");
      if (model.size() > 0) check(rdata == model[0], $sformatf("head %h exp %h", rdata, model[0]));
      if (full) n_full++;
      if (empty) n_empty++;
      clear = (cyc % 997 == 500);
      // bias toward filling in the first half of each 400-cycle period
      push  = ((cyc / 200) % 2 == 0) ? ($urandom % 4 != 0) && !full : ($urandom % 4 == 0) && !full;
      pop   = ((cyc / 200) % 2 == 0) ? ($urandom % 4 == 0) && !empty : ($urandom % 4 != 0) && !empty;
      wdata = W'($urandom);
      @(posedge clk);
      #1;
      if (clear) model.delete();
      else begin
        if (pop) void'(model.pop_front());
        if (push) model.push_back(wdata);
      end
    end
    check(n_full > 0, "FIFO never became full");
    check(n_empty > 0, "FIFO never became empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
