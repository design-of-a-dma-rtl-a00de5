// tb_data_xfer: self-checking test of data_xfer with 16-byte rows (4 words).
//
// Random words with random readdatavalid gaps; every valid word must appear
// on source_stream_data one clock later with source_stream_valid, and the
// FIFO select must stay on FIFO 0 for the first 4 words, switch to FIFO 1
// for the next 4, and so on. A start in the middle of a row must return the
// select to FIFO 0 with a fresh row count.
module tb_data_xfer;
  localparam int ROWB = 16, ROWW = 4;
  logic clk = 0, rst_n = 0, start = 0, m_read_datavalid = 0;
  logic [31:0] m_read_data = '0, source_stream_data;
  logic source_stream_valid, source_stream_sel;
  int checks = 0, failures = 0;

  data_xfer #(.ROW_BYTES(ROWB)) dut (.*);
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

  logic [32:0] exp_q[$];   // {sel, data}
  int nwords = 0;

  always @(posedge clk) if (rst_n) begin
    #1;
    if (source_stream_valid) begin
      if (exp_q.size() > 0) begin
        check({source_stream_sel, source_stream_data} == exp_q[0],
              $sformatf("word %h sel %0d exp %h", source_stream_data, source_stream_sel, exp_q[0]));
        void'(exp_q.pop_front());
      end else check(0, "unexpected word");
    end
  end

  task automatic send(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      m_read_datavalid = ($urandom % 3 != 0);
      m_read_data = $urandom;
      if (m_read_datavalid) begin
        exp_q.push_back({1'((nwords / ROWW) % 2), m_read_data});
        nwords++;
      end
    end
    @(negedge clk); m_read_datavalid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(1000);
    // restart in the middle of a row
    while (nwords % ROWW == 0) send(1);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    nwords = 0;
    send(200);
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "every word forwarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
