// tb_vga_ctrl: self-checking test of vga_ctrl with a small screen
// (16x4 visible, short porches) and two pixel queues standing in for the
// 16-bit FIFOs.
//
// Checks: the module waits (syncs high, no pops) until set 0 holds a whole
// line; visible pixels come from set 0 and set 1 line by line in turn and
// appear split into 5/6/5-bit red/green/blue one pixel slot later; colours
// are 0 outside the visible area; the pixel strobe comes every second clock;
// frame_shown pulses once per frame and the module stops at the frame end
// once no more data is buffered or coming. Finally an empty FIFO during a visible slot must
// raise underflow and show black.
module tb_vga_ctrl;
  localparam int HA = 16, HF = 2, HS = 3, HB = 3, VA = 4, VF = 1, VS = 1, VB = 2;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  localparam int D16 = 32;
  logic clk = 0, rst_n = 0, start = 0, feeding = 0, more_data;
  logic [1:0][$clog2(D16):0] count16;
  logic [15:0] rd_data;
  logic rd_empty, rd_sel, rd_pop, pix_en;
  logic [4:0] red, blue;
  logic [5:0] green;
  logic h_sync_out, v_sync_out, video_on, running, underflow, frame_shown;
  logic [15:0] q[2][$];
  int checks = 0, failures = 0;

  vga_ctrl #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
             .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB),
             .CLKS_PER_PIXEL(2), .DEPTH16(D16)) dut (.*);
  always #5 clk = ~clk;

  // FIFO stand-ins
  always_comb begin
    more_data  = feeding || q[0].size() > 0 || q[1].size() > 0;
    count16[0] = ($clog2(D16)+1)'(q[0].size());
    count16[1] = ($clog2(D16)+1)'(q[1].size());
    rd_empty   = (q[rd_sel].size() == 0);
    rd_data    = rd_empty ? 16'h0 : q[rd_sel][0];
  end
  always @(posedge clk) if (rd_pop) void'(q[rd_sel].pop_front());

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

  function automatic logic [15:0] pix(int f, int y, int x);
    return 16'((f << 12) ^ (y << 8) ^ (x * 37) ^ 16'h5A5A);
  endfunction

  // output monitor: expected visible pixel stream
  logic [15:0] exp_px[$];
  int vis_seen = 0, frames_seen = 0, n_uflow = 0, pe_gap = 0, last_pe = -1, cyc = 0;
  logic exp_black = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && pix_en) begin
      if (last_pe >= 0) check(cyc - last_pe == 2, "pixel strobe every second clock");
      last_pe = cyc;
    end
    if (frame_shown) frames_seen++;
    if (underflow) n_uflow++;
  end
  // outputs change at the edge after pix_en: look at them one clock later
  always @(posedge clk) if (rst_n && pix_en) begin
    #1;
    if (video_on) begin
      if (exp_px.size() == 0 && exp_black) check({red, green, blue} == 16'h0, "black on underflow");
      else if (exp_px.size() > 0) begin
        check({red, green, blue} == exp_px[0],
              $sformatf("pixel %h exp %h", {red, green, blue}, exp_px[0]));
        check(red == exp_px[0][15:11] && green == exp_px[0][10:5] && blue == exp_px[0][4:0], "565 split");
        void'(exp_px.pop_front());
      end else check(0, "unexpected visible pixel");
      vis_seen++;
    end else check({red, green, blue} == 16'h0, "black outside visible area");
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // frame data for two frames: set 0 gets even lines, set 1 odd lines
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < VA; y++)
        for (int x = 0; x < HA; x++) exp_px.push_back(pix(f, y, x));
    // fill only half a line into set 0 and start: must stay primed
    for (int x = 0; x < HA / 2; x++) q[0].push_back(pix(0, 0, x));
    @(negedge clk); start = 1; feeding = 1;
    @(negedge clk); start = 0;
    repeat (50) begin
      @(negedge clk);
      check(running && h_sync_out && v_sync_out && !video_on, "priming: waiting for a whole line");
    end
    for (int x = HA / 2; x < HA; x++) q[0].push_back(pix(0, 0, x));
    for (int x = 0; x < HA; x++) q[1].push_back(pix(0, 1, x));
    // feed the rest of frame 0 and frame 1 as room appears
    fork
      begin
        for (int f = 0; f < 2; f++)
          for (int y = (f == 0) ? 2 : 0; y < VA; y++) begin
            wait (q[y % 2].size() + HA <= D16);
            for (int x = 0; x < HA; x++) q[y % 2].push_back(pix(f, y, x));
          end
        feeding = 0;
      end
    join_none
    wait (frames_seen == 1);
    check(running, "keeps running while data is buffered");
    wait (frames_seen == 2);
    @(negedge clk);
    @(negedge clk);
    check(!running, "stops at frame end once all data is shown");
    check(vis_seen == 2 * HA * VA, $sformatf("visible pixels %0d", vis_seen));
    check(exp_px.size() == 0, "all pixels shown");
    check(n_uflow == 0, "no underflow with full FIFOs");
    check(h_sync_out && v_sync_out, "syncs inactive when idle");
    // underflow: start with one line in set 0 only, set 1 stays empty
    for (int x = 0; x < HA; x++) begin q[0].push_back(pix(2, 0, x)); exp_px.push_back(pix(2, 0, x)); end
    @(negedge clk); start = 1; feeding = 1;
    @(negedge clk); start = 0;
    wait (rd_sel == 1'b1);
    exp_black = 1;
    wait (n_uflow > 0);
    check(n_uflow > 0, "underflow flagged on empty FIFO");
    feeding = 0;
    wait (!running);
    check(n_uflow == (VA - 1) * HA, $sformatf("every empty visible slot flagged: %0d", n_uflow));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
