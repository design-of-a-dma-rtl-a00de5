// tb_vga_timing: self-checking test of vga_timing at the default 640x480
// 60 Hz settings, with a pixel enable every second clock (50 MHz / 2).
//
// Over two frames it measures, in pixel slots: the line period (800), the
// hsync low width (96) and its position (starts after 640 + 16), visible
// pixels per line (640) and per frame (307200), the frame period (525 lines
// = 420000 slots, 16.8 ms at 40 ns per pixel), the vsync low width (2 lines)
// and its position (after 480 + 10 lines). Also checks that run low holds
// the counters and keeps the syncs high.
module tb_vga_timing;
  logic clk = 0, rst_n = 0, run = 0, pix_en = 0;
  logic [9:0] hcount, vcount;
  logic active, hsync_n, vsync_n, line_end, frame_end;
  int checks = 0, failures = 0;

  vga_timing dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) pix_en <= rst_n ? !pix_en : 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measurements, in pixel slots
  longint slot = 0, last_hfall = -1, last_vfall = -1, hfall_slot = 0, frame_start = 0;
  int vis_line = 0, vis_frame = 0, frames = 0, lines = 0;
  logic hs_q = 1, vs_q = 1;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    check(hcount == 0 && vcount == 0 && hsync_n && vsync_n && !active, "idle while run low");
    @(negedge clk); run = 1;
  end

  always @(posedge clk) if (run && pix_en) begin
    // values seen here belong to the slot that ends at this edge
    if (active) begin vis_line++; vis_frame++; end
    if (!hsync_n && hs_q) begin
      if (last_hfall >= 0) check(slot - last_hfall == 800, $sformatf("line period %0d", slot - last_hfall));
      check(hcount == 656, $sformatf("hsync starts at pixel %0d", hcount));
      last_hfall = slot;
      hfall_slot = slot;
    end
    if (hsync_n && !hs_q) check(slot - hfall_slot == 96, $sformatf("hsync width %0d", slot - hfall_slot));
    if (!vsync_n && vs_q) begin
      check(vcount == 490 && hcount == 0, $sformatf("vsync starts at line %0d", vcount));
      if (last_vfall >= 0) check(slot - last_vfall == 420000, "frame period");
      last_vfall = slot;
    end
    if (vsync_n && !vs_q) check(slot - last_vfall == 2 * 800, $sformatf("vsync width %0d", slot - last_vfall));
    if (line_end) begin
      if (lines < 480) check(vis_line == 640, $sformatf("visible pixels in line %0d", vis_line));
      else             check(vis_line == 0, "no visible pixels in blanking lines");
      vis_line = 0;
      lines++;
    end
    if (frame_end) begin
      check(lines == 525, $sformatf("lines per frame %0d", lines));
      check(vis_frame == 640 * 480, $sformatf("visible pixels per frame %0d", vis_frame));
      check(slot + 1 - frame_start == 420000, "frame length in slots");
      frame_start = slot + 1;
      vis_frame = 0;
      lines = 0;
      frames++;
      if (frames == 2) begin
        @(negedge clk); run = 0;
        @(negedge clk);
        check(hcount == 0 && vcount == 0 && hsync_n && vsync_n, "held while run low");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    hs_q = hsync_n;
    vs_q = vsync_n;
    slot++;
  end
endmodule
