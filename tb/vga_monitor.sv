// vga_monitor: testbench checker for the VGA output of dma_controller.
//
// Samples the registered VGA outputs once per pixel slot (just after the
// clock edge that carries pix_en). Visible pixels are numbered in raster
// order; pixel x of line y of the n-th frame shown since restart must be
// tb_pkg::pixel_at(base, n mod num_frames, img_size, 2*H_ACTIVE, x, y).
// It also checks the hsync pulse width and period and the vsync pulse width
// and period in pixel slots, and counts frames and line-to-line FIFO set
// switches. restart (one clock) resets the frame numbering and the sync
// period measurement, as a new run begins; check_en low skips pixel
// comparison (used while underflows are provoked).
module vga_monitor #(
  parameter int H_ACTIVE = 640, H_TOTAL = 800, H_SYNC = 96,
  parameter int V_ACTIVE = 480, V_TOTAL = 525, V_SYNC = 2
) (
  input logic        clk,
  input logic        rst_n,
  input logic        pix_en,
  input logic        video_on,
  input logic [4:0]  red,
  input logic [5:0]  green,
  input logic [4:0]  blue,
  input logic        h_sync_out,
  input logic        v_sync_out,
  input logic [31:0] base,
  input int          img_size,
  input int          num_frames,
  input logic        check_en,
  input logic        restart
);
  import tb_pkg::*;
  int checks = 0, failures = 0, frames = 0, pixels = 0, idx = 0;
  longint slot = 0, h_fall = -1, v_fall = -1;
  logic hs_q = 1, vs_q = 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  always @(posedge clk) begin
    if (restart) begin
      idx = 0; frames = 0; h_fall = -1; v_fall = -1;
    end else if (rst_n && pix_en) begin
      #1;
      if (video_on) begin
        if (check_en) begin
          logic [15:0] e;
          e = pixel_at(base, frames % num_frames, img_size, 2 * H_ACTIVE,
                       idx % H_ACTIVE, idx / H_ACTIVE);
          check({red, green, blue} == e, $sformatf("frame %0d pixel (%0d,%0d) = %h, expected %h",
                frames, idx % H_ACTIVE, idx / H_ACTIVE, {red, green, blue}, e));
        end
        pixels++;
        idx++;
        if (idx == H_ACTIVE * V_ACTIVE) begin idx = 0; frames++; end
      end else check({red, green, blue} == 16'h0, "colour outside visible area");
      if (!h_sync_out && hs_q) begin
        if (h_fall >= 0) check(slot - h_fall == H_TOTAL, $sformatf("hsync period %0d", slot - h_fall));
        h_fall = slot;
      end
      if (h_sync_out && !hs_q && h_fall >= 0)
        check(slot - h_fall == H_SYNC, $sformatf("hsync width %0d", slot - h_fall));
      if (!v_sync_out && vs_q) begin
        if (v_fall >= 0) check(slot - v_fall == H_TOTAL * V_TOTAL, $sformatf("vsync period %0d", slot - v_fall));
        v_fall = slot;
      end
      if (v_sync_out && !vs_q && v_fall >= 0)
        check(slot - v_fall == H_TOTAL * V_SYNC, $sformatf("vsync width %0d", slot - v_fall));
      hs_q = h_sync_out;
      vs_q = v_sync_out;
      slot++;
    end
  end
endmodule
