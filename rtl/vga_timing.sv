// vga_timing: 640x480 at 60 Hz VGA timing generator.
//
// Two counters, one for the pixel within a line and one for the line within a
// frame, advance on pix_en (one pulse per 40 ns pixel; with the 50 MHz system
// clock every second clock). Pixel 0 of line 0 is the top-left visible pixel;
// each line is followed by its horizontal front porch, sync pulse and back
// porch, and the frame by the vertical ones. hsync and vsync are active low.
// active marks visible pixels; line_end and frame_end pulse (with pix_en) on
// the last pixel slot of a line and of a frame. While run is low the counters
// are held at 0 and the syncs are inactive.
//
// Durations (fixed by the standard 60 Hz mode): line 31.9 us with 25.6 us of
// pixels, a 3.8 us sync and a 1.9 us back porch; frame 16.67 ms with 15.25 ms
// of lines, 0.32 ms front porch and 0.06 ms sync. At 40 ns per pixel this
// gives 640 + 16 + 96 + 48 = 800 pixel slots and 480 + 10 + 2 + 33 = 525
// lines. The 0.6 us horizontal front porch and the 33-line vertical back
// porch are the remainders of those figures; the order front porch, sync,
// back porch is the usual one of the VGA standard.
module vga_timing #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP,
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP,
  localparam int unsigned HW = $clog2(H_TOTAL),
  localparam int unsigned VW = $clog2(V_TOTAL)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          pix_en,
  output logic [HW-1:0] hcount,
  output logic [VW-1:0] vcount,
  output logic          active,
  output logic          hsync_n,
  output logic          vsync_n,
  output logic          line_end,
  output logic          frame_end
);

  logic h_last, v_last;

  assign h_last    = (hcount == HW'(H_TOTAL - 1));
  assign v_last    = (vcount == VW'(V_TOTAL - 1));
  assign line_end  = run && pix_en && h_last;
  assign frame_end = line_end && v_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcount <= '0;
      vcount <= '0;
    end else if (!run) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_en) begin
      if (h_last) begin
        hcount <= '0;
        vcount <= v_last ? '0 : vcount + 1'b1;
      end else begin
        hcount <= hcount + 1'b1;
      end
    end
  end

  assign active  = run && (hcount < HW'(H_ACTIVE)) && (vcount < VW'(V_ACTIVE));
  assign hsync_n = !(run && (hcount >= HW'(H_ACTIVE + H_FP)) &&
                            (hcount <  HW'(H_ACTIVE + H_FP + H_SYNC)));
  assign vsync_n = !(run && (vcount >= VW'(V_ACTIVE + V_FP)) &&
                            (vcount <  VW'(V_ACTIVE + V_FP + V_SYNC)));

endmodule
