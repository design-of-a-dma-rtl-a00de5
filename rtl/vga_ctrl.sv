// vga_ctrl: VGA control module, shows the image rows held in the two 16-bit
// FIFOs on a 640x480 60 Hz VGA output in RGB565.
//
// A pixel enable is made by dividing the system clock by CLKS_PER_PIXEL
// (50 MHz / 2 = 25 MHz, i.e. 40 ns per pixel). vga_timing produces the
// counters and the active-low sync pulses. In every visible pixel slot one
// pixel is popped from the 16-bit FIFO of the current set and split into red
// (5 bits), green (6 bits) and blue (5 bits); after the last visible pixel of
// each line the module switches to the other set, so lines alternate between
// FIFO set 0 and FIFO set 1, starting with set 0. Outside the visible area
// the colour outputs are 0. All outputs are registered and change with
// pix_en, one pixel slot after the timing counters.
//
// Run control: start puts the module in a priming state in which the timing
// is held; once the 16-bit FIFO of set 0 holds a whole line the timing starts
// at the top-left pixel. At each frame end frame_shown pulses, and if the DMA
// control module has finished requesting data (dma_active low) the module
// returns to idle, with the syncs inactive. A visible pixel slot that finds
// the FIFO empty shows black and pulses underflow: that is a lost pixel, and
// the design is meant never to produce one.
//
// From the description: RGB565 output, 640x480 at 60 Hz, 40 ns per pixel,
// row-by-row alternation of the 16-bit FIFOs, active-low horizontal sync.
// This design's choices: priming before the first frame, stopping at a frame
// end, underflow flag, black on empty FIFO.
module vga_ctrl #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  parameter int unsigned CLKS_PER_PIXEL = 2,
  parameter int unsigned DEPTH16  = 1024,
  localparam int unsigned CW16 = $clog2(DEPTH16) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 more_data,
  // 16-bit FIFO side
  input  logic [1:0][CW16-1:0] count16,
  input  logic [15:0]          rd_data,
  input  logic                 rd_empty,
  output logic                 rd_sel,
  output logic                 rd_pop,
  // VGA output
  output logic                 pix_en,
  output logic [4:0]           red,
  output logic [5:0]           green,
  output logic [4:0]           blue,
  output logic                 h_sync_out,
  output logic                 v_sync_out,
  output logic                 video_on,
  // status
  output logic                 running,     // priming or displaying
  output logic                 underflow,   // one-cycle event
  output logic                 frame_shown  // one-cycle event
);

  typedef enum logic [1:0] {V_IDLE, V_PRIME, V_RUN} vstate_e;
  vstate_e state;

  localparam int unsigned DW = (CLKS_PER_PIXEL > 1) ? $clog2(CLKS_PER_PIXEL) : 1;
  logic [DW-1:0] div;

  logic run, active, hsync_n, vsync_n, line_end, frame_end, last_vis;
  logic [$clog2(H_ACTIVE + H_FP + H_SYNC + H_BP)-1:0] hcount;
  logic [$clog2(V_ACTIVE + V_FP + V_SYNC + V_BP)-1:0] vcount;

  // pixel enable
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           div <= '0;
    else if (div == DW'(CLKS_PER_PIXEL - 1)) div <= '0;
    else                                  div <= div + 1'b1;
  end
  assign pix_en = (div == DW'(CLKS_PER_PIXEL - 1));

  assign run = (state == V_RUN);

  vga_timing #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_timing (
    .clk, .rst_n, .run, .pix_en,
    .hcount, .vcount, .active, .hsync_n, .vsync_n, .line_end, .frame_end
  );

  assign rd_pop      = pix_en && active && !rd_empty;
  assign underflow   = pix_en && active && rd_empty;
  assign frame_shown = frame_end;
  assign running     = (state != V_IDLE);
  assign last_vis    = pix_en && active && (hcount == $bits(hcount)'(H_ACTIVE - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= V_IDLE;
      rd_sel <= 1'b0;
    end else begin
      unique case (state)
        V_IDLE:  if (start) begin
                   state  <= V_PRIME;
                   rd_sel <= 1'b0;
                 end
        V_PRIME: if (count16[0] >= CW16'(H_ACTIVE)) state <= V_RUN;
        V_RUN: begin
          if (last_vis) rd_sel <= !rd_sel;
          if (frame_end && !more_data) state <= V_IDLE;
        end
        default: state <= V_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {red, green, blue} <= '0;
      h_sync_out         <= 1'b1;
      v_sync_out         <= 1'b1;
      video_on           <= 1'b0;
    end else if (pix_en) begin
      {red, green, blue} <= rd_pop ? rd_data : 16'h0000;
      h_sync_out         <= hsync_n;
      v_sync_out         <= vsync_n;
      video_on           <= active;
    end
  end

  initial assert (H_ACTIVE <= DEPTH16)
    else $error("vga_ctrl: a line must fit in a 16-bit FIFO");

endmodule
