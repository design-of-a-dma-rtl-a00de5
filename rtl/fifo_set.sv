// fifo_set: one FIFO set of the FIFO control module, a 32-bit FIFO feeding a
// 16-bit FIFO.
//
// Bus words (two RGB565 pixels each) are pushed into the 32-bit FIFO. A small
// splitter moves each word into the 16-bit FIFO as two pixels, the lower half
// first and the upper half second, as the design prescribes. The splitter
// moves one pixel per clock whenever the 32-bit FIFO holds a word and the
// 16-bit FIFO has room: on the first cycle it writes bits [15:0], on the
// second bits [31:16] and pops the word. The VGA side pops pixels from the
// 16-bit FIFO head (pix_data, show-ahead).
//
// Sizes follow the description: both FIFOs are 2048 bytes. The one-pixel-per-
// clock splitter is this design's choice; at a 50 MHz clock it moves pixels at
// twice the 25 MHz VGA pixel rate.
module fifo_set #(
  parameter int unsigned DEPTH32 = 512,   // 2048 bytes of 32-bit words
  parameter int unsigned DEPTH16 = 1024,  // 2048 bytes of 16-bit pixels
  localparam int unsigned CW32 = $clog2(DEPTH32) + 1,
  localparam int unsigned CW16 = $clog2(DEPTH16) + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  // 32-bit side (from the data transfer unit)
  input  logic            ff_in_push,
  input  logic [31:0]     ff_in_data,
  output logic [CW32-1:0] free32,
  // 16-bit side (to the VGA control module)
  input  logic            pix_pop,
  output logic [15:0]     pix_data,
  output logic            pix_empty,
  output logic [CW16-1:0] count16
);

  logic [31:0]     w_data;
  logic            w_empty, w_full, w_pop;
  logic [CW32-1:0] w_count;
  logic            p_push, p_full;
  logic [15:0]     p_wdata;
  logic [CW16-1:0] p_free;
  logic            upper;   // 0: next pixel is bits [15:0], 1: bits [31:16]

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH32)) u_fifo32 (
    .clk, .rst_n, .clear,
    .push(ff_in_push), .wdata(ff_in_data),
    .pop(w_pop), .rdata(w_data),
    .full(w_full), .empty(w_empty), .count(w_count), .free(free32)
  );

  // splitter: one pixel per clock, lower half first
  assign p_push  = !w_empty && !p_full;
  assign p_wdata = upper ? w_data[31:16] : w_data[15:0];
  assign w_pop   = p_push && upper;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       upper <= 1'b0;
    else if (clear)   upper <= 1'b0;
    else if (p_push)  upper <= !upper;
  end

  sync_fifo #(.WIDTH(16), .DEPTH(DEPTH16)) u_fifo16 (
    .clk, .rst_n, .clear,
    .push(p_push), .wdata(p_wdata),
    .pop(pix_pop), .rdata(pix_data),
    .full(p_full), .empty(pix_empty), .count(count16), .free(p_free)
  );

endmodule
