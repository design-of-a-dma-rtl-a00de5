// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used for both FIFO kinds of the FIFO control module: the 32-bit FIFO that
// receives bus words from the DMA control module and the 16-bit FIFO that
// holds RGB565 pixels for the VGA control module. Both are 2048 bytes in the
// described design, i.e. 512 x 32 bit and 1024 x 16 bit.
//
// Storage is a plain array with a write pointer and a read pointer one bit
// wider than the address, so full and empty are told apart. The head entry is
// always visible on rdata (show-ahead); asserting pop removes it. push while
// full and pop while empty are ignored (and flagged by assertions). count gives
// the number of stored entries, free the number of empty slots. clear empties
// the FIFO synchronously. Push and pop in the same cycle are allowed.
// The show-ahead style and the synchronous clear are this design's choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512,   // must be a power of two
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned CW = AW + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             empty,
  output logic [CW-1:0]    count,
  output logic [CW-1:0]    free
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [CW-1:0]    wptr, rptr;
  logic             do_push, do_pop;

  assign count   = wptr - rptr;
  assign free    = CW'(DEPTH) - count;
  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else if (clear) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

  // Usage rules: never write a full FIFO or read an empty one.
  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("sync_fifo: DEPTH must be a power of two");
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n || clear) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || clear) pop |-> !empty);

endmodule
