// fifo_ctrl: FIFO control module, two FIFO sets used row by row in turn.
//
// Each set is a 32-bit FIFO followed by a 16-bit FIFO (fifo_set). Image rows
// go alternately to set 0 and set 1: while the VGA control module shows a
// row from one 16-bit FIFO, the other set is already filled with the next
// row. wr_sel picks the set written by the DMA control module, rd_sel the set
// read by the VGA control module. The free space of both 32-bit FIFOs goes to
// the address generation unit, which fetches a row only when it fits; the
// pixel counts of both 16-bit FIFOs go to the VGA control module.
//
// The two sets and their sizes follow the description; the select signals
// and the status outputs are this design's interface.
module fifo_ctrl #(
  parameter int unsigned DEPTH32 = 512,
  parameter int unsigned DEPTH16 = 1024,
  localparam int unsigned CW32 = $clog2(DEPTH32) + 1,
  localparam int unsigned CW16 = $clog2(DEPTH16) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  // write side: stream from the data transfer unit
  input  logic                 wr_valid,
  input  logic [31:0]          wr_data,
  input  logic                 wr_sel,
  output logic [1:0][CW32-1:0] free32,
  // read side: pixels to the VGA control module
  input  logic                 rd_sel,
  input  logic                 rd_pop,
  output logic [15:0]          rd_data,
  output logic                 rd_empty,
  output logic [1:0][CW16-1:0] count16,
  // both 16-bit FIFO heads, for observation
  output logic [15:0]          f_ff_out_data_16,
  output logic [15:0]          s_ff_out_data_16
);

  logic [1:0][15:0] pix;
  logic [1:0]       pix_empty;

  for (genvar s = 0; s < 2; s++) begin : g_set
    fifo_set #(.DEPTH32(DEPTH32), .DEPTH16(DEPTH16)) u_set (
      .clk, .rst_n, .clear,
      .ff_in_push(wr_valid && (wr_sel == 1'(s))),
      .ff_in_data(wr_data),
      .free32(free32[s]),
      .pix_pop(rd_pop && (rd_sel == 1'(s))),
      .pix_data(pix[s]),
      .pix_empty(pix_empty[s]),
      .count16(count16[s])
    );
  end

  assign rd_data          = pix[rd_sel];
  assign rd_empty         = pix_empty[rd_sel];
  assign f_ff_out_data_16 = pix[0];
  assign s_ff_out_data_16 = pix[1];

endmodule
