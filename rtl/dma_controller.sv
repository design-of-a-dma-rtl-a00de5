// dma_controller: DMA controller for loss-less display of images from SDRAM.
//
// A host writes the control register over an Avalon MM slave port and starts
// the controller (or a push button does, through ext_start). The DMA control
// module then reads the stored frames from SDRAM over an Avalon MM burst read
// master, one 1280-byte row at a time in bursts of up to four 32-bit words,
// and the FIFO control module buffers each row in one of two FIFO sets
// (a 32-bit FIFO feeding a 16-bit FIFO). The VGA control module shows the
// rows on a 640x480 60 Hz VGA output in RGB565, taking lines from the two
// sets in turn while the other set is refilled, so no pixel is lost.
//
// One clock (50 MHz, the operating frequency of the fabricated chip); the
// 25 MHz pixel rate is a clock enable (pix_en), so the whole controller is a
// single clock domain. rst_n is an asynchronous active-low reset.
// Ports: avs_* is the configuration slave (read latency 1), m_read_* the
// read master (byte addresses, active-high read and waitrequest), and the
// VGA side brings out red/green/blue, the active-low h_sync_out/v_sync_out,
// video_on (visible area) and pix_en (pixel strobe). busy and underflow are
// status outputs; underflow pulses for every pixel that found its FIFO empty.
module dma_controller
  import dma_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  parameter int unsigned CLKS_PER_PIXEL = 2,
  parameter int unsigned DEPTH32  = 512,   // 2048-byte 32-bit FIFOs
  parameter int unsigned DEPTH16  = 1024   // 2048-byte 16-bit FIFOs
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // Avalon MM slave: control register
  input  logic [REG_ADDR_W-1:0] avs_address,
  input  logic                  avs_write,
  input  logic [31:0]           avs_writedata,
  input  logic                  avs_read,
  output logic [31:0]           avs_readdata,
  input  logic                  ext_start,
  // Avalon MM read master (to the SDRAM controller through the fabric)
  output logic [31:0]           m_read_address,
  output logic                  m_read_read,
  output logic [BURST_W-1:0]    m_read_burstcnt,
  input  logic                  m_read_waitrequest,
  input  logic [DATA_W-1:0]     m_read_data,
  input  logic                  m_read_datavalid,
  // VGA output
  output logic                  pix_en,
  output logic [4:0]            red,
  output logic [5:0]            green,
  output logic [4:0]            blue,
  output logic                  h_sync_out,
  output logic                  v_sync_out,
  output logic                  video_on,
  // status
  output logic                  busy,
  output logic                  underflow
);

  localparam int unsigned ROW_BYTES = H_ACTIVE * 2;
  localparam int unsigned CW32 = $clog2(DEPTH32) + 1;
  localparam int unsigned CW16 = $clog2(DEPTH16) + 1;

  logic                 start, dma_active, data_pending, more_data, vga_running, frame_shown;
  logic                 ss_valid, ss_sel;
  logic [DATA_W-1:0]    ss_data;
  logic [1:0][CW32-1:0] free32;
  logic [1:0][CW16-1:0] count16;
  logic                 rd_sel, rd_pop, rd_empty;
  logic [15:0]          rd_data, f_ff_out_data_16, s_ff_out_data_16;

  dma_ctrl #(
    .ROW_BYTES(ROW_BYTES), .DEPTH32(DEPTH32),
    .IMG_SIZE_RST(32'(ROW_BYTES * V_ACTIVE))
  ) u_dma_ctrl (
    .clk, .rst_n,
    .avs_address, .avs_write, .avs_writedata, .avs_read, .avs_readdata, .ext_start,
    .m_read_address, .m_read_read, .m_read_burstcnt,
    .m_read_waitrequest, .m_read_data, .m_read_datavalid,
    .source_stream_valid(ss_valid), .source_stream_data(ss_data),
    .source_stream_sel(ss_sel), .free32,
    .vga_running, .underflow, .frame_shown,
    .start, .dma_active, .data_pending, .busy
  );

  // image data still to be shown: requested, in flight or buffered
  assign more_data = data_pending ||
                     (free32[0] != CW32'(DEPTH32)) || (free32[1] != CW32'(DEPTH32)) ||
                     (count16[0] != '0) || (count16[1] != '0);

  fifo_ctrl #(.DEPTH32(DEPTH32), .DEPTH16(DEPTH16)) u_fifo_ctrl (
    .clk, .rst_n, .clear(start),
    .wr_valid(ss_valid), .wr_data(ss_data), .wr_sel(ss_sel), .free32,
    .rd_sel, .rd_pop, .rd_data, .rd_empty, .count16,
    .f_ff_out_data_16, .s_ff_out_data_16
  );

  vga_ctrl #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
    .CLKS_PER_PIXEL(CLKS_PER_PIXEL), .DEPTH16(DEPTH16)
  ) u_vga_ctrl (
    .clk, .rst_n, .start, .more_data,
    .count16, .rd_data, .rd_empty, .rd_sel, .rd_pop,
    .pix_en, .red, .green, .blue, .h_sync_out, .v_sync_out, .video_on,
    .running(vga_running), .underflow, .frame_shown
  );

endmodule
