// dma_ctrl: DMA control module, the bus side of the DMA controller.
//
// Groups the four units the design names: the control register (Avalon MM
// slave, configured by the host), the address generation unit (which bytes
// to read and when), the read control unit (Avalon MM read master
// signalling with waitrequest) and the data transfer unit (forwards words
// that come with readdatavalid to one of the two 32-bit FIFOs).
//
// Interface: an Avalon MM slave (avs_*) for configuration, an Avalon MM
// burst read master (m_read_*), the stream to the FIFO control module
// (source_stream_*) and the FIFO free space it needs for flow control.
// data_pending is high while image data is still to be requested, owed by
// the slave or on its way to the FIFOs. busy covers the whole controller:
// data pending, or the VGA side still priming or displaying. start is a
// one-cycle pulse that also clears the FIFOs and starts the VGA side.
module dma_ctrl
  import dma_pkg::*;
#(
  parameter int unsigned ROW_BYTES    = 1280,
  parameter int unsigned DEPTH32      = 512,
  parameter logic [31:0] IMG_SIZE_RST = 32'd614400,
  localparam int unsigned CW32 = $clog2(DEPTH32) + 1
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
  // Avalon MM read master
  output logic [31:0]           m_read_address,
  output logic                  m_read_read,
  output logic [BURST_W-1:0]    m_read_burstcnt,
  input  logic                  m_read_waitrequest,
  input  logic [DATA_W-1:0]     m_read_data,
  input  logic                  m_read_datavalid,
  // to / from the FIFO control module
  output logic                  source_stream_valid,
  output logic [DATA_W-1:0]     source_stream_data,
  output logic                  source_stream_sel,
  input  logic [1:0][CW32-1:0]  free32,
  // to / from the VGA control module
  input  logic                  vga_running,
  input  logic                  underflow,
  input  logic                  frame_shown,
  output logic                  start,
  output logic                  dma_active,
  output logic                  data_pending,
  output logic                  busy
);

  dma_cfg_t           cfg;
  logic               stop_req, bus_quiet, cmd_valid, cmd_ready, row_set;
  logic [31:0]        cmd_addr;
  logic [BURST_W-1:0] cmd_burst;

  assign data_pending = dma_active || !bus_quiet || source_stream_valid;
  assign busy         = data_pending || vga_running;

  ctrl_reg #(.IMG_SIZE_RST(IMG_SIZE_RST)) u_ctrl_reg (
    .clk, .rst_n,
    .avs_address, .avs_write, .avs_writedata, .avs_read, .avs_readdata,
    .ext_start, .busy, .underflow, .frame_shown,
    .start, .stop_req, .cfg
  );

  addr_gen #(.ROW_BYTES(ROW_BYTES), .DEPTH32(DEPTH32)) u_addr_gen (
    .clk, .rst_n, .start, .stop_req, .cfg, .free32, .bus_quiet,
    .cmd_valid, .cmd_addr, .cmd_burst, .cmd_ready, .row_set,
    .active(dma_active)
  );

  read_ctrl u_read_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_addr, .cmd_burst, .cmd_ready,
    .m_read_read, .m_read_address, .m_read_burstcnt,
    .m_read_waitrequest, .m_read_datavalid,
    .bus_quiet
  );

  data_xfer #(.ROW_BYTES(ROW_BYTES)) u_data_xfer (
    .clk, .rst_n, .start,
    .m_read_datavalid, .m_read_data,
    .source_stream_valid, .source_stream_data, .source_stream_sel
  );

endmodule
