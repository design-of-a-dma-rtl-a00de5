// ctrl_reg: control register of the DMA control module, an Avalon MM slave.
//
// A host (processor or JTAG-to-Avalon bridge) configures the controller
// through this slave port. The register holds what the design names: start of
// operation, the number of frames and the burst count, plus the image size
// the address generation unit works from. Base address, loop, stop and the
// status words are this design's additions so that the host can place the
// frames in SDRAM and watch progress.
//
// Register map (word offsets, see dma_pkg):
//   0 CTRL       W: bit0 start, bit1 loop, bit2 stop at end of frame,
//                   bit3 clear underflow flag (write 1)
//                R: bit0 busy, bit1 loop, bit2 stop pending, bit3 underflow
//   1 BASE       byte address of frame 0 (bits [1:0] read as 0)
//   2 IMG_SIZE   bytes per frame (reset: one full 640x480 RGB565 frame)
//   3 NUM_FRAMES frames stored back to back after BASE (0 acts as 1)
//   4 BURST      Avalon burst count; 1, 2 or 4 (other values round down)
//   5 FRAMES_OUT frames shown since the last start (read only)
// Timing: writes take effect at the clock edge; readdata is registered, so
// the read latency is one cycle; the slave never asserts waitrequest.
// Start (from CTRL bit0 or the ext_start button input) gives a one-cycle
// start pulse and is ignored while busy. The configuration must not be
// changed while busy.
module ctrl_reg
  import dma_pkg::*;
#(
  parameter logic [31:0] IMG_SIZE_RST = 32'd614400,  // 640 * 480 * 2 bytes
  parameter bit          LOOP_RST     = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // Avalon MM slave
  input  logic [REG_ADDR_W-1:0] avs_address,
  input  logic                  avs_write,
  input  logic [31:0]           avs_writedata,
  input  logic                  avs_read,
  output logic [31:0]           avs_readdata,
  // push button start (one pulse per press, already debounced)
  input  logic                  ext_start,
  // status from the datapath
  input  logic                  busy,
  input  logic                  underflow,   // one-cycle event
  input  logic                  frame_shown, // one-cycle event
  // to the datapath
  output logic                  start,       // one-cycle pulse
  output logic                  stop_req,
  output dma_cfg_t              cfg
);

  logic [31:0] frames_out;
  logic        uflow_flag;
  logic        wr_ctrl;

  assign wr_ctrl = avs_write && (avs_address == REG_CTRL);
  assign start   = !busy && (ext_start || (wr_ctrl && avs_writedata[CTRL_START]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.base_addr  <= '0;
      cfg.img_size   <= IMG_SIZE_RST;
      cfg.num_frames <= 16'd1;
      cfg.burst      <= BURST_W'(MAX_BURST);
      cfg.loop       <= LOOP_RST;
      stop_req       <= 1'b0;
      uflow_flag     <= 1'b0;
      frames_out     <= '0;
    end else begin
      if (avs_write) begin
        unique case (avs_address)
          REG_CTRL:       cfg.loop       <= avs_writedata[CTRL_LOOP];
          REG_BASE:       cfg.base_addr  <= {avs_writedata[31:2], 2'b00};
          REG_IMG_SIZE:   cfg.img_size   <= avs_writedata;
          REG_NUM_FRAMES: cfg.num_frames <= (avs_writedata[15:0] == 16'd0) ? 16'd1
                                                                         : avs_writedata[15:0];
          REG_BURST:      cfg.burst      <= legal_burst(avs_writedata[BURST_W-1:0]);
          default: ;
        endcase
      end
      // stop request: set by a write, dropped once the run has ended
      if (start)
        stop_req <= 1'b0;
      else if (wr_ctrl && avs_writedata[CTRL_STOP] && busy)
        stop_req <= 1'b1;
      else if (!busy)
        stop_req <= 1'b0;
      // sticky underflow flag
      if (underflow)
        uflow_flag <= 1'b1;
      else if (wr_ctrl && avs_writedata[CTRL_UFLOW])
        uflow_flag <= 1'b0;
      // frame counter
      if (start)            frames_out <= '0;
      else if (frame_shown) frames_out <= frames_out + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) avs_readdata <= '0;
    else if (avs_read) begin
      unique case (avs_address)
        REG_CTRL:       avs_readdata <= {28'd0, uflow_flag, stop_req, cfg.loop, busy};
        REG_BASE:       avs_readdata <= cfg.base_addr;
        REG_IMG_SIZE:   avs_readdata <= cfg.img_size;
        REG_NUM_FRAMES: avs_readdata <= {16'd0, cfg.num_frames};
        REG_BURST:      avs_readdata <= {29'd0, cfg.burst};
        REG_FRAMES_OUT: avs_readdata <= frames_out;
        default:        avs_readdata <= '0;
      endcase
    end
  end

endmodule
