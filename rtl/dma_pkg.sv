// dma_pkg: constants and types shared by the DMA controller modules.
//
// Holds the Avalon MM bus widths, the register map of the control register
// (word offsets on the slave port) and the bit positions of the CTRL word.
// The 32-bit data bus and the burst count limit of four come from the design
// description; the register map and its encoding are this design's own choice,
// since only the register contents (start, number of frames, burst count,
// image size) are specified.
package dma_pkg;

  // Avalon MM master (read) bus
  localparam int unsigned DATA_W    = 32;  // Avalon fabric data width
  localparam int unsigned BYTES_PER_WORD = DATA_W / 8;
  localparam int unsigned MAX_BURST = 4;   // largest burst count supported
  localparam int unsigned BURST_W   = 3;   // width of burstcount (holds 1..4)

  // Slave register map (word offsets)
  localparam int unsigned REG_ADDR_W = 3;
  typedef enum logic [REG_ADDR_W-1:0] {
    REG_CTRL       = 3'd0,  // W: start/loop/stop/clear, R: status bits
    REG_BASE       = 3'd1,  // byte address of frame 0 in SDRAM
    REG_IMG_SIZE   = 3'd2,  // bytes per frame
    REG_NUM_FRAMES = 3'd3,  // number of frames stored back to back
    REG_BURST      = 3'd4,  // Avalon burst count (1, 2 or 4)
    REG_FRAMES_OUT = 3'd5   // R: frames shown since the last start
  } reg_addr_e;

  // CTRL bits
  localparam int unsigned CTRL_START = 0;  // W1: start (R: busy)
  localparam int unsigned CTRL_LOOP  = 1;  // RW: repeat the frame sequence
  localparam int unsigned CTRL_STOP  = 2;  // W1: stop at end of frame (R: stop pending)
  localparam int unsigned CTRL_UFLOW = 3;  // R: sticky FIFO underflow, W1 clears

  // Configuration handed from the control register to the address generator
  typedef struct packed {
    logic [31:0]        base_addr;
    logic [31:0]        img_size;
    logic [15:0]        num_frames;
    logic [BURST_W-1:0] burst;
    logic               loop;
  } dma_cfg_t;

  // Reduce any written burst count to the power of two not above it (1, 2 or 4)
  function automatic logic [BURST_W-1:0] legal_burst(input logic [BURST_W-1:0] b);
    if (b[2])      return 3'd4;
    else if (b[1]) return 3'd2;
    else           return 3'd1;
  endfunction

endpackage
