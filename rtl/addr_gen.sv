// addr_gen: address generation unit of the DMA control module.
//
// Walks through the frames stored in SDRAM and issues one Avalon read command
// (byte address plus burst count) per burst. Addresses are byte addresses, so
// a burst of four 32-bit words advances the address by 16; one image row of
// 640 RGB565 pixels is 1280 bytes, i.e. 80 bursts of four words.
//
// Work is done row by row. Rows go to the two FIFO sets in turn (row 0 to
// set 0, row 1 to set 1, ...). A row is started only when the read path is
// quiet (no command pending, no read data outstanding) and the 32-bit FIFO of
// its set has room for the whole row, so the read data can never overflow a
// FIFO. Once started, the bursts of the row are issued back to back, each
// when the read control unit takes the command (cmd_valid/cmd_ready).
// After img_size bytes the frame is complete and the next frame follows
// directly in memory; after num_frames frames the address wraps to
// base_addr. The run ends at a frame boundary: after the last frame when
// loop is off, or after the current frame once stop_req is set. active is
// high from start until the last command of the run has been taken.
//
// From the description: byte addressing, address step of 16 per burst of
// four, 1280-byte rows, counting by image size and number of frames, burst
// counts of up to four. This design's choices: row-at-a-time flow control
// against FIFO space, frames stored back to back, loop and stop.
module addr_gen
  import dma_pkg::*;
#(
  parameter int unsigned ROW_BYTES = 1280,  // 640 pixels x 2 bytes
  parameter int unsigned DEPTH32   = 512,   // 32-bit FIFO depth (words)
  localparam int unsigned CW32      = $clog2(DEPTH32) + 1,
  localparam int unsigned ROW_WORDS = ROW_BYTES / BYTES_PER_WORD
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 stop_req,
  input  dma_cfg_t             cfg,
  input  logic [1:0][CW32-1:0] free32,
  input  logic                 bus_quiet,
  output logic                 cmd_valid,
  output logic [31:0]          cmd_addr,
  output logic [BURST_W-1:0]   cmd_burst,
  input  logic                 cmd_ready,
  output logic                 row_set,    // set the current row goes to
  output logic                 active
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT_ROW, S_ISSUE} state_e;
  state_e state;

  logic [31:0] addr;
  logic [15:0] row_left;    // words of the current row not yet requested
  logic [31:0] frame_off;   // bytes of the current frame already requested
  logic [15:0] frame_idx;
  logic [31:0] burst_bytes;
  logic        row_end, frame_end, seq_end;

  assign burst_bytes = 32'(cfg.burst) * BYTES_PER_WORD;
  assign cmd_valid   = (state == S_ISSUE);
  assign cmd_addr    = addr;
  assign cmd_burst   = cfg.burst;
  assign active      = (state != S_IDLE);

  assign row_end   = (row_left == 16'(cfg.burst));
  assign frame_end = row_end && (frame_off + ROW_BYTES >= cfg.img_size);
  assign seq_end   = frame_end && (frame_idx + 16'd1 >= cfg.num_frames);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      addr      <= '0;
      row_left  <= '0;
      frame_off <= '0;
      frame_idx <= '0;
      row_set   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state     <= S_WAIT_ROW;
            addr      <= cfg.base_addr;
            frame_off <= '0;
            frame_idx <= '0;
            row_set   <= 1'b0;
          end
        end
        S_WAIT_ROW: begin
          if (bus_quiet && free32[row_set] >= CW32'(ROW_WORDS)) begin
            state    <= S_ISSUE;
            row_left <= 16'(ROW_WORDS);
          end
        end
        S_ISSUE: begin
          if (cmd_ready) begin
            addr     <= addr + burst_bytes;
            row_left <= row_left - 16'(cfg.burst);
            if (row_end) begin
              row_set   <= !row_set;
              frame_off <= frame_off + ROW_BYTES;
              state     <= S_WAIT_ROW;
              if (frame_end) begin
                frame_off <= '0;
                frame_idx <= seq_end ? 16'd0 : frame_idx + 16'd1;
                if (seq_end) addr <= cfg.base_addr;
                if (stop_req || (seq_end && !cfg.loop)) state <= S_IDLE;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (ROW_BYTES % (BYTES_PER_WORD * MAX_BURST) == 0)
      else $error("addr_gen: a row must be a whole number of longest bursts");
    assert (ROW_WORDS <= DEPTH32)
      else $error("addr_gen: a row must fit in a 32-bit FIFO");
  end

endmodule
