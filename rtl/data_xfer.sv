// data_xfer: data transfer unit of the DMA control module.
//
// Every bus word that arrives with readdatavalid high is forwarded to the
// FIFO control module as source_stream_data / source_stream_valid, one clock
// later (registered). The unit also decides which of the two 32-bit FIFOs
// gets the word: it counts the words of each image row and switches to the
// other FIFO after a whole row (ROW_BYTES / 4 words), starting with FIFO 0
// after start. Because read data returns in request order and the address
// generation unit requests whole rows for the two FIFO sets in turn, this
// count matches the row-to-set assignment there.
//
// From the description: forwarding qualified by read_data_valid and the
// choice between the two 32-bit FIFOs. The registered output and the
// word-counting select are this design's choices.
module data_xfer
  import dma_pkg::*;
#(
  parameter int unsigned ROW_BYTES = 1280,
  localparam int unsigned ROW_WORDS = ROW_BYTES / BYTES_PER_WORD,
  localparam int unsigned RW = $clog2(ROW_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              m_read_datavalid,
  input  logic [DATA_W-1:0] m_read_data,
  output logic              source_stream_valid,
  output logic [DATA_W-1:0] source_stream_data,
  output logic              source_stream_sel
);

  logic [RW-1:0] word_cnt;
  logic          sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_cnt            <= '0;
      sel                 <= 1'b0;
      source_stream_valid <= 1'b0;
      source_stream_data  <= '0;
      source_stream_sel   <= 1'b0;
    end else begin
      source_stream_valid <= m_read_datavalid;
      if (m_read_datavalid) begin
        source_stream_data <= m_read_data;
        source_stream_sel  <= sel;
      end
      if (start) begin
        word_cnt <= '0;
        sel      <= 1'b0;
      end else if (m_read_datavalid) begin
        if (word_cnt == RW'(ROW_WORDS - 1)) begin
          word_cnt <= '0;
          sel      <= !sel;
        end else begin
          word_cnt <= word_cnt + 1'b1;
        end
      end
    end
  end

endmodule
