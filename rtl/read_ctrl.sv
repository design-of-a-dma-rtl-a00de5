// read_ctrl: read control unit of the DMA control module, the Avalon MM read
// master signalling.
//
// Takes read commands (byte address and burst count) from the address
// generation unit and presents them on the bus: read, address and burstcount
// are registered and held stable while waitrequest is high; a command is
// accepted by the slave in a cycle where read is high and waitrequest is low.
// A new command can be loaded in that same cycle, so read stays high across
// back-to-back bursts (cmd_ready = !read || !waitrequest). read is active
// high, as is waitrequest.
// The unit also counts the read data beats still owed by the slave (burst
// count added on acceptance, one taken off per readdatavalid). bus_quiet is
// high when no command is waiting and no beat is owed.
//
// From the description: active-high read and wait_request, read held while
// wait_request is high, burst counts up to four. Pipelined commands and the
// outstanding-beat counter are this design's choices.
module read_ctrl
  import dma_pkg::*;
#(
  parameter int unsigned MAX_OUTSTANDING = 64  // bound for the beat counter
) (
  input  logic               clk,
  input  logic               rst_n,
  // command from the address generation unit
  input  logic               cmd_valid,
  input  logic [31:0]        cmd_addr,
  input  logic [BURST_W-1:0] cmd_burst,
  output logic               cmd_ready,
  // Avalon MM master, read side
  output logic               m_read_read,
  output logic [31:0]        m_read_address,
  output logic [BURST_W-1:0] m_read_burstcnt,
  input  logic               m_read_waitrequest,
  input  logic               m_read_datavalid,
  // status
  output logic               bus_quiet
);

  localparam int unsigned OW = $clog2(MAX_OUTSTANDING + 1);
  logic [OW-1:0] owed;
  logic          accepted;

  assign accepted  = m_read_read && !m_read_waitrequest;
  assign cmd_ready = !m_read_read || !m_read_waitrequest;
  assign bus_quiet = !m_read_read && (owed == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_read_read     <= 1'b0;
      m_read_address  <= '0;
      m_read_burstcnt <= BURST_W'(1);
      owed            <= '0;
    end else begin
      if (cmd_ready) begin
        m_read_read <= cmd_valid;
        if (cmd_valid) begin
          m_read_address  <= cmd_addr;
          m_read_burstcnt <= cmd_burst;
        end
      end
      owed <= owed + (accepted ? OW'(m_read_burstcnt) : '0)
                   - (m_read_datavalid ? OW'(1) : '0);
    end
  end

  // Avalon rules: command held stable while stalled; no unrequested data.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
            m_read_read && m_read_waitrequest |=>
              m_read_read && $stable(m_read_address) && $stable(m_read_burstcnt));
  a_no_extra_data: assert property (@(posedge clk) disable iff (!rst_n)
            m_read_datavalid |-> (owed != '0) || accepted);

endmodule
