// sdram_model: behavioural stand-in for an SDRAM controller seen as an Avalon
// MM burst read slave (not synthesizable, testbench only).
//
// After reset waitrequest stays high for INIT_CYCLES cycles, as a real
// controller does while it runs the SDRAM power-up sequence and sets the mode
// register. A read is accepted in a cycle with read high and waitrequest
// low. Every accepted burst puts its word addresses in a queue; words leave
// the queue one per cycle with readdatavalid, LATENCY cycles after a command that
// found the queue empty (back-to-back bursts follow without a gap), with random gaps (GAP_PCT percent).
// waitrequest is high while more than one word is still owed, so a new
// command is taken only while the last word of the previous burst is being
// returned, and also in random cycles (STALL_PCT percent). The data is
// tb_pkg::pattern(address). The model counts accepted commands and stalled
// command cycles for the testbenches.
module sdram_model #(
  parameter int INIT_CYCLES = 50,
  parameter int LATENCY     = 3,
  parameter int GAP_PCT     = 0,
  parameter int STALL_PCT   = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] address,
  input  logic        read,
  input  logic [2:0]  burstcount,
  output logic        waitrequest,
  output logic [31:0] readdata,
  output logic        readdatavalid
);
  import tb_pkg::*;

  logic [31:0] q[$];
  int          init_cnt;
  int          lat;
  logic        stall;
  int          n_cmds;
  int          n_stall_cycles;
  int          n_init_stall_cycles;

  assign waitrequest = (init_cnt < INIT_CYCLES) || (q.size() > 1) || stall;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q.delete();
      init_cnt            <= 0;
      lat                 <= 0;
      stall               <= 1'b0;
      readdatavalid       <= 1'b0;
      readdata            <= '0;
      n_cmds              <= 0;
      n_stall_cycles      <= 0;
      n_init_stall_cycles <= 0;
    end else begin
      automatic bit was_empty = (q.size() == 0);
      if (init_cnt < INIT_CYCLES) init_cnt <= init_cnt + 1;
      stall <= (STALL_PCT > 0) && (($urandom % 100) < STALL_PCT);
      if (read && waitrequest) begin
        n_stall_cycles <= n_stall_cycles + 1;
        if (init_cnt < INIT_CYCLES) n_init_stall_cycles <= n_init_stall_cycles + 1;
      end
      // return one word
      readdatavalid <= 1'b0;
      if (q.size() > 0) begin
        if (lat > 0) lat <= lat - 1;
        else if (!((GAP_PCT > 0) && (($urandom % 100) < GAP_PCT))) begin
          readdatavalid <= 1'b1;
          readdata      <= pattern(q.pop_front());
        end
      end
      // accept a command
      if (read && !waitrequest) begin
        if (was_empty) lat <= LATENCY;
        for (int i = 0; i < int'(burstcount); i++) q.push_back(address + 32'(4 * i));
        n_cmds <= n_cmds + 1;
      end
    end
  end

endmodule
