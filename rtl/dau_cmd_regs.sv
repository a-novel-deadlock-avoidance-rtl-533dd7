// dau_cmd_regs: command register of the DAU.
//
// A process writes one command word (request or release, process id,
// resource id; layout in dau_pkg). The register holds it and hands it to the
// DAA controller as a one-cycle cmd_valid pulse in the cycle after the write.
// A write that arrives while the controller is busy, or while a command is
// still being handed over, is dropped and sets the sticky overrun flag, which
// the process clears by reading the control word (clr_overrun). The last
// accepted command can be read back. The handshake and the overrun flag are
// this design's own; the source names only "command registers". The
// read-back word's unused fields are constant zero.
module dau_cmd_regs
  import dau_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,          // bus write to the command address
  input  logic [DATA_W-1:0] wdata,
  input  logic              fsm_busy,
  input  logic              clr_overrun,
  output logic              cmd_valid,
  output cmd_t              cmd,
  output logic [DATA_W-1:0] cmd_word,
  output logic              overrun
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_valid <= 1'b0;
      cmd       <= '{kind: CMD_NOP, proc_id: '0, res_id: '0};
      overrun   <= 1'b0;
    end else begin
      cmd_valid <= 1'b0;
      if (we && !fsm_busy && !cmd_valid) begin
        cmd       <= unpack_cmd(wdata);
        cmd_valid <= 1'b1;
      end
      if (we && (fsm_busy || cmd_valid)) overrun <= 1'b1;
      else if (clr_overrun)              overrun <= 1'b0;
    end
  end

  assign cmd_word = pack_cmd(cmd);

  // The controller is idle whenever a command is handed over.
  a_handover_idle: assert property (@(posedge clk) disable iff (!rst_n) cmd_valid |-> !fsm_busy);

endmodule
