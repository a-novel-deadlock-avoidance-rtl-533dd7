// dau_addr_decoder: address decoder of the DAU register bus.
//
// Turns a word address into one select: the command register, the global
// control/status word, the status register of one process or one row of the
// resource allocation matrix (cell access). Addresses beyond the configured
// numbers of processes and resources select nothing (reads return 0, writes
// are ignored). The index outputs are the low address bits, qualified by
// the selects. Purely combinational. The block itself is part of the DAU
// architecture; the address map (see dau_pkg) is this design's own.
module dau_addr_decoder
  import dau_pkg::*;
#(
  parameter int unsigned N_RES  = 5,
  parameter int unsigned N_PROC = 5
) (
  input  logic [ADDR_W-1:0] addr,
  output logic              sel_cmd,
  output logic              sel_ctrl,
  output logic              sel_status,
  output logic [3:0]        status_idx,
  output logic              sel_row,
  output logic [4:0]        row_idx
);

  always_comb begin
    sel_cmd    = (addr == A_CMD);
    sel_ctrl   = (addr == A_CTRL);
    status_idx = addr[3:0];
    row_idx    = addr[4:0];
    sel_status = (addr[ADDR_W-1:4] == A_STATUS0[ADDR_W-1:4]) && (32'(status_idx) < N_PROC);
    sel_row    = (addr[ADDR_W-1:5] == A_ROW0[ADDR_W-1:5])    && (32'(row_idx)    < N_RES);
  end

endmodule
