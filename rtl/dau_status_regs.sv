// dau_status_regs: per-process status registers of the DAU.
//
// One register per process holds the last result the DAA controller reported
// to that process (granted, pending, give up, release request, released,
// error) and the resource it concerns. Two write ports let one command report
// to two processes at once, e.g. a release that also hands the resource to a
// waiting process. Each update sets the register's fresh bit, which drives
// the process' notify line (an interrupt request) until the process reads its
// register; a write in the same cycle as the read wins. Writes to an id
// beyond N_PROC are ignored. Register layout and notification scheme are this
// design's own; the source names only "status registers".
module dau_status_regs
  import dau_pkg::*;
#(
  parameter int unsigned N_PROC = 5,
  localparam int unsigned PW = (N_PROC > 1) ? $clog2(N_PROC) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              a_we,
  input  logic [PW-1:0]     a_proc,
  input  status_e           a_code,
  input  logic              b_we,
  input  logic [PW-1:0]     b_proc,
  input  status_e           b_code,
  input  logic [7:0]        res_id,
  input  logic              rd_en,      // bus read of one status register
  input  logic [3:0]        rd_idx,
  output logic [DATA_W-1:0] rd_word,
  output logic [N_PROC-1:0] notify
);

  status_t regs_q [N_PROC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_PROC; i++) regs_q[i] <= '{fresh: 1'b0, code: ST_NONE, res_id: '0};
    end else begin
      for (int i = 0; i < N_PROC; i++) begin
        if (a_we && 32'(a_proc) == i)
          regs_q[i] <= '{fresh: 1'b1, code: a_code, res_id: res_id};
        else if (b_we && 32'(b_proc) == i)
          regs_q[i] <= '{fresh: 1'b1, code: b_code, res_id: res_id};
        else if (rd_en && 32'(rd_idx) == i)
          regs_q[i].fresh <= 1'b0;
      end
    end
  end

  always_comb begin
    rd_word = '0;
    for (int i = 0; i < N_PROC; i++) begin
      if (32'(rd_idx) == i) rd_word = pack_status(regs_q[i]);
      notify[i] = regs_q[i].fresh;
    end
  end

  // The controller never reports to the same process on both ports at once.
  a_ports_distinct: assert property (@(posedge clk) disable iff (!rst_n)
    a_we && b_we |-> a_proc != b_proc);

endmodule
