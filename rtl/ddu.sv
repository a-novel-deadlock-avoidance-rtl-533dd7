// ddu: Deadlock Detection Unit.
//
// Stores the resource allocation graph of single-unit resources as an
// N_RES x N_PROC matrix of cells (none / request / grant, see dau_pkg) and
// tells, on demand, whether the graph holds a cycle, which for single-unit
// resources is the same as a deadlock.
//
// Detection is the parallel "terminal edge reduction" of the matrix. A row
// (resource) or a column (process) whose cells are not a mix of request and
// grant edges is a node with only incoming or only outgoing edges, so none of
// its edges can lie on a cycle: all of them are removed at once, for every
// such row and column in the same clock cycle. The reduction repeats on a
// working copy until a cycle removes nothing. Edges left over then lie on, or
// between, cycles: deadlock = any edge left. Only bit-wise operations are
// used and no cycle is ever traced. This follows the unit's description as a
// matrix-based, bit-wise, O(min(m,n)) reduction; the cycle-by-cycle schedule
// below is this design's own.
//
// Interface
//   wr_en/wr_res/wr_proc/wr_cell  write one cell of the stored matrix (cell access)
//   mat_o                         the stored matrix, read combinationally
//   start                         copy the stored matrix into the working copy and
//                                 begin reducing; ignored while busy
//   ddu_reset                     abort a run and clear done/deadlock (matrix kept)
//   busy, done, deadlock          done and deadlock hold until the next start/reset
//   iterations                    reduction steps that removed edges in the last run
// Timing: start is sampled at a clock edge; each following cycle performs one
// reduction step; the first step that removes nothing raises done (with
// deadlock valid) at its closing edge. A graph needing k removing steps gives
// done k+1 cycles after start.
module ddu
  import dau_pkg::*;
#(
  parameter int unsigned N_RES  = 5,
  parameter int unsigned N_PROC = 5,
  localparam int unsigned RW = (N_RES  > 1) ? $clog2(N_RES)  : 1,
  localparam int unsigned PW = (N_PROC > 1) ? $clog2(N_PROC) : 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // cell access
  input  logic                                 wr_en,
  input  logic [RW-1:0]                        wr_res,
  input  logic [PW-1:0]                        wr_proc,
  input  cell_e                                wr_cell,
  output logic [N_RES-1:0][N_PROC-1:0][1:0]    mat_o,
  // detection control
  input  logic                                 start,
  input  logic                                 ddu_reset,
  output logic                                 busy,
  output logic                                 done,
  output logic                                 deadlock,
  output logic [7:0]                           iterations
);

  logic [N_RES-1:0][N_PROC-1:0][1:0] mat_q;    // stored graph
  logic [N_RES-1:0][N_PROC-1:0][1:0] work_q;   // copy being reduced
  logic [N_RES-1:0][N_PROC-1:0][1:0] work_d;

  logic [N_RES-1:0]  row_r, row_g, row_term;
  logic [N_PROC-1:0] col_r, col_g, col_term;
  logic              removes, any_edge;

  assign mat_o = mat_q;

  // One reduction step, fully parallel.
  always_comb begin
    row_r = '0; row_g = '0; col_r = '0; col_g = '0;
    any_edge = 1'b0;
    for (int i = 0; i < N_RES; i++) begin
      for (int j = 0; j < N_PROC; j++) begin
        if (work_q[i][j] == CELL_REQ)   begin row_r[i] = 1'b1; col_r[j] = 1'b1; end
        if (work_q[i][j] == CELL_GRANT) begin row_g[i] = 1'b1; col_g[j] = 1'b1; end
        if (work_q[i][j] != CELL_NONE)  any_edge = 1'b1;
      end
    end
    row_term = ~(row_r & row_g);
    col_term = ~(col_r & col_g);
    removes  = 1'b0;
    work_d   = work_q;
    for (int i = 0; i < N_RES; i++) begin
      for (int j = 0; j < N_PROC; j++) begin
        if ((row_term[i] || col_term[j]) && work_q[i][j] != CELL_NONE) begin
          work_d[i][j] = CELL_NONE;
          removes      = 1'b1;
        end
      end
    end
  end

  // Stored matrix: written one cell at a time.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mat_q <= '0;
    end else if (wr_en && 32'(wr_res) < N_RES && 32'(wr_proc) < N_PROC) begin
      mat_q[wr_res][wr_proc] <= wr_cell;
    end
  end

  // Reduction engine.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      work_q     <= '0;
      busy       <= 1'b0;
      done       <= 1'b0;
      deadlock   <= 1'b0;
      iterations <= '0;
    end else if (ddu_reset) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      deadlock   <= 1'b0;
    end else if (start && !busy) begin
      work_q     <= mat_q;
      busy       <= 1'b1;
      done       <= 1'b0;
      deadlock   <= 1'b0;
      iterations <= '0;
    end else if (busy) begin
      if (removes) begin
        work_q     <= work_d;
        iterations <= iterations + 8'd1;
      end else begin
        busy     <= 1'b0;
        done     <= 1'b1;
        deadlock <= any_edge;
      end
    end
  end

  // A resource is a single unit: never more than one grant in a row.
  for (genvar i = 0; i < N_RES; i++) begin : g_row_chk
    logic [N_PROC-1:0] row_grant;
    for (genvar j = 0; j < N_PROC; j++) begin : g_cell
      assign row_grant[j] = (mat_q[i][j] == CELL_GRANT);
    end
    a_single_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(row_grant))
      else $error("ddu: resource %0d granted twice", i);
  end

endmodule
