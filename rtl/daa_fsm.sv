// daa_fsm: Deadlock Avoidance Algorithm controller (the "DAA logic").
//
// Carries out one request or release command at a time on the resource
// allocation matrix held by the ddu, using the ddu to ask "would this edge
// close a cycle?". The states and their order follow the DAA logic state
// diagram; the "DAA 2" flow charts give the decisions:
//
// Request of resource q by process p
//   AVAIL_CHK   q has no grant edge            -> GRANT_REQ: grant q to p
//               (p already waits for free q    -> retry, see below)
//               else write request edge (q,p)  -> RDL_CHK: run the ddu
//   RDL_CHK     no cycle                       -> MAKE_PENDING: p waits
//               cycle (request deadlock, R-dl) -> FIND_OWNER, CMP_PRIO
//   CMP_PRIO    p outranks the owner           -> OWNER_GIVEUP: owner is asked to
//                                                 release q, then MAKE_PENDING
//               owner outranks p               -> REQ_GIVEUP: request edge removed,
//                                                 p is asked to give up what it holds
// Release of resource q by process p
//   the grant edge (q,p) is removed            -> WAITING_CHK
//   WAITING_CHK no request on q                -> done: q is available
//   SEARCH_NEXT highest-priority waiting process not yet tried; none left
//               -> done: q stays available
//   TEMP_GRANT  turn its request edge into a grant edge -> GDL_CHK: run the ddu
//   GDL_CHK     cycle (grant deadlock, G-dl): restore the request edge, mark the
//               process tried -> SEARCH_NEXT (so the resource may go to a lower
//               priority process); no cycle -> GRANT_REL: the grant stands.
//
// Retry (this design's own): a released resource is left free when every
// waiter would close a cycle, which can only happen while an owner has not yet
// obeyed a release request. A waiting process may later repeat its request
// for the resource; if the resource is still free, the release path's
// temporary grant and G-dl check are run for that process alone, and it is
// told GRANTED or, again, PENDING.
//
// Priority is fixed by process index: process 0 has the highest priority. The
// outcome of each command is written to the status registers through two write
// ports (A: the commanding process; B: the other process concerned, an owner
// asked to release or a waiting process that received the resource).
// Also this design's own: the error checks on malformed commands, the fixed
// index priority, and a resource that stays available when every waiting
// process would deadlock.
//
// Timing: cmd_valid is accepted in IDLE only. A request granted at once takes
// 3 cycles from acceptance to IDLE; every ddu run adds its detection time.
// cmd_done pulses for one cycle on the return to IDLE and last_cycles holds the
// number of cycles the command took.
module daa_fsm
  import dau_pkg::*;
#(
  parameter int unsigned N_RES  = 5,
  parameter int unsigned N_PROC = 5,
  localparam int unsigned RW = (N_RES  > 1) ? $clog2(N_RES)  : 1,
  localparam int unsigned PW = (N_PROC > 1) ? $clog2(N_PROC) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // command from the command registers
  input  logic                              cmd_valid,
  input  cmd_t                              cmd,
  output logic                              busy,
  output logic                              cmd_done,
  output logic [7:0]                        last_cycles,
  // ddu
  output logic                              ddu_wr_en,
  output logic [RW-1:0]                     ddu_wr_res,
  output logic [PW-1:0]                     ddu_wr_proc,
  output cell_e                             ddu_wr_cell,
  input  logic [N_RES-1:0][N_PROC-1:0][1:0] mat,
  output logic                              ddu_start,
  output logic                              ddu_reset,
  input  logic                              ddu_done,
  input  logic                              ddu_deadlock,
  // status register writes
  output logic                              st_a_we,
  output logic [PW-1:0]                     st_a_proc,
  output status_e                           st_a_code,
  output logic                              st_b_we,
  output logic [PW-1:0]                     st_b_proc,
  output status_e                           st_b_code,
  output logic [7:0]                        st_res
);

  typedef enum logic [3:0] {
    S_IDLE, S_AVAIL_CHK, S_GRANT_REQ, S_RDL_CHK, S_MAKE_PENDING, S_FIND_OWNER,
    S_CMP_PRIO, S_OWNER_GIVEUP, S_REQ_GIVEUP, S_WAITING_CHK, S_SEARCH_NEXT,
    S_TEMP_GRANT, S_GDL_CHK, S_GRANT_REL
  } state_e;

  state_e            state_q, state_d;
  logic [PW-1:0]     p_q;        // commanding process
  logic [RW-1:0]     q_q;        // resource concerned
  logic [PW-1:0]     other_q;    // owner (request path) or candidate (release path)
  logic [N_PROC-1:0] tried_q;    // waiting processes whose grant would deadlock
  logic              start_q;    // ddu start, high in the first cycle of a check state
  logic              retry_q;    // request retry: the release path runs for p alone
  logic [7:0]        cyc_q;

  // Matrix views of the row of resource q.
  logic [N_PROC-1:0] row_req, row_grant;
  always_comb begin
    for (int j = 0; j < N_PROC; j++) begin
      row_req[j]   = (mat[q_q][j] == CELL_REQ);
      row_grant[j] = (mat[q_q][j] == CELL_GRANT);
    end
  end

  // Owner of q, and highest-priority (lowest index) waiting process not tried.
  logic [PW-1:0] owner, cand;
  logic          cand_found;
  always_comb begin
    owner = '0;
    for (int j = N_PROC - 1; j >= 0; j--) if (row_grant[j]) owner = PW'(j);
    cand = '0;
    cand_found = 1'b0;
    for (int j = N_PROC - 1; j >= 0; j--) begin
      if (row_req[j] && !tried_q[j]) begin
        cand = PW'(j);
        cand_found = 1'b1;
      end
    end
  end

  // Command checks at acceptance.
  logic ids_ok;
  assign ids_ok = (32'(cmd.proc_id) < N_PROC) && (32'(cmd.res_id) < N_RES);

  // Next state and outputs.
  always_comb begin
    state_d     = state_q;
    ddu_wr_en   = 1'b0;
    ddu_wr_res  = q_q;
    ddu_wr_proc = p_q;
    ddu_wr_cell = CELL_NONE;
    ddu_reset   = 1'b0;
    st_a_we     = 1'b0;
    st_a_proc   = p_q;
    st_a_code   = ST_NONE;
    st_b_we     = 1'b0;
    st_b_proc   = other_q;
    st_b_code   = ST_NONE;
    st_res      = 8'(q_q);
    unique case (state_q)
      S_IDLE: begin
        if (cmd_valid) begin
          ddu_reset   = 1'b1;
          ddu_wr_res  = RW'(cmd.res_id);
          ddu_wr_proc = PW'(cmd.proc_id);
          st_a_proc   = PW'(cmd.proc_id);
          st_res      = cmd.res_id;
          if (!ids_ok || cmd.kind == CMD_NOP || cmd.kind == cmd_e'(2'b11)) begin
            // An out-of-range process id cannot be reported to anyone.
            st_a_we   = (32'(cmd.proc_id) < N_PROC);
            st_a_code = ST_ERROR;
          end else if (cmd.kind == CMD_REQUEST) begin
            state_d = S_AVAIL_CHK;
          end else if (mat[RW'(cmd.res_id)][PW'(cmd.proc_id)] == CELL_GRANT) begin
            ddu_wr_en   = 1'b1;          // release: remove the grant edge
            ddu_wr_cell = CELL_NONE;
            state_d     = S_WAITING_CHK;
          end else begin
            st_a_we   = 1'b1;            // release of a resource not held
            st_a_code = ST_ERROR;
          end
        end
      end
      // ---------------- request path ----------------
      S_AVAIL_CHK: begin
        if (mat[q_q][p_q] == CELL_REQ && row_grant == '0) begin
          state_d = S_SEARCH_NEXT;       // retry of a request left on a free resource
        end else if (mat[q_q][p_q] != CELL_NONE) begin
          st_a_we   = 1'b1;              // already holds or already waits for q
          st_a_code = ST_ERROR;
          state_d   = S_IDLE;
        end else if (row_grant == '0) begin
          state_d = S_GRANT_REQ;
        end else begin
          ddu_wr_en   = 1'b1;
          ddu_wr_cell = CELL_REQ;
          state_d     = S_RDL_CHK;
        end
      end
      S_GRANT_REQ: begin
        ddu_wr_en   = 1'b1;
        ddu_wr_cell = CELL_GRANT;
        st_a_we     = 1'b1;
        st_a_code   = ST_GRANTED;
        state_d     = S_IDLE;
      end
      S_RDL_CHK: begin
        if (!start_q && ddu_done) state_d = ddu_deadlock ? S_FIND_OWNER : S_MAKE_PENDING;
      end
      S_MAKE_PENDING: begin
        st_a_we   = 1'b1;
        st_a_code = ST_PENDING;
        state_d   = S_IDLE;
      end
      S_FIND_OWNER: state_d = S_CMP_PRIO;
      S_CMP_PRIO:   state_d = (p_q < other_q) ? S_OWNER_GIVEUP : S_REQ_GIVEUP;
      S_OWNER_GIVEUP: begin
        st_b_we   = 1'b1;
        st_b_code = ST_RELEASE_REQ;
        state_d   = S_MAKE_PENDING;
      end
      S_REQ_GIVEUP: begin
        ddu_wr_en   = 1'b1;              // withdraw the request edge
        ddu_wr_cell = CELL_NONE;
        st_a_we     = 1'b1;
        st_a_code   = ST_GIVE_UP;
        state_d     = S_IDLE;
      end
      // ---------------- release path ----------------
      S_WAITING_CHK: begin
        st_a_we   = 1'b1;
        st_a_code = ST_RELEASED;
        state_d   = (row_req != '0) ? S_SEARCH_NEXT : S_IDLE;
      end
      S_SEARCH_NEXT: begin
        if (!cand_found && retry_q) begin
          st_a_we   = 1'b1;              // retry: the grant would still deadlock
          st_a_code = ST_PENDING;
        end
        state_d = cand_found ? S_TEMP_GRANT : S_IDLE;
      end
      S_TEMP_GRANT: begin
        ddu_wr_en   = 1'b1;
        ddu_wr_proc = other_q;
        ddu_wr_cell = CELL_GRANT;
        state_d     = S_GDL_CHK;
      end
      S_GDL_CHK: begin
        if (!start_q && ddu_done) begin
          if (ddu_deadlock) begin
            ddu_wr_en   = 1'b1;          // undo the temporary grant
            ddu_wr_proc = other_q;
            ddu_wr_cell = CELL_REQ;
            state_d     = S_SEARCH_NEXT;
          end else begin
            state_d = S_GRANT_REL;
          end
        end
      end
      S_GRANT_REL: begin
        if (retry_q) begin
          st_a_we   = 1'b1;
          st_a_code = ST_GRANTED;
        end else begin
          st_b_we   = 1'b1;
          st_b_code = ST_GRANTED;
        end
        state_d = S_IDLE;
      end
      default: state_d = S_IDLE;
    endcase
  end

  assign ddu_start = start_q;
  assign busy      = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      p_q         <= '0;
      q_q         <= '0;
      other_q     <= '0;
      tried_q     <= '0;
      start_q     <= 1'b0;
      retry_q     <= 1'b0;
      cyc_q       <= '0;
      last_cycles <= '0;
      cmd_done    <= 1'b0;
    end else begin
      state_q  <= state_d;
      start_q  <= (state_d == S_RDL_CHK || state_d == S_GDL_CHK) && state_q != state_d;
      cmd_done <= 1'b0;
      if (state_q == S_IDLE && cmd_valid) begin
        p_q     <= PW'(cmd.proc_id);
        q_q     <= RW'(cmd.res_id);
        tried_q <= '0;
        retry_q <= 1'b0;
        cyc_q   <= 8'd1;
      end else if (state_q != S_IDLE) begin
        cyc_q <= cyc_q + 8'd1;
      end
      if (state_q == S_AVAIL_CHK && state_d == S_SEARCH_NEXT) begin
        retry_q    <= 1'b1;
        tried_q    <= '1;
        tried_q[p_q] <= 1'b0;            // only the retrying process is a candidate
      end
      if (state_q == S_FIND_OWNER) other_q <= owner;
      if (state_q == S_SEARCH_NEXT && cand_found) other_q <= cand;
      if (state_q == S_GDL_CHK && !start_q && ddu_done && ddu_deadlock) tried_q[other_q] <= 1'b1;
      if (state_q != S_IDLE && state_d == S_IDLE) begin
        cmd_done    <= 1'b1;
        last_cycles <= cyc_q + 8'd1;
      end else if (state_q == S_IDLE && cmd_valid && state_d == S_IDLE) begin
        cmd_done    <= 1'b1;             // rejected at once
        last_cycles <= 8'd1;
      end
    end
  end

  // A ddu check is never left before the unit has answered.
  a_check_answered: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q inside {S_RDL_CHK, S_GDL_CHK}) && state_d != state_q |-> ddu_done && !start_q);

endmodule
