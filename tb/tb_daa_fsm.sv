// tb_daa_fsm: self-checking testbench of the deadlock avoidance controller.
//
// The controller runs against a real ddu. A reference model of the avoidance
// algorithm, written here with its own cycle test (depth-first search over
// the resource allocation graph), predicts for every command the new matrix
// and the status reports on both report ports. Commands come from processes
// that behave like RTOS tasks: they request and release at random, but a
// process asked to release a resource releases it next, and a process told to
// give up releases everything it holds. A few malformed commands are mixed in.
// A directed sequence at the end leaves a released resource free (every waiter
// would deadlock while an owner has not yet complied) and then retries.
// Also checked: a request for a free resource completes in 3 cycles, no
// command exceeds a fixed worst-case cycle count, and
// every branch of the controller is taken at least once.
module tb_daa_fsm;
  import dau_pkg::*;

  localparam int unsigned M = 5;   // resources
  localparam int unsigned N = 5;   // processes
  localparam int unsigned RW = $clog2(M), PW = $clog2(N);
  // Worst case of one command: a release that tries every process, each try
  // taking search + temporary grant + a ddu run of at most 2*min(m,n)+2 cycles.
  localparam int unsigned DDU_MAX = 2 * ((M < N) ? M : N) + 2;
  localparam int unsigned CMD_MAX = 4 + N * (3 + DDU_MAX);

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0;
  cmd_t cmd = '{kind: CMD_NOP, proc_id: 8'd0, res_id: 8'd0};
  logic busy, cmd_done;
  logic [7:0] last_cycles;
  logic ddu_wr_en, ddu_start, ddu_reset, ddu_busy, ddu_done, ddu_deadlock;
  logic [RW-1:0] ddu_wr_res;
  logic [PW-1:0] ddu_wr_proc;
  cell_e ddu_wr_cell;
  logic [M-1:0][N-1:0][1:0] mat;
  logic [7:0] ddu_iter;
  logic st_a_we, st_b_we;
  logic [PW-1:0] st_a_proc, st_b_proc;
  status_e st_a_code, st_b_code;
  logic [7:0] st_res;

  daa_fsm #(.N_RES(M), .N_PROC(N)) dut (.*);
  ddu #(.N_RES(M), .N_PROC(N)) u_ddu (
    .clk, .rst_n, .wr_en(ddu_wr_en), .wr_res(ddu_wr_res), .wr_proc(ddu_wr_proc),
    .wr_cell(ddu_wr_cell), .mat_o(mat), .start(ddu_start), .ddu_reset, .busy(ddu_busy),
    .done(ddu_done), .deadlock(ddu_deadlock), .iterations(ddu_iter));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // how often each branch was taken
  int n_grant = 0, n_pending = 0, n_owner_giveup = 0, n_req_giveup = 0, n_error = 0;
  int n_avail = 0, n_handover = 0, n_gdl_skip = 0, n_kept_free = 0;
  int max_cycles = 0, n_retry = 0;
  bit was_retry;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("tb_daa_fsm: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  cell_e g [M][N];

  function automatic bit reaches(int node, int target, ref bit seen [M+N]);
    // nodes 0..M-1 resources, M.. processes; edges from the matrix
    if (seen[node]) return 0;
    seen[node] = 1;
    if (node < M) begin
      for (int j = 0; j < N; j++)
        if (g[node][j] == CELL_GRANT && (M + j == target || reaches(M + j, target, seen))) return 1;
    end else begin
      for (int i = 0; i < M; i++)
        if (g[i][node-M] == CELL_REQ && (i == target || reaches(i, target, seen))) return 1;
    end
    return 0;
  endfunction

  function automatic bit has_cycle();
    for (int s = 0; s < M + N; s++) begin
      bit seen [M+N];
      foreach (seen[k]) seen[k] = 0;
      if (reaches(s, s, seen)) return 1;
    end
    return 0;
  endfunction

  typedef struct { bit we; int proc; status_e code; } rep_t;
  rep_t exp_a, exp_b, got_a, got_b;
  int   got_res;

  // obligations of the simulated processes
  bit must_release [N][M];
  bit must_giveup  [N];

  task automatic model(cmd_e kind, int p, int q);
    exp_a = '{0, 0, ST_NONE}; exp_b = '{0, 0, ST_NONE};
    was_retry = 0;
    if (p >= N || q >= M || !(kind inside {CMD_REQUEST, CMD_RELEASE})) begin
      if (p < N) exp_a = '{1, p, ST_ERROR};
      n_error++;
      return;
    end
    if (kind == CMD_REQUEST) begin
      int owner = -1;
      for (int j = 0; j < N; j++) if (g[q][j] == CELL_GRANT) owner = j;
      if (g[q][p] == CELL_REQ && owner < 0) begin
        // retry of a request left on a free resource
        g[q][p] = CELL_GRANT;
        if (has_cycle()) begin g[q][p] = CELL_REQ; exp_a = '{1, p, ST_PENDING}; end
        else exp_a = '{1, p, ST_GRANTED};
        n_retry++;
        was_retry = 1;
      end
      else if (g[q][p] != CELL_NONE) begin exp_a = '{1, p, ST_ERROR}; n_error++; end
      else if (owner < 0) begin g[q][p] = CELL_GRANT; exp_a = '{1, p, ST_GRANTED}; n_grant++; end
      else begin
        g[q][p] = CELL_REQ;
        if (!has_cycle()) begin exp_a = '{1, p, ST_PENDING}; n_pending++; end
        else if (p < owner) begin
          exp_a = '{1, p, ST_PENDING}; exp_b = '{1, owner, ST_RELEASE_REQ};
          must_release[owner][q] = 1; n_owner_giveup++;
        end else begin
          g[q][p] = CELL_NONE; exp_a = '{1, p, ST_GIVE_UP};
          must_giveup[p] = 1; n_req_giveup++;
        end
      end
    end else begin
      if (g[q][p] != CELL_GRANT) begin exp_a = '{1, p, ST_ERROR}; n_error++; return; end
      g[q][p] = CELL_NONE;
      must_release[p][q] = 0;
      exp_a = '{1, p, ST_RELEASED};
      begin
        bit any_wait = 0, given = 0;
        for (int j = 0; j < N && !given; j++) begin
          if (g[q][j] != CELL_REQ) continue;
          any_wait = 1;
          g[q][j] = CELL_GRANT;
          if (has_cycle()) begin g[q][j] = CELL_REQ; n_gdl_skip++; end
          else begin exp_b = '{1, j, ST_GRANTED}; given = 1; end
        end
        if (!any_wait) n_avail++;
        else if (given) n_handover++;
        else n_kept_free++;
      end
    end
  endtask

  // ---------------- driver and monitor ----------------
  always @(posedge clk) begin
    if (st_a_we) begin got_a = '{1, int'(st_a_proc), st_a_code}; got_res = st_res; end
    if (st_b_we) begin got_b = '{1, int'(st_b_proc), st_b_code}; got_res = st_res; end
  end

  task automatic issue(cmd_e kind, int p, int q);
    int cyc = 0;
    got_a = '{0, 0, ST_NONE}; got_b = '{0, 0, ST_NONE}; got_res = -1;
    @(negedge clk);
    cmd_valid = 1; cmd = '{kind: kind, proc_id: 8'(p), res_id: 8'(q)};
    @(negedge clk);
    cmd_valid = 0;
    cyc = 1;
    while (!cmd_done && cyc < 500) begin @(negedge clk); cyc++; end
    model(kind, p, q);
    checks++;
    if (got_a.we != exp_a.we || (exp_a.we && (got_a.proc != exp_a.proc || got_a.code != exp_a.code))) begin
      failures++;
      $display("tb_daa_fsm: cmd %s p%0d q%0d: port A got %0b/%0d/%s expected %0b/%0d/%s",
               kind.name(), p, q, got_a.we, got_a.proc, got_a.code.name(),
               exp_a.we, exp_a.proc, exp_a.code.name());
    end
    checks++;
    if (got_b.we != exp_b.we || (exp_b.we && (got_b.proc != exp_b.proc || got_b.code != exp_b.code))) begin
      failures++;
      $display("tb_daa_fsm: cmd %s p%0d q%0d: port B got %0b/%0d/%s expected %0b/%0d/%s",
               kind.name(), p, q, got_b.we, got_b.proc, got_b.code.name(),
               exp_b.we, exp_b.proc, exp_b.code.name());
    end
    if ((exp_a.we || exp_b.we) && q < M) begin
      checks++;
      if (got_res != q) begin failures++; $display("tb_daa_fsm: reported resource %0d, expected %0d", got_res, q); end
    end
    checks++;
    for (int i = 0; i < M; i++) for (int j = 0; j < N; j++)
      if (mat[i][j] != g[i][j]) begin
        failures++;
        $display("tb_daa_fsm: after %s p%0d q%0d cell (%0d,%0d) is %0d expected %0d",
                 kind.name(), p, q, i, j, mat[i][j], g[i][j]);
        i = M; break;
      end
    checks++;
    if (busy) begin failures++; $display("tb_daa_fsm: busy after cmd_done"); end
    checks++;
    if (last_cycles != 8'(cyc)) begin
      failures++; $display("tb_daa_fsm: last_cycles %0d, measured %0d", last_cycles, cyc);
    end
    checks++;
    if (cyc > CMD_MAX) begin failures++; $display("tb_daa_fsm: command took %0d cycles, bound %0d", cyc, CMD_MAX); end
    if (cyc > max_cycles) max_cycles = cyc;
    if (kind == CMD_REQUEST && exp_a.code == ST_GRANTED && !was_retry) begin
      checks++;
      if (cyc != 3) begin failures++; $display("tb_daa_fsm: immediate grant took %0d cycles", cyc); end
    end
  endtask

  // Next command of the simulated processes.
  task automatic step();
    // obligations first
    for (int p = 0; p < N; p++) begin
      for (int q = 0; q < M; q++) begin
        if ((must_giveup[p] || must_release[p][q]) && g[q][p] == CELL_GRANT) begin
          issue(CMD_RELEASE, p, q);
          return;
        end
      end
      must_giveup[p] = 0;
      for (int q = 0; q < M; q++) must_release[p][q] = 0;
    end
    begin
      int p, q, r;
      p = $urandom_range(N - 1);
      q = $urandom_range(M - 1);
      r = $urandom_range(99);
      if (r < 3) issue(cmd_e'($urandom_range(3)), $urandom_range(N + 1), $urandom_range(M + 1));
      else if (r < 45 && g[q][p] == CELL_GRANT) issue(CMD_RELEASE, p, q);
      else if (r < 55 && g[q][p] == CELL_REQ) begin
        // a waiting process stays blocked; someone else acts
        int o = -1;
        for (int j = 0; j < N; j++) if (g[q][j] == CELL_GRANT) o = j;
        if (o >= 0) issue(CMD_RELEASE, o, q); else issue(CMD_REQUEST, p, q);
      end else issue(CMD_REQUEST, p, q);
    end
  endtask

  initial begin
    foreach (g[i, j]) g[i][j] = CELL_NONE;
    foreach (must_release[i, j]) must_release[i][j] = 0;
    foreach (must_giveup[i]) must_giveup[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // The grant-deadlock example: P1 holds Q1 and Q2 is held by P0; P1 and P2 wait for Q2,
    // P2 holds Q3 and P1 waits for Q3 ... built up by commands, then Q2 is released.
    issue(CMD_REQUEST, 0, 1);   // P0 gets Q1
    issue(CMD_REQUEST, 1, 2);   // P1 gets Q2
    issue(CMD_REQUEST, 2, 1);   // P2 waits for Q1
    issue(CMD_REQUEST, 1, 1);   // P1 waits for Q1
    issue(CMD_REQUEST, 2, 2);   // P2 -> Q2: R-dl? no (P1 waits Q1, not P2's) -> pending
    issue(CMD_RELEASE, 0, 1);   // Q1 freed: P1 first would close P1<->P2? model decides
    // The request-deadlock example in both priority orders.
    issue(CMD_REQUEST, 3, 3);
    issue(CMD_REQUEST, 4, 4);
    issue(CMD_REQUEST, 3, 4);   // P3 waits for Q4
    issue(CMD_REQUEST, 4, 3);   // P4 -> Q3 closes a cycle, P4 lower: gives up
    issue(CMD_RELEASE, 4, 4);   // P4 complies: Q4 goes to P3
    repeat (4000) step();
    // Directed: a release that no waiter can take. P1 holds Q1, P0 holds Q0,
    // P2 holds Q2; P1 and P0 wait for Q2; P1 waits for Q0; P0's request for Q1
    // closes a cycle and P1 is asked to release Q1. Before P1 complies, P2
    // releases Q2: giving it to either waiter closes a cycle, so it stays free.
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    foreach (g[i, j]) g[i][j] = CELL_NONE;
    issue(CMD_REQUEST, 0, 0);
    issue(CMD_REQUEST, 1, 1);
    issue(CMD_REQUEST, 2, 2);
    issue(CMD_REQUEST, 1, 2);
    issue(CMD_REQUEST, 0, 2);
    issue(CMD_REQUEST, 1, 0);
    issue(CMD_REQUEST, 0, 1);
    issue(CMD_RELEASE, 2, 2);
    checks++;
    if ((mat[2][0] != CELL_REQ || mat[2][1] != CELL_REQ || mat[2][2] != CELL_NONE)) begin
      failures++; $display("tb_daa_fsm: released resource not left free with both requests pending");
    end
    issue(CMD_REQUEST, 0, 2);   // retry before P1 complies: still pending
    issue(CMD_RELEASE, 1, 1);   // P1 complies, P0 gets Q1
    issue(CMD_REQUEST, 0, 2);   // retry: now granted
    checks++;
    if (mat[2][0] != CELL_GRANT) begin failures++; $display("tb_daa_fsm: retry did not grant"); end
    $display("tb_daa_fsm: grant %0d pending %0d owner-give-up %0d requester-give-up %0d error %0d",
             n_grant, n_pending, n_owner_giveup, n_req_giveup, n_error);
    $display("tb_daa_fsm: retried requests %0d", n_retry);
    $display("tb_daa_fsm: longest command %0d cycles (bound %0d)", max_cycles, CMD_MAX);
    $display("tb_daa_fsm: release: available %0d handed over %0d G-dl skipped %0d kept free %0d",
             n_avail, n_handover, n_gdl_skip, n_kept_free);
    checks++;
    if (n_grant == 0 || n_pending == 0 || n_owner_giveup == 0 || n_req_giveup == 0 || n_error == 0 ||
        n_avail == 0 || n_handover == 0 || n_gdl_skip == 0 || n_kept_free == 0 || n_retry == 0) begin
      failures++; $display("tb_daa_fsm: a branch of the controller was never taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
