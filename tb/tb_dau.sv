// tb_dau: end-to-end testbench of the Deadlock Avoidance Unit at its default
// size (5 processes, 5 resources), driven only through the register bus.
//
// It runs the video application the unit was built for: four processes on
// four processing elements share four single-unit resources,
//   P1 (process 0): video stream       needs Q1 (video interface) + Q2 (MPEG)
//   P2 (process 1): frame enhancement  needs Q2 (MPEG) + Q3 (DSP)
//   P3 (process 2): image extraction   needs Q3 (DSP) + Q1 (video interface)
//   P4 (process 3): image transfer     needs Q4 (wireless interface)
// Each job requests its resources, works for a random time and releases
// them. The application runs in three phases of 100 jobs per process:
//   0  requests in random order, sometimes posted before the first is granted;
//   1  every process asks for its two resources one after the other in the
//      same rotational order, the classic setting for request deadlock;
//   2  P1..P3 each need a random two or three of Q1..Q3, as the software flow
//      decides, and post all requests at once: the setting for grant deadlock.
// The simulated processes obey the unit: a process asked to release a
// resource releases it, a process told to give up releases everything and
// retries later. Before the application the testbench replays the
// grant-deadlock example (a released resource must go to a lower-priority
// waiter), a request deadlock in both priority orders, a release that no
// waiter can take followed by retries, a malformed command and a command
// written while the unit is busy.
//
// Checked after every command: each status report matches what the process
// can expect; the matrix read back over the bus equals the bookkeeping kept
// here from those reports; the graph, searched here for cycles, holds one
// only while an owner has an outstanding request to release; every process
// completes its jobs (no deadlock, no livelock). Every mechanism of the unit
// must occur at least once; phase 1 must avoid a request deadlock and phase 2
// a grant deadlock. Per phase, the avoided deadlocks and the average number of
// cycles per command that needed a deadlock check are reported.
module tb_dau;
  import dau_pkg::*;

  localparam int unsigned N = 5, M = 5;   // the unit's defaults
  localparam int unsigned JOBS = 100;     // jobs per process in each phase of the application

  logic clk = 1'b0, rst_n = 1'b0;
  logic [ADDR_W-1:0] bus_addr = '0;
  logic bus_we = 1'b0, bus_re = 1'b0;
  logic [DATA_W-1:0] bus_wdata = '0, bus_rdata;
  logic [N-1:0] notify;

  dau dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit trace = 0;
  // mechanisms
  int n_grant = 0, n_pending = 0, n_owner_giveup = 0, n_req_giveup = 0, n_released = 0;
  int n_handover = 0, n_lower_prio = 0, n_free_no_waiter = 0, n_error = 0, n_overrun = 0;
  int n_checked_cmds = 0, sum_checked_cycles = 0;
  int n_gdl = 0;                          // releases where a grant deadlock was avoided
  int n_kept_free = 0, n_retry = 0;
  int last_grantee = -1;
  int app_mode = 0;                       // 0 mixed, 1 request-deadlock prone, 2 grant-deadlock prone

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("tb_dau: watchdog expired");
    for (int p = 0; p < N; p++)
      $display("tb_dau: P%0d jobs %0d held %p waits %p oblig %0d needs %0d", p, jobs_done[p], held[p], waits[p], any_obligation(p), need_n[p]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("tb_dau: %s", what); end
  endtask

  // ---------------- bus ----------------
  task automatic bus_write(logic [ADDR_W-1:0] a, logic [DATA_W-1:0] d);
    @(negedge clk); bus_addr = a; bus_we = 1; bus_wdata = d;
    @(negedge clk); bus_we = 0;
  endtask

  task automatic bus_read(logic [ADDR_W-1:0] a, output logic [DATA_W-1:0] d);
    @(negedge clk); bus_addr = a; bus_re = 1;
    @(negedge clk); bus_re = 0; d = bus_rdata;
  endtask

  // ---------------- bookkeeping of the simulated processes ----------------
  bit held [N][M];
  bit waits [N][M];
  bit must_release [N][M];
  bit must_giveup [N];
  int jobs_done [N];
  int need_n [N];
  int need_q [N][3];
  int work_left [N];
  bit finishing [N];

  function automatic bit any_obligation(int p);
    if (must_giveup[p]) return 1;
    for (int q = 0; q < M; q++) if (must_release[p][q]) return 1;
    return 0;
  endfunction

  // cycle search over the matrix read back from the unit
  cell_e rb [M][N];
  function automatic bit reach(int node, int target, ref bit seen [M+N]);
    if (seen[node]) return 0;
    seen[node] = 1;
    if (node < M) begin
      for (int j = 0; j < N; j++)
        if (rb[node][j] == CELL_GRANT && (M + j == target || reach(M + j, target, seen))) return 1;
    end else begin
      for (int i = 0; i < M; i++)
        if (rb[i][node-M] == CELL_REQ && (i == target || reach(i, target, seen))) return 1;
    end
    return 0;
  endfunction
  function automatic bit cyclic();
    for (int s = 0; s < M + N; s++) begin
      bit seen [M+N];
      foreach (seen[k]) seen[k] = 0;
      if (reach(s, s, seen)) return 1;
    end
    return 0;
  endfunction

  // Read every fresh status register and update the bookkeeping.
  task automatic service(int cmd_p, int cmd_q, cmd_e kind);
    logic [DATA_W-1:0] w;
    for (int p = 0; p < N; p++) begin
      if (!notify[p]) continue;
      bus_read(A_STATUS0 + ADDR_W'(p), w);
      begin
        status_e code = status_e'(w[18:16]);
        int q = int'(w[7:0]);
        check(w[31] == 1'b1, "status not marked fresh");
        check(q < M, "status names a resource out of range");
        case (code)
          ST_GRANTED: begin
            check(!held[p][q], "granted a resource already held");
            if (p == cmd_p) n_grant++;
            else begin
              n_handover++;
              last_grantee = p;
              for (int j = 0; j < p; j++) if (waits[j][q]) n_lower_prio++;
            end
            held[p][q] = 1; waits[p][q] = 0;
          end
          ST_PENDING:     begin check(p == cmd_p && kind == CMD_REQUEST, "unexpected pending"); waits[p][q] = 1; n_pending++; end
          ST_GIVE_UP:     begin check(p == cmd_p && kind == CMD_REQUEST, "unexpected give-up"); must_giveup[p] = 1; n_req_giveup++; end
          ST_RELEASE_REQ: begin check(p != cmd_p && held[p][q] && p > cmd_p, "unexpected release request"); must_release[p][q] = 1; n_owner_giveup++; end
          ST_RELEASED:    begin check(p == cmd_p && kind == CMD_RELEASE && held[p][q], "unexpected released"); held[p][q] = 0; must_release[p][q] = 0; n_released++; end
          ST_ERROR:       begin n_error++; end
          default:        check(0, $sformatf("unknown status code %0d", code));
        endcase
      end
    end
  endtask

  // Compare the matrix with the bookkeeping and test the no-deadlock property.
  task automatic audit();
    logic [DATA_W-1:0] w;
    bit obligation = 0;
    for (int q = 0; q < M; q++) begin
      bus_read(A_ROW0 + ADDR_W'(q), w);
      for (int p = 0; p < N; p++) rb[q][p] = cell_e'(w[2*p +: 2]);
    end
    checks++;
    for (int q = 0; q < M; q++) for (int p = 0; p < N; p++) begin
      cell_e e = held[p][q] ? CELL_GRANT : waits[p][q] ? CELL_REQ : CELL_NONE;
      if (rb[q][p] != e) begin
        failures++; $display("tb_dau: cell (Q%0d,P%0d) reads %0d, reports say %0d", q, p, rb[q][p], e);
        q = M; break;
      end
    end
    for (int p = 0; p < N; p++) obligation |= any_obligation(p);
    check(!cyclic() || obligation, "the graph holds a cycle nobody was asked to break");
  endtask

  // Issue one command, wait for it, service the reports and audit.
  task automatic command(cmd_e kind, int p, int q);
    logic [DATA_W-1:0] w;
    logic [N-1:0] waiters;
    bus_write(A_CMD, pack_cmd('{kind: kind, proc_id: 8'(p), res_id: 8'(q)}));
    if (trace) $display("%0t cmd %s P%0d Q%0d", $time, kind.name(), p, q);
    do bus_read(A_CTRL, w); while (w[0]);
    if (kind == CMD_REQUEST && int'(w[15:8]) > 3) begin
      n_checked_cmds++; sum_checked_cycles += int'(w[15:8]);
    end
    last_grantee = -1;
    waiters = '0;
    if (kind == CMD_REQUEST && waits[p][q]) n_retry++;
    if (kind == CMD_RELEASE) begin
      for (int j = 0; j < N; j++) waiters[j] = waits[j][q];
      if (waiters == '0) n_free_no_waiter++;
      else begin n_checked_cmds++; sum_checked_cycles += int'(w[15:8]); end
    end
    service(p, q, kind);
    if (waiters != '0) begin
      // the highest-priority waiter was passed over, or nobody could take q
      bit skipped = (last_grantee < 0);
      if (last_grantee < 0) n_kept_free++;
      for (int j = 0; j < N; j++) if (waiters[j] && j < last_grantee) skipped = 1;
      if (skipped) n_gdl++;
    end
    audit();
  endtask

  // ---------------- application ----------------
  task automatic new_job(int p);
    // needs in the order the job asks for them
    case (p)
      0: begin need_n[p] = 2; need_q[p][0] = 0; need_q[p][1] = 1; end
      1: begin need_n[p] = 2; need_q[p][0] = 1; need_q[p][1] = 2; end
      2: begin need_n[p] = 2; need_q[p][0] = 2; need_q[p][1] = 0; end
      default: begin need_n[p] = 1; need_q[p][0] = 3; end
    endcase
    if (app_mode == 2 && p < 3) begin
      // the software flow decides: two or three of Q1..Q3, in any order
      int first = $urandom_range(2);
      need_n[p] = $urandom_range(2, 3);
      for (int k = 0; k < 3; k++) need_q[p][k] = (first + k) % 3;
      if ($urandom_range(1)) begin int t = need_q[p][1]; need_q[p][1] = need_q[p][2]; need_q[p][2] = t; end
    end else if (app_mode != 1 && need_n[p] == 2 && $urandom_range(1)) begin
      int t = need_q[p][0]; need_q[p][0] = need_q[p][1]; need_q[p][1] = t;
    end
    work_left[p] = $urandom_range(1, 6);
  endtask

  function automatic bit blocked(int p);
    for (int q = 0; q < M; q++) if (waits[p][q]) return 1;
    return 0;
  endfunction

  task automatic turn(int p);
    // obligations first
    for (int q = 0; q < M; q++)
      if ((must_release[p][q] || must_giveup[p]) && held[p][q]) begin
        command(CMD_RELEASE, p, q);
        return;
      end
    if (must_giveup[p]) begin
      must_giveup[p] = 0;
      work_left[p] = $urandom_range(1, 6);   // back off, keep the job
      return;
    end
    for (int q = 0; q < M; q++) must_release[p][q] = 0;
    if (jobs_done[p] >= JOBS) return;
    if (finishing[p]) begin
      // job finished: release what it holds, then start the next one
      for (int q = 0; q < M; q++) if (held[p][q]) begin command(CMD_RELEASE, p, q); return; end
      finishing[p] = 0;
      jobs_done[p]++;
      new_job(p);
      return;
    end
    // ask for what the job still needs; a process may post further requests
    // while it waits: sometimes in mode 0, never in mode 1, always in mode 2
    for (int k = 0; k < need_n[p]; k++) begin
      int q = need_q[p][k];
      if (held[p][q] || waits[p][q]) continue;
      if (k == 0) begin command(CMD_REQUEST, p, q); return; end
      if (blocked(p)) begin
        if (app_mode == 2 || (app_mode == 0 && $urandom_range(3) == 0)) command(CMD_REQUEST, p, q);
        return;
      end
      if (app_mode == 2 || $urandom_range(2) == 0) command(CMD_REQUEST, p, q);
      return;
    end
    if (blocked(p)) return;
    if (work_left[p] > 0) begin work_left[p]--; return; end
    finishing[p] = 1;
  endtask

  int stall = 0;
  function automatic int total_jobs();
    int t = 0;
    for (int p = 0; p < 4; p++) t += jobs_done[p];
    return t;
  endfunction

  function automatic bit all_done();
    for (int p = 0; p < 4; p++) if (jobs_done[p] < JOBS) return 0;
    return 1;
  endfunction

  initial begin
    logic [DATA_W-1:0] w;
    foreach (held[p, q]) begin held[p][q] = 0; waits[p][q] = 0; must_release[p][q] = 0; end
    foreach (must_giveup[p]) begin must_giveup[p] = 0; jobs_done[p] = 0; finishing[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    bus_read(A_CTRL, w);
    check(w[23:16] == 8'(N) && w[31:24] == 8'(M), "size fields of the control word");

    // Grant deadlock: P1 holds Q2, P3 holds Q3, P2 waits for Q2 and Q3, P3 waits for Q2.
    // When P1 releases Q2, giving it to P2 would close P2->Q3->P3->Q2->P2,
    // so Q2 must go to the lower-priority P3.
    command(CMD_REQUEST, 0, 1);
    command(CMD_REQUEST, 2, 2);
    command(CMD_REQUEST, 1, 1);
    command(CMD_REQUEST, 1, 2);
    command(CMD_REQUEST, 2, 1);
    command(CMD_RELEASE, 0, 1);
    check(held[2][1] && waits[1][1], "grant deadlock example: Q2 did not go to P3");
    command(CMD_RELEASE, 2, 1);   // P2 now gets Q2
    command(CMD_RELEASE, 2, 2);   // and Q3
    check(held[1][1] && held[1][2], "grant deadlock example: P2 did not get Q2 and Q3");
    command(CMD_RELEASE, 1, 1);
    command(CMD_RELEASE, 1, 2);

    // Request deadlock, requester of higher priority: P1 holds Q1, P2 holds Q2,
    // P2 waits for Q1, then P1 asks for Q2: P2 is asked to release Q2.
    command(CMD_REQUEST, 0, 0);
    command(CMD_REQUEST, 1, 1);
    command(CMD_REQUEST, 1, 0);
    command(CMD_REQUEST, 0, 1);
    check(must_release[1][1] && waits[0][1], "request deadlock: owner not asked to release");
    command(CMD_RELEASE, 1, 1);   // P2 complies, P1 gets Q2
    check(held[0][1], "request deadlock: P1 did not get Q2");
    command(CMD_RELEASE, 0, 0);   // P1 done: Q1 goes to P2
    command(CMD_RELEASE, 0, 1);
    command(CMD_RELEASE, 1, 0);
    // Request deadlock, requester of lower priority: P3 is told to give up.
    command(CMD_REQUEST, 1, 2);
    command(CMD_REQUEST, 2, 0);
    command(CMD_REQUEST, 1, 0);
    command(CMD_REQUEST, 2, 2);
    check(must_giveup[2] && !waits[2][2], "request deadlock: requester not told to give up");
    turn(2); turn(2);             // P3 gives up Q1; P2 gets it
    check(held[1][0], "request deadlock: P2 did not get Q1");
    command(CMD_RELEASE, 1, 0);
    command(CMD_RELEASE, 1, 2);

    // A release nobody can take, then a retry. P0 holds Q0, P1 holds Q1, P2
    // holds Q2; P1 and P0 wait for Q2; P1 waits for Q0; P0's request for Q1
    // makes P1 owe Q1. Before P1 complies, P2 releases Q2: either grant would
    // close a cycle, so Q2 stays free. P0 retries (still pending), P1
    // complies, P0 retries again and gets Q2.
    command(CMD_REQUEST, 0, 0);
    command(CMD_REQUEST, 1, 1);
    command(CMD_REQUEST, 2, 2);
    command(CMD_REQUEST, 1, 2);
    command(CMD_REQUEST, 0, 2);
    command(CMD_REQUEST, 1, 0);
    command(CMD_REQUEST, 0, 1);
    command(CMD_RELEASE, 2, 2);
    check(n_kept_free == 1 && waits[0][2] && waits[1][2], "released resource not left free");
    command(CMD_REQUEST, 0, 2);
    check(waits[0][2], "retry granted while the cycle still exists");
    command(CMD_RELEASE, 1, 1);
    command(CMD_REQUEST, 0, 2);
    check(held[0][2] && held[0][1] && held[0][0], "retry did not grant");
    for (int q = 0; q < 3; q++) command(CMD_RELEASE, 0, q);
    check(held[1][0] && held[1][2], "waiter did not receive the released resources");
    command(CMD_RELEASE, 1, 0);
    command(CMD_RELEASE, 1, 2);

    // A malformed command and a command written while the unit is busy.
    command(CMD_RELEASE, 3, 4);   // releases what P4 does not hold
    check(n_error == 1, "malformed command not reported");
    command(CMD_REQUEST, 4, 4);
    command(CMD_REQUEST, 0, 4);   // pending behind P5
    bus_write(A_CMD, pack_cmd('{kind: CMD_RELEASE, proc_id: 8'd4, res_id: 8'd4}));
    bus_write(A_CMD, pack_cmd('{kind: CMD_REQUEST, proc_id: 8'd1, res_id: 8'd4}));  // while busy
    begin
      bit seen_overrun = 0;
      do begin bus_read(A_CTRL, w); seen_overrun |= w[1]; end while (w[0]);
      check(seen_overrun, "overrun flag not set");
      if (seen_overrun) n_overrun++;
    end
    bus_read(A_CTRL, w);
    check(!w[1], "overrun flag not cleared by reading");
    service(4, 4, CMD_RELEASE);
    audit();
    command(CMD_RELEASE, 0, 4);

    // The application, in three phases that differ in how the processes order
    // their requests: 0 mixed; 1 each process asks for its two resources one
    // after the other in the same rotational order (prone to request deadlock);
    // 2 each process posts both requests at once (prone to grant deadlock).
    for (int mode = 0; mode < 3; mode++) begin
      int rdl0, gdl0, chk0, cyc0;
      app_mode = mode;
      rdl0 = n_owner_giveup + n_req_giveup; gdl0 = n_gdl;
      chk0 = n_checked_cmds; cyc0 = sum_checked_cycles;
      foreach (jobs_done[p]) jobs_done[p] = 0;
      stall = 0;
      for (int p = 0; p < N; p++) new_job(p);
      while (!all_done() && stall < 20000) begin
        int p, jobs_before;
        jobs_before = total_jobs();
        @(negedge clk);             // every turn takes time, even an idle one
        p = -1;
        for (int k = 0; k < 4; k++) if (any_obligation(k)) p = k;
        if (p < 0) p = $urandom_range(3);
        turn(p);
        stall = (total_jobs() == jobs_before) ? stall + 1 : 0;
      end
      check(stall < 20000, "no process completed a job for 20000 turns");
      for (int p = 0; p < 4; p++) check(jobs_done[p] == JOBS, "a process did not finish its jobs");
      $display("tb_dau: phase %0d: %0d jobs, request deadlocks avoided %0d, grant deadlocks avoided %0d, %0.2f cycles per checked command",
               mode, 4 * JOBS, n_owner_giveup + n_req_giveup - rdl0, n_gdl - gdl0,
               real'(sum_checked_cycles - cyc0) / ((n_checked_cmds - chk0) > 0 ? (n_checked_cmds - chk0) : 1));
      if (mode == 1) check(n_owner_giveup + n_req_giveup > rdl0, "phase 1 avoided no request deadlock");
      if (mode == 2) check(n_gdl > gdl0, "phase 2 avoided no grant deadlock");
    end

    $display("tb_dau: grant %0d pending %0d owner-release %0d requester-give-up %0d released %0d",
             n_grant, n_pending, n_owner_giveup, n_req_giveup, n_released);
    $display("tb_dau: handed over %0d (to a lower-priority waiter %0d) freed with no waiter %0d error %0d overrun %0d",
             n_handover, n_lower_prio, n_free_no_waiter, n_error, n_overrun);
    $display("tb_dau: grant deadlocks avoided %0d (resource left free %0d), retried requests %0d",
             n_gdl, n_kept_free, n_retry);
    if (n_checked_cmds > 0)
      $display("tb_dau: %0d commands needed avoidance, %0.2f cycles on average",
               n_checked_cmds, real'(sum_checked_cycles) / n_checked_cmds);
    check(n_grant > 0 && n_pending > 0 && n_owner_giveup > 0 && n_req_giveup > 0 && n_released > 0 &&
          n_handover > 0 && n_lower_prio > 0 && n_free_no_waiter > 0 && n_error > 0 && n_overrun > 0 &&
          n_gdl > 0 && n_kept_free > 0 && n_retry > 0,
          "a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
