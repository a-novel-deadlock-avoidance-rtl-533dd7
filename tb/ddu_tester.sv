// ddu_tester: checking harness for one size of the deadlock detection unit,
// used by tb_ddu. It loads graphs into a ddu of M resources x N processes and
// compares the deadlock flag with a transitive-closure reference (see tb_ddu).
// It raises finished when done and counts its checks and failures.
module ddu_tester #(
  parameter int unsigned M = 5,   // resources
  parameter int unsigned N = 5    // processes
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  import dau_pkg::*;
  localparam int unsigned BOUND = 2 * ((M < N) ? M : N) + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, start = 1'b0, ddu_reset = 1'b0;
  logic [$clog2(M)-1:0] wr_res = '0;
  logic [$clog2(N)-1:0] wr_proc = '0;
  cell_e wr_cell = CELL_NONE;
  logic [M-1:0][N-1:0][1:0] mat_o;
  logic busy, done, deadlock;
  logic [7:0] iterations;

  initial begin checks = 0; failures = 0; finished = 1'b0; end
  int n_dead = 0, n_free = 0, max_lat = 0;

  ddu #(.N_RES(M), .N_PROC(N)) dut (.*);

  always #5 clk = ~clk;


  cell_e g [M][N];

  function automatic bit ref_deadlock();
    // nodes 0..M-1 resources, M..M+N-1 processes
    bit reach [M+N][M+N];
    for (int a = 0; a < M+N; a++) for (int b = 0; b < M+N; b++) reach[a][b] = 0;
    for (int i = 0; i < M; i++) for (int j = 0; j < N; j++) begin
      if (g[i][j] == CELL_GRANT) reach[i][M+j] = 1;   // resource -> process
      if (g[i][j] == CELL_REQ)   reach[M+j][i] = 1;   // process -> resource
    end
    for (int k = 0; k < M+N; k++)
      for (int a = 0; a < M+N; a++)
        for (int b = 0; b < M+N; b++)
          if (reach[a][k] && reach[k][b]) reach[a][b] = 1;
    for (int a = 0; a < M+N; a++) if (reach[a][a]) return 1;
    return 0;
  endfunction

  task automatic load();
    // Non-grant cells first, so that a row never holds two grants on the way.
    for (int pass = 0; pass < 2; pass++)
      for (int i = 0; i < M; i++) for (int j = 0; j < N; j++)
        if ((g[i][j] == CELL_GRANT) == (pass == 1)) begin
          @(negedge clk);
          wr_en = 1; wr_res = i[$clog2(M)-1:0]; wr_proc = j[$clog2(N)-1:0]; wr_cell = g[i][j];
        end
    @(negedge clk);
    wr_en = 0;
    checks++;
    for (int i = 0; i < M; i++) for (int j = 0; j < N; j++)
      if (mat_o[i][j] != g[i][j]) begin
        failures++; $display("tb_ddu %0dx%0d: readback mismatch at (%0d,%0d)", M, N, i, j);
        return;
      end
  endtask

  task automatic detect(string name);
    int lat = 0;
    bit exp = ref_deadlock();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    lat = 1;
    while (!done && lat < 1000) begin @(negedge clk); lat++; end
    checks++;
    if (deadlock !== exp) begin
      failures++; $display("tb_ddu %0dx%0d: %s: deadlock=%0b expected %0b", M, N, name, deadlock, exp);
    end
    checks++;
    if (lat > BOUND) begin
      failures++; $display("tb_ddu %0dx%0d: %s: detection took %0d cycles, bound %0d", M, N, name, lat, BOUND);
    end
    if (lat > max_lat) max_lat = lat;
    if (exp) n_dead++; else n_free++;
  endtask

  task automatic clear_g();
    for (int i = 0; i < M; i++) for (int j = 0; j < N; j++) g[i][j] = CELL_NONE;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Two-process cycle: P0 holds Q0 and waits for Q1, P1 holds Q1 and waits for Q0.
    clear_g();
    g[0][0] = CELL_GRANT; g[1][0] = CELL_REQ; g[1][1] = CELL_GRANT; g[0][1] = CELL_REQ;
    load(); detect("two-cycle");
    // Chain without cycle: P0 holds Q0, P1 waits for Q0, P1 holds Q1, P2 waits for Q1.
    clear_g();
    g[0][0] = CELL_GRANT; g[0][1] = CELL_REQ; g[1][1] = CELL_GRANT; g[1][2] = CELL_REQ;
    load(); detect("chain");
    // Long cycle through every process (needs most reduction steps when M=N).
    clear_g();
    for (int k = 0; k < M && k < N; k++) begin
      g[k][k] = CELL_GRANT;
      g[(k+1) % ((M < N) ? M : N)][k] = CELL_REQ;
    end
    load(); detect("ring");
    // Same ring with a tail hanging off it.
    g[0][N-1] = (N > M) ? CELL_REQ : g[0][N-1];
    load(); detect("ring+tail");
    // Reset aborts a run.
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; ddu_reset = 1;
    @(negedge clk); ddu_reset = 0;
    checks++;
    if (busy || done || deadlock) begin failures++; $display("tb_ddu %0dx%0d: ddu_reset did not abort", M, N); end
    // Random graphs.
    for (int t = 0; t < 400; t++) begin
      clear_g();
      for (int i = 0; i < M; i++) begin
        int h, dens;
        h    = $urandom_range(N);           // N means: resource free
        dens = $urandom_range(1, 3);
        for (int j = 0; j < N; j++)
          if (j == h) g[i][j] = CELL_GRANT;
          else if ($urandom_range(3) < dens - 1 + (t % 2)) g[i][j] = CELL_REQ;
      end
      load(); detect($sformatf("random %0d", t));
    end
    checks++;
    if (n_dead == 0 || n_free == 0) begin
      failures++; $display("tb_ddu %0dx%0d: random graphs did not cover both outcomes", M, N);
    end
    $display("tb_ddu %0dx%0d: %0d graphs with deadlock, %0d without, longest detection %0d cycles",
             M, N, n_dead, n_free, max_lat);
    finished = 1'b1;
  end
endmodule
