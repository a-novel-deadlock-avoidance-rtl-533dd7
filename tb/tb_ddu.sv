// tb_ddu: self-checking testbench of the deadlock detection unit.
//
// Loads resource allocation graphs into the ddu through its cell-write port,
// starts a detection and compares the deadlock flag with a reference computed
// here in a different way: the transitive closure (Warshall) of the graph's
// node adjacency, where a deadlock is any node that reaches itself. Graphs
// are the two textbook ones (a two-process cycle and a chain without cycle),
// then random graphs with at most one grant per resource. It also checks the
// stored matrix read-back, the detection time (done within 2*min(m,n)+2
// cycles of start, the unit's O(min(m,n)) bound), and that ddu_reset aborts
// a run. Three sizes are run: the default 5 x 5 and the non-square 3 x 8
// and 8 x 3.
module tb_ddu;
  logic clk = 1'b0;
  logic f0, f1, f2;
  int c0, c1, c2, e0, e1, e2;
  int checks, failures;

  ddu_tester #(.M(5), .N(5)) t_square (.finished(f0), .checks(c0), .failures(e0));
  ddu_tester #(.M(3), .N(8)) t_wide   (.finished(f1), .checks(c1), .failures(e1));
  ddu_tester #(.M(8), .N(3)) t_tall   (.finished(f2), .checks(c2), .failures(e2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    $display("tb_ddu: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, e0 + e1 + e2 + 1);
    $finish;
  end

  initial begin
    wait (f0 === 1'b1 && f1 === 1'b1 && f2 === 1'b1);
    checks   = c0 + c1 + c2;
    failures = e0 + e1 + e2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
