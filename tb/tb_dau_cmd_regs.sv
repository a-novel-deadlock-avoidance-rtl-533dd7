// tb_dau_cmd_regs: self-checking testbench of the DAU command register.
// Checks that a write while the controller is idle is handed over as a single
// cmd_valid pulse one cycle later with the fields decoded, that writes while
// busy or back-to-back are dropped and set the sticky overrun flag, that the
// flag clears on clr_overrun, and that the command reads back.
module tb_dau_cmd_regs;
  import dau_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, fsm_busy = 1'b0, clr_overrun = 1'b0;
  logic [DATA_W-1:0] wdata = '0;
  logic cmd_valid, overrun;
  cmd_t cmd;
  logic [DATA_W-1:0] cmd_word;
  int checks = 0, failures = 0, pulses = 0;
  logic [DATA_W-1:0] prev;

  dau_cmd_regs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && cmd_valid) pulses++;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("tb_dau_cmd_regs: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      logic [1:0] k; logic [7:0] p, q;
      k = 2'($urandom_range(3)); p = 8'($urandom); q = 8'($urandom);
      @(negedge clk); we = 1; wdata = {8'h00, q, p, 6'h00, k};
      @(negedge clk); we = 0;
      check(cmd_valid && cmd.kind == cmd_e'(k) && cmd.proc_id == p && cmd.res_id == q, "command not handed over");
      check(cmd_word == {8'h00, q, p, 6'h00, k}, "read-back differs");
      @(negedge clk);
      check(!cmd_valid, "cmd_valid longer than one cycle");
    end
    check(pulses == 50 && !overrun, "pulse count or overrun wrong");
    // write while busy
    prev = cmd_word;
    @(negedge clk); fsm_busy = 1; we = 1; wdata = 32'h0003_0201;
    @(negedge clk); we = 0;
    check(!cmd_valid && overrun && cmd_word == prev, "write while busy accepted");
    @(negedge clk); fsm_busy = 0; clr_overrun = 1;
    @(negedge clk); clr_overrun = 0;
    check(!overrun, "overrun not cleared");
    // back-to-back writes: the second is dropped
    pulses = 0;
    @(negedge clk); we = 1; wdata = 32'h0001_0101;
    @(negedge clk); wdata = 32'h0002_0201;
    @(negedge clk); we = 0;
    @(negedge clk);
    check(pulses == 1 && overrun && cmd.proc_id == 8'h01, "back-to-back write not dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
