// tb_dau_status_regs: self-checking testbench of the per-process status
// registers. Random writes on both ports and random reads are applied; a
// reference copy kept here predicts each register word and the notify lines
// (set by a write, cleared by a read, write wins over a same-cycle read,
// out-of-range process ids ignored).
module tb_dau_status_regs;
  import dau_pkg::*;
  localparam int unsigned N = 5;
  localparam int unsigned PW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic a_we = 0, b_we = 0, rd_en = 0;
  logic [PW-1:0] a_proc = '0, b_proc = '0;
  status_e a_code = ST_NONE, b_code = ST_NONE;
  logic [7:0] res_id = '0;
  logic [3:0] rd_idx = '0;
  logic [DATA_W-1:0] rd_word;
  logic [N-1:0] notify;
  int checks = 0, failures = 0;

  dau_status_regs #(.N_PROC(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit          r_fresh [N];
  logic [2:0]  r_code  [N];
  logic [7:0]  r_res   [N];

  initial begin
    foreach (r_fresh[i]) begin r_fresh[i] = 0; r_code[i] = 0; r_res[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // compare the read port and notify before the next edge
      checks++;
      if (rd_word != {r_fresh[rd_idx % N], 12'h0, r_code[rd_idx % N], 8'h0, r_res[rd_idx % N]} && rd_idx < N) begin
        failures++; $display("tb_dau_status_regs: register %0d reads %h", rd_idx, rd_word);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (notify[i] != r_fresh[i]) begin failures++; $display("tb_dau_status_regs: notify[%0d] wrong", i); end
      end
      // new stimulus
      a_we = $urandom_range(1); b_we = $urandom_range(1); rd_en = $urandom_range(1);
      a_proc = PW'($urandom_range(2**PW - 1));
      do b_proc = PW'($urandom_range(2**PW - 1)); while (a_we && b_we && b_proc == a_proc);
      a_code = status_e'($urandom_range(7)); b_code = status_e'($urandom_range(7));
      res_id = 8'($urandom); rd_idx = 4'($urandom_range(N - 1));
      // reference update at the coming edge
      if (rd_en) r_fresh[rd_idx] = 0;
      if (b_we && b_proc < N) begin r_fresh[b_proc] = 1; r_code[b_proc] = b_code; r_res[b_proc] = res_id; end
      if (a_we && a_proc < N) begin r_fresh[a_proc] = 1; r_code[a_proc] = a_code; r_res[a_proc] = res_id; end
      #1;
      // read port is combinational: it still shows the old contents (checked next cycle)
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
