// tb_dau_addr_decoder: exhaustive self-checking testbench of the DAU address
// decoder. Every address is applied and the selects are compared with the
// address map (command 0x00, control 0x01, process status 0x10+p for p below
// N_PROC, matrix row 0x20+r for r below N_RES; nothing else selected).
module tb_dau_addr_decoder;
  import dau_pkg::*;
  localparam int unsigned M = 5, N = 5;

  logic [ADDR_W-1:0] addr;
  logic sel_cmd, sel_ctrl, sel_status, sel_row;
  logic [3:0] status_idx;
  logic [4:0] row_idx;
  int checks = 0, failures = 0;

  dau_addr_decoder #(.N_RES(M), .N_PROC(N)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**ADDR_W; a++) begin
      bit e_cmd, e_ctrl, e_st, e_row;
      addr = ADDR_W'(a);
      #1;
      e_cmd  = (a == 0);
      e_ctrl = (a == 1);
      e_st   = (a >= 16 && a < 16 + N);
      e_row  = (a >= 32 && a < 32 + M);
      checks++;
      if ({sel_cmd, sel_ctrl, sel_status, sel_row} != {e_cmd, e_ctrl, e_st, e_row} ||
          (e_st && status_idx != 4'(a - 16)) || (e_row && row_idx != 5'(a - 32))) begin
        failures++;
        $display("tb_dau_addr_decoder: addr 0x%02h selects %b%b%b%b", a, sel_cmd, sel_ctrl, sel_status, sel_row);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
