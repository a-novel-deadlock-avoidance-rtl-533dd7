// dau: Deadlock Avoidance Unit, the top of the design.
//
// A memory-mapped unit shared by the processors of a multiprocessor SoC. Each
// process asks it for a resource (request) or gives one back (release) by
// writing a command word; the unit decides at once, in hardware, so that the
// system never deadlocks, without any declaration of maximum claims:
//   * a free resource is granted;
//   * a request that would close a cycle (request deadlock) makes the lower-
//     priority side give way: either the owner is asked to release, or the
//     requester is told to give up the resources it holds;
//   * a released resource goes to the highest-priority waiting process whose
//     grant closes no cycle (grant deadlock avoided), if any.
// The resource allocation graph lives in the ddu, the decisions in daa_fsm.
//
// Structure: address decoder -> command register -> DAA controller <-> ddu;
// the controller reports into the per-process status registers, whose fresh
// bits drive one notify (interrupt) line per process. The matrix rows can be
// read over the bus (cell access).
//
// Bus (word addresses, see dau_pkg): a write with bus_we is taken at the
// clock edge; bus_re returns bus_rdata one cycle later.
//   0x00 W command [1:0] 1=request 2=release, [15:8] process, [23:16] resource
//        R last command word, bit 31 = busy
//   0x01 R [0] busy [1] overrun (cleared by this read) [7:2] reduction steps
//          of the last ddu run [15:8] cycles of last command [23:16] N_PROC [31:24] N_RES
//   0x10+p R status of process p: [31] fresh [18:16] code [7:0] resource
//          (reading clears fresh and notify[p])
//   0x20+r R row r of the matrix, 2 bits per process (0 none, 1 request, 2 grant)
// The block structure follows the DAU architecture; the bus protocol, the
// address map and the notify lines are this design's own.
module dau
  import dau_pkg::*;
#(
  parameter int unsigned N_PROC = 5,
  parameter int unsigned N_RES  = 5,
  localparam int unsigned RW = (N_RES  > 1) ? $clog2(N_RES)  : 1,
  localparam int unsigned PW = (N_PROC > 1) ? $clog2(N_PROC) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic              bus_we,
  input  logic              bus_re,
  input  logic [DATA_W-1:0] bus_wdata,
  output logic [DATA_W-1:0] bus_rdata,
  output logic [N_PROC-1:0] notify
);

  // Limits of the address map and status fields.
  initial begin
    assert (N_PROC >= 1 && N_PROC <= 16) else $fatal(1, "dau: N_PROC must be 1..16");
    assert (N_RES  >= 1 && N_RES  <= 32) else $fatal(1, "dau: N_RES must be 1..32");
  end

  // Address decoder
  logic       sel_cmd, sel_ctrl, sel_status, sel_row;
  logic [3:0] status_idx;
  logic [4:0] row_idx;
  dau_addr_decoder #(.N_RES(N_RES), .N_PROC(N_PROC)) u_dec (
    .addr(bus_addr), .sel_cmd, .sel_ctrl, .sel_status, .status_idx, .sel_row, .row_idx
  );

  // Command register
  logic              cmd_valid, overrun, fsm_busy;
  cmd_t              cmd;
  logic [DATA_W-1:0] cmd_word;
  dau_cmd_regs u_cmd (
    .clk, .rst_n,
    .we(bus_we && sel_cmd), .wdata(bus_wdata), .fsm_busy,
    .clr_overrun(bus_re && sel_ctrl),
    .cmd_valid, .cmd, .cmd_word, .overrun
  );

  // DDU
  logic                              ddu_wr_en, ddu_start, ddu_reset, ddu_busy, ddu_done, ddu_deadlock;
  logic [RW-1:0]                     ddu_wr_res;
  logic [PW-1:0]                     ddu_wr_proc;
  cell_e                             ddu_wr_cell;
  logic [N_RES-1:0][N_PROC-1:0][1:0] mat;
  logic [7:0]                        ddu_iter;
  ddu #(.N_RES(N_RES), .N_PROC(N_PROC)) u_ddu (
    .clk, .rst_n,
    .wr_en(ddu_wr_en), .wr_res(ddu_wr_res), .wr_proc(ddu_wr_proc), .wr_cell(ddu_wr_cell),
    .mat_o(mat),
    .start(ddu_start), .ddu_reset, .busy(ddu_busy), .done(ddu_done), .deadlock(ddu_deadlock),
    .iterations(ddu_iter)
  );

  // DAA logic with FSM
  logic          cmd_done, st_a_we, st_b_we;
  logic [7:0]    last_cycles, st_res;
  logic [PW-1:0] st_a_proc, st_b_proc;
  status_e       st_a_code, st_b_code;
  daa_fsm #(.N_RES(N_RES), .N_PROC(N_PROC)) u_daa (
    .clk, .rst_n,
    .cmd_valid, .cmd, .busy(fsm_busy), .cmd_done, .last_cycles,
    .ddu_wr_en, .ddu_wr_res, .ddu_wr_proc, .ddu_wr_cell, .mat,
    .ddu_start, .ddu_reset, .ddu_done, .ddu_deadlock,
    .st_a_we, .st_a_proc, .st_a_code, .st_b_we, .st_b_proc, .st_b_code, .st_res
  );

  // Status registers
  logic [DATA_W-1:0] status_word;
  dau_status_regs #(.N_PROC(N_PROC)) u_st (
    .clk, .rst_n,
    .a_we(st_a_we), .a_proc(st_a_proc), .a_code(st_a_code),
    .b_we(st_b_we), .b_proc(st_b_proc), .b_code(st_b_code), .res_id(st_res),
    .rd_en(bus_re && sel_status), .rd_idx(status_idx), .rd_word(status_word),
    .notify
  );

  // Read data
  logic              busy_all;
  logic [DATA_W-1:0] row_word, rd_d;
  assign busy_all = fsm_busy || cmd_valid;

  always_comb begin
    row_word = '0;
    for (int r = 0; r < N_RES; r++)
      if (32'(row_idx) == r)
        for (int p = 0; p < N_PROC; p++) row_word[2*p +: 2] = mat[r][p];
  end

  always_comb begin
    rd_d = '0;
    if (sel_cmd)    rd_d = {busy_all, cmd_word[DATA_W-2:0]};
    if (sel_ctrl)   rd_d = {8'(N_RES), 8'(N_PROC), last_cycles, ddu_iter[5:0], overrun, busy_all};
    if (sel_status) rd_d = status_word;
    if (sel_row)    rd_d = row_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      bus_rdata <= '0;
    else if (bus_re) bus_rdata <= rd_d;
  end

endmodule
