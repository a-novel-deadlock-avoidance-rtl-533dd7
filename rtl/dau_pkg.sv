// dau_pkg: types and constants shared by the Deadlock Avoidance Unit (DAU).
//
// The DAU keeps the system's resource allocation graph (RAG) as a matrix with
// one row per resource and one column per process. Each cell holds one of
// three values: no edge, a request edge (process waits for the resource) or a
// grant edge (resource is held by the process). Every resource is a single
// unit, so a row holds at most one grant.
//
// Processes talk to the DAU over a small word-addressed register bus. The
// command word and the per-process status word formats are defined here.
// The field layout, the encodings and the address map are this design's own
// choices; the source material names the registers but gives no layout.
package dau_pkg;

  // One cell of the resource x process matrix.
  typedef enum logic [1:0] {
    CELL_NONE  = 2'b00,   // no edge
    CELL_REQ   = 2'b01,   // request edge: process -> resource
    CELL_GRANT = 2'b10    // grant edge:   resource -> process
  } cell_e;

  // Command kinds written to the command register.
  typedef enum logic [1:0] {
    CMD_NOP     = 2'b00,
    CMD_REQUEST = 2'b01,
    CMD_RELEASE = 2'b10
  } cmd_e;

  // Result codes written into a process' status register.
  typedef enum logic [2:0] {
    ST_NONE        = 3'd0,  // nothing reported yet
    ST_GRANTED     = 3'd1,  // the resource is now held by this process
    ST_PENDING     = 3'd2,  // the request waits in the matrix
    ST_GIVE_UP     = 3'd3,  // request refused (R-dl, lower priority): release what you hold
    ST_RELEASE_REQ = 3'd4,  // a higher-priority process asks you to release the resource
    ST_RELEASED    = 3'd5,  // the release was carried out
    ST_ERROR       = 3'd7   // malformed command (bad id, double request, release of a resource not held)
  } status_e;

  // Decoded command.
  typedef struct packed {
    cmd_e       kind;
    logic [7:0] proc_id;
    logic [7:0] res_id;
  } cmd_t;

  // Per-process status register contents.
  typedef struct packed {
    logic       fresh;    // set on update, cleared when the process reads it
    status_e    code;
    logic [7:0] res_id;   // resource the code refers to
  } status_t;

  // Bus width and word-address map.
  localparam int unsigned DATA_W     = 32;
  localparam int unsigned ADDR_W     = 8;
  localparam logic [ADDR_W-1:0] A_CMD     = 8'h00;  // command register (W), last command + busy (R)
  localparam logic [ADDR_W-1:0] A_CTRL    = 8'h01;  // global status (R)
  localparam logic [ADDR_W-1:0] A_STATUS0 = 8'h10;  // 0x10 + p: status of process p (R), up to 16
  localparam logic [ADDR_W-1:0] A_ROW0    = 8'h20;  // 0x20 + r: matrix row r, 2 bits per process (R), up to 32

  // Command word layout: [1:0] kind, [15:8] process, [23:16] resource.
  function automatic cmd_t unpack_cmd(logic [DATA_W-1:0] w);
    cmd_t c;
    c.kind    = cmd_e'(w[1:0]);
    c.proc_id = w[15:8];
    c.res_id  = w[23:16];
    return c;
  endfunction

  function automatic logic [DATA_W-1:0] pack_cmd(cmd_t c);
    return {8'h00, c.res_id, c.proc_id, 6'h00, c.kind};
  endfunction

  // Status word layout: [31] fresh, [18:16] code, [7:0] resource.
  function automatic logic [DATA_W-1:0] pack_status(status_t s);
    return {s.fresh, 12'h000, s.code, 8'h00, s.res_id};
  endfunction

endpackage
