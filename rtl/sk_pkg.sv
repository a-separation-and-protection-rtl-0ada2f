// sk_pkg: types and constants shared by the separation kernel.
//
// A memory access is the tuple (MID, Action, Data, Addr): the module ID of the
// requesting IP, read or write, the write data and the address. The upper
// BLK_W bits of an IP address select the kernel block (one reference monitor
// plus one Block RAM); the lower LADDR_W bits address a word inside that
// block's RAM. The security policy has two tables: a MID -> PID look-up table
// shared by all monitors, and for each kernel block a permission record per
// privilege ID (read allowed, write allowed, and the address window the PID
// owns in that block).
//
// The 32-bit data, 4-bit MID and 1-bit action follow the signal values in the
// design's simulation traces (data words such as B10C0001, MIDs 3, 7 and F,
// action 0/1). The block count, address split, PID width and the default
// policy are this design's own choices.
package sk_pkg;

  localparam int unsigned DATA_W   = 32;  // memory word
  localparam int unsigned MID_W    = 4;   // module ID
  localparam int unsigned PID_W    = 2;   // privilege ID
  localparam int unsigned N_BLK    = 4;   // kernel blocks (monitor + Block RAM)
  localparam int unsigned BLK_W    = $clog2(N_BLK);
  localparam int unsigned LADDR_W  = 10;  // word address inside one Block RAM
  localparam int unsigned ADDR_W   = BLK_W + LADDR_W;
  localparam int unsigned N_IP     = 2;   // IPs per monitor
  localparam int unsigned PORT_W   = 1;   // encodes an IP port of a monitor
  localparam int unsigned N_MID    = 1 << MID_W;
  localparam int unsigned N_PID    = 1 << PID_W;

  typedef enum logic {
    ACT_READ  = 1'b0,
    ACT_WRITE = 1'b1
  } action_e;

  // One LUT entry: is the MID known, and which PID it has.
  typedef struct packed {
    logic             valid;
    logic [PID_W-1:0] pid;
  } lut_entry_t;

  // Permission of one PID in one kernel block: the PID may read/write the
  // word addresses lo..hi (inclusive) of that block's RAM.
  typedef struct packed {
    logic               rd;
    logic               wr;
    logic [LADDR_W-1:0] lo;
    logic [LADDR_W-1:0] hi;
  } perm_t;

  typedef lut_entry_t [N_MID-1:0]            lut_table_t;
  typedef perm_t      [N_PID-1:0]            perm_table_t;
  typedef perm_t      [N_BLK-1:0][N_PID-1:0] policy_t;

  // Request from an IP.
  typedef struct packed {
    logic [MID_W-1:0]  mid;
    action_e           action;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
  } ip_req_t;

  // Response to an IP: for a read, rdata; a denied access returns zero data.
  typedef struct packed {
    logic              denied;
    logic [DATA_W-1:0] rdata;
  } ip_rsp_t;

  // Request passed between monitors: the PID is looked up at the source
  // monitor and travels with the request; src_blk/src_port route the answer.
  typedef struct packed {
    logic [BLK_W-1:0]   dst_blk;
    logic [BLK_W-1:0]   src_blk;
    logic [PORT_W-1:0]  src_port;
    logic [PID_W-1:0]   pid;
    action_e            action;
    logic [LADDR_W-1:0] laddr;
    logic [DATA_W-1:0]  data;
  } xreq_t;

  // Response passed back between monitors.
  typedef struct packed {
    logic [BLK_W-1:0]  dst_blk;
    logic [PORT_W-1:0] dst_port;
    logic              denied;
    logic [DATA_W-1:0] rdata;
  } xrsp_t;

  // Where a request in the monitor pipeline came from.
  typedef enum logic [1:0] {
    SRC_IP0 = 2'd0,
    SRC_IP1 = 2'd1,
    SRC_XIN = 2'd2
  } src_e;

  // Request as it travels through a monitor's pipeline.
  typedef struct packed {
    src_e               src;
    logic [MID_W-1:0]   mid;
    logic               pid_given;  // request came from the crossbar with its PID
    logic [PID_W-1:0]   pid;
    action_e            action;
    logic [BLK_W-1:0]   blk;        // kernel block the address falls in
    logic [LADDR_W-1:0] laddr;
    logic [DATA_W-1:0]  data;
    logic [BLK_W-1:0]   xsrc_blk;   // for SRC_XIN: originating monitor
    logic [PORT_W-1:0]  xsrc_port;  // for SRC_XIN: originating IP port
  } pipe_req_t;

  // Default MID -> PID table. MID 1 is trusted (PID 3), MID 3 gets PID 1,
  // MID 7 gets PID 2; every other MID (0xF included) is unknown and denied.
  function automatic lut_table_t default_lut();
    lut_table_t t;
    t = '0;
    t[1] = '{valid: 1'b1, pid: 2'd3};
    t[3] = '{valid: 1'b1, pid: 2'd1};
    t[7] = '{valid: 1'b1, pid: 2'd2};
    return t;
  endfunction

  // Default permissions of one kernel block: PID 0 has no access, PID 1 owns
  // the lower half of the RAM, PID 2 the upper half (the two never overlap),
  // PID 3 may read and write all of it.
  function automatic perm_table_t default_perm();
    perm_table_t t;
    logic [LADDR_W-1:0] half;
    half = LADDR_W'(1 << (LADDR_W - 1));
    t[0] = '{rd: 1'b0, wr: 1'b0, lo: '0,   hi: '0};
    t[1] = '{rd: 1'b1, wr: 1'b1, lo: '0,   hi: half - 1'b1};
    t[2] = '{rd: 1'b1, wr: 1'b1, lo: half, hi: '1};
    t[3] = '{rd: 1'b1, wr: 1'b1, lo: '0,   hi: '1};
    return t;
  endfunction

  // Default policy: every kernel block uses default_perm().
  function automatic policy_t default_policy();
    policy_t p;
    for (int b = 0; b < N_BLK; b++)
      p[b] = default_perm();
    return p;
  endfunction

endpackage
