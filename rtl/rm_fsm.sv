// rm_fsm: decision stage of a reference monitor.
//
// For the request in pipeline stage 2 the FSM chooses its next state:
//   IDLE     no request;
//   GRANT_RD / GRANT_WR
//            the address lies in this kernel block, the MID is known (or the
//            PID came over the crossbar), the PID may perform the action and
//            the word address lies in the PID's window lo..hi;
//   DENY     any check failed;
//   FORWARD  the address lies in another kernel block and the MID is known:
//            the request, with its PID, goes to the crossbar slot.
// The Block RAM port is driven combinationally from that choice, so the RAM
// performs a granted access on the same clock edge that loads the state
// register. Outside a grant the RAM address and data outputs are zero.
//
// In the state after a decision the FSM returns the response: GRANT_RD
// returns the RAM's read data, GRANT_WR an acknowledge with zero data, DENY a
// denied flag with zero data. The response goes to the IP port the request
// came from, or, for a request that arrived over the crossbar, onto the
// crossbar's response path towards the monitor that sent it.
//
// Timing: an IP request accepted on clock edge 0 is in stage 1 after edge 0,
// in stage 2 after edge 1, reaches the RAM on edge 2 and is answered in the
// cycle after edge 2, i.e. three cycles after the request was presented where
// a bare Block RAM answers in one. One request per cycle is accepted, so
// bursts run at full rate.
//
// That an FSM allows or denies each access by the MID's privilege, with one
// state between memory accesses and about three cycles of delay, follows the
// design description; the address windows, the states and the response format
// are this design's own choices.
module rm_fsm
  import sk_pkg::*;
#(
  parameter logic [BLK_W-1:0] MY_BLK = '0,
  parameter perm_table_t      PERM   = default_perm()
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // stage 2
  input  logic                  s2_valid,
  input  pipe_req_t             s2_req,
  input  logic                  s2_pid_ok,
  // Block RAM port
  output logic                  mem_en,
  output logic                  mem_we,
  output logic [LADDR_W-1:0]    mem_addr,
  output logic [DATA_W-1:0]     mem_wdata,
  input  logic [DATA_W-1:0]     mem_rdata,
  // forward slot towards the crossbar
  output logic                  xout_valid,
  output xreq_t                 xout_req,
  input  logic                  xout_ready,
  // answers to this monitor's IPs (local requests and source-side denials)
  output logic [N_IP-1:0]       rsp_valid,
  output ip_rsp_t [N_IP-1:0]    rsp,
  // answers to requests that came over the crossbar
  output logic                  xrsp_valid,
  output xrsp_t                 xrsp,
  // a remote request of this monitor was denied here: no answer will come back
  output logic                  remote_denied
);

  typedef enum logic [2:0] {
    ST_IDLE     = 3'd0,
    ST_GRANT_RD = 3'd1,
    ST_GRANT_WR = 3'd2,
    ST_DENY     = 3'd3,
    ST_FORWARD  = 3'd4
  } state_e;

  state_e    state, next;
  src_e      s3_src;
  logic [BLK_W-1:0]  s3_xblk;
  logic [PORT_W-1:0] s3_xport;

  logic  remote;
  perm_t perm;
  logic  in_window;

  assign remote    = s2_req.src != SRC_XIN && s2_req.blk != MY_BLK;
  assign perm      = PERM[s2_req.pid];
  assign in_window = s2_req.laddr >= perm.lo && s2_req.laddr <= perm.hi;

  always_comb begin
    next = ST_IDLE;
    if (s2_valid) begin
      if (!s2_pid_ok)
        next = ST_DENY;
      else if (remote)
        next = ST_FORWARD;
      else if (s2_req.action == ACT_WRITE)
        next = (perm.wr && in_window) ? ST_GRANT_WR : ST_DENY;
      else
        next = (perm.rd && in_window) ? ST_GRANT_RD : ST_DENY;
    end
  end

  // Block RAM port, zero unless granted
  always_comb begin
    mem_en    = next == ST_GRANT_RD || next == ST_GRANT_WR;
    mem_we    = next == ST_GRANT_WR;
    mem_addr  = mem_en ? s2_req.laddr : '0;
    mem_wdata = mem_we ? s2_req.data  : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= ST_IDLE;
      s3_src        <= SRC_IP0;
      s3_xblk       <= '0;
      s3_xport      <= '0;
      xout_valid    <= 1'b0;
      xout_req      <= '0;
      remote_denied <= 1'b0;
    end else begin
      state         <= next;
      s3_src        <= s2_valid ? s2_req.src       : SRC_IP0;
      s3_xblk       <= s2_valid ? s2_req.xsrc_blk  : '0;
      s3_xport      <= s2_valid ? s2_req.xsrc_port : '0;
      remote_denied <= next == ST_DENY && remote;
      if (xout_valid && xout_ready) begin
        xout_valid <= 1'b0;
        xout_req   <= '0;
      end
      if (next == ST_FORWARD) begin
        xout_valid        <= 1'b1;
        xout_req.dst_blk  <= s2_req.blk;
        xout_req.src_blk  <= MY_BLK;
        xout_req.src_port <= PORT_W'(s2_req.src);
        xout_req.pid      <= s2_req.pid;
        xout_req.action   <= s2_req.action;
        xout_req.laddr    <= s2_req.laddr;
        xout_req.data     <= s2_req.data;
      end
    end
  end

  // Response in the cycle after the decision
  ip_rsp_t r;
  logic    r_valid;
  always_comb begin
    r_valid  = state == ST_GRANT_RD || state == ST_GRANT_WR || state == ST_DENY;
    r.denied = state == ST_DENY;
    r.rdata  = state == ST_GRANT_RD ? mem_rdata : '0;
  end

  always_comb begin
    rsp_valid = '0;
    rsp       = '0;
    xrsp_valid = 1'b0;
    xrsp       = '0;
    if (r_valid) begin
      if (s3_src == SRC_XIN) begin
        xrsp_valid    = 1'b1;
        xrsp.dst_blk  = s3_xblk;
        xrsp.dst_port = s3_xport;
        xrsp.denied   = r.denied;
        xrsp.rdata    = r.rdata;
      end else begin
        rsp_valid[s3_src[PORT_W-1:0]] = 1'b1;
        rsp[s3_src[PORT_W-1:0]]       = r;
      end
    end
  end

  // The arbiter allows one remote request in flight, so the slot is free.
  assert property (@(posedge clk) disable iff (!rst_n)
                   next == ST_FORWARD |-> !xout_valid || xout_ready)
    else $error("forward slot overrun");

endmodule
