// rm_arbiter: input stage of a reference monitor.
//
// Each cycle it grants at most one of three requesters, the monitor's two IP
// ports and the request slot fed by the inter-monitor crossbar, and registers
// the granted request into the monitor pipeline (stage 1). Arbitration is
// round robin: the requester after the last one granted has priority. The
// pipeline behind it never stalls, so a grant is also the ready of the
// valid/ready handshake on that input.
//
// A request whose address falls in another kernel block is "remote": it will
// be forwarded through the crossbar and its answer comes back later. To keep
// ordering and the crossbar deadlock free, a monitor has at most one remote
// request outstanding. While one is outstanding, the IP port that issued it
// gets no grant at all (so its answers stay in order), and the other port is
// granted only local requests. remote_done (the answer arrived, or the source
// monitor denied the request itself) ends the outstanding state.
//
// Timing: ready is combinational from valid; stage 1 is valid the cycle after
// the handshake. An empty stage 1 holds all-zero fields, so no stale data
// lingers on the internal bus.
//
// That the monitor has an arbiter choosing which IP enters the FSM follows
// the design description; round robin, the crossbar input as a third
// requester and the outstanding-remote rule are this design's own choices.
module rm_arbiter
  import sk_pkg::*;
#(
  parameter logic [BLK_W-1:0] MY_BLK = '0  // kernel block this monitor guards
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // IP ports
  input  logic    [N_IP-1:0]   ip_valid,
  input  ip_req_t [N_IP-1:0]   ip_req,
  output logic    [N_IP-1:0]   ip_ready,
  // request slot filled by the crossbar
  input  logic                 xin_valid,
  input  xreq_t                xin_req,
  output logic                 xin_ready,
  // outstanding remote request finished
  input  logic                 remote_done,
  // stage 1
  output logic                 s1_valid,
  output pipe_req_t            s1_req
);

  localparam int unsigned N_SRC = N_IP + 1;  // IP0, IP1, crossbar slot

  logic                  pending;       // a remote request is outstanding
  logic [PORT_W-1:0]     pending_port;  // IP port that issued it
  logic [N_SRC-1:0]      elig;
  logic [N_SRC-1:0]      grant;
  logic [1:0]            last;          // last granted source
  logic [N_IP-1:0]       is_remote;

  always_comb begin
    for (int p = 0; p < N_IP; p++) begin
      is_remote[p] = ip_req[p].addr[ADDR_W-1 -: BLK_W] != MY_BLK;
      elig[p] = ip_valid[p]
             && !(pending && pending_port == PORT_W'(p))
             && !(pending && is_remote[p]);
    end
    elig[N_IP] = xin_valid;
  end

  // Round robin: search from the source after the last one granted.
  always_comb begin
    logic [1:0] idx;
    logic       found;
    grant = '0;
    found = 1'b0;
    for (int k = 1; k <= N_SRC; k++) begin
      idx = 2'((int'(last) + k) % N_SRC);
      if (!found && elig[idx]) begin
        grant[idx] = 1'b1;
        found      = 1'b1;
      end
    end
  end

  assign ip_ready  = grant[N_IP-1:0];
  assign xin_ready = grant[N_IP];

  pipe_req_t nxt;
  always_comb begin
    nxt = '0;
    if (grant[N_IP]) begin
      nxt.src       = SRC_XIN;
      nxt.pid_given = 1'b1;
      nxt.pid       = xin_req.pid;
      nxt.action    = xin_req.action;
      nxt.blk       = MY_BLK;
      nxt.laddr     = xin_req.laddr;
      nxt.data      = xin_req.data;
      nxt.xsrc_blk  = xin_req.src_blk;
      nxt.xsrc_port = xin_req.src_port;
    end else begin
      for (int p = 0; p < N_IP; p++) begin
        if (grant[p]) begin
          nxt.src    = src_e'(p);
          nxt.mid    = ip_req[p].mid;
          nxt.action = ip_req[p].action;
          nxt.blk    = ip_req[p].addr[ADDR_W-1 -: BLK_W];
          nxt.laddr  = ip_req[p].addr[LADDR_W-1:0];
          nxt.data   = (ip_req[p].action == ACT_WRITE) ? ip_req[p].data : '0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid     <= 1'b0;
      s1_req       <= '0;
      last         <= 2'(N_SRC - 1);
      pending      <= 1'b0;
      pending_port <= '0;
    end else begin
      s1_valid <= |grant;
      s1_req   <= nxt;
      for (int s = 0; s < N_SRC; s++)
        if (grant[s]) last <= 2'(s);
      if (remote_done)
        pending <= 1'b0;
      for (int p = 0; p < N_IP; p++) begin
        if (grant[p] && is_remote[p]) begin
          pending      <= 1'b1;
          pending_port <= PORT_W'(p);
        end
      end
    end
  end

  // A request held but not granted must stay asserted (valid/ready rule).
  for (genvar p = 0; p < N_IP; p++) begin : g_hs
    assert property (@(posedge clk) disable iff (!rst_n)
                     ip_valid[p] && !ip_ready[p] |=> ip_valid[p])
      else $error("IP port %0d dropped valid before ready", p);
  end
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant))
    else $error("arbiter granted more than one source");

endmodule
