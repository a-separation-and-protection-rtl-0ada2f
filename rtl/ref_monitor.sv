// ref_monitor: reference monitor guarding one Block RAM (one kernel block).
//
// Two IPs connect to the monitor. Every access they make passes three
// pipelined parts before it may reach the RAM:
//   rm_arbiter   picks one request per cycle (IP 0, IP 1 or a request that
//                another monitor sent over the crossbar),
//   mid_pid_lut  looks up the privilege ID of the request's module ID,
//   rm_fsm       allows, denies or forwards the access and drives the RAM.
// Requests addressed to another kernel block are forwarded, with the PID
// found here, through the crossbar to the monitor that owns that block,
// which applies its own permissions; its answer comes back over the
// crossbar and is handed to the IP that asked.
//
// Crossbar side: xout_* is this monitor's outgoing request (valid/ready);
// xin_* is a one-entry slot the crossbar fills when xin_ready is high (its
// ready depends only on registered state, which keeps ready paths between
// monitors free of loops); xrsp_out_* is the answer to a request that came in
// over the crossbar; xrsp_in_* is the answer to this monitor's own forwarded
// request. IP side: valid/ready request, and an answer (rsp_valid with
// denied flag and read data) for every accepted request, in order per port.
//
// Timing: a local access presented in cycle 0 and accepted at once writes or
// reads the RAM on the clock edge that ends cycle 2 and is answered in
// cycle 3. Everything that is not in use is driven to zero.
//
// The arbiter, LUT and FSM, their pipelining and the forwarding between
// monitors follow the design description; the handshakes, the one-entry
// slot and the answer format are this design's own choices.
module ref_monitor
  import sk_pkg::*;
#(
  parameter logic [BLK_W-1:0] MY_BLK = '0,
  parameter lut_table_t       LUT    = default_lut(),
  parameter perm_table_t      PERM   = default_perm()
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // IPs
  input  logic    [N_IP-1:0]    ip_valid,
  input  ip_req_t [N_IP-1:0]    ip_req,
  output logic    [N_IP-1:0]    ip_ready,
  output logic    [N_IP-1:0]    ip_rsp_valid,
  output ip_rsp_t [N_IP-1:0]    ip_rsp,
  // Block RAM port
  output logic                  mem_en,
  output logic                  mem_we,
  output logic [LADDR_W-1:0]    mem_addr,
  output logic [DATA_W-1:0]     mem_wdata,
  input  logic [DATA_W-1:0]     mem_rdata,
  // crossbar
  output logic                  xout_valid,
  output xreq_t                 xout_req,
  input  logic                  xout_ready,
  input  logic                  xin_push,
  input  xreq_t                 xin_req,
  output logic                  xin_ready,
  output logic                  xrsp_out_valid,
  output xrsp_t                 xrsp_out,
  input  logic                  xrsp_in_valid,
  input  xrsp_t                 xrsp_in
);

  // one-entry slot for requests arriving over the crossbar
  logic  slot_valid;
  xreq_t slot_req;
  logic  slot_take;

  assign xin_ready = !slot_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_valid <= 1'b0;
      slot_req   <= '0;
    end else if (xin_push && !slot_valid) begin
      slot_valid <= 1'b1;
      slot_req   <= xin_req;
    end else if (slot_take) begin
      slot_valid <= 1'b0;
      slot_req   <= '0;
    end
  end

  logic      s1_valid, s2_valid, s2_pid_ok;
  pipe_req_t s1_req, s2_req;
  logic      remote_denied;
  logic      remote_done;
  logic [N_IP-1:0]    loc_valid;
  ip_rsp_t [N_IP-1:0] loc_rsp;

  assign remote_done = remote_denied || xrsp_in_valid;

  rm_arbiter #(.MY_BLK(MY_BLK)) u_arb (
    .clk, .rst_n,
    .ip_valid, .ip_req, .ip_ready,
    .xin_valid   (slot_valid),
    .xin_req     (slot_req),
    .xin_ready   (slot_take),
    .remote_done,
    .s1_valid, .s1_req
  );

  mid_pid_lut #(.LUT(LUT)) u_lut (
    .clk, .rst_n,
    .s1_valid, .s1_req,
    .s2_valid, .s2_req, .s2_pid_ok
  );

  rm_fsm #(.MY_BLK(MY_BLK), .PERM(PERM)) u_fsm (
    .clk, .rst_n,
    .s2_valid, .s2_req, .s2_pid_ok,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .xout_valid, .xout_req, .xout_ready,
    .rsp_valid   (loc_valid),
    .rsp         (loc_rsp),
    .xrsp_valid  (xrsp_out_valid),
    .xrsp        (xrsp_out),
    .remote_denied
  );

  // merge local answers with answers that came back over the crossbar
  always_comb begin
    ip_rsp_valid = loc_valid;
    ip_rsp       = loc_rsp;
    if (xrsp_in_valid) begin
      ip_rsp_valid[xrsp_in.dst_port]  = 1'b1;
      ip_rsp[xrsp_in.dst_port].denied = xrsp_in.denied;
      ip_rsp[xrsp_in.dst_port].rdata  = xrsp_in.rdata;
    end
  end

  // The issuing port is held off while its remote request is out, so a
  // local and a remote answer never meet on the same port.
  assert property (@(posedge clk) disable iff (!rst_n)
                   xrsp_in_valid |-> !loc_valid[xrsp_in.dst_port])
    else $error("answer collision on IP port");

endmodule
