// sep_kernel_top: separation kernel for on-chip memory.
//
// The on-chip memory is split into N_BLK kernel blocks. Each block is one
// true dual-port Block RAM guarded by one reference monitor, and each monitor
// serves two IPs, so the kernel has N_BLK*N_IP IP ports. An IP addresses the
// whole memory with ADDR_W bits: the upper BLK_W bits name the kernel block,
// the lower LADDR_W bits the word. Every access carries the IP's module ID;
// the monitor of the IP's own block looks up the privilege ID, and the
// monitor owning the addressed block allows the access only if that PID may
// read or write that word. Accesses to another block travel between monitors
// through a crossbar switch. The RAMs therefore have no path that bypasses a
// monitor: the second port of each RAM is left disabled.
//
// IP interface (per port, index [block][port]): ip_valid/ip_req/ip_ready is a
// valid/ready request (MID, action, address, write data); ip_rsp_valid with
// ip_rsp (denied flag, read data) answers every accepted request, in order
// per port. A denied access leaves the RAM untouched and returns zero data.
//
// Timing: an access to the IP's own block is answered three cycles after it
// is presented (one for a bare Block RAM) and one access per cycle per
// monitor is accepted. An access to another block takes seven cycles
// and the issuing port waits for its answer before it sends again.
//
// The split into kernel blocks, the monitor per Block RAM, two IPs per
// monitor and the crossbar between monitors follow the design description;
// the sizes, the address split and the default policy are this design's own
// choices (see sk_pkg).
module sep_kernel_top
  import sk_pkg::*;
#(
  parameter lut_table_t LUT    = default_lut(),
  parameter policy_t    POLICY = default_policy()
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic    [N_BLK-1:0][N_IP-1:0]     ip_valid,
  input  ip_req_t [N_BLK-1:0][N_IP-1:0]     ip_req,
  output logic    [N_BLK-1:0][N_IP-1:0]     ip_ready,
  output logic    [N_BLK-1:0][N_IP-1:0]     ip_rsp_valid,
  output ip_rsp_t [N_BLK-1:0][N_IP-1:0]     ip_rsp
);

  logic  [N_BLK-1:0] xout_valid, xout_ready;
  xreq_t [N_BLK-1:0] xout_req;
  logic  [N_BLK-1:0] xin_push, xin_ready;
  xreq_t [N_BLK-1:0] xin_req;
  logic  [N_BLK-1:0] xrsp_out_valid, xrsp_in_valid;
  xrsp_t [N_BLK-1:0] xrsp_out, xrsp_in;

  for (genvar b = 0; b < N_BLK; b++) begin : g_blk
    logic                mem_en, mem_we;
    logic [LADDR_W-1:0]  mem_addr;
    logic [DATA_W-1:0]   mem_wdata, mem_rdata, unused_b_rdata;

    ref_monitor #(
      .MY_BLK (BLK_W'(b)),
      .LUT    (LUT),
      .PERM   (POLICY[b])
    ) u_mon (
      .clk, .rst_n,
      .ip_valid     (ip_valid[b]),
      .ip_req       (ip_req[b]),
      .ip_ready     (ip_ready[b]),
      .ip_rsp_valid (ip_rsp_valid[b]),
      .ip_rsp       (ip_rsp[b]),
      .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
      .xout_valid     (xout_valid[b]),
      .xout_req       (xout_req[b]),
      .xout_ready     (xout_ready[b]),
      .xin_push       (xin_push[b]),
      .xin_req        (xin_req[b]),
      .xin_ready      (xin_ready[b]),
      .xrsp_out_valid (xrsp_out_valid[b]),
      .xrsp_out       (xrsp_out[b]),
      .xrsp_in_valid  (xrsp_in_valid[b]),
      .xrsp_in        (xrsp_in[b])
    );

    tdp_bram #(.WIDTH(DATA_W), .DEPTH(1 << LADDR_W)) u_ram (
      .clk,
      .a_en    (mem_en),
      .a_we    (mem_we),
      .a_addr  (mem_addr),
      .a_wdata (mem_wdata),
      .a_rdata (mem_rdata),
      .b_en    (1'b0),
      .b_we    (1'b0),
      .b_addr  ('0),
      .b_wdata ('0),
      .b_rdata (unused_b_rdata)
    );
  end

  rm_crossbar u_xbar (
    .clk, .rst_n,
    .req_valid  (xout_valid),
    .req        (xout_req),
    .req_ready  (xout_ready),
    .slot_push  (xin_push),
    .slot_req   (xin_req),
    .slot_ready (xin_ready),
    .rsp_valid  (xrsp_out_valid),
    .rsp        (xrsp_out),
    .dlv_valid  (xrsp_in_valid),
    .dlv        (xrsp_in)
  );

endmodule
