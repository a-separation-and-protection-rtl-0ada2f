// tb_rm_fsm: random stage-2 requests into the decision FSM of kernel block 1
// with the default permissions (PID 0 nothing, PID 1 words 0..511, PID 2 words
// 512..1023, PID 3 all). Checked every cycle: the Block RAM port (enable,
// write enable, address, data; all zero unless granted), the answer one cycle
// later to the right IP port or onto the crossbar answer path (denied flag,
// read data taken from the RAM, zero when denied), forwarding of requests for
// other blocks into the crossbar slot with their PID, and the remote_denied
// pulse for a remote request with an unknown MID.
module tb_rm_fsm;
  import sk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               s2_valid, s2_pid_ok;
  pipe_req_t          s2_req;
  logic               mem_en, mem_we;
  logic [LADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0]  mem_wdata, mem_rdata;
  logic               xout_valid, xout_ready;
  xreq_t              xout_req;
  logic [N_IP-1:0]    rsp_valid;
  ip_rsp_t [N_IP-1:0] rsp;
  logic               xrsp_valid, remote_denied;
  xrsp_t              xrsp;

  rm_fsm #(.MY_BLK(2'd1)) dut (.*);

  int checks = 0, failures = 0;
  int n_rd = 0, n_wr = 0, n_deny = 0, n_fwd = 0, n_xin = 0, n_rdeny = 0;

  task automatic fail(string m);
    failures++;
    $display("%0t: %s", $time, m);
  endtask

  function automatic bit allowed(logic [1:0] pid, logic [LADDR_W-1:0] a);
    case (pid)
      2'd1: return a < 512;
      2'd2: return a >= 512;
      2'd3: return 1;
      default: return 0;
    endcase
  endfunction

  initial begin
    pipe_req_t r;
    bit v, ok, remote, grant, deny, fwd, was_rd, was_resp, was_rdeny;
    src_e was_src;
    logic [1:0] was_xblk;
    logic       was_xport;
    bit         slot_full;
    s2_valid = 0; s2_pid_ok = 0; s2_req = '0; mem_rdata = '0; xout_ready = 0;
    was_resp = 0; was_rd = 0; was_rdeny = 0; deny = 0; was_src = SRC_IP0;
    was_xblk = 0; was_xport = 0; slot_full = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // answer to the previous decision
      mem_rdata = $urandom();
      #1;
      checks++;
      if (was_resp) begin
        if (was_src == SRC_XIN) begin
          if (!xrsp_valid || rsp_valid != 0 || xrsp.dst_blk != was_xblk ||
              xrsp.dst_port != was_xport || xrsp.denied != deny ||
              xrsp.rdata != (was_rd ? mem_rdata : '0))
            fail("crossbar answer wrong");
        end else begin
          if (xrsp_valid || rsp_valid != (2'b01 << was_src) ||
              rsp[was_src].denied != deny ||
              rsp[was_src].rdata != (was_rd ? mem_rdata : '0))
            fail("IP answer wrong");
        end
      end else if (rsp_valid != 0 || xrsp_valid) fail("unexpected answer");
      if (remote_denied != was_rdeny) fail("remote_denied wrong");
      // crossbar slot
      checks++;
      if (xout_valid != slot_full) fail("slot valid wrong");
      xout_ready = $urandom_range(0, 1);
      if (xout_ready) slot_full = 0;
      // new request (no forward while the slot is busy: the arbiter's rule)
      v = $urandom_range(0, 4) != 0;
      r = pipe_req_t'({$urandom(), $urandom(), $urandom()});
      r.src = src_e'($urandom_range(0, 2));
      r.xsrc_port = $urandom_range(0, 1);
      r.pid_given = r.src == SRC_XIN;
      if (r.src == SRC_XIN || $urandom_range(0, 2) != 0) r.blk = 2'd1;
      s2_pid_ok = r.pid_given ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      remote = r.src != SRC_XIN && r.blk != 2'd1;
      if (remote && slot_full) r.blk = 2'd1;
      remote = r.src != SRC_XIN && r.blk != 2'd1;
      s2_valid = v;
      s2_req = r;
      #1;
      fwd   = v && s2_pid_ok && remote;
      ok    = v && s2_pid_ok && !remote && allowed(r.pid, r.laddr);
      grant = ok;
      deny  = v && !fwd && !ok;
      checks++;
      if (mem_en != grant || mem_we != (grant && r.action == ACT_WRITE) ||
          mem_addr != (grant ? r.laddr : '0) ||
          mem_wdata != ((grant && r.action == ACT_WRITE) ? r.data : '0))
        fail($sformatf("RAM port wrong for pid %0d addr %0d ok %0b", r.pid, r.laddr, ok));
      if (grant && r.action == ACT_WRITE) n_wr++;
      if (grant && r.action == ACT_READ) n_rd++;
      if (deny) n_deny++;
      if (fwd) n_fwd++;
      if (v && r.src == SRC_XIN) n_xin++;
      was_resp  = v && !fwd;
      was_rd    = grant && r.action == ACT_READ;
      was_src   = r.src;
      was_xblk  = r.xsrc_blk;
      was_xport = r.xsrc_port;
      was_rdeny = v && remote && !s2_pid_ok;
      if (was_rdeny) n_rdeny++;
      @(posedge clk); #1;
      if (fwd) begin
        slot_full = 1;
        checks++;
        if (!xout_valid || xout_req.dst_blk != r.blk || xout_req.src_blk != 2'd1 ||
            xout_req.src_port != r.src[0] || xout_req.pid != r.pid ||
            xout_req.action != r.action || xout_req.laddr != r.laddr ||
            xout_req.data != r.data)
          fail("forwarded request wrong");
      end
    end
    checks++;
    if (!n_rd || !n_wr || !n_deny || !n_fwd || !n_xin || !n_rdeny) fail("coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
