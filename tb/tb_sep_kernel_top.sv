// tb_sep_kernel_top: end-to-end test of the separation kernel at its default
// sizes (4 kernel blocks of 1K x 32, 8 IP ports, default policy).
//
// Every IP port sends a stream of random accesses: trusted, low-privilege,
// high-privilege and unknown module IDs, reads and writes, to its own kernel
// block and to the other blocks. The expected answer of each access is worked
// out in the testbench from its own copy of the policy (MID 1 everything,
// MID 3 the lower half of each RAM, MID 7 the upper half, others nothing) and
// its own memory model. Each port only uses word addresses whose low three
// bits equal its port number, so the order of accesses between ports never
// changes a result and the model is exact. Words never written are unknown,
// so reads of them check only the denied flag.
//
// Checked: every answer (denied flag, read data), answer order per port, the
// three-cycle latency of accesses to the port's own block, and that each
// mechanism of the kernel happened at least once: local read/write grants,
// denials for unknown MIDs and for out-of-window addresses, forwarding to
// another block, denial at the target block and at the source, arbitration
// between two IPs, a port held off by its outstanding remote access,
// crossbar contention and back-to-back (burst) accesses.
module tb_sep_kernel_top;
  import sk_pkg::*;

  localparam int NREQ      = 400;      // accesses per port
  localparam int NPORT     = N_BLK * N_IP;
  localparam int WATCHDOG  = 200000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    [N_BLK-1:0][N_IP-1:0] ip_valid;
  ip_req_t [N_BLK-1:0][N_IP-1:0] ip_req;
  logic    [N_BLK-1:0][N_IP-1:0] ip_ready;
  logic    [N_BLK-1:0][N_IP-1:0] ip_rsp_valid;
  ip_rsp_t [N_BLK-1:0][N_IP-1:0] ip_rsp;

  sep_kernel_top dut (.*);

  int checks = 0, failures = 0;

  // testbench memory model, one known bit per word
  logic [DATA_W-1:0] model [N_BLK][1 << LADDR_W];
  bit                known [N_BLK][1 << LADDR_W];

  typedef struct {
    bit                denied;
    bit                data_known;
    logic [DATA_W-1:0] rdata;
    bit                remote;
    int                t_acc;
  } exp_t;
  exp_t q [NPORT][$];

  int issued [NPORT];
  int cycle = 0;
  int min_remote = 1000;   // shortest remote answer time seen
  bit port_remote_out [NPORT];

  // mechanism counters
  int n_grant_rd, n_grant_wr, n_deny_mid, n_deny_window, n_forward,
      n_remote_ok, n_remote_deny_tgt, n_remote_deny_src, n_arb_conflict,
      n_held_off, n_xbar_contention, n_burst, n_latency3;

  function automatic bit policy_ok(logic [MID_W-1:0] mid, logic [LADDR_W-1:0] a);
    case (mid)
      4'h1:    return 1'b1;
      4'h3:    return a < 10'd512;
      4'h7:    return a >= 10'd512;
      default: return 1'b0;
    endcase
  endfunction

  function automatic bit mid_known(logic [MID_W-1:0] mid);
    return mid == 4'h1 || mid == 4'h3 || mid == 4'h7;
  endfunction

  function automatic ip_req_t rand_req(int g);
    ip_req_t r;
    int      sel;
    logic [BLK_W-1:0]   blk;
    logic [LADDR_W-1:0] la;
    sel = $urandom_range(0, 9);
    r.mid = sel < 3 ? 4'h1 : sel < 5 ? 4'h3 : sel < 7 ? 4'h7 : sel < 9 ? 4'hF : 4'h0;
    r.action = action_e'($urandom_range(0, 1));
    blk = ($urandom_range(0, 9) < 6) ? BLK_W'(g / N_IP) : BLK_W'($urandom_range(0, N_BLK - 1));
    la  = LADDR_W'($urandom_range(0, (1 << LADDR_W) - 1));
    // keep the bursts on few words so reads often find written data
    if ($urandom_range(0, 3) != 0) la[LADDR_W-2:3] = '0;
    la[2:0] = 3'(g);
    r.addr = {blk, la};
    r.data = r.action == ACT_WRITE ? $urandom() : '0;
    return r;
  endfunction

  // drive and score
  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      for (int b = 0; b < N_BLK; b++) begin
        if (ip_valid[b][0] && ip_valid[b][1] && !(ip_ready[b][0] && ip_ready[b][1]))
          n_arb_conflict++;
        for (int p = 0; p < N_IP; p++) begin
          automatic int g = b * N_IP + p;
          // answers
          if (ip_rsp_valid[b][p]) begin
            if (q[g].size() == 0) begin
              failures++;
              $display("port %0d: answer with nothing outstanding", g);
            end else begin
              automatic exp_t e = q[g].pop_front();
              checks++;
              if (ip_rsp[b][p].denied !== e.denied ||
                  (e.data_known && ip_rsp[b][p].rdata !== e.rdata) ||
                  (e.denied && ip_rsp[b][p].rdata !== '0)) begin
                failures++;
                $display("port %0d: got denied=%0b data=%h, expected denied=%0b data=%h",
                         g, ip_rsp[b][p].denied, ip_rsp[b][p].rdata, e.denied, e.rdata);
              end
              if (!e.remote) begin
                checks++;
                if (cycle - e.t_acc != 3) begin
                  failures++;
                  $display("port %0d: local latency %0d, expected 3", g, cycle - e.t_acc);
                end else n_latency3++;
              end else begin
                port_remote_out[g] = 1'b0;
                if (cycle - e.t_acc < min_remote) min_remote = cycle - e.t_acc;
                if (e.denied) n_remote_deny_tgt++; else n_remote_ok++;
              end
            end
          end
          if (ip_valid[b][p] && !ip_ready[b][p] && port_remote_out[g]) n_held_off++;
          // accepted request
          if (ip_valid[b][p] && ip_ready[b][p]) begin
            automatic ip_req_t r = ip_req[b][p];
            automatic exp_t e;
            automatic logic [BLK_W-1:0] tb_blk = r.addr[ADDR_W-1 -: BLK_W];
            automatic logic [LADDR_W-1:0] la = r.addr[LADDR_W-1:0];
            automatic bit ok = policy_ok(r.mid, la);
            e.remote = tb_blk != BLK_W'(b);
            e.denied = !ok;
            e.t_acc  = cycle;
            e.rdata  = '0;
            e.data_known = 1'b1;
            if (ok && r.action == ACT_WRITE) begin
              model[tb_blk][la] = r.data;
              known[tb_blk][la] = 1'b1;
            end else if (ok) begin
              e.data_known = known[tb_blk][la];
              e.rdata      = model[tb_blk][la];
            end
            if (e.remote && !mid_known(r.mid)) begin
              e.remote = 1'b0;          // denied at the source, local timing
              n_remote_deny_src++;
            end else if (e.remote) begin
              n_forward++;
              port_remote_out[g] = 1'b1;
            end else if (!mid_known(r.mid)) n_deny_mid++;
            else if (!ok) n_deny_window++;
            else if (r.action == ACT_WRITE) n_grant_wr++;
            else n_grant_rd++;
            q[g].push_back(e);
            issued[g]++;
          end
          // next request: keep, new one, or idle
          if (!ip_valid[b][p] || ip_ready[b][p]) begin
            if (issued[g] < NREQ && $urandom_range(0, 3) != 0) begin
              ip_valid[b][p] <= 1'b1;
              ip_req[b][p]   <= rand_req(g);
              if (ip_valid[b][p]) n_burst++;
            end else begin
              ip_valid[b][p] <= 1'b0;
              ip_req[b][p]   <= '0;
            end
          end
        end
      end
      // crossbar contention: two monitors sending to one block in a cycle
      for (int d = 0; d < N_BLK; d++) begin
        automatic int n = 0;
        for (int s = 0; s < N_BLK; s++)
          if (dut.xout_valid[s] && dut.xout_req[s].dst_blk == BLK_W'(d)) n++;
        if (n > 1) n_xbar_contention++;
      end
    end
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else
      $display("  %-34s %0d", what, n);
  endtask

  initial begin
    bit done;
    ip_valid = '0;
    ip_req   = '0;
    for (int b = 0; b < N_BLK; b++)
      for (int a = 0; a < (1 << LADDR_W); a++) known[b][a] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    do begin
      @(posedge clk);
      done = 1'b1;
      for (int g = 0; g < NPORT; g++)
        if (issued[g] < NREQ || q[g].size() != 0) done = 1'b0;
    end while (!done);
    repeat (5) @(posedge clk);
    if (ip_rsp_valid != '0) begin
      failures++;
      $display("answer after all accesses were answered");
    end
    checks++;
    $display("mechanisms:");
    need("local read granted",        n_grant_rd);
    need("local write granted",       n_grant_wr);
    need("denied: unknown MID",       n_deny_mid);
    need("denied: outside PID window", n_deny_window);
    need("forwarded to other block",  n_forward);
    need("remote access granted",     n_remote_ok);
    need("remote denied at target",   n_remote_deny_tgt);
    need("remote denied at source",   n_remote_deny_src);
    need("two IPs competing",         n_arb_conflict);
    need("port held by remote access", n_held_off);
    need("crossbar contention",       n_xbar_contention);
    need("back-to-back accesses",     n_burst);
    need("3-cycle local answers",     n_latency3);
    checks++;
    if (min_remote != 7) begin
      failures++;
      $display("shortest remote access took %0d cycles, expected 7", min_remote);
    end else $display("  shortest remote access             7 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
