// tb_rm_arbiter: random traffic on the two IP inputs and the crossbar slot of
// an arbiter for kernel block 0. A testbench model of round-robin priority
// (IP0, IP1, crossbar, starting at IP0) and of the one-outstanding-remote rule
// predicts each cycle's readies; the stage-1 register is checked the cycle
// after each grant (fields, source, PID carried from the crossbar, zero write
// data on reads) and is checked to be empty and zero after idle cycles.
module tb_rm_arbiter;
  import sk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    [N_IP-1:0] ip_valid, ip_ready;
  ip_req_t [N_IP-1:0] ip_req;
  logic               xin_valid, xin_ready, remote_done, s1_valid;
  xreq_t              xin_req;
  pipe_req_t          s1_req;

  rm_arbiter #(.MY_BLK(2'd0)) dut (.*);

  int checks = 0, failures = 0;
  int n_rr = 0, n_held = 0, n_remote = 0, n_x = 0;

  // model
  int  last = 2;
  bit  pend = 0;
  int  pend_port = 0;

  function automatic bit is_remote(ip_req_t r);
    return r.addr[ADDR_W-1 -: BLK_W] != 2'd0;
  endfunction

  initial begin
    bit        el [3];
    int        g = -1;
    bit        tk [3] = '{0, 0, 0};  // taken by the arbiter at the last edge
    pipe_req_t e;
    ip_valid = 0; ip_req = '0; xin_valid = 0; xin_req = '0; remote_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // new requests where the old one was taken (or none was held)
      for (int p = 0; p < N_IP; p++) begin
        if (!ip_valid[p] || tk[p]) begin
          ip_valid[p] = $urandom_range(0, 2) != 0;
          ip_req[p]   = ip_req_t'({$urandom(), $urandom()});
          if ($urandom_range(0, 2) != 0) ip_req[p].addr[ADDR_W-1 -: BLK_W] = 2'd0;
        end
      end
      if (!xin_valid || tk[2]) begin
        xin_valid = $urandom_range(0, 2) == 0;
        xin_req   = xreq_t'({$urandom(), $urandom(), $urandom()});
      end
      remote_done = pend && $urandom_range(0, 5) == 0;
      #1;
      // expected grant
      for (int p = 0; p < N_IP; p++)
        el[p] = ip_valid[p] && !(pend && pend_port == p) && !(pend && is_remote(ip_req[p]));
      el[2] = xin_valid;
      g = -1;
      for (int k = 1; k <= 3; k++)
        if (g < 0 && el[(last + k) % 3]) g = (last + k) % 3;
      checks++;
      if (ip_ready !== {g == 1, g == 0} || xin_ready !== (g == 2)) begin
        failures++;
        $display("cycle %0d: ready %b/%b, expected grant %0d", i, ip_ready, xin_ready, g);
      end
      tk[0] = ip_valid[0] && ip_ready[0];
      tk[1] = ip_valid[1] && ip_ready[1];
      tk[2] = xin_valid && xin_ready;
      if (ip_valid == 2'b11 && g >= 0) n_rr++;
      for (int p = 0; p < N_IP; p++) if (ip_valid[p] && !el[p]) n_held++;
      e = '0;
      if (g == 2) begin
        n_x++;
        e.src = SRC_XIN; e.pid_given = 1; e.pid = xin_req.pid; e.action = xin_req.action;
        e.blk = 2'd0; e.laddr = xin_req.laddr; e.data = xin_req.data;
        e.xsrc_blk = xin_req.src_blk; e.xsrc_port = xin_req.src_port;
      end else if (g >= 0) begin
        e.src = src_e'(g); e.mid = ip_req[g].mid; e.action = ip_req[g].action;
        e.blk = ip_req[g].addr[ADDR_W-1 -: BLK_W]; e.laddr = ip_req[g].addr[LADDR_W-1:0];
        e.data = ip_req[g].action == ACT_WRITE ? ip_req[g].data : '0;
      end
      // update model at the clock edge
      if (remote_done) pend = 0;
      if (g >= 0 && g < 2 && is_remote(ip_req[g])) begin pend = 1; pend_port = g; n_remote++; end
      if (g >= 0) last = g;
      @(posedge clk); #1;
      checks++;
      if (s1_valid !== (g >= 0) || s1_req !== e) begin
        failures++;
        $display("cycle %0d: stage 1 mismatch (valid %0b)", i, s1_valid);
      end
    end
    checks++;
    if (n_rr == 0 || n_held == 0 || n_remote == 0 || n_x == 0) begin
      failures++;
      $display("coverage: rr %0d held %0d remote %0d xin %0d", n_rr, n_held, n_remote, n_x);
    end
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
