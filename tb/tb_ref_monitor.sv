// tb_ref_monitor: one reference monitor (kernel block 0) with its Block RAM;
// the testbench plays the crossbar. Directed phases:
//   A  both IPs write in the same cycle (MID 3 word 0x01F, MID 7 word 0x21A),
//      an unknown MID (F) tries to overwrite both, trusted reads check that
//      the RAM holds the allowed data only; answers three cycles after the
//      request, the losing IP waits one cycle;
//   B  a 16-word write burst and read burst from one IP: one access accepted
//      per cycle, answers on consecutive cycles;
//   C  an access to block 2 is forwarded with its PID; the issuing port is
//      held off and the other port may only make local accesses until the
//      answer returns; a remote access with an unknown MID is denied here;
//   D  requests arriving in the crossbar slot are checked against block 0's
//      permissions and answered on the crossbar answer path.
module tb_ref_monitor;
  import sk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    [N_IP-1:0] ip_valid, ip_ready, ip_rsp_valid;
  ip_req_t [N_IP-1:0] ip_req;
  ip_rsp_t [N_IP-1:0] ip_rsp;
  logic               mem_en, mem_we;
  logic [LADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0]  mem_wdata, mem_rdata, b_rdata;
  logic               xout_valid, xout_ready, xin_push, xin_ready;
  xreq_t              xout_req, xin_req;
  logic               xrsp_out_valid, xrsp_in_valid;
  xrsp_t              xrsp_out, xrsp_in;

  ref_monitor #(.MY_BLK(2'd0)) dut (.*);
  tdp_bram #(.WIDTH(DATA_W), .DEPTH(1 << LADDR_W)) ram (
    .clk, .a_en(mem_en), .a_we(mem_we), .a_addr(mem_addr), .a_wdata(mem_wdata),
    .a_rdata(mem_rdata), .b_en(1'b0), .b_we(1'b0), .b_addr('0), .b_wdata('0),
    .b_rdata(b_rdata));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // answers seen, with the cycle they were seen in
  typedef struct { int t; ip_rsp_t r; } seen_t;
  seen_t got [N_IP][$];
  seen_t xgot [$];
  xrsp_t xgot_r [$];
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < N_IP; p++)
      if (ip_rsp_valid[p]) got[p].push_back('{cyc, ip_rsp[p]});
    if (xrsp_out_valid) begin
      xgot.push_back('{cyc, '{xrsp_out.denied, xrsp_out.rdata}});
      xgot_r.push_back(xrsp_out);
    end
  end

  task automatic check(bit cond, string m);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", m);
    end
  endtask

  function automatic ip_req_t mk(logic [3:0] mid, action_e a, logic [11:0] addr,
                                 logic [31:0] d);
    ip_req_t r;
    r.mid = mid; r.action = a; r.addr = addr; r.data = d;
    return r;
  endfunction

  // present a request on port p at the next negedge, hold until taken;
  // returns the cycle it was presented and the cycle it was taken in
  task automatic send(int p, ip_req_t r, output int t_pres, output int t_acc);
    @(negedge clk);
    ip_valid[p] = 1; ip_req[p] = r;
    t_pres = cyc;
    t_acc  = cyc;
    forever begin
      @(posedge clk);
      if (ip_ready[p]) break;
      t_acc++;
    end
    @(negedge clk);
    ip_valid[p] = 0; ip_req[p] = '0;
  endtask

  task automatic expect_rsp(int p, bit denied, logic [31:0] d, int t_exp, string m);
    int n = 0;
    while (got[p].size() == 0 && n < 40) begin @(posedge clk); n++; end
    check(got[p].size() != 0, {m, ": no answer"});
    if (got[p].size() != 0) begin
      seen_t s = got[p].pop_front();
      check(s.r.denied == denied && s.r.rdata == d,
            $sformatf("%s: got denied %0b data %h", m, s.r.denied, s.r.rdata));
      if (t_exp >= 0)
        check(s.t == t_exp, $sformatf("%s: answer in cycle %0d, expected %0d", m, s.t, t_exp));
    end
  endtask

  // fill the crossbar slot, as the crossbar does: only while it is free
  task automatic xpush(xreq_t r);
    @(negedge clk);
    xin_push = 1; xin_req = r;
    forever begin
      @(posedge clk);
      if (xin_ready) break;
    end
    @(negedge clk);
    xin_push = 0; xin_req = '0;
  endtask

  initial begin
    int tp, ta, tp1, ta1, t0;
    ip_valid = 0; ip_req = '0; xout_ready = 0; xin_push = 0; xin_req = '0;
    xrsp_in_valid = 0; xrsp_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- A: trace-like scenario
    @(negedge clk);
    ip_valid = 2'b11;
    ip_req[0] = mk(4'h3, ACT_WRITE, 12'h01F, 32'hB10C_0001);
    ip_req[1] = mk(4'h7, ACT_WRITE, 12'h21A, 32'hB10C_0002);
    t0 = cyc;
    @(posedge clk);
    check(ip_ready == 2'b01, "IP0 wins first arbitration");
    @(negedge clk);
    ip_valid[0] = 0;
    @(posedge clk);
    check(ip_ready[1], "IP1 granted next cycle");
    @(negedge clk);
    ip_valid = 0; ip_req = '0;
    // answer is seen at the edge 3 cycles after the request (t0 + 4 in cyc)
    expect_rsp(0, 0, '0, t0 + 3, "MID 3 write");
    expect_rsp(1, 0, '0, t0 + 4, "MID 7 write");
    send(0, mk(4'hF, ACT_WRITE, 12'h01F, 32'hBADD_0001), tp, ta);
    expect_rsp(0, 1, '0, ta + 3, "MID F write denied");
    send(1, mk(4'hF, ACT_WRITE, 12'h21A, 32'hBADB_AD02), tp, ta);
    expect_rsp(1, 1, '0, ta + 3, "MID F write denied");
    send(1, mk(4'h3, ACT_WRITE, 12'h21A, 32'hBADB_AD03), tp, ta);
    expect_rsp(1, 1, '0, ta + 3, "MID 3 outside its window denied");
    send(0, mk(4'h7, ACT_READ, 12'h01F, 0), tp, ta);
    expect_rsp(0, 1, '0, ta + 3, "MID 7 read of MID 3's word denied");
    send(0, mk(4'h1, ACT_READ, 12'h01F, 0), tp, ta);
    expect_rsp(0, 0, 32'hB10C_0001, ta + 3, "trusted read 0x01F");
    send(0, mk(4'h1, ACT_READ, 12'h21A, 0), tp, ta);
    expect_rsp(0, 0, 32'hB10C_0002, ta + 3, "trusted read 0x21A");

    // ---- B: bursts
    @(negedge clk);
    ip_valid[0] = 1;
    t0 = cyc;
    for (int i = 0; i < 16; i++) begin
      ip_req[0] = mk(4'h1, ACT_WRITE, 12'h100 + 12'(i), 32'hA000_0000 + i);
      @(posedge clk);
      check(ip_ready[0], "burst write accepted every cycle");
      @(negedge clk);
    end
    for (int i = 0; i < 16; i++) begin
      ip_req[0] = mk(4'h1, ACT_READ, 12'h100 + 12'(i), 0);
      @(posedge clk);
      check(ip_ready[0], "burst read accepted every cycle");
      @(negedge clk);
    end
    ip_valid[0] = 0; ip_req[0] = '0;
    for (int i = 0; i < 16; i++) expect_rsp(0, 0, '0, t0 + 3 + i, "burst write answer");
    for (int i = 0; i < 16; i++)
      expect_rsp(0, 0, 32'hA000_0000 + i, t0 + 19 + i, "burst read answer");

    // ---- C: remote access from IP1 to block 2
    send(1, mk(4'h3, ACT_WRITE, 12'h805, 32'hCAFE_0001), tp, ta);
    while (!xout_valid) @(posedge clk);
    check(xout_req.dst_blk == 2 && xout_req.src_blk == 0 && xout_req.src_port == 1 &&
          xout_req.pid == 2'd1 && xout_req.action == ACT_WRITE &&
          xout_req.laddr == 10'h005 && xout_req.data == 32'hCAFE_0001,
          "forwarded request carries PID and address");
    check(!mem_en, "forwarded request does not touch local RAM");
    @(negedge clk);
    xout_ready = 1;
    @(negedge clk);
    xout_ready = 0;
    check(!xout_valid, "forward slot emptied");
    // IP1 is held, IP0 local goes, IP0 remote held
    ip_valid = 2'b11;
    ip_req[1] = mk(4'h1, ACT_READ, 12'h01F, 0);
    ip_req[0] = mk(4'h1, ACT_READ, 12'h100, 0);
    @(posedge clk);
    check(ip_ready == 2'b01, "IP1 held while its remote access is out");
    @(negedge clk);
    ip_req[0] = mk(4'h1, ACT_READ, 12'hC00, 0);
    repeat (3) begin
      @(posedge clk);
      check(ip_ready == 2'b00, "second remote access and held port wait");
    end
    expect_rsp(0, 0, 32'hA000_0000, -1, "local read while remote out");
    @(negedge clk);
    xrsp_in_valid = 1;
    xrsp_in = '{dst_blk: 2'd0, dst_port: 1'b1, denied: 1'b0, rdata: '0};
    @(posedge clk);
    check(ip_rsp_valid[1], "remote answer handed to IP1");
    @(negedge clk);
    xrsp_in_valid = 0; xrsp_in = '0;
    void'(got[1].pop_front());
    // now both may go again (round robin decides the order)
    begin
      bit taken0 = 0, taken1 = 0;
      while (!(taken0 && taken1)) begin
        @(posedge clk);
        if (ip_valid[0] && ip_ready[0]) taken0 = 1;
        if (ip_valid[1] && ip_ready[1]) taken1 = 1;
        @(negedge clk);
        if (taken0) ip_valid[0] = 0;
        if (taken1) ip_valid[1] = 0;
      end
    end
    while (!xout_valid) @(posedge clk);
    check(xout_req.dst_blk == 3 && xout_req.pid == 2'd3, "IP0 remote access forwarded");
    expect_rsp(1, 0, 32'hB10C_0001, -1, "IP1 read after remote answer");
    xout_ready = 1;
    @(negedge clk);
    xout_ready = 0;
    xrsp_in_valid = 1;
    xrsp_in = '{dst_blk: 2'd0, dst_port: 1'b0, denied: 1'b1, rdata: '0};
    @(negedge clk);
    xrsp_in_valid = 0; xrsp_in = '0;
    expect_rsp(0, 1, '0, -1, "remote denial handed to IP0");
    // unknown MID to a remote block: denied at source, nothing forwarded
    send(0, mk(4'hF, ACT_READ, 12'h405, 0), tp, ta);
    expect_rsp(0, 1, '0, ta + 3, "unknown MID remote access denied here");
    check(!xout_valid, "nothing forwarded for unknown MID");
    send(0, mk(4'h3, ACT_READ, 12'h01F, 0), tp, ta);
    expect_rsp(0, 0, 32'hB10C_0001, ta + 3, "port free again after source denial");

    // ---- D: requests arriving over the crossbar
    check(xin_ready, "slot free");
    xpush('{dst_blk: 2'd0, src_blk: 2'd3, src_port: 1'b1, pid: 2'd2,
            action: ACT_WRITE, laddr: 10'h300, data: 32'h0101_BA55});
    xpush('{dst_blk: 2'd0, src_blk: 2'd2, src_port: 1'b0, pid: 2'd1,
            action: ACT_WRITE, laddr: 10'h301, data: 32'hBAD0_0000});
    xpush('{dst_blk: 2'd0, src_blk: 2'd1, src_port: 1'b1, pid: 2'd2,
            action: ACT_READ, laddr: 10'h300, data: '0});
    repeat (8) @(posedge clk);
    check(xgot.size() == 3, "three crossbar answers");
    if (xgot.size() == 3) begin
      check(xgot_r[0].dst_blk == 3 && xgot_r[0].dst_port == 1 && !xgot_r[0].denied,
            "crossbar write granted, routed to monitor 3 port 1");
      check(xgot_r[1].dst_blk == 2 && xgot_r[1].dst_port == 0 && xgot_r[1].denied,
            "crossbar write outside PID 1 window denied");
      check(xgot_r[2].dst_blk == 1 && !xgot_r[2].denied && xgot_r[2].rdata == 32'h0101_BA55,
            "crossbar read returns data");
    end
    check(ram.mem[10'h301] != 32'hBAD0_0000, "denied crossbar write left RAM alone");
    check(got[0].size() == 0 && got[1].size() == 0, "no stray IP answers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
