// tb_trace_scenario: the access scenario of the separation kernel's reference
// simulation, replayed on the full kernel at its default sizes.
//   1. Kernel block 0: IP 0 (MID 3) writes 1111B10C to word 0x01F while IP 1
//      (MID 7) writes 2222B10C to its own window (word 0x21A here; the
//      default policy gives MID 7 the upper half of each RAM). In the same
//      cycles an IP of block 1 (MID 3) writes 0101BA55 to word 0x01E of
//      block 0; the request reaches block 0's monitor over the crossbar with
//      PID 1 attached.
//   2. Both IPs of block 0 then switch to the unknown MID F and try to
//      overwrite the same words with BADD0001 and BADBAD02.
//   3. A trusted core reads the three words back.
// Checked: the answers (granted, then denied), the PID seen by block 0's
// monitor for the passed request, the order in which block 0's RAM is
// written (one write per cycle, the two local writes first), and the final
// contents.
module tb_trace_scenario;
  import sk_pkg::*;

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
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // what block 0's RAM port does, and what its monitor receives
  typedef struct { int t; logic [9:0] a; logic [31:0] d; } wr_t;
  wr_t ram_writes [$];
  int  passed_pid = -1;
  logic [31:0] passed_data;
  logic [9:0]  passed_addr;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_blk[0].mem_en && dut.g_blk[0].mem_we)
      ram_writes.push_back('{cyc, dut.g_blk[0].mem_addr, dut.g_blk[0].mem_wdata});
    if (dut.xin_push[0]) begin
      passed_pid  = int'(dut.xin_req[0].pid);
      passed_data = dut.xin_req[0].data;
      passed_addr = dut.xin_req[0].laddr;
    end
  end

  // answers collected per port
  ip_rsp_t got [N_BLK][N_IP][$];
  always @(posedge clk) if (rst_n)
    for (int b = 0; b < N_BLK; b++)
      for (int p = 0; p < N_IP; p++)
        if (ip_rsp_valid[b][p]) got[b][p].push_back(ip_rsp[b][p]);

  task automatic check(bit cond, string m);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", m);
    end
  endtask

  // present requests on several ports at once, each held until taken
  task automatic send_all(bit [N_BLK*N_IP-1:0] act, ip_req_t r [N_BLK*N_IP]);
    bit [N_BLK*N_IP-1:0] left = act;
    @(negedge clk);
    for (int g = 0; g < N_BLK * N_IP; g++)
      if (act[g]) begin
        ip_valid[g / N_IP][g % N_IP] = 1'b1;
        ip_req[g / N_IP][g % N_IP]   = r[g];
      end
    while (left != 0) begin
      @(posedge clk);
      for (int g = 0; g < N_BLK * N_IP; g++)
        if (left[g] && ip_ready[g / N_IP][g % N_IP]) left[g] = 1'b0;
      @(negedge clk);
      for (int g = 0; g < N_BLK * N_IP; g++)
        if (act[g] && !left[g]) begin
          ip_valid[g / N_IP][g % N_IP] = 1'b0;
          ip_req[g / N_IP][g % N_IP]   = '0;
        end
    end
    repeat (12) @(posedge clk);
  endtask

  function automatic ip_req_t mk(logic [3:0] mid, action_e a, logic [11:0] addr,
                                 logic [31:0] d);
    return '{mid: mid, action: a, addr: addr, data: d};
  endfunction

  initial begin
    ip_req_t r [N_BLK*N_IP];
    ip_rsp_t x;
    ip_valid = '0;
    ip_req   = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // 1. authorized writes, one of them passed from block 1
    r[0] = mk(4'h3, ACT_WRITE, 12'h01F, 32'h1111_B10C);
    r[1] = mk(4'h7, ACT_WRITE, 12'h21A, 32'h2222_B10C);
    r[2] = mk(4'h3, ACT_WRITE, 12'h01E, 32'h0101_BA55);
    send_all(8'b0000_0111, r);
    for (int g = 0; g < 3; g++) begin
      check(got[g / N_IP][g % N_IP].size() == 1, $sformatf("port %0d answered", g));
      if (got[g / N_IP][g % N_IP].size() == 1) begin
        x = got[g / N_IP][g % N_IP].pop_front();
        check(!x.denied, $sformatf("port %0d write granted", g));
      end
    end
    check(passed_pid == 1 && passed_data == 32'h0101_BA55 && passed_addr == 10'h01E,
          $sformatf("passed request: pid %0d data %h addr %h", passed_pid, passed_data, passed_addr));
    check(ram_writes.size() == 3, $sformatf("%0d writes to block 0's RAM", ram_writes.size()));
    if (ram_writes.size() == 3) begin
      check(ram_writes[0].a == 10'h01F && ram_writes[0].d == 32'h1111_B10C, "first write: IP 0");
      check(ram_writes[1].a == 10'h21A && ram_writes[1].d == 32'h2222_B10C, "second write: IP 1");
      check(ram_writes[1].t == ram_writes[0].t + 1, "local writes on consecutive cycles");
      check(ram_writes[2].a == 10'h01E && ram_writes[2].d == 32'h0101_BA55, "third write: passed");
    end

    // 2. unknown MID F tries to overwrite
    ram_writes.delete();
    r[0] = mk(4'hF, ACT_WRITE, 12'h01F, 32'hBADD_0001);
    r[1] = mk(4'hF, ACT_WRITE, 12'h21A, 32'hBADB_AD02);
    send_all(8'b0000_0011, r);
    for (int p = 0; p < 2; p++) begin
      check(got[0][p].size() == 1, "attack answered");
      if (got[0][p].size() == 1) begin
        x = got[0][p].pop_front();
        check(x.denied && x.rdata == '0, "attack denied with zero data");
      end
    end
    check(ram_writes.size() == 0, "RAM not written by the attack");

    // 3. trusted read-back
    r[0] = mk(4'h1, ACT_READ, 12'h01F, '0);
    r[1] = mk(4'h1, ACT_READ, 12'h21A, '0);
    r[2] = mk(4'h1, ACT_READ, 12'h01E, '0);
    send_all(8'b0000_0111, r);
    begin
      logic [31:0] exp [3] = '{32'h1111_B10C, 32'h2222_B10C, 32'h0101_BA55};
      for (int g = 0; g < 3; g++)
        if (got[g / N_IP][g % N_IP].size() == 1) begin
          x = got[g / N_IP][g % N_IP].pop_front();
          check(!x.denied && x.rdata == exp[g],
                $sformatf("read-back %0d: %h", g, x.rdata));
        end else check(0, "read-back answered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
