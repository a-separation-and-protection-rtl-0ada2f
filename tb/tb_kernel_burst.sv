// tb_kernel_burst: burst workload on the full kernel at its default sizes.
// The protection is meant to leave the memory usable for burst reads and
// writes; this test measures that.
//   Phase 1: in all four kernel blocks at once, IP 0 (trusted MID 1) writes a
//            burst of 256 words to its own block and then reads them back.
//            Every access must be accepted in the cycle it is presented, the
//            answers must come on consecutive cycles, the first one three
//            cycles after the first request, and the data must match.
//   Phase 2: both IPs of every block burst at once (MID 3 into the lower half,
//            MID 7 into the upper half). The monitor still completes one
//            access per cycle in total, so the two ports share it: the test
//            checks 512 accesses per block finish in 512 + 3 cycles plus at
//            most one cycle of arbitration start-up.
//   Phase 3: MID 7 tries a burst of writes into MID 3's half: all denied,
//            and a trusted read-back shows the words unchanged.
module tb_kernel_burst;
  import sk_pkg::*;

  localparam int BURST    = 256;
  localparam int WATCHDOG = 50000;

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

  // answers per port with the cycle they were seen in
  int          rsp_t [N_BLK][N_IP][$];
  ip_rsp_t     rsp_r [N_BLK][N_IP][$];
  int          acc_n [N_BLK][N_IP];
  always @(posedge clk) if (rst_n)
    for (int b = 0; b < N_BLK; b++)
      for (int p = 0; p < N_IP; p++) begin
        if (ip_rsp_valid[b][p]) begin
          rsp_t[b][p].push_back(cyc);
          rsp_r[b][p].push_back(ip_rsp[b][p]);
        end
        if (ip_valid[b][p] && ip_ready[b][p]) acc_n[b][p]++;
      end

  function automatic logic [31:0] pattern(int b, int p, int i);
    return {8'(b), 8'(p), 16'(i)} ^ 32'h5A5A_0000;
  endfunction

  task automatic check(bit cond, string m);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", m);
    end
  endtask

  task automatic clear_logs();
    for (int b = 0; b < N_BLK; b++)
      for (int p = 0; p < N_IP; p++) begin
        rsp_t[b][p].delete();
        rsp_r[b][p].delete();
        acc_n[b][p] = 0;
      end
  endtask

  // drive a burst on the given ports; req_of gives each request
  // mode 0: IP0 writes, 1: IP0 reads, 2: both write, 3: both read, 4: MID 7 attack
  function automatic ip_req_t req_of(int mode, int b, int p, int i);
    ip_req_t r;
    r = '0;
    case (mode)
      0: r = '{mid: 4'h1, action: ACT_WRITE, addr: {2'(b), 10'(i)}, data: pattern(b, 0, i)};
      1: r = '{mid: 4'h1, action: ACT_READ,  addr: {2'(b), 10'(i)}, data: '0};
      2: r = '{mid: p ? 4'h7 : 4'h3, action: ACT_WRITE,
               addr: {2'(b), 1'(p), 9'(i)}, data: pattern(b, p, i)};
      3: r = '{mid: p ? 4'h7 : 4'h3, action: ACT_READ, addr: {2'(b), 1'(p), 9'(i)}, data: '0};
      4: r = '{mid: 4'h7, action: ACT_WRITE, addr: {2'(b), 1'b0, 9'(i)}, data: 32'hBAD0_0000};
      default: r = '0;
    endcase
    return r;
  endfunction

  // run one burst of n accesses per active port; returns the cycle the
  // first request was presented
  task automatic burst(int mode, bit [N_IP-1:0] ports, int n, output int t0);
    int sent [N_BLK][N_IP];
    bit busy;
    for (int b = 0; b < N_BLK; b++)
      for (int p = 0; p < N_IP; p++) sent[b][p] = 0;
    @(negedge clk);
    t0 = cyc;
    do begin
      busy = 0;
      for (int b = 0; b < N_BLK; b++)
        for (int p = 0; p < N_IP; p++)
          if (ports[p] && sent[b][p] < n) begin
            ip_valid[b][p] = 1'b1;
            ip_req[b][p]   = req_of(mode, b, p, sent[b][p]);
            busy = 1;
          end else begin
            ip_valid[b][p] = 1'b0;
            ip_req[b][p]   = '0;
          end
      if (busy) begin
        @(posedge clk);
        for (int b = 0; b < N_BLK; b++)
          for (int p = 0; p < N_IP; p++)
            if (ip_valid[b][p] && ip_ready[b][p]) sent[b][p]++;
        @(negedge clk);
      end
    end while (busy);
    repeat (6) @(posedge clk);
  endtask

  initial begin
    int t0, last;
    ip_valid = '0;
    ip_req   = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // ---- phase 1: single-port bursts, all blocks in parallel
    for (int mode = 0; mode < 2; mode++) begin
      clear_logs();
      burst(mode, 2'b01, BURST, t0);
      for (int b = 0; b < N_BLK; b++) begin
        check(rsp_t[b][0].size() == BURST, $sformatf("block %0d: %0d answers", b, rsp_t[b][0].size()));
        if (rsp_t[b][0].size() == BURST) begin
          check(rsp_t[b][0][0] == t0 + 3, $sformatf("block %0d: first answer after %0d cycles",
                                                 b, rsp_t[b][0][0] - t0));
          check(rsp_t[b][0][BURST-1] == t0 + 3 + BURST - 1,
                $sformatf("block %0d: burst took %0d cycles", b, rsp_t[b][0][BURST-1] - t0 + 1));
          for (int i = 0; i < BURST; i++)
            check(!rsp_r[b][0][i].denied &&
                  rsp_r[b][0][i].rdata == (mode ? pattern(b, 0, i) : '0),
                  $sformatf("block %0d word %0d", b, i));
        end
      end
    end
    $display("phase 1: %0d-word bursts in 4 blocks, one access per cycle per block, 3-cycle latency",
             BURST);

    // ---- phase 2: both ports of every block, separate windows
    for (int mode = 2; mode < 4; mode++) begin
      clear_logs();
      burst(mode, 2'b11, BURST, t0);
      for (int b = 0; b < N_BLK; b++) begin
        last = 0;
        for (int p = 0; p < N_IP; p++) begin
          check(rsp_t[b][p].size() == BURST, $sformatf("block %0d port %0d answers", b, p));
          for (int i = 0; i < rsp_t[b][p].size(); i++) begin
            check(!rsp_r[b][p][i].denied &&
                  rsp_r[b][p][i].rdata == (mode == 3 ? pattern(b, p, i) : '0),
                  $sformatf("block %0d port %0d word %0d", b, p, i));
            if (rsp_t[b][p][i] > last) last = rsp_t[b][p][i];
          end
        end
        check(last - t0 + 1 <= 2 * BURST + 3 + 1,
              $sformatf("block %0d: %0d accesses took %0d cycles", b, 2 * BURST, last - t0 + 1));
      end
    end
    $display("phase 2: two ports per block share one access per cycle");

    // ---- phase 3: burst attack on another core's window
    clear_logs();
    burst(4, 2'b10, 64, t0);
    for (int b = 0; b < N_BLK; b++)
      for (int i = 0; i < rsp_t[b][1].size(); i++)
        check(rsp_r[b][1][i].denied && rsp_r[b][1][i].rdata == '0, "attack write denied");
    clear_logs();
    burst(3, 2'b01, 64, t0);
    for (int b = 0; b < N_BLK; b++) begin
      check(rsp_t[b][0].size() == 64, "read-back answers");
      for (int i = 0; i < rsp_t[b][0].size(); i++)
        check(rsp_r[b][0][i].rdata == pattern(b, 0, i), "words survived the attack");
    end
    $display("phase 3: denied burst left the victim's words intact");

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
