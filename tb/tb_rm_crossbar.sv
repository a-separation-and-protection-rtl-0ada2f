// tb_rm_crossbar: four monitors offer random requests to random other blocks
// while the destination slots are randomly free or full. A testbench model of
// per-destination round robin (start after the last winner, first winner
// searched from monitor 1) predicts which requests move; checked are the
// ready to each source, the push and contents of each slot, and that held
// requests wait. Answers from serving monitors, at most one per requesting
// monitor and cycle, must be delivered unchanged to the monitor they name.
module tb_rm_crossbar;
  import sk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [N_BLK-1:0] req_valid, req_ready, slot_push, slot_ready, rsp_valid, dlv_valid;
  xreq_t [N_BLK-1:0] req, slot_req;
  xrsp_t [N_BLK-1:0] rsp, dlv;

  rm_crossbar dut (.*);

  int checks = 0, failures = 0;
  int n_cont = 0, n_blocked = 0, n_moved = 0, n_dlv = 0;
  int last [N_BLK];

  initial begin
    bit moved [N_BLK];
    int w, cnt;
    bit used [N_BLK];
    for (int d = 0; d < N_BLK; d++) last[d] = 0;
    for (int s = 0; s < N_BLK; s++) moved[s] = 0;
    req_valid = 0; req = '0; slot_ready = 0; rsp_valid = 0; rsp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      for (int s = 0; s < N_BLK; s++) begin
        if (!req_valid[s] || moved[s]) begin
          req_valid[s] = $urandom_range(0, 2) != 0;
          req[s] = xreq_t'({$urandom(), $urandom(), $urandom()});
          req[s].dst_blk = 2'((s + $urandom_range(1, N_BLK - 1)) % N_BLK);
          req[s].src_blk = 2'(s);
        end
      end
      slot_ready = 4'($urandom());
      // answers: each requesting monitor gets at most one
      for (int d = 0; d < N_BLK; d++) used[d] = 0;
      for (int s = 0; s < N_BLK; s++) begin
        rsp_valid[s] = 0;
        rsp[s] = xrsp_t'({$urandom(), $urandom()});
        if (!used[rsp[s].dst_blk] && $urandom_range(0, 1)) begin
          rsp_valid[s] = 1;
          used[rsp[s].dst_blk] = 1;
        end
      end
      #1;
      for (int s = 0; s < N_BLK; s++) moved[s] = 0;
      for (int d = 0; d < N_BLK; d++) begin
        w = -1; cnt = 0;
        for (int k = 1; k <= N_BLK; k++) begin
          automatic int s = (last[d] + k) % N_BLK;
          if (req_valid[s] && req[s].dst_blk == d) begin
            cnt++;
            if (w < 0) w = s;
          end
        end
        if (cnt > 1) n_cont++;
        checks++;
        if (w >= 0 && slot_ready[d]) begin
          n_moved++;
          moved[w] = 1;
          last[d] = w;
          if (!slot_push[d] || slot_req[d] !== req[w]) begin
            failures++;
            $display("cycle %0d: slot %0d should take monitor %0d", i, d, w);
          end
        end else begin
          if (w >= 0) n_blocked++;
          if (slot_push[d]) begin
            failures++;
            $display("cycle %0d: slot %0d pushed unexpectedly", i, d);
          end
        end
      end
      for (int s = 0; s < N_BLK; s++) begin
        checks++;
        if (req_ready[s] !== moved[s]) begin
          failures++;
          $display("cycle %0d: ready of monitor %0d wrong", i, s);
        end
      end
      for (int d = 0; d < N_BLK; d++) begin
        checks++;
        if (dlv_valid[d] !== used[d]) begin
          failures++;
          $display("cycle %0d: delivery valid to %0d wrong", i, d);
        end
        for (int s = 0; s < N_BLK; s++)
          if (rsp_valid[s] && rsp[s].dst_blk == d) begin
            n_dlv++;
            if (dlv[d] !== rsp[s]) begin
              failures++;
              $display("cycle %0d: delivery to %0d wrong", i, d);
            end
          end
      end
    end
    checks++;
    if (!n_cont || !n_blocked || !n_moved || !n_dlv) failures++;
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
