// rm_crossbar: crossbar switch between the reference monitors.
//
// Request side: each monitor offers at most one outgoing request (valid/ready)
// naming the kernel block it is for. For every destination the crossbar picks
// one of the monitors asking for it, round robin from the one after the last
// winner, and moves the request into the destination's one-entry input slot
// when that slot is empty. Several destinations are served in the same cycle.
// A monitor can never send to itself (it keeps local requests), so its own
// column is unused.
//
// Response side: a monitor that served a request from another monitor sends
// the answer with the number of the monitor it is for; the crossbar delivers
// it in the same cycle. Each monitor has at most one request outstanding, so
// at most one answer is ever on its way to a given monitor and no arbitration
// is needed.
//
// Timing: a request moves on the clock edge after it is offered if its
// destination slot is free and it wins; answers are combinational.
//
// That the monitors talk through a crossbar switch follows the design
// description; everything inside it is this design's own choice.
module rm_crossbar
  import sk_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // outgoing requests of the monitors
  input  logic  [N_BLK-1:0]      req_valid,
  input  xreq_t [N_BLK-1:0]      req,
  output logic  [N_BLK-1:0]      req_ready,
  // input slots of the monitors
  output logic  [N_BLK-1:0]      slot_push,
  output xreq_t [N_BLK-1:0]      slot_req,
  input  logic  [N_BLK-1:0]      slot_ready,
  // answers sent by the serving monitors
  input  logic  [N_BLK-1:0]      rsp_valid,
  input  xrsp_t [N_BLK-1:0]      rsp,
  // answers delivered to the requesting monitors
  output logic  [N_BLK-1:0]      dlv_valid,
  output xrsp_t [N_BLK-1:0]      dlv
);

  logic [N_BLK-1:0][BLK_W-1:0] last;       // last winner per destination
  logic [N_BLK-1:0][N_BLK-1:0] win;        // win[d][s]

  always_comb begin
    logic [BLK_W-1:0] s;
    logic             found;
    win       = '0;
    req_ready = '0;
    slot_push = '0;
    slot_req  = '0;
    for (int d = 0; d < N_BLK; d++) begin
      found = 1'b0;
      for (int k = 1; k <= N_BLK; k++) begin
        s = BLK_W'((int'(last[d]) + k) % N_BLK);
        if (!found && req_valid[s] && req[s].dst_blk == BLK_W'(d)) begin
          found = 1'b1;
          if (slot_ready[d]) begin
            win[d][s]    = 1'b1;
            req_ready[s] = 1'b1;
            slot_push[d] = 1'b1;
            slot_req[d]  = req[s];
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last <= '0;
    end else begin
      for (int d = 0; d < N_BLK; d++)
        for (int s = 0; s < N_BLK; s++)
          if (win[d][s]) last[d] <= BLK_W'(s);
    end
  end

  always_comb begin
    dlv_valid = '0;
    dlv       = '0;
    for (int s = 0; s < N_BLK; s++) begin
      if (rsp_valid[s]) begin
        dlv_valid[rsp[s].dst_blk] = 1'b1;
        dlv[rsp[s].dst_blk]       = rsp[s];
      end
    end
  end

  // at most one answer per requesting monitor per cycle
  for (genvar d = 0; d < N_BLK; d++) begin : g_chk
    logic [N_BLK-1:0] hits;
    always_comb
      for (int s = 0; s < N_BLK; s++)
        hits[s] = rsp_valid[s] && rsp[s].dst_blk == BLK_W'(d);
    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hits))
      else $error("two answers for monitor %0d in one cycle", d);
  end

endmodule
