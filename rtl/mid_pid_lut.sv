// mid_pid_lut: MID -> PID look-up stage of a reference monitor.
//
// The look-up table holds, for every module ID, whether the module is known
// and its privilege ID. The stage takes the request in pipeline stage 1,
// reads the entry of its MID and registers request, PID and a pid_ok flag
// into stage 2. A request that came over the crossbar already carries the PID
// the source monitor looked up; its PID passes through unchanged and counts as
// valid. An unknown MID gives pid_ok = 0 and PID 0, and the FSM denies it.
//
// The table is a parameter: in an FPGA it is fixed with the bitstream and
// costs only LUTs, no Block RAM. One cycle of latency, no stall.
//
// That the monitor holds a LUT giving the PID of each MID follows the design
// description; the table contents, the valid bit and the pass-through for
// crossbar requests are this design's own choices.
module mid_pid_lut
  import sk_pkg::*;
#(
  parameter lut_table_t LUT = default_lut()
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      s1_valid,
  input  pipe_req_t s1_req,
  output logic      s2_valid,
  output pipe_req_t s2_req,
  output logic      s2_pid_ok
);

  lut_entry_t entry;
  assign entry = LUT[s1_req.mid];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid  <= 1'b0;
      s2_req    <= '0;
      s2_pid_ok <= 1'b0;
    end else begin
      s2_valid <= s1_valid;
      if (!s1_valid) begin
        s2_req    <= '0;       // flush: nothing stale on the bus
        s2_pid_ok <= 1'b0;
      end else begin
        s2_req <= s1_req;
        if (s1_req.pid_given) begin
          s2_pid_ok <= 1'b1;
        end else begin
          s2_req.pid <= entry.valid ? entry.pid : '0;
          s2_pid_ok  <= entry.valid;
        end
      end
    end
  end

endmodule
