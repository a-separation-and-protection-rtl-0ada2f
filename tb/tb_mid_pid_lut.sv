// tb_mid_pid_lut: drives random requests into the LUT stage and checks stage 2
// one cycle later: the PID of known MIDs (1 -> 3, 3 -> 1, 7 -> 2), pid_ok = 0
// and PID 0 for unknown MIDs, a PID that came over the crossbar passed through
// unchanged, the rest of the request copied, and an all-zero stage 2 when no
// request is present.
module tb_mid_pid_lut;
  import sk_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      s1_valid, s2_valid, s2_pid_ok;
  pipe_req_t s1_req, s2_req;

  mid_pid_lut dut (.*);

  int checks = 0, failures = 0;
  int n_known = 0, n_unknown = 0, n_given = 0;

  function automatic pipe_req_t expected(pipe_req_t r, output bit ok);
    pipe_req_t e = r;
    if (r.pid_given) begin
      ok = 1;
    end else begin
      case (r.mid)
        4'h1: begin e.pid = 2'd3; ok = 1; end
        4'h3: begin e.pid = 2'd1; ok = 1; end
        4'h7: begin e.pid = 2'd2; ok = 1; end
        default: begin e.pid = 2'd0; ok = 0; end
      endcase
    end
    return e;
  endfunction

  initial begin
    pipe_req_t r, e;
    bit v, ok;
    s1_valid = 0; s1_req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      v = $urandom_range(0, 4) != 0;
      r = pipe_req_t'({$urandom(), $urandom(), $urandom()});
      r.src = src_e'($urandom_range(0, 2));
      r.pid_given = r.src == SRC_XIN;
      s1_valid = v;
      s1_req   = r;
      @(negedge clk);
      checks++;
      if (v) begin
        e = expected(r, ok);
        if (r.pid_given) n_given++; else if (ok) n_known++; else n_unknown++;
        if (!s2_valid || s2_req !== e || s2_pid_ok !== ok) begin
          failures++;
          $display("mid %h given %0b: got pid %0d ok %0b, expected pid %0d ok %0b",
                   r.mid, r.pid_given, s2_req.pid, s2_pid_ok, e.pid, ok);
        end
      end else if (s2_valid || s2_req !== '0 || s2_pid_ok) begin
        failures++;
        $display("idle stage 2 not flushed");
      end
    end
    checks++;
    if (n_known == 0 || n_unknown == 0 || n_given == 0) failures++;
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
