// tb_tdp_bram: random reads and writes on both ports of the true dual-port
// RAM, compared with a testbench array. Port A and port B use different
// halves of the address space in the random phase, so their order within a
// cycle never matters; a directed phase then has port B read a word in the
// cycle port A writes it (old data expected) and reads it back one cycle later.
module tb_tdp_bram;
  localparam int W = 32, D = 1024, AW = 10;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [W-1:0]  a_wdata, b_wdata, a_rdata, b_rdata;

  tdp_bram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [D];
  bit           known [D];
  logic [W-1:0] exp_a, exp_b;
  bit           chk_a, chk_b;

  task automatic cmp(string port, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("port %s: got %h expected %h", port, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < D; i++) known[i] = 0;
    a_en = 0; a_we = 0; b_en = 0; b_we = 0;
    a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    chk_a = 0; chk_b = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (chk_a) cmp("A", a_rdata, exp_a);
      if (chk_b) cmp("B", b_rdata, exp_b);
      chk_a = 0; chk_b = 0;
      a_en = $urandom_range(0, 3) != 0;
      a_we = $urandom_range(0, 1);
      a_addr = AW'($urandom_range(0, D / 2 - 1));
      a_wdata = $urandom();
      b_en = $urandom_range(0, 3) != 0;
      b_we = $urandom_range(0, 1);
      b_addr = AW'($urandom_range(D / 2, D - 1));
      b_wdata = $urandom();
      if (a_en && !a_we && known[a_addr]) begin chk_a = 1; exp_a = model[a_addr]; end
      if (b_en && !b_we && known[b_addr]) begin chk_b = 1; exp_b = model[b_addr]; end
      if (a_en && a_we) begin model[a_addr] = a_wdata; known[a_addr] = 1; end
      if (b_en && b_we) begin model[b_addr] = b_wdata; known[b_addr] = 1; end
    end
    // read-during-write from the other port
    @(negedge clk);
    a_en = 1; a_we = 1; a_addr = 10'd5; a_wdata = 32'h1111_0000;
    b_en = 0; b_we = 0;
    @(negedge clk);
    a_wdata = 32'h2222_0000;
    b_en = 1; b_addr = 10'd5;
    @(negedge clk);
    cmp("B old", b_rdata, 32'h1111_0000);
    a_en = 0;
    @(negedge clk);
    cmp("B new", b_rdata, 32'h2222_0000);
    // a read result holds while the port is idle
    b_en = 0;
    @(negedge clk);
    @(negedge clk);
    cmp("B hold", b_rdata, 32'h2222_0000);
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
