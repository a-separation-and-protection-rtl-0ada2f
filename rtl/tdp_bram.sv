// tdp_bram: true dual-port on-chip Block RAM.
//
// Two independent ports, A and B, each with enable, write enable, address,
// write data and registered read data, share one array of DEPTH words of
// WIDTH bits. A port reads on the clock edge when it is enabled and not
// writing (the read data stays until its next read); it writes when enabled
// with write enable high. Both ports are synchronous to one clock, as the
// reference monitors and the RAM of a kernel block run on one clock.
// Reading and writing the same word from the two ports in one cycle returns
// the old word on the reading port; two writes to the same word in one cycle
// leave port B's word (the monitor makes neither happen).
//
// That every kernel block uses one on-chip memory block as a true dual-port
// RAM follows the design description; the 1K x 32 size and the read
// behaviour are this design's own choices (one 36 Kb FPGA Block RAM).
module tdp_bram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      else      b_rdata     <= mem[b_addr];
    end
  end

endmodule
