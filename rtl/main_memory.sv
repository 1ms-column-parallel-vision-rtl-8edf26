// main_memory: the controller's dual-port main memory, 32 bits x 64k words.
//
// One port belongs to the controller (program fetch, data loads and stores),
// the other to the host DSP network, which downloads the user program and
// collects results through it: the two sides share data by shared memory, with
// no handshake beyond the memory itself.
//
// Both ports are synchronous: the address is sampled on the rising edge and the
// read data appears after that edge (one clock of read latency); a write takes
// effect on the edge and a read of the same address on the same edge returns
// the old word. If both ports write one address on the same edge, port A (the
// controller) wins. The memory is not cleared by reset.
//
// Width, depth and dual porting are the architecture's; the latency, the
// read-during-write behaviour and the write priority are this design's choice.
module main_memory #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 65536,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A: controller
  input  logic [AW-1:0]    a_addr,
  input  logic             a_we,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B: host DSP
  input  logic [AW-1:0]    b_addr,
  input  logic             b_we,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_we && !(a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule
