// prog_mem -- internal program memory: DEPTH words of WIDTH bits.
//
// Read combinationally by the controller at the program counter, so an
// instruction is fetched and issued in the same cycle. Written one word at
// a time through the CPU interface (we, waddr, wdata on the clock edge).
// Not reset: the host loads the program before starting the controller.
//
// From the document: 256-word internal program memory, 64-bit
// instructions. The same-cycle fetch is this design's choice.
module prog_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata = mem[raddr];
endmodule
