// const_mem -- global constants memory: DEPTH words of 16 bits.
//
// Holds coefficients (filter taps, cosine tables) shared by all PEs. The
// controller reads the word at the instruction's immediate address and
// broadcasts it with the instruction, so every PE sees the same constant in
// its read stage. Written through the CPU interface. Not reset.
//
// From the document: 256-word internal constants memory for coefficient
// storage. Broadcasting at the immediate address is this design's choice.
module const_mem #(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [15:0]              wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [15:0]              rdata
);
  logic [15:0] mem [DEPTH];
  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata = mem[raddr];
endmodule
