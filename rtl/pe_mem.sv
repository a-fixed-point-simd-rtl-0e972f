// pe_mem -- one PE data memory (memA or memB): 256 words of 16 bits.
//
// Memories hold data with a longer lifetime than the register files and are
// filled directly from the communication chains. Reads are combinational
// at the pipeline read stage (three read addresses so that every source
// operand of an instruction can name the memory). Two write sources exist:
// the pipeline write-back (wb_*) and the one-cycle forward from a chain
// stage (fw_*); if both hit the same word in one cycle, write-back wins.
// The array is not reset: a program or the chain writes what it reads.
//
// From the document: 256 x 16 memories with a direct link to the
// communication channels. The document describes a single-port macro;
// the extra ports here are this design's simplification.
module pe_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 16
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr1,
  input  logic [$clog2(DEPTH)-1:0] raddr2,
  input  logic [$clog2(DEPTH)-1:0] raddr3,
  output logic [W-1:0]             rdata1,
  output logic [W-1:0]             rdata2,
  output logic [W-1:0]             rdata3,
  input  logic                     wb_we,
  input  logic [$clog2(DEPTH)-1:0] wb_addr,
  input  logic [W-1:0]             wb_data,
  input  logic                     fw_we,
  input  logic [$clog2(DEPTH)-1:0] fw_addr,
  input  logic [W-1:0]             fw_data
);
  logic [W-1:0] mem [DEPTH];

  assign rdata1 = mem[raddr1];
  assign rdata2 = mem[raddr2];
  assign rdata3 = mem[raddr3];

  always_ff @(posedge clk) begin
    if (fw_we) mem[fw_addr] <= fw_data;
    if (wb_we) mem[wb_addr] <= wb_data;
  end
endmodule
