// pe_regfile -- one PE register file (regA or regB): 32 words of 16 bits.
//
// Reads are combinational (the pipeline read stage samples them), the write
// happens on the clock edge. Reset clears every word. The RANK operation
// writes up to three consecutive words at once, so the write side accepts
// a count of 1..3 words starting at waddr (wrapping inside the file).
//
// From the document: 2 register files of 32 16-bit words per PE. The
// document gives each file one read and one write port; this model lets
// three source operands read the same file in one instruction and lets
// RANK write three words, which is this design's own simplification.
module pe_regfile #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned W     = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(DEPTH)-1:0] raddr1,
  input  logic [$clog2(DEPTH)-1:0] raddr2,
  input  logic [$clog2(DEPTH)-1:0] raddr3,
  output logic [W-1:0]             rdata1,
  output logic [W-1:0]             rdata2,
  output logic [W-1:0]             rdata3,
  input  logic [1:0]               wcount,   // 0: no write, 1..3 words
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [2:0][W-1:0]        wdata
);
  localparam int unsigned AB = $clog2(DEPTH);
  logic [W-1:0] rf [DEPTH];

  assign rdata1 = rf[raddr1];
  assign rdata2 = rf[raddr2];
  assign rdata3 = rf[raddr3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) rf[i] <= '0;
    end else begin
      for (int k = 0; k < 3; k++)
        if (k < int'(wcount)) rf[AB'(waddr + AB'(k))] <= wdata[k];
    end
  end
endmodule
