// comm_chain -- 16-bit shift-register communication chain (north or south).
//
// One register stage per PE, linked in a line: the chain input port feeds
// stage 0, stage i feeds stage i+1, the last stage drives the output port.
// On shift every stage takes its left neighbour, so data streams through the
// PEs one stage per cycle; cascaded chips continue the chain through their
// ports. Each PE can also write its own stage (ld_en) and always sees it
// (stage). A PE write wins over a shift for that stage in the same cycle.
// Reset clears the stages.
//
// From the document: north and south 16-bit chains, port 1/2 in, port 3/4
// out, a register per PE with a link to the PE. The write-priority rule is
// this design's own.
module comm_chain #(
  parameter int unsigned NPE = 4,
  parameter int unsigned W   = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  shift,
  input  logic [W-1:0]          port_in,
  output logic [W-1:0]          port_out,
  input  logic [NPE-1:0]        ld_en,
  input  logic [NPE-1:0][W-1:0] ld_data,
  output logic [NPE-1:0][W-1:0] stage
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= '0;
    end else begin
      for (int i = 0; i < NPE; i++) begin
        if (ld_en[i])   stage[i] <= ld_data[i];
        else if (shift) stage[i] <= (i == 0) ? port_in : stage[(i == 0) ? 0 : i-1];
      end
    end
  end
  assign port_out = stage[NPE-1];
endmodule
