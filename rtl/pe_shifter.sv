// pe_shifter -- 32-bit barrel shifter of one PE.
//
// Shifts a 32-bit input by 0..31 places in one pass: op 0 logical left,
// 1 logical right, 2 arithmetic right, 3 rotate left. Combinational.
//
// From the document: a full 32-bit in / 32-bit out barrel shifter with
// logical and arithmetic shifts. The op encoding and the inclusion of a
// rotate ("shift/rotate" in the feature list) follow the document; the
// 2-bit op code is this design's own.
module pe_shifter (
  input  logic [31:0] a,
  input  logic [4:0]  amt,
  input  logic [1:0]  op,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      2'd0:    y = a << amt;
      2'd1:    y = a >> amt;
      2'd2:    y = 32'($signed(a) >>> amt);
      default: y = (a << amt) | (a >> (6'd32 - {1'b0, amt}));
    endcase
  end
endmodule
