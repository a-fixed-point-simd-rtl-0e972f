// pe_accum -- PE accumulator: 33-bit internal range, overflow detection,
// programmable saturation of the value it shows.
//
// The register keeps 33 bits. An accumulate adds a 33-bit operand; a sum
// that leaves the 33-bit range is clamped to it. The sticky overflow flag
// is set by a load or add whose result leaves the signed 32-bit range, and
// is cleared by clear or by clr_ovf (which leaves the value alone). The
// 32-bit value read by the PE (q) is, by mode:
//   SAT_NONE  the low 32 bits,
//   SAT_S32   clamped to [-2^31, 2^31-1],
//   SAT_U31   clamped to [0, 2^31-1].
// op: 0 hold, 1 load d, 2 add d, 3 clear. Updates on the clock edge; a
// clr_ovf in the same cycle as an overflowing op leaves the flag clear.
//
// From the document: 33-bit internal resolution, overflow detection and
// saturation to 32-bit signed or 31-bit unsigned ranges, and an instruction
// that clears the overflow flag. The clamp of the
// 33-bit register itself and the sticky flag are this design's choices.
module pe_accum
  import pulse_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [1:0]         op,
  input  logic               clr_ovf,
  input  logic signed [32:0] d,
  input  sat_e               mode,
  output logic signed [32:0] acc,
  output logic signed [31:0] q,
  output logic               ovf
);
  localparam logic signed [33:0] MAX33 = 34'sh0_FFFF_FFFF;
  localparam logic signed [33:0] MIN33 = -34'sh1_0000_0000;
  localparam logic signed [32:0] MAX32 = 33'sh0_7FFF_FFFF;
  localparam logic signed [32:0] MIN32 = -33'sh0_8000_0000;

  logic signed [33:0] sum;
  logic signed [32:0] nxt;

  always_comb begin
    sum = 34'(acc) + 34'(d);
    unique case (op)
      2'd1:    nxt = d;
      2'd2:    nxt = (sum > MAX33) ? MAX33[32:0] : (sum < MIN33) ? MIN33[32:0] : sum[32:0];
      2'd3:    nxt = '0;
      default: nxt = acc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      ovf <= 1'b0;
    end else begin
      acc <= nxt;
      if (op == 2'd3 || clr_ovf)             ovf <= 1'b0;
      else if (op inside {2'd1, 2'd2} && (nxt > MAX32 || nxt < MIN32)) ovf <= 1'b1;
    end
  end

  always_comb begin
    unique case (mode)
      SAT_S32: q = (acc > MAX32) ? 32'sh7FFF_FFFF : (acc < MIN32) ? 32'sh8000_0000 : acc[31:0];
      SAT_U31: q = (acc > MAX32) ? 32'sh7FFF_FFFF : (acc < 0) ? 32'sh0 : acc[31:0];
      default: q = acc[31:0];
    endcase
  end
endmodule
