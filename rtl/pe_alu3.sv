// pe_alu3 -- multi-function 3-operand arithmetic-logic unit of one PE.
//
// Works on three signed 16-bit operands a, b, c and gives up to three
// results in one pass. Besides the usual arithmetic and logic it has the
// non-linear functions that let image filters avoid per-PE branching:
//   LD   r0 = a            ADD  r0 = a+b        SUB r0 = a-b
//   ABS  r0 = |a|          AND/OR/XOR on a, b   ADD3 r0 = a+b+c
//   MAX/MIN/MED  r0 = maximum, minimum, median of a, b, c
//   RANK r0,r1,r2 = max, med, min (three-point rank order)
//   CLIP r0 = a limited to [b, c]
//   COR  r0 = 0 when a lies in [b, c], else a (coring)
// Arithmetic wraps at 16 bits. Combinational.
//
// From the document: single-cycle rank, max, med, min, clip and cor on
// three operands, 3-input 3-output ALU. The exact meaning of "cor" (a
// coring function) and the opcode set are this design's reading.
module pe_alu3
  import pulse_pkg::*;
(
  input  opc_e                   op,
  input  logic signed [15:0]     a,
  input  logic signed [15:0]     b,
  input  logic signed [15:0]     c,
  output logic signed [2:0][15:0] r
);
  logic signed [15:0] mx, mn, md;

  always_comb begin
    mx = (a >= b) ? ((a >= c) ? a : c) : ((b >= c) ? b : c);
    mn = (a <= b) ? ((a <= c) ? a : c) : ((b <= c) ? b : c);
    md = sel3_med(a, b, c);
    r  = '0;
    unique case (op)
      OP_LD:   r[0] = a;
      OP_ADD:  r[0] = a + b;
      OP_SUB:  r[0] = a - b;
      OP_ABS:  r[0] = (a < 0) ? -a : a;
      OP_AND:  r[0] = a & b;
      OP_OR:   r[0] = a | b;
      OP_XOR:  r[0] = a ^ b;
      OP_MAX:  r[0] = mx;
      OP_MIN:  r[0] = mn;
      OP_MED:  r[0] = md;
      OP_CLIP: r[0] = (a < b) ? b : (a > c) ? c : a;
      OP_COR:  r[0] = (a >= b && a <= c) ? 16'sd0 : a;
      OP_RANK: begin r[0] = mx; r[1] = md; r[2] = mn; end
      OP_ADD3: r[0] = a + b + c;
      default: r = '0;
    endcase
  end
endmodule
