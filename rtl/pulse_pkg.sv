// pulse_pkg -- shared types, constants and the instruction word format of the
// PULSE SIMD array processor.
//
// The processor is a 16-bit fixed-point SIMD machine: one controller broadcasts
// a 64-bit instruction to four processing elements (PEs). The architecture
// (PE resources, chains, memories, 4-stage pipeline, program/constant memory
// sizes, 64-bit instruction width) follows the published description. The
// binary encoding below is this design's own: only the assembler mnemonics
// of the original are known, so the fields were laid out here to carry them.
//
// Instruction word (64 bits), PE/ALU format:
//   [63:58] opc    operation (opc_e)
//   [57:51] dst    destination operand code
//   [50:44] s1     source 1 operand code
//   [43:37] s2     source 2 operand code
//   [36:30] s3     source 3 operand code (ALU third operand, MADD addend)
//   [29:27] fwd    parallel forward: [2] enable, [1] 0=north/1=south stage,
//                  [0] 0=memA via mcaw / 1=memB via mcbw
//   [26]    nsr    parallel: shift the north chain
//   [25]    ssr    parallel: shift the south chain
//   [24]    io_rd  parallel: external read at counter mccr (address port 0)
//   [23]    io_wr  parallel: external write at counter mccw (address port 1)
//   [22:19] mstep  signed post-step of the memory modulo counters (*mcar(n))
//   [18:16] aux    condition code (IF), control register select (LDCR)
//   [15:0]  imm    immediate, direct address, branch target, loop count
// Modulo counter load formats:
//   LDIAMC: [57:56] counter (0 mcar,1 mcaw,2 mcbr,3 mcbw), [55:48] start,
//           [47:40] min, [39:32] max, [31:24] default stride
//   LDEAMC: [17:16] field (0 min,1 max,2 stride,3 start),
//           value for mccr = [57:34], value for mccw = {[33:26], imm}
package pulse_pkg;

  localparam int unsigned DW   = 16;   // data word
  localparam int unsigned AW   = 32;   // accumulator visible width
  localparam int unsigned IW   = 64;   // instruction width
  localparam int unsigned PCW  = 16;   // program counter width
  localparam int unsigned XAW  = 24;   // external address port width
  localparam int unsigned MAW  = 8;    // PE memory address width (256 words)

  typedef enum logic [5:0] {
    OP_NOP    = 6'd0,
    // 3-operand ALU, 16-bit result to dst
    OP_LD     = 6'd1,   // dst = s1
    OP_ADD    = 6'd2,   // dst = s1 + s2
    OP_SUB    = 6'd3,   // dst = s1 - s2
    OP_ABS    = 6'd4,   // dst = |s1|
    OP_AND    = 6'd5,
    OP_OR     = 6'd6,
    OP_XOR    = 6'd7,
    OP_MAX    = 6'd8,   // dst = max(s1,s2,s3)
    OP_MIN    = 6'd9,
    OP_MED    = 6'd10,
    OP_CLIP   = 6'd11,  // dst = s1 limited to [s2,s3]
    OP_COR    = 6'd12,  // dst = 0 if s1 in [s2,s3] else s1 (coring)
    OP_RANK   = 6'd13,  // dst,dst+1,dst+2 = max,med,min (register dst only)
    OP_ADD3   = 6'd14,  // dst = s1 + s2 + s3
    // multiplier-adder / accumulator
    OP_MULT   = 6'd16,  // acc = s1*s2
    OP_MACC   = 6'd17,  // acc = acc + s1*s2
    OP_MADD   = 6'd18,  // acc = s1*s2 + s3 (32-bit addend, e.g. CHAIN)
    OP_MADDACC= 6'd19,  // acc = acc + s1*s2 + s3
    OP_CLRACC = 6'd20,  // acc = 0, clears the overflow flag
    OP_CLROVF = 6'd21,  // clears the overflow flag only, acc kept
    // barrel shifter on the accumulator, amount = s2[4:0]
    OP_SHL    = 6'd24,
    OP_SHR    = 6'd25,
    OP_SAR    = 6'd26,
    OP_ROL    = 6'd27,
    // controller
    OP_BR     = 6'd32,  // pc = imm
    OP_CALL   = 6'd33,
    OP_RET    = 6'd34,
    OP_PUSH   = 6'd35,  // push loop count imm
    OP_DBR    = 6'd36,  // count>1: count--, pc = imm; else pop
    OP_HALT   = 6'd37,
    OP_LDCR   = 6'd38,  // aux 0: acm = imm[3:0] (1 = PE inactive); aux 1: sat mode = imm[1:0]
    OP_IF     = 6'd39,  // per-PE condition aux on (s1 ? s2); push mask
    OP_ELSE   = 6'd40,
    OP_RESTORE= 6'd41,
    OP_BPA    = 6'd42,  // branch to imm if any PE is enabled
    OP_LDIAMC = 6'd43,
    OP_LDEAMC = 6'd44,
    OP_INT    = 6'd45,  // pulse the interrupt output
    OP_POP    = 6'd46   // drop the innermost loop (leaving it by a branch)
  } opc_e;

  // operand codes (7 bits)
  localparam logic [6:0] OPD_RA     = 7'd0;    // 0..31  regA[n]
  localparam logic [6:0] OPD_RB     = 7'd32;   // 32..63 regB[n]
  localparam logic [6:0] OPD_MEMA   = 7'd64;   // memA[imm]
  localparam logic [6:0] OPD_MEMB   = 7'd65;   // memB[imm]
  localparam logic [6:0] OPD_MEMA_I = 7'd66;   // memA[addra]
  localparam logic [6:0] OPD_MEMB_I = 7'd67;   // memB[addrb]
  localparam logic [6:0] OPD_MEMA_C = 7'd68;   // memA[mcar] (read) / memA[mcaw] (write), post-step
  localparam logic [6:0] OPD_MEMB_C = 7'd69;   // memB[mcbr] / memB[mcbw], post-step
  localparam logic [6:0] OPD_IMM    = 7'd70;
  localparam logic [6:0] OPD_NPORT  = 7'd71;   // this PE's north chain stage
  localparam logic [6:0] OPD_SPORT  = 7'd72;   // this PE's south chain stage
  localparam logic [6:0] OPD_ACCL   = 7'd73;   // saturated accumulator, low half
  localparam logic [6:0] OPD_ACCH   = 7'd74;   // saturated accumulator, high half
  localparam logic [6:0] OPD_ADDRA  = 7'd75;   // memA address register
  localparam logic [6:0] OPD_ADDRB  = 7'd76;   // memB address register
  localparam logic [6:0] OPD_CONST  = 7'd77;   // constant memory word (broadcast)
  localparam logic [6:0] OPD_PEID   = 7'd78;   // index of the PE in the array
  localparam logic [6:0] OPD_CHAIN  = 7'd79;   // accumulate chain input (32-bit, s3)
  localparam logic [6:0] OPD_ACC    = 7'd80;   // own accumulator (32-bit, s3)
  localparam logic [6:0] OPD_ZERO   = 7'd81;

  typedef enum logic [2:0] {
    CC_EQ = 3'd0, CC_NE = 3'd1, CC_LT = 3'd2, CC_LE = 3'd3,
    CC_GT = 3'd4, CC_GE = 3'd5, CC_T = 3'd6,  CC_F = 3'd7
  } cond_e;

  typedef enum logic [1:0] {
    SAT_NONE = 2'd0,   // wrap to 32 bits
    SAT_S32  = 2'd1,   // signed 32-bit range
    SAT_U31  = 2'd2    // unsigned 31-bit range
  } sat_e;

  // operation broadcast from the controller to every PE
  typedef struct packed {
    logic             valid;
    opc_e             opc;
    logic [6:0]       dst, s1, s2, s3;
    logic [2:0]       fwd;
    logic signed [3:0] mstep;
    logic [2:0]       aux;
    logic [15:0]      imm;
    logic [DW-1:0]    cval;      // constant memory word at imm
    logic [3:0]       mc_ld;     // load strobes mcar, mcaw, mcbr, mcbw
    logic [MAW-1:0]   mc_start, mc_min, mc_max, mc_stride;
  } pe_op_t;

  // instruction assembly helpers (used by programs in the testbenches)
  function automatic logic [IW-1:0] enc(opc_e opc, logic [6:0] dst = OPD_ZERO,
      logic [6:0] s1 = OPD_ZERO, logic [6:0] s2 = OPD_ZERO, logic [6:0] s3 = OPD_ZERO,
      logic [15:0] imm = '0, logic [2:0] aux = '0, logic [3:0] mstep = 4'd1,
      logic [2:0] fwd = '0, logic nsr = 1'b0, logic ssr = 1'b0,
      logic io_rd = 1'b0, logic io_wr = 1'b0);
    return {opc, dst, s1, s2, s3, fwd, nsr, ssr, io_rd, io_wr, mstep, aux, imm};
  endfunction

  function automatic logic [IW-1:0] enc_ldiamc(logic [1:0] ctr, logic [7:0] start,
      logic [7:0] mn, logic [7:0] mx, logic [7:0] stride);
    return {OP_LDIAMC, ctr, start, mn, mx, stride, 24'd0};
  endfunction

  function automatic logic [IW-1:0] enc_ldeamc(logic [1:0] field, logic [23:0] v_rd,
      logic [23:0] v_wr);
    return {OP_LDEAMC, v_rd, v_wr[23:16], 7'd0, 1'b0, field, v_wr[15:0]};
  endfunction

  function automatic logic signed [DW-1:0] sel3_med(logic signed [DW-1:0] a,
      logic signed [DW-1:0] b, logic signed [DW-1:0] c);
    if ((a >= b && a <= c) || (a <= b && a >= c)) return a;
    if ((b >= a && b <= c) || (b <= a && b >= c)) return b;
    return c;
  endfunction

endpackage
